// jtag_ir_tb: checks the instruction register on its own. For every one of
// the 16 opcodes it captures (expects 0001 out of the shift stage), shifts
// the opcode in LSB first, updates on the falling edge and checks the
// decoded selects against a reference decode. Also checks that reset
// returns the IR to BYPASS and that the update stage holds outside
// Update-IR.
module jtag_ir_tb;
  import p1687_pkg::*;

  logic tck = 0, rst_n = 1, tdi = 0, capture_ir = 0, shift_ir = 0, update_ir = 0;
  logic ir_so, sel_bypass, sel_extest, sel_intest, sel_gateway, sel_pathsel;
  logic [IR_W-1:0] instr;
  int checks = 0, failures = 0;

  jtag_ir dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic clk();
    #5 tck = 1; #5 tck = 0;
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [IR_W-1:0] got;
    #1 rst_n = 0; #1 rst_n = 1;
    check(instr == OP_BYPASS && sel_bypass, "reset to BYPASS");
    for (int op = 0; op < 16; op++) begin
      capture_ir = 1; clk(); capture_ir = 0;
      shift_ir = 1;
      for (int i = 0; i < IR_W; i++) begin
        got[i] = ir_so;
        tdi = op[i];
        clk();
      end
      shift_ir = 0;
      check(got == 4'b0001, $sformatf("capture pattern %b", got));
      check(instr != IR_W'(op) || op == 15, "update before Update-IR");
      #1 update_ir = 1; #4 tck = 1; #3 check(op == 15 || instr != IR_W'(op), $sformatf("update waits for falling edge op=%0d instr=%0d", op, instr));
      #2 tck = 0; #1 update_ir = 0;
      check(instr == IR_W'(op), $sformatf("instr %h", instr));
      check(sel_extest == (op == 0) && sel_intest == (op == 2) && sel_gateway == (op == 4) &&
            sel_pathsel == (op == 5) &&
            sel_bypass == !(op == 0 || op == 2 || op == 4 || op == 5), $sformatf("decode %0d", op));
      check($onehot({sel_bypass, sel_extest, sel_intest, sel_gateway, sel_pathsel}), "one select");
    end
    rst_n = 0; #1 check(instr == OP_BYPASS, "reset again"); rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
