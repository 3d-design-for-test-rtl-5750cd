// tdr_tb: checks the instrument TDR with directly driven Select/Capture/
// Shift/Update strobes: capture of the status word, LSB-first shift-out,
// shift-in followed by update on the falling TCK edge, no change while the
// register is not selected, and clearing by the network reset. Runs 50
// random words at the default width.
module tdr_tb;
  import p1687_pkg::*;
  localparam int W = 8;

  logic tck = 0, si = 0, so;
  net_ctrl_t ctrl = '{rst_n: 1'b1, default: 1'b0};
  logic [W-1:0] capture_data, update_data;
  int checks = 0, failures = 0;

  tdr #(.W(W)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic clk(); #4 tck = 1; #5 tck = 0; #1; endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W-1:0] din, dout, prev;
    #1 ctrl.rst_n = 0; #1 ctrl.rst_n = 1;
    check(update_data == '0, "reset");
    for (int n = 0; n < 50; n++) begin
      capture_data = W'($urandom);
      din = W'($urandom);
      prev = update_data;
      ctrl.sel = (n % 10) != 9;
      ctrl.capture = 1; clk(); ctrl.capture = 0;
      ctrl.shift = 1;
      for (int i = 0; i < W; i++) begin dout[i] = so; si = din[i]; clk(); end
      ctrl.shift = 0;
      check(update_data == prev, "no update before Update-DR");
      ctrl.update = 1; clk(); ctrl.update = 0;
      if (ctrl.sel) begin
        check(dout == capture_data, $sformatf("capture %h vs %h", dout, capture_data));
        check(update_data == din, $sformatf("update %h vs %h", update_data, din));
      end else begin
        check(update_data == prev, "unselected holds");
      end
    end
    ctrl.rst_n = 0; #1 check(update_data == '0, "reset clears"); ctrl.rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
