// right_die_tdr_tb: the right_die TDR driving the behavioural Die 1 self
// test. One scan sets Tst Enable and Tst Start; after the test time a second
// scan must capture Tst Result = 1 for a good die and 0 for a bad one, and
// the Enable bit must read back. Checks the start/enable levels at the die
// after each update and that Start only changes at Update-DR.
module right_die_tdr_tb;
  import p1687_pkg::*;

  logic tck = 0, si = 0, so, tst_start, tst_enable, tst_result, good = 1;
  net_ctrl_t ctrl = '{rst_n: 1'b1, sel: 1'b1, default: 1'b0};
  int runs, checks = 0, failures = 0;

  right_die_tdr dut (.*);
  die1_bist_model #(.RUN_CYCLES(12)) die1 (.clk(tck), .good, .tst_start, .tst_enable,
                                           .tst_result, .runs);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic clk(); #4 tck = 1; #5 tck = 0; #1; endtask
  task automatic scan(input logic [1:0] din, output logic [1:0] dout);
    ctrl.capture = 1; clk(); ctrl.capture = 0;
    ctrl.shift = 1;
    for (int i = 0; i < 2; i++) begin dout[i] = so; si = din[i]; clk(); end
    ctrl.shift = 0;
    ctrl.update = 1; clk(); ctrl.update = 0;
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [1:0] o;
    #1 ctrl.rst_n = 0; #1 ctrl.rst_n = 1;
    check(!tst_start && !tst_enable, "reset");
    for (int t = 0; t < 4; t++) begin
      good = (t != 2);
      scan(2'b10, o);                 // enable, start low
      check(tst_enable && !tst_start, "enable set");
      scan(2'b11, o);                 // start
      check(tst_enable && tst_start, "start set");
      repeat (20) clk();
      scan(2'b10, o);                 // drop start, read result
      check(o == {1'b1, good}, $sformatf("result %b good=%b", o, good));
      scan(2'b00, o);                 // disable
      check(!tst_enable && !tst_start, "disabled");
    end
    check(runs == 4, $sformatf("runs %0d", runs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
