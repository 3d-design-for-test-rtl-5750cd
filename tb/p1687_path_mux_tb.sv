// p1687_path_mux_tb: exhaustive check of the path multiplexer of the third
// architecture against a reference table: which path is active for head and
// non-head dies, where the network control comes from, what goes up as
// TDI, what the die returns as TDO, what the TAP's Gateway input sees and
// when the die's TAP is held in reset.
module p1687_path_mux_tb;
  import p1687_pkg::*;

  logic lower_present, upper_present, path_local, path_dn, global_path;
  net_ctrl_t ctrl_tap, ctrl_dn, ctrl_net;
  logic tap_tdo, net_so, up_tdo, net_return, up_tdi, local_tdo, keep_local_tdo, tap_hold;
  int checks = 0, failures = 0;

  p1687_path_mux dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit head, g;
    for (int i = 0; i < 512; i++) begin
      {lower_present, upper_present, path_local, path_dn} = 4'(i);
      ctrl_tap = 5'($urandom); ctrl_dn = 5'($urandom);
      {tap_tdo, net_so, up_tdo} = 3'($urandom);
      #1;
      head = !lower_present;
      g = head ? path_local : path_dn;
      check(global_path == g, "path");
      check(ctrl_net == ((g && !head) ? ctrl_dn : ctrl_tap), "control source");
      check(up_tdi == (g ? net_so : tap_tdo), "tdi to upper die");
      check(local_tdo == ((g && !head) ? net_so : tap_tdo), "own tdo");
      check(net_return == ((g && head && upper_present) ? up_tdo : net_so), "gateway return");
      check(keep_local_tdo == (g && head) && tap_hold == (g && !head), "hold/keep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
