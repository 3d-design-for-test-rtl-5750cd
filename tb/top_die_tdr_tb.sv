// top_die_tdr_tb: the Top_die TDR driving the behavioural IEEE 1500 wrapper.
// Sequence per round: set SelectWIR (path = SelectWIR bit + WBY), load the
// WIR with the core-register instruction (path = SelectWIR bit + 3-bit WIR,
// readout must be the WIR capture 001), clear SelectWIR, then write a random
// word into the core register and read back the core response (inverse,
// rotated). Checks the WSP strobes follow the network strobes only while
// the segment is selected, and that the path lengths are as expected.
module top_die_tdr_tb;
  import p1687_pkg::*;

  logic tck = 0, si = 0, so, wrck, wrst_n, shift_wr, capture_wr, update_wr, select_wir, wsi, wso;
  net_ctrl_t ctrl = '{rst_n: 1'b1, sel: 1'b1, default: 1'b0};
  wsp_t wsp;
  logic [2:0] wir;
  logic [7:0] core_reg;
  int checks = 0, failures = 0;

  top_die_tdr dut (.*);
  assign wsp = '{wrck: wrck, wrst_n: wrst_n, shift_wr: shift_wr, capture_wr: capture_wr,
                 update_wr: update_wr, select_wir: select_wir, wsi: wsi};
  wrapper1500_model die2 (.wsp, .wso, .wir, .core_reg);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic clk(); #4 tck = 1; #5 tck = 0; #1; endtask
  task automatic scan(input logic [15:0] din, input int n, output logic [15:0] dout);
    dout = '0;
    ctrl.capture = 1; #1 check(capture_wr == ctrl.sel, "capture_wr"); clk(); ctrl.capture = 0;
    ctrl.shift = 1; #1 check(shift_wr == ctrl.sel, "shift_wr");
    for (int i = 0; i < n; i++) begin dout[i] = so; si = din[i]; clk(); end
    ctrl.shift = 0;
    ctrl.update = 1; #1 check(update_wr == ctrl.sel, "update_wr"); clk(); ctrl.update = 0;
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] o;
    logic [7:0] d;
    #1 ctrl.rst_n = 0; #1 ctrl.rst_n = 1;
    check(!select_wir && wir == 3'b000 && !wrst_n == 1'b0, "reset");
    for (int r = 0; r < 5; r++) begin
      scan(16'b10, 2, o);                  // SelectWIR <= 1 (WBY in path)
      check(select_wir, "select_wir set");
      scan(16'b0_001, 4, o);               // WIR <= 001, SelectWIR <= 0
      check(o[2:0] == 3'b001, $sformatf("wir capture %b", o[2:0]));
      check(wir == 3'b001 && !select_wir, "wir loaded");
      d = 8'($urandom);
      scan({7'd0, 1'b0, d}, 9, o);         // core register <= d
      check(core_reg == d, "core register written");
      scan(16'h0, 9, o);
      check(o[7:0] == ~{d[6:0], d[7]}, $sformatf("core response %h", o[7:0]));
      scan(16'h100, 9, o);                 // back to WIR for the next round
      scan(16'b0_000, 4, o);               // WIR <= bypass
      check(wir == 3'b000, "wir bypass");
    end
    ctrl.sel = 0; #1 check(!shift_wr && !capture_wr && !update_wr, "deselected");
    ctrl.shift = 1; ctrl.capture = 1; ctrl.update = 1;
    #1 check(!shift_wr && !capture_wr && !update_wr, "strobes gated when deselected");
    ctrl.shift = 0; ctrl.capture = 0; ctrl.update = 0;
    check(wrck == tck, "wrck");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
