// p1687_network_tb: a three-segment network with 8-bit TDRs. Against a
// test-bench model of the scan path (which SIBs are open decides the
// length), it checks: the 3-bit path with all SIBs closed; opening SIBs
// one pattern at a time; loading instrument control words through open
// segments; reading instrument status back; and closing everything again.
module p1687_network_tb;
  import p1687_pkg::*;
  localparam int NS = 3, W = 8;

  logic tck = 0, si = 0, so;
  net_ctrl_t ctrl = '{rst_n: 1'b1, sel: 1'b1, default: 1'b0};
  logic [NS-1:0][W-1:0] inst_status, inst_ctrl;
  logic [NS-1:0] sib_open;
  int checks = 0, failures = 0;

  p1687_network #(.NUM_SEG(NS), .TDR_W(W)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic clk(); #4 tck = 1; #5 tck = 0; #1; endtask

  task automatic scan(input logic [63:0] din, input int n, output logic [63:0] dout);
    dout = '0;
    ctrl.capture = 1; clk(); ctrl.capture = 0;
    ctrl.shift = 1;
    for (int i = 0; i < n; i++) begin dout[i] = so; si = din[i]; clk(); end
    ctrl.shift = 0;
    ctrl.update = 1; clk(); ctrl.update = 0;
  endtask

  // Build the scan vector for a path whose SIB k is open when open_now[k]:
  // the stream is ordered from the far end (SIB NS-1, shifted first) to the
  // near end. new_open / tdr_data give the values to leave behind.
  function automatic int path_len(logic [NS-1:0] open_now);
    int n = 0;
    for (int k = 0; k < NS; k++) n += 1 + (open_now[k] ? W : 0);
    return n;
  endfunction

  function automatic logic [63:0] build(logic [NS-1:0] open_now, logic [NS-1:0] new_open,
                                        logic [NS-1:0][W-1:0] tdr_data);
    logic [63:0] v = '0;
    int p = 0;
    for (int k = NS - 1; k >= 0; k--) begin
      v[p] = new_open[k]; p++;
      if (open_now[k]) for (int b = 0; b < W; b++) begin v[p] = tdr_data[k][b]; p++; end
    end
    return v;
  endfunction

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] o;
    logic [NS-1:0] cur, nxt;
    logic [NS-1:0][W-1:0] data;
    #1 ctrl.rst_n = 0; #1 ctrl.rst_n = 1;
    check(sib_open == '0 && inst_ctrl == '0, "reset");
    cur = '0;
    for (int r = 0; r < 12; r++) begin
      inst_status = {NS{W'($urandom)}};
      for (int k = 0; k < NS; k++) inst_status[k] = W'($urandom);
      nxt  = (r == 11) ? '0 : NS'($urandom);
      for (int k = 0; k < NS; k++) data[k] = W'($urandom);
      scan(build(cur, nxt, data), path_len(cur), o);
      // what came out: captured SIB bits and status words, near end first
      check(o == (build(cur, cur, inst_status) & ((64'd1 << path_len(cur)) - 1)) ||
            path_len(cur) == 0, $sformatf("readout r=%0d %h", r, o));
      check(sib_open == nxt, $sformatf("sib_open %b vs %b", sib_open, nxt));
      for (int k = 0; k < NS; k++)
        if (cur[k]) check(inst_ctrl[k] == data[k], $sformatf("inst_ctrl[%0d]", k));
      cur = nxt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
