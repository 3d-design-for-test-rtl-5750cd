// jtag_tap_tb: drives one die TAP through the pins with the jtag_if driver.
// Checks: the IR capture pattern, BYPASS as a one-bit delay, the PATHSEL
// register (write, read back, cleared by reset), the boundary-scan selects
// for EXTEST/INTEST with the TDO multiplexer reading bsr_so, and the Gateway
// instruction: a test-bench 8-bit register clocked by net_ctrl (an
// independent model of a network) must load what was shifted and return
// its captured value on TDO. Cycle counts of each scan are checked against
// the TAP state sequence (IR scan n+6 ticks, DR scan n+5 ticks). Finally
// every one of the 16 opcodes is loaded twice, and a 16-bit DR scan with
// random data must show the right register between TDI and TDO (its length
// and capture value) and the right update; undefined opcodes must behave as
// BYPASS.
module jtag_tap_tb;
  import p1687_pkg::*;

  jtag_if jt ();
  logic bsr_so, bsr_sel, bsr_extest, bsr_intest, net_so, path_global;
  net_ctrl_t net_ctrl;
  tap_state_e state;
  logic [IR_W-1:0] instr;
  int checks = 0, failures = 0;

  jtag_tap dut (
    .tck(jt.tck), .trst_n(jt.trst_n), .tms(jt.tms), .tdi(jt.tdi), .tdo(jt.tdo),
    .bsr_so, .bsr_sel, .bsr_extest, .bsr_intest, .net_so, .net_ctrl, .path_global,
    .state, .instr
  );

  // Model network: 8-bit shift register with capture value 8'hC5.
  logic [7:0] net_sh, net_upd;
  always_ff @(posedge jt.tck)
    if (net_ctrl.sel && net_ctrl.capture)    net_sh <= 8'hC5;
    else if (net_ctrl.sel && net_ctrl.shift) net_sh <= {jt.tdi, net_sh[7:1]};
  always_ff @(negedge jt.tck)
    if (net_ctrl.sel && net_ctrl.update) net_upd <= net_sh;
  assign net_so = net_sh[0];

  // Model BSR: 3-bit register capturing 3'b110.
  logic [2:0] bsr_sh;
  always_ff @(posedge jt.tck)
    if (bsr_sel && net_ctrl.capture)    bsr_sh <= 3'b110;
    else if (bsr_sel && net_ctrl.shift) bsr_sh <= {jt.tdi, bsr_sh[2:1]};
  assign bsr_so = bsr_sh[0];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [255:0] o;
    int t0;
    jt.reset();
    check(instr == OP_BYPASS && !path_global && !net_ctrl.sel, "reset state");
    t0 = jt.ticks;
    jt.scan_ir(256'(OP_BYPASS), 4, o);
    check(o[3:0] == 4'b0001, "IR capture");
    check(jt.ticks - t0 == 4 + 6, "IR scan length");
    t0 = jt.ticks;
    jt.scan_dr(256'h0B5, 9, o);
    check(o[8:1] == 8'hB5 && o[0] == 1'b0, $sformatf("bypass delay %h", o[8:0]));
    check(jt.ticks - t0 == 9 + 5, "DR scan length");
    // PATHSEL
    jt.scan_ir(256'(OP_PATHSEL), 4, o);
    jt.scan_dr(256'h1, 1, o);
    check(path_global == 1'b1, "pathsel set");
    jt.scan_dr(256'h0, 1, o);
    check(o[0] == 1'b1 && path_global == 1'b0, "pathsel readback and clear");
    jt.scan_dr(256'h1, 1, o);
    // EXTEST / INTEST
    jt.scan_ir(256'(OP_EXTEST), 4, o);
    check(bsr_sel && bsr_extest && !bsr_intest, "extest select");
    jt.scan_dr(256'h0, 3, o);
    check(o[2:0] == 3'b110, "bsr on tdo");
    jt.scan_ir(256'(OP_INTEST), 4, o);
    check(bsr_sel && bsr_intest && !bsr_extest, "intest select");
    // Gateway
    jt.scan_ir(256'(OP_GATEWAY), 4, o);
    check(net_ctrl.sel && net_ctrl.rst_n, "gateway select");
    jt.scan_dr(256'h3A, 8, o);
    check(o[7:0] == 8'hC5, $sformatf("network capture %h", o[7:0]));
    check(net_upd == 8'h3A, $sformatf("network update %h", net_upd));
    // reset clears PATHSEL and IR
    check(path_global == 1'b1, "pathsel kept across instructions");
    jt.reset();
    check(path_global == 1'b0 && instr == OP_BYPASS && !net_ctrl.rst_n == 1'b0, $sformatf("reset clears %b %h %b", path_global, instr, net_ctrl.rst_n));
    // every opcode
    for (int pass = 0; pass < 2; pass++)
      for (int op = 0; op < 16; op++) begin
        logic [15:0] d;
        logic ps;
        bit ok;
        jt.scan_ir(256'(op), 4, o);
        check(o[3:0] == 4'b0001 && instr == 4'(op), $sformatf("load opcode %h", op));
        check(bsr_sel == (op == OP_EXTEST || op == OP_INTEST) && bsr_extest == (op == OP_EXTEST)
              && bsr_intest == (op == OP_INTEST) && net_ctrl.sel == (op == OP_GATEWAY),
              $sformatf("selects for opcode %h", op));
        d = 16'($urandom);
        ps = path_global;
        jt.scan_dr(256'(d), 16, o);
        case (op)
          OP_EXTEST, OP_INTEST: ok = o[2:0] == 3'b110 && o[15:3] == d[12:0];
          OP_GATEWAY:           ok = o[7:0] == 8'hC5 && o[15:8] == d[7:0] && net_upd == d[15:8];
          OP_PATHSEL:           ok = o[0] == ps && o[15:1] == d[14:0] && path_global == d[15];
          default:              ok = o[0] == 1'b0 && o[15:1] == d[14:0] && path_global == ps;
        endcase
        check(ok, $sformatf("data register of opcode %h: in %h out %h", op, d, o[15:0]));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
