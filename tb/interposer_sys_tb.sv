// interposer_sys_tb: the passive-interposer system with Die 1 and Die 2
// behavioural models on its die-side ports.
//  * Before mounting, Die 0 is reached through its own probe pads (IR
//    capture, SIBs opened and closed), Die 1's self test is run from its own pads (Tst
//    Start / Tst Enable in, Tst Result out) and Die 2's wrapper is driven
//    from its own pads: a WIR load through the WSP pins, checked on WSO.
//  * With all dies mounted, everything goes through the package JTAG pins
//    and Die 0: both SIBs opened, Die 1 self test started and its result
//    read, Die 2 WIR loaded and core register written and read back.
//  * The detectors must switch each die's test inputs between pads and
//    interposer.
//  * Finally Die 1 is made to fail its self test, and the failing result
//    must come back through the interposer and Die 0's right_die TDR.
module interposer_sys_tb;
  import p1687_pkg::*;

  jtag_if jt ();   // package pins on the interposer
  jtag_if jp ();   // Die 0's own probe pads
  logic clk = 0;
  always #5 clk = ~clk;
  logic die0_m = 0, die1_m = 0, die2_m = 0;
  logic pkg_tdo, d0_pad_tdo;
  logic [3:0] d0_core_in, d0_pin_out;
  logic d1_pad_start = 0, d1_pad_enable = 0, d1_pad_result, d1_start, d1_enable, d1_result;
  wsp_t d2_pad_wsp, d2_wsp;
  logic d2_pad_wso, d2_wso;
  logic [2:0] mounted_seen, wir;
  logic [1:0] sib_open;
  logic [IR_W-1:0] instr;
  logic [7:0] core_reg;
  logic good = 1'b1;
  int runs, checks = 0, failures = 0;

  interposer_sys dut (
    .die0_mounted(die0_m), .die1_mounted(die1_m), .die2_mounted(die2_m),
    .pkg_trst_n(jt.trst_n), .pkg_tck(jt.tck), .pkg_tms(jt.tms), .pkg_tdi(jt.tdi), .pkg_tdo,
    .d0_pad_trst_n(jp.trst_n), .d0_pad_tck(jp.tck), .d0_pad_tms(jp.tms), .d0_pad_tdi(jp.tdi), .d0_pad_tdo,
    .d0_pin_in(4'h0), .d0_core_in, .d0_core_out(4'h0), .d0_pin_out,
    .d1_pad_start, .d1_pad_enable, .d1_pad_result, .d1_start, .d1_enable, .d1_result,
    .d2_pad_wsp, .d2_pad_wso, .d2_wsp, .d2_wso, .mounted_seen, .sib_open, .instr
  );
  assign jt.tdo = pkg_tdo;
  assign jp.tdo = d0_pad_tdo;

  die1_bist_model #(.RUN_CYCLES(20)) die1 (.clk, .good(good), .tst_start(d1_start),
                                           .tst_enable(d1_enable), .tst_result(d1_result), .runs);
  wrapper1500_model die2 (.wsp(d2_wsp), .wso(d2_wso), .wir, .core_reg);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wrck_pulse();
    #5 d2_pad_wsp.wrck = 1; #5 d2_pad_wsp.wrck = 0; #1;
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [255:0] o;
    logic [2:0] got;
    d2_pad_wsp = '{wrst_n: 1'b1, default: 1'b0};
    #20 check(mounted_seen == 3'b000, "nothing mounted");
    // ---- Die 0 pre-bond through its own pads ----
    jp.reset();
    jp.scan_ir(256'(OP_GATEWAY), 4, o);
    check(o[3:0] == 4'b0001 && instr == OP_GATEWAY, "die 0 pad IR scan");
    jp.scan_dr(256'b11, 2, o);
    check(o[1:0] == 2'b00 && sib_open == 2'b11, "die 0 pad SIBs open");
    jp.scan_dr(256'b0, 6, o);
    // read back: SIB_right, result, enable, SIB_top, wrapper bypass, SelectWIR
    check(o[0] && !o[2] && o[3] && !o[5] && sib_open == 2'b00,
          $sformatf("die 0 pad SIBs closed %b", o[5:0]));
    // ---- Die 1 pre-bond through its pads ----
    d1_pad_enable = 1; repeat (2) @(posedge clk);
    d1_pad_start = 1; repeat (25) @(posedge clk);
    check(d1_pad_result == 1'b1, "die 1 pad self test");
    d1_pad_start = 0; d1_pad_enable = 0; repeat (2) @(posedge clk);
    // ---- Die 2 pre-bond through its pads: WIR <= 001 ----
    d2_pad_wsp.wrst_n = 0; #2 d2_pad_wsp.wrst_n = 1;
    d2_pad_wsp.select_wir = 1;
    d2_pad_wsp.capture_wr = 1; wrck_pulse(); d2_pad_wsp.capture_wr = 0;
    d2_pad_wsp.shift_wr = 1;
    for (int i = 0; i < 3; i++) begin got[i] = d2_pad_wso; d2_pad_wsp.wsi = (i == 0); wrck_pulse(); end
    d2_pad_wsp.shift_wr = 0;
    d2_pad_wsp.update_wr = 1; wrck_pulse(); d2_pad_wsp.update_wr = 0;
    check(got == 3'b001 && wir == 3'b001, "die 2 pad WIR load");
    // ---- mount everything ----
    die0_m = 1; die1_m = 1; #20;
    check(mounted_seen == 3'b011, "Die 2 not yet mounted");
    die2_m = 1; #20;
    check(mounted_seen == 3'b111, "all mounted");
    jt.reset();
    check(wir == 3'b000, "wrapper reset by WRSTn from Die 0");
    jt.scan_ir(256'(OP_GATEWAY), 4, o);
    jt.scan_dr(256'b11, 2, o);
    jt.scan_dr(256'b101101, 6, o);        // enable, SelectWIR
    jt.scan_dr(256'b0001_1111, 8, o);     // WIR <= 001, start
    check(o[6:4] == 3'b001 && wir == 3'b001, "WIR through interposer");
    repeat (30) @(posedge clk);
    jt.scan_dr(256'({1'b0, 8'h96, 4'b1101}), 13, o);
    check(o[1] == 1'b1 && core_reg == 8'h96, "result and core write through interposer");
    jt.scan_dr(256'({1'b0, 8'h00, 4'b1101}), 13, o);
    check(o[11:4] == ~8'h2D, $sformatf("core response %h", o[11:4]));
    check(runs == 2, "two self tests");
    check(d0_pad_tdo == pkg_tdo, "Die 0 pad TDO follows the package TDO");
    // ---- a failing Die 1 ----
    good = 1'b0;
    jt.scan_dr(256'({1'b0, 8'h00, 4'b1101}), 13, o);   // start low
    jt.scan_dr(256'({1'b0, 8'h00, 4'b1111}), 13, o);   // start high
    repeat (30) @(posedge clk);
    jt.scan_dr(256'({1'b0, 8'h00, 4'b1101}), 13, o);
    check(o[1] == 1'b0 && o[2] == 1'b1, $sformatf("failing result read %b", o[3:0]));
    check(runs == 3, "three self tests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
