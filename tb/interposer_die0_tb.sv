// interposer_die0_tb: Die 0 of the interposer test case with behavioural
// models of Die 1 (static-signal self test) and Die 2 (IEEE 1500 wrapper)
// attached directly. Through the interposer JTAG pins (die mounted) it:
// opens both SIBs; starts the Die 1 self test and sets SelectWIR; loads the
// Die 2 WIR while starting the test; writes the Die 2 core register and
// reads Tst Result; reads the Die 2 core response; and checks the scan path
// length at each step (the Gateway path grows as SIBs open and as the
// wrapper register changes). It repeats the first step through the probe
// pads with the die unmounted, and checks EXTEST on Die 0's own cells.
module interposer_die0_tb;
  import p1687_pkg::*;

  jtag_if jt ();
  logic clk = 0;
  always #5 clk = ~clk;
  logic mounted_in = 1, mounted, pad_tdo, ip_tdo;
  logic [3:0] pin_in = 4'h3, core_in, core_out = 4'hC, pin_out;
  logic tst_start, tst_enable, tst_result, wso;
  wsp_t wsp;
  logic [1:0] sib_open;
  logic [IR_W-1:0] instr;
  logic [2:0] wir;
  logic [7:0] core_reg;
  int runs, checks = 0, failures = 0;

  interposer_die0 dut (
    .ip_det_driven(mounted_in), .ip_det_level(1'b1), .mounted,
    .pad_trst_n(mounted_in ? 1'b0 : jt.trst_n), .pad_tck(mounted_in ? 1'b0 : jt.tck),
    .pad_tms(mounted_in ? 1'b1 : jt.tms), .pad_tdi(mounted_in ? 1'b0 : jt.tdi), .pad_tdo,
    .ip_trst_n(mounted_in ? jt.trst_n : 1'b0), .ip_tck(mounted_in ? jt.tck : 1'b0),
    .ip_tms(mounted_in ? jt.tms : 1'b1), .ip_tdi(mounted_in ? jt.tdi : 1'b0), .ip_tdo,
    .pin_in, .core_in, .core_out, .pin_out,
    .tst_start, .tst_enable, .tst_result, .wsp, .wso, .sib_open, .instr
  );
  assign jt.tdo = mounted_in ? ip_tdo : pad_tdo;

  die1_bist_model #(.RUN_CYCLES(20)) die1 (.clk, .good(1'b1), .tst_start, .tst_enable,
                                           .tst_result, .runs);
  wrapper1500_model die2 (.wsp, .wso, .wir, .core_reg);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [255:0] o;
    logic [7:0] d;
    int t0;
    #20 check(mounted, "mounted detected");
    jt.reset();
    jt.scan_ir(256'(OP_GATEWAY), 4, o);
    check(o[3:0] == 4'b0001, "ir capture");
    // path: [0] SIB_right, [1] SIB_top
    jt.scan_dr(256'b11, 2, o);
    check(sib_open == 2'b11, "both SIBs open");
    // path: SIB_r, start, enable, SIB_t, WBY, SelectWIR  (6 bits)
    jt.scan_dr(256'b101101, 6, o);
    check(tst_enable && !tst_start && wsp.select_wir, "enable + SelectWIR");
    // path: SIB_r, start, enable, SIB_t, WIR[0..2], SelectWIR  (8 bits)
    jt.scan_dr(256'b0001_1111, 8, o);
    check(o[6:4] == 3'b001, $sformatf("WIR capture %b", o[6:4]));
    check(wir == 3'b001 && !wsp.select_wir && tst_start, "WIR loaded, test started");
    // path: SIB_r, start, enable, SIB_t, core[0..7], SelectWIR  (13 bits)
    d = 8'h5A;
    repeat (30) @(posedge clk);
    t0 = jt.ticks;
    jt.scan_dr(256'({1'b0, d, 4'b1101}), 13, o);
    check(jt.ticks - t0 == 13 + 5, "13-bit path");
    check(o[1] == 1'b1 && o[2] == 1'b1, $sformatf("Tst Result captured %b", o[2:0]));
    check(core_reg == d, "core register written");
    jt.scan_dr(256'({1'b0, 8'h00, 4'b1101}), 13, o);
    check(o[11:4] == ~{d[6:0], d[7]}, $sformatf("core response %h", o[11:4]));
    check(runs == 1, "one self test");
    // EXTEST on Die 0 cells: chain bit 7 is output cell 3
    jt.scan_ir(256'(OP_EXTEST), 4, o);
    jt.scan_dr(256'h05, 8, o);
    check(o[7:0] == {<<{8'hC3}}, $sformatf("extest capture %h", o[7:0]));
    check(pin_out == 4'hA, "extest drive");
    // probe pads before mounting
    mounted_in = 0; #20;
    check(!mounted, "unmounted");
    jt.reset();
    check(sib_open == 2'b00, "reset closes SIBs");
    jt.scan_ir(256'(OP_GATEWAY), 4, o);
    jt.scan_dr(256'b01, 2, o);
    check(sib_open == 2'b10, "right SIB open through pads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
