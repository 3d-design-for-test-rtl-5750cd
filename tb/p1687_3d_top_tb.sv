// p1687_3d_top_tb: end-to-end test of the whole design at its default
// parameters, both systems of the top in turn.
// 3D stack (third architecture): pre-bond test of all three dies through
// their probe pads, mid-bond test of a two-die stack, post-bond test through
// the bottom pads on the JTAG path (three TAPs in a daisy chain, Gateway in
// each die, inter-die TSV test with EXTEST, INTEST on die 1), switch to the
// P1687 path (one TAP drives all nine instruments), and back.
// The instruction setup of the stack is timed on both paths: 18 TCK cycles
// for the three chained IRs, 10 for the bottom IR alone.
// Passive interposer: pre-bond tests of Die 1 and Die 2 through their pads,
// then, mounted, the Type-A self test of Die 1 and the Type-C wrapper access
// of Die 2 through Die 0's two SIBs.
// Each mechanism is counted when it is seen to happen; a mechanism that
// never happened counts as a failure.
module p1687_3d_top_tb;
  import p1687_pkg::*;
  import p1687_tb_pkg::*;
  localparam int ND = 3, NS = 3, W = 8, NT = 4;

  jtag_if js ();   // stack JTAG (same pins on every die's pads)
  jtag_if ji ();   // interposer package JTAG
  logic clk = 0;
  always #5 clk = ~clk;

  // stack side
  logic [ND-1:1] bonded;
  logic [ND-1:0] pad_tdo, lower_present, upper_present, global_path;
  logic [NT-1:0] bot_data_in, top_data_out;
  logic [ND-1:0][NT-1:0] core_from_dn, core_to_up;
  logic [ND-1:0][NS-1:0][W-1:0] inst_status, inst_ctrl;
  logic [ND-1:0][NS-1:0] sib_open;
  logic [ND-1:0][IR_W-1:0] instr;
  int probe = 0;
  // interposer side
  logic die0_m = 0, die1_m = 0, die2_m = 0;
  logic pkg_tdo, d0_pad_tdo;
  logic [3:0] d0_core_in, d0_pin_out;
  logic d1_pad_start = 0, d1_pad_enable = 0, d1_pad_result, d1_start, d1_enable, d1_result;
  wsp_t d2_pad_wsp, d2_wsp;
  logic d2_pad_wso, d2_wso;
  logic [2:0] mounted_seen, wir;
  logic [1:0] i_sib_open;
  logic [IR_W-1:0] i_instr;
  logic [7:0] core_reg;
  int runs;

  int checks = 0, failures = 0;
  typedef enum int {M_PRE_BOND, M_MID_BOND, M_POST_BOND, M_PAD_TO_TSV, M_TDO_FROM_ABOVE,
                    M_JTAG_PATH, M_P1687_PATH, M_PATH_SWITCH, M_TAP_HOLD, M_SIB_OPEN,
                    M_SIB_CLOSE, M_EXTEST_TSV, M_INTEST, M_BYPASS, M_IP_PREBOND,
                    M_TYPE_A_TEST, M_TYPE_C_WIR, M_TYPE_C_WDR, M_NUM} mech_e;
  int seen[M_NUM];

  p1687_3d_top dut (
    .s_bonded(bonded), .s_pad_trst_n({ND{js.trst_n}}), .s_pad_tck({ND{js.tck}}),
    .s_pad_tms({ND{js.tms}}), .s_pad_tdi({ND{js.tdi}}), .s_pad_tdo(pad_tdo),
    .s_bot_data_in(bot_data_in), .s_top_data_out(top_data_out),
    .s_core_from_dn(core_from_dn), .s_core_to_up(core_to_up),
    .s_inst_status(inst_status), .s_inst_ctrl(inst_ctrl), .s_sib_open(sib_open),
    .s_lower_present(lower_present), .s_upper_present(upper_present),
    .s_global_path(global_path), .s_instr(instr),
    .i_die0_mounted(die0_m), .i_die1_mounted(die1_m), .i_die2_mounted(die2_m),
    .i_pkg_trst_n(ji.trst_n), .i_pkg_tck(ji.tck), .i_pkg_tms(ji.tms), .i_pkg_tdi(ji.tdi),
    .i_pkg_tdo(pkg_tdo),
    .i_d0_pad_trst_n(1'b0), .i_d0_pad_tck(1'b0), .i_d0_pad_tms(1'b1), .i_d0_pad_tdi(1'b0),
    .i_d0_pad_tdo(d0_pad_tdo), .i_d0_pin_in(4'h0), .i_d0_core_in(d0_core_in),
    .i_d0_core_out(4'h0), .i_d0_pin_out(d0_pin_out),
    .i_d1_pad_start(d1_pad_start), .i_d1_pad_enable(d1_pad_enable), .i_d1_pad_result(d1_pad_result),
    .i_d1_start(d1_start), .i_d1_enable(d1_enable), .i_d1_result(d1_result),
    .i_d2_pad_wsp(d2_pad_wsp), .i_d2_pad_wso(d2_pad_wso), .i_d2_wsp(d2_wsp), .i_d2_wso(d2_wso),
    .i_mounted_seen(mounted_seen), .i_sib_open(i_sib_open), .i_instr(i_instr)
  );
  assign js.tdo = pad_tdo[probe];
  assign ji.tdo = pkg_tdo;

  die1_bist_model #(.RUN_CYCLES(20)) die1 (.clk, .good(1'b1), .tst_start(d1_start),
                                           .tst_enable(d1_enable), .tst_result(d1_result), .runs);
  wrapper1500_model die2 (.wsp(d2_wsp), .wso(d2_wso), .wir, .core_reg);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic saw(mech_e m, bit ok);
    if (ok) seen[m]++;
  endtask

  function automatic logic [7:0] rev8(logic [7:0] v);
    return {<<{v}};
  endfunction

  // Chain of n dies starting at die `first`: vec[k] of length len each;
  // die first+n-1 occupies the lowest bits.
  function automatic logic [255:0] cat_chain(int n, int len, logic [3:0][63:0] vec);
    logic [255:0] v = '0;
    for (int k = 0; k < n; k++) v |= 256'(vec[k]) << (len * (n - 1 - k));
    return v;
  endfunction

  // Gateway session on dies first..first+n-1 forming one chain of networks.
  task automatic gateway_chain(int first, int n);
    logic [255:0] o, exp_o;
    logic [3:0][63:0] v;
    logic [7:0][31:0] wr[4], st[4];
    int len, t0;
    for (int k = 0; k < n; k++) v[k] = 64'(net_vec(NS, W, 8'h0, 8'h7, '0));
    js.scan_dr(cat_chain(n, NS, v), NS * n, o);
    for (int k = 0; k < n; k++) check(sib_open[first + k] == 3'b111, $sformatf("die %0d open", first + k));
    len = net_len(NS, W, 8'h7);
    for (int k = 0; k < n; k++) begin
      wr[k] = '0; st[k] = '0;
      for (int s = 0; s < NS; s++) begin
        wr[k][s] = 32'($urandom) & 32'hFF;
        inst_status[first + k][s] = W'($urandom);
        st[k][s] = 32'(inst_status[first + k][s]);
      end
      v[k] = 64'(net_vec(NS, W, 8'h7, 8'h7, wr[k]));
    end
    t0 = js.ticks;
    js.scan_dr(cat_chain(n, len, v), len * n, o);
    check(js.ticks - t0 == len * n + 5, "dr scan cycles");
    for (int k = 0; k < n; k++) v[k] = 64'(net_vec(NS, W, 8'h7, 8'h7, st[k]));
    exp_o = cat_chain(n, len, v);
    check(((o ^ exp_o) & ((256'(1) << (len * n)) - 1)) == 0, "status readout");
    for (int k = 0; k < n; k++)
      for (int s = 0; s < NS; s++)
        check(inst_ctrl[first + k][s] == W'(wr[k][s]), $sformatf("ctrl die %0d seg %0d", first + k, s));
    for (int k = 0; k < n; k++) v[k] = 64'(net_vec(NS, W, 8'h7, 8'h0, '0));
    js.scan_dr(cat_chain(n, len, v), len * n, o);
    for (int k = 0; k < n; k++) check(sib_open[first + k] == 3'b000, "closed");
  endtask

  task automatic ir_all(int n, opcode_e op, output logic [255:0] o);
    logic [3:0][63:0] v;
    for (int k = 0; k < n; k++) v[k] = 64'(op);
    js.scan_ir(cat_chain(n, IR_W, v), IR_W * n, o);
  endtask


  task automatic wrck_pulse();
    #5 d2_pad_wsp.wrck = 1; #5 d2_pad_wsp.wrck = 0; #1;
  endtask

  task automatic stack_flow();
    logic [255:0] o;
    logic [3:0][63:0] v;
    int t0;
    inst_status = '0; core_to_up = '0; bot_data_in = '0;
    // pre-bond
    bonded = 2'b00; #20;
    check(lower_present == 3'b000 && upper_present == 3'b000, "pre-bond detection");
    for (int d = 0; d < ND; d++) begin
      probe = d;
      js.reset();
      ir_all(1, OP_GATEWAY, o);
      check(o[3:0] == 4'b0001, "pre-bond ir");
      gateway_chain(d, 1);
      saw(M_PRE_BOND, failures == 0);
    end
    // mid-bond
    bonded = 2'b01; probe = 0; #20;
    check(lower_present == 3'b010 && upper_present == 3'b001, "mid-bond detection");
    saw(M_PAD_TO_TSV, lower_present[1]);
    saw(M_TDO_FROM_ABOVE, upper_present[0]);
    js.reset();
    ir_all(2, OP_GATEWAY, o);
    check(o[7:0] == 8'h11, "mid-bond ir chain");
    gateway_chain(0, 2);
    saw(M_MID_BOND, o[7:0] == 8'h11);
    // post-bond, JTAG path
    bonded = 2'b11; #20;
    check(lower_present == 3'b110 && upper_present == 3'b011, "post-bond detection");
    js.reset();
    ir_all(3, OP_BYPASS, o);
    check(o[11:0] == 12'h111, "post-bond ir chain");
    js.scan_dr(256'b1011000, 7, o);
    check(o[6:3] == 4'b1000, $sformatf("3-bit bypass chain %b", o[6:0]));
    saw(M_BYPASS, o[6:3] == 4'b1000);
    t0 = js.ticks;
    ir_all(3, OP_GATEWAY, o);
    check(js.ticks - t0 == 3 * IR_W + 6, "three-IR configuration: 18 TCK cycles");
    gateway_chain(0, 3);
    saw(M_POST_BOND, global_path == 3'b000);
    saw(M_JTAG_PATH, global_path == 3'b000);
    // inter-die TSV test
    ir_all(3, OP_EXTEST, o);
    v[0] = 64'(rev8({4'hA, 4'h0})); v[1] = 64'(rev8({4'h5, 4'h0})); v[2] = 64'(rev8(8'h00));
    js.scan_dr(cat_chain(3, 8, v), 24, o);
    js.scan_dr(256'h0, 24, o);
    check(o[7:0] == rev8({4'h0, 4'h5}) && o[15:8] == rev8({4'h0, 4'hA}), "tsv test captures");
    saw(M_EXTEST_TSV, o[7:0] == rev8({4'h0, 4'h5}) && o[15:8] == rev8({4'h0, 4'hA}));
    // INTEST on die 1 (others BYPASS): drive die 1 core inputs with 6
    v[0] = 64'(OP_BYPASS); v[1] = 64'(OP_INTEST); v[2] = 64'(OP_BYPASS);
    js.scan_ir(cat_chain(3, 4, v), 12, o);
    core_to_up[1] = 4'h9;
    js.scan_dr(256'({rev8({4'h0, 4'h6}), 1'b0}), 10, o);
    check(core_from_dn[1] == 4'h6, "intest drive");
    check(o[8:1] == rev8({4'h9, 4'hA}) || o[8:1] == rev8({4'h9, 4'h0}), $sformatf("intest capture %h", o[8:1]));
    saw(M_INTEST, core_from_dn[1] == 4'h6);
    // switch to the P1687 path
    v[0] = 64'(OP_PATHSEL); v[1] = 64'(OP_BYPASS); v[2] = 64'(OP_BYPASS);
    js.scan_ir(cat_chain(3, 4, v), 12, o);
    js.scan_dr(256'b100, 3, o);
    check(global_path == 3'b111, "P1687 path active");
    saw(M_PATH_SWITCH, global_path == 3'b111);
    t0 = js.ticks;
    ir_all(1, OP_GATEWAY, o);
    check(js.ticks - t0 == IR_W + 6, "one-IR configuration: 10 TCK cycles");
    check(o[3:0] == 4'b0001 && instr[0] == OP_GATEWAY, "single IR in P1687 path");
    check(instr[1] == OP_BYPASS && instr[2] == OP_BYPASS, "upper TAPs held");
    saw(M_TAP_HOLD, instr[1] == OP_BYPASS && instr[2] == OP_BYPASS);
    gateway_chain(0, 3);
    saw(M_P1687_PATH, global_path == 3'b111);
    ir_all(1, OP_PATHSEL, o);
    js.scan_dr(256'b0, 1, o);
    check(o[0] == 1'b1 && global_path == 3'b000, "back to JTAG path");
    saw(M_PATH_SWITCH, global_path == 3'b000);
    ir_all(3, OP_BYPASS, o);
    check(o[11:0] == 12'h111, "three TAPs again");
  endtask

  task automatic interposer_flow();
    logic [255:0] o;
    logic [2:0] got;
    d2_pad_wsp = '{wrst_n: 1'b1, default: 1'b0};
    #20 check(mounted_seen == 3'b000, "nothing mounted");
    d1_pad_enable = 1; repeat (2) @(posedge clk);
    d1_pad_start = 1; repeat (25) @(posedge clk);
    check(d1_pad_result == 1'b1, "die 1 pad self test");
    saw(M_IP_PREBOND, d1_pad_result);
    d1_pad_start = 0; d1_pad_enable = 0; repeat (2) @(posedge clk);
    d2_pad_wsp.wrst_n = 0; #2 d2_pad_wsp.wrst_n = 1;
    d2_pad_wsp.select_wir = 1;
    d2_pad_wsp.capture_wr = 1; wrck_pulse(); d2_pad_wsp.capture_wr = 0;
    d2_pad_wsp.shift_wr = 1;
    for (int i = 0; i < 3; i++) begin got[i] = d2_pad_wso; d2_pad_wsp.wsi = (i == 0); wrck_pulse(); end
    d2_pad_wsp.shift_wr = 0;
    d2_pad_wsp.update_wr = 1; wrck_pulse(); d2_pad_wsp.update_wr = 0;
    check(got == 3'b001 && wir == 3'b001, "die 2 pad WIR load");
    saw(M_IP_PREBOND, wir == 3'b001);
    die0_m = 1; die1_m = 1; #20;
    check(mounted_seen == 3'b011, "Die 2 not yet mounted");
    die2_m = 1; #20;
    check(mounted_seen == 3'b111, "all mounted");
    ji.reset();
    check(wir == 3'b000, "wrapper reset from Die 0");
    ji.scan_ir(256'(OP_GATEWAY), 4, o);
    ji.scan_dr(256'b11, 2, o);
    check(i_sib_open == 2'b11, "interposer SIBs open");
    saw(M_SIB_OPEN, i_sib_open == 2'b11);
    ji.scan_dr(256'b101101, 6, o);
    ji.scan_dr(256'b0001_1111, 8, o);
    check(o[6:4] == 3'b001 && wir == 3'b001, "WIR through interposer");
    saw(M_TYPE_C_WIR, wir == 3'b001);
    repeat (30) @(posedge clk);
    ji.scan_dr(256'({1'b0, 8'h96, 4'b1101}), 13, o);
    check(o[1] == 1'b1 && core_reg == 8'h96, "result and core write through interposer");
    saw(M_TYPE_A_TEST, o[1]);
    ji.scan_dr(256'({1'b0, 8'h00, 4'b1101}), 13, o);
    check(o[11:4] == ~8'h2D, "core response");
    saw(M_TYPE_C_WDR, o[11:4] == ~8'h2D);
    ji.scan_dr(256'({1'b0, 8'h00, 4'b0000}), 13, o);
    check(i_sib_open == 2'b00 && !d1_enable, "SIBs closed, die 1 disabled");
    saw(M_SIB_CLOSE, i_sib_open == 2'b00);
    check(runs == 2, "two self tests");
  endtask

  initial begin
    #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    stack_flow();
    interposer_flow();
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %s happened %0d times", mech_e'(m), seen[m]);
      check(seen[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
