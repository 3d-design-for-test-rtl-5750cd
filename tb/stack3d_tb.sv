// stack3d_tb: the three-die stack through every assembly stage.
//  * Pre-bond: nothing bonded; the same JTAG sequence reaches all three dies
//    through their own probe pads (as on three probe stations); each die's
//    Gateway session is checked on its own TDO.
//  * Mid-bond: die 1 bonded on die 0, die 2 still apart: through die 0's
//    pads the IR chain is 8 bits (two TAPs) and die 2's pads still work.
//  * Post-bond, JTAG path: 12-bit IR chain; inter-die TSV test with EXTEST
//    in all dies (die 0 drives its upward TSVs, die 1 captures them, die 1
//    drives, die 2 captures); Gateway in all three dies writes and reads
//    every instrument.
//  * Path switch: PATHSEL=1 in die 0 (upper dies in BYPASS) selects the
//    P1687 path; then the IR chain is 4 bits, upper TAPs are held in reset,
//    and one Gateway instruction in die 0 reaches all nine instruments;
//    PATHSEL=0 restores the JTAG path.
// Expected scan vectors are built from the chain structure (p1687_tb_pkg);
// scan lengths are checked in TCK cycles.
module stack3d_tb;
  import p1687_pkg::*;
  import p1687_tb_pkg::*;
  localparam int ND = 3, NS = 3, W = 8, NT = 4;

  jtag_if jt ();
  logic [ND-1:1] bonded;
  logic [ND-1:0] pad_tdo, lower_present, upper_present, global_path;
  logic [NT-1:0] bot_data_in, top_data_out;
  logic [ND-1:0][NT-1:0] core_from_dn, core_to_up;
  logic [ND-1:0][NS-1:0][W-1:0] inst_status, inst_ctrl;
  logic [ND-1:0][NS-1:0] sib_open;
  logic [ND-1:0][IR_W-1:0] instr;
  int probe = 0;
  int checks = 0, failures = 0;

  stack3d #(.NUM_DIES(ND), .NUM_SEG(NS), .TDR_W(W), .N_TSV(NT)) dut (
    .bonded, .pad_trst_n({ND{jt.trst_n}}), .pad_tck({ND{jt.tck}}), .pad_tms({ND{jt.tms}}),
    .pad_tdi({ND{jt.tdi}}), .pad_tdo, .bot_data_in, .top_data_out, .core_from_dn, .core_to_up,
    .inst_status, .inst_ctrl, .sib_open, .lower_present, .upper_present, .global_path, .instr
  );
  assign jt.tdo = pad_tdo[probe];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
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
    jt.scan_dr(cat_chain(n, NS, v), NS * n, o);
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
    t0 = jt.ticks;
    jt.scan_dr(cat_chain(n, len, v), len * n, o);
    check(jt.ticks - t0 == len * n + 5, "dr scan cycles");
    for (int k = 0; k < n; k++) v[k] = 64'(net_vec(NS, W, 8'h7, 8'h7, st[k]));
    exp_o = cat_chain(n, len, v);
    check(((o ^ exp_o) & ((256'(1) << (len * n)) - 1)) == 0, "status readout");
    for (int k = 0; k < n; k++)
      for (int s = 0; s < NS; s++)
        check(inst_ctrl[first + k][s] == W'(wr[k][s]), $sformatf("ctrl die %0d seg %0d", first + k, s));
    for (int k = 0; k < n; k++) v[k] = 64'(net_vec(NS, W, 8'h7, 8'h0, '0));
    jt.scan_dr(cat_chain(n, len, v), len * n, o);
    for (int k = 0; k < n; k++) check(sib_open[first + k] == 3'b000, "closed");
  endtask

  task automatic ir_all(int n, opcode_e op, output logic [255:0] o);
    logic [3:0][63:0] v;
    for (int k = 0; k < n; k++) v[k] = 64'(op);
    jt.scan_ir(cat_chain(n, IR_W, v), IR_W * n, o);
  endtask

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [255:0] o;
    logic [3:0][63:0] v;
    inst_status = '0; core_to_up = '0; bot_data_in = '0;
    // ---- pre-bond ----
    bonded = 2'b00; #20;
    check(lower_present == 3'b000 && upper_present == 3'b000, "pre-bond detection");
    for (int d = 0; d < ND; d++) begin
      probe = d;
      jt.reset();
      ir_all(1, OP_GATEWAY, o);
      check(o[3:0] == 4'b0001, "pre-bond ir");
      gateway_chain(d, 1);
    end
    // ---- mid-bond: die 1 on die 0 ----
    bonded = 2'b01; probe = 0; #20;
    check(lower_present == 3'b010 && upper_present == 3'b001, "mid-bond detection");
    jt.reset();
    ir_all(2, OP_GATEWAY, o);
    check(o[7:0] == 8'h11, $sformatf("mid-bond ir chain %h", o[7:0]));
    gateway_chain(0, 2);
    probe = 2;
    ir_all(1, OP_BYPASS, o);
    check(o[3:0] == 4'b0001, "die 2 still on its pads");
    // ---- post-bond, JTAG path ----
    bonded = 2'b11; probe = 0; #20;
    check(lower_present == 3'b110 && upper_present == 3'b011, "post-bond detection");
    jt.reset();
    ir_all(3, OP_GATEWAY, o);
    check(o[11:0] == 12'h111, "post-bond ir chain");
    gateway_chain(0, 3);
    // inter-die TSV test: die 0 drives A, die 1 drives 5
    ir_all(3, OP_EXTEST, o);
    core_to_up = {4'h0, 4'h0, 4'h0};
    v[0] = 64'(rev8({4'hA, 4'h0})); v[1] = 64'(rev8({4'h5, 4'h0})); v[2] = 64'(rev8(8'h00));
    jt.scan_dr(cat_chain(3, 8, v), 24, o);
    check(top_data_out == 4'h0 && core_from_dn[1] == 4'hA && core_from_dn[2] == 4'h5, "extest drive");
    jt.scan_dr(256'h0, 24, o);
    check(o[7:0] == rev8({4'h0, 4'h5}) && o[15:8] == rev8({4'h0, 4'hA}),
          $sformatf("tsv test captures %h", o[23:0]));
    ir_all(3, OP_BYPASS, o);
    // ---- switch to the P1687 path ----
    v[0] = 64'(OP_PATHSEL); v[1] = 64'(OP_BYPASS); v[2] = 64'(OP_BYPASS);
    jt.scan_ir(cat_chain(3, 4, v), 12, o);
    jt.scan_dr(256'b100, 3, o);
    check(global_path == 3'b111, "P1687 path active");
    ir_all(1, OP_GATEWAY, o);
    check(o[3:0] == 4'b0001 && instr[0] == OP_GATEWAY, "single IR in P1687 path");
    check(instr[1] == OP_BYPASS && instr[2] == OP_BYPASS, "upper TAPs held");
    gateway_chain(0, 3);
    ir_all(1, OP_PATHSEL, o);
    jt.scan_dr(256'b0, 1, o);
    check(o[0] == 1'b1 && global_path == 3'b000, "back to JTAG path");
    ir_all(3, OP_BYPASS, o);
    check(o[11:0] == 12'h111, "three TAPs again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
