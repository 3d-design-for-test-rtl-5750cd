// stack_die_tb: one die of the stacked architecture on its own.
//  1. Pre-bond (nothing detected): JTAG through the probe pads; IR capture,
//     Gateway, opening all three SIBs, writing the three instrument control
//     words and reading the status words back; EXTEST capture of the TSV
//     inputs and core outputs and driving of the upward TSVs; INTEST
//     driving of the core inputs.
//  2. A die detected below: the same JTAG traffic now arrives on the TSVs
//     from below while the pads carry nonsense; the die must follow it.
//  3. A die detected above: the die's TDO must come from the die above.
//  4. The path bit from below with a die below: the network must obey the
//     control bundle from below (held idle here) and the TAP must be held.
module stack_die_tb;
  import p1687_pkg::*;
  import p1687_tb_pkg::*;
  localparam int NS = 3, W = 8, NT = 4;

  jtag_if jt ();
  logic via_tsv = 0;
  logic pad_trst_n, pad_tck, pad_tms, pad_tdi, pad_tdo;
  logic dn_det_driven = 0, up_det_driven = 0;
  logic dn_trst_n, dn_tck, dn_tms, dn_tdi, dn_path = 0, dn_tdo, up_tdo = 0;
  net_ctrl_t dn_ctrl = '0, up_ctrl;
  logic [NT-1:0] dn_data, up_data, core_from_dn, core_to_up;
  logic up_trst_n, up_tck, up_tms, up_tdi, up_path;
  logic [NS-1:0][W-1:0] inst_status, inst_ctrl;
  logic [NS-1:0] sib_open;
  logic lower_present, upper_present, global_path;
  logic [IR_W-1:0] instr;
  int checks = 0, failures = 0;

  assign {pad_trst_n, pad_tck, pad_tms, pad_tdi} = via_tsv ? 4'b1010 : {jt.trst_n, jt.tck, jt.tms, jt.tdi};
  assign {dn_trst_n, dn_tck, dn_tms, dn_tdi}     = via_tsv ? {jt.trst_n, jt.tck, jt.tms, jt.tdi} : 4'b0101;
  assign jt.tdo = via_tsv ? dn_tdo : pad_tdo;

  stack_die #(.NUM_SEG(NS), .TDR_W(W), .N_TSV(NT)) dut (
    .pad_trst_n, .pad_tck, .pad_tms, .pad_tdi, .pad_tdo,
    .dn_det_driven, .dn_det_level(1'b1), .up_det_driven, .up_det_level(1'b1),
    .dn_trst_n, .dn_tck, .dn_tms, .dn_tdi, .dn_path, .dn_ctrl, .dn_tdo, .dn_data,
    .up_trst_n, .up_tck, .up_tms, .up_tdi, .up_path, .up_ctrl, .up_tdo, .up_data,
    .core_from_dn, .core_to_up, .inst_status, .inst_ctrl, .sib_open,
    .lower_present, .upper_present, .global_path, .instr
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Gateway session: open all SIBs, write words, read status.
  task automatic gateway_session();
    logic [255:0] o;
    logic [7:0][31:0] wr, st;
    jt.scan_ir(256'(OP_GATEWAY), 4, o);
    check(o[3:0] == 4'b0001, "ir capture");
    jt.scan_dr(net_vec(NS, W, 8'h0, 8'h7, '0), net_len(NS, W, 8'h0), o);
    check(sib_open == 3'b111, "sibs open");
    wr = '0; st = '0;
    for (int k = 0; k < NS; k++) begin
      wr[k] = 32'($urandom) & 32'hFF;
      inst_status[k] = W'($urandom);
      st[k] = 32'(inst_status[k]);
    end
    jt.scan_dr(net_vec(NS, W, 8'h7, 8'h7, wr), net_len(NS, W, 8'h7), o);
    for (int k = 0; k < NS; k++) begin
      check(inst_ctrl[k] == W'(wr[k]), $sformatf("inst_ctrl %0d", k));
      check(net_field(NS, W, 8'h7, o, k) == st[k], $sformatf("inst_status %0d", k));
    end
    jt.scan_dr(net_vec(NS, W, 8'h7, 8'h0, wr), net_len(NS, W, 8'h7), o);
    check(sib_open == 3'b000, "sibs closed");
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [255:0] o;
    dn_data = 4'h0; core_to_up = 4'h0; inst_status = '0;
    // 1. pre-bond
    #20;
    check(!lower_present && !upper_present, "nothing detected");
    jt.reset();
    gateway_session();
    dn_data = 4'h9; core_to_up = 4'h6;
    jt.scan_ir(256'(OP_EXTEST), 4, o);
    jt.scan_dr(256'h0A, 8, o);  // chain bit 7 (output cell 3) is shifted first
    check(o[7:0] == {<<{8'h69}}, $sformatf("extest capture %h", o[7:0]));
    check(up_data == 4'h5 && core_from_dn == 4'h9, "extest drive");
    jt.scan_ir(256'(OP_INTEST), 4, o);
    jt.scan_dr(256'h30, 8, o);
    check(core_from_dn == 4'hC && up_data == 4'h6, "intest drive");
    jt.scan_ir(256'(OP_BYPASS), 4, o);
    check(core_from_dn == dn_data && up_data == core_to_up, "transparent");
    // 2. JTAG from the die below
    via_tsv = 1; dn_det_driven = 1;
    #20;
    check(lower_present && up_tck == jt.tck && up_tms == jt.tms, "lower detected, forwarded");
    jt.reset();
    gateway_session();
    // 3. TDO from the die above
    up_det_driven = 1; #20;
    up_tdo = 1; #1 check(jt.tdo == 1'b1, "tdo from above 1");
    up_tdo = 0; #1 check(jt.tdo == 1'b0, "tdo from above 0");
    up_det_driven = 0; #20;
    // 4. P1687 path from below
    dn_path = 1; dn_ctrl = '{rst_n: 1'b1, default: 1'b0}; #1;
    check(global_path && up_path, "path from below");
    check(instr == OP_BYPASS, "tap held in reset");
    dn_ctrl = '{rst_n: 1'b0, default: 1'b0}; #1;
    check(up_ctrl == dn_ctrl, "control passed up");
    dn_path = 0; #1;
    check(!global_path, "back to jtag path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
