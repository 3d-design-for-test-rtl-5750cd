// interposer_die0: Die 0 of the passive-interposer system, the die that
// carries the JTAG and IEEE P1687 infrastructure for all three dies.
//
// Die 0 holds a TAP (controller, IR and decoder, bypass), boundary-scan
// cells on N_BSC inputs and N_BSC outputs of its own logic, and a P1687
// network of two SIBs selected by the Gateway instruction:
//   TDI -> SIB_top [Top_die TDR] -> SIB_right [right_die TDR] -> TDO.
// The Top_die TDR reaches Die 2 through its IEEE 1500 wrapper port
// (Type-C instrument); the right_die TDR drives Die 1's static test signals
// (Type-A instrument). A die detector on the interposer side chooses the
// JTAG inputs from the interposer (package pins, once mounted) or from the
// die's own probe pads (pre-bond); TDO goes to both. Timing is that of
// IEEE 1149.1 on TCK. Structure from the description's interposer figure;
// the SIB order, the boundary-scan cells and the TDR encodings are this
// design's choice.
module interposer_die0
  import p1687_pkg::*;
#(
  parameter int unsigned N_BSC = 4
) (
  input  logic             ip_det_driven,
  input  logic             ip_det_level,
  output logic             mounted,
  // probe pads
  input  logic             pad_trst_n,
  input  logic             pad_tck,
  input  logic             pad_tms,
  input  logic             pad_tdi,
  output logic             pad_tdo,
  // JTAG through the interposer
  input  logic             ip_trst_n,
  input  logic             ip_tck,
  input  logic             ip_tms,
  input  logic             ip_tdi,
  output logic             ip_tdo,
  // Die 0 logic behind boundary-scan cells
  input  logic [N_BSC-1:0] pin_in,
  output logic [N_BSC-1:0] core_in,
  input  logic [N_BSC-1:0] core_out,
  output logic [N_BSC-1:0] pin_out,
  // Die 1 static test signals
  output logic             tst_start,
  output logic             tst_enable,
  input  logic             tst_result,
  // Die 2 IEEE 1500 wrapper serial port
  output wsp_t             wsp,
  input  logic             wso,
  // observability
  output logic [1:0]       sib_open,
  output logic [IR_W-1:0]  instr
);

  logic      trst_n, tck, tms, tdi, tap_tdo, net_so, bsr_so;
  logic      bsr_sel, bsr_extest, bsr_intest;
  logic      top_si, top_sel, top_so, right_si, right_sel, right_so, sib_mid;
  net_ctrl_t ctrl, top_ctrl, right_ctrl;

  die_detector u_det (.tsv_driven(ip_det_driven), .tsv_level(ip_det_level), .present(mounted));

  die_jtag_mux u_jmux (
    .lower_present(mounted), .upper_present(1'b0), .keep_local_tdo(1'b0),
    .pad_trst_n, .pad_tck, .pad_tms, .pad_tdi, .pad_tdo,
    .dn_trst_n(ip_trst_n), .dn_tck(ip_tck), .dn_tms(ip_tms), .dn_tdi(ip_tdi),
    .dn_tdo(ip_tdo), .up_tdo(1'b0),
    .trst_n, .tck, .tms, .tdi, .local_tdo(tap_tdo)
  );

  jtag_tap u_tap (
    .tck, .trst_n, .tms, .tdi, .tdo(tap_tdo),
    .bsr_so, .bsr_sel, .bsr_extest, .bsr_intest,
    .net_so, .net_ctrl(ctrl), .path_global(), .state(), .instr
  );

  boundary_scan_register #(.N_IN(N_BSC), .N_OUT(N_BSC)) u_bsr (
    .tck, .rst_n(ctrl.rst_n), .sel(bsr_sel),
    .capture(ctrl.capture), .shift(ctrl.shift), .update(ctrl.update),
    .extest(bsr_extest), .intest(bsr_intest), .si(tdi), .so(bsr_so),
    .pin_in, .core_in, .core_out, .pin_out
  );

  sib u_sib_top (
    .tck, .ctrl, .si(tdi), .so(sib_mid),
    .to_si(top_si), .to_sel(top_sel), .from_so(top_so), .is_open(sib_open[0])
  );

  sib u_sib_right (
    .tck, .ctrl, .si(sib_mid), .so(net_so),
    .to_si(right_si), .to_sel(right_sel), .from_so(right_so), .is_open(sib_open[1])
  );

  always_comb begin
    top_ctrl       = ctrl;
    top_ctrl.sel   = top_sel;
    right_ctrl     = ctrl;
    right_ctrl.sel = right_sel;
  end

  top_die_tdr u_top_tdr (
    .tck, .ctrl(top_ctrl), .si(top_si), .so(top_so),
    .wrck(wsp.wrck), .wrst_n(wsp.wrst_n), .shift_wr(wsp.shift_wr),
    .capture_wr(wsp.capture_wr), .update_wr(wsp.update_wr),
    .select_wir(wsp.select_wir), .wsi(wsp.wsi), .wso
  );

  right_die_tdr u_right_tdr (
    .tck, .ctrl(right_ctrl), .si(right_si), .so(right_so),
    .tst_start, .tst_enable, .tst_result
  );

endmodule
