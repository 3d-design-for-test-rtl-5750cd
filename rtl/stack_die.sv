// stack_die: one die of the third 3D DFT architecture (two multiplexed test
// paths), which also covers the first two architectures as its two modes.
//
// Contents: two die detectors (one looking down, one looking up), the JTAG
// pad/TSV multiplexers, the die's TAP (controller, IR, bypass, PATHSEL),
// boundary-scan cells on the N_TSV functional TSVs that go up and come in
// from below, the path multiplexer, and a P1687 network of NUM_SEG SIB+TDR
// segments.
//
// With PATHSEL = 0 everywhere (JTAG path) the dies behave as in the second
// architecture: TRSTn/TCK/TMS are shared, TDI-TDO runs through the TAP of
// every bonded die in turn, and each die's Gateway instruction opens its own
// network. With PATHSEL = 1 loaded in the bottom die (P1687 path) the stack
// behaves as the first architecture: only the bottom TAP is used and its
// Gateway register is the chain of all dies' networks, bottom first.
// A die with nothing detected below uses its own probe pads, so the same
// die can be tested pre-bond, mid-bond and post-bond.
//
// TSV interface toward the die above (up_*) and below (dn_*): JTAG
// signals, the path bit, the network control bundle, the returned TDO, the
// functional TSVs and the two detection TSVs (modelled as driven/level
// pairs). All scan timing is that of IEEE 1149.1 on the shared TCK.
module stack_die
  import p1687_pkg::*;
#(
  parameter int unsigned NUM_SEG = 3,
  parameter int unsigned TDR_W   = 8,
  parameter int unsigned N_TSV   = 4
) (
  // probe pads
  input  logic             pad_trst_n,
  input  logic             pad_tck,
  input  logic             pad_tms,
  input  logic             pad_tdi,
  output logic             pad_tdo,
  // detection TSVs
  input  logic             dn_det_driven,
  input  logic             dn_det_level,
  input  logic             up_det_driven,
  input  logic             up_det_level,
  // TSVs from / to the die below
  input  logic             dn_trst_n,
  input  logic             dn_tck,
  input  logic             dn_tms,
  input  logic             dn_tdi,
  input  logic             dn_path,
  input  net_ctrl_t        dn_ctrl,
  output logic             dn_tdo,
  input  logic [N_TSV-1:0] dn_data,
  // TSVs to / from the die above
  output logic             up_trst_n,
  output logic             up_tck,
  output logic             up_tms,
  output logic             up_tdi,
  output logic             up_path,
  output net_ctrl_t        up_ctrl,
  input  logic             up_tdo,
  output logic [N_TSV-1:0] up_data,
  // die core
  output logic [N_TSV-1:0] core_from_dn,
  input  logic [N_TSV-1:0] core_to_up,
  // embedded instruments
  input  logic [NUM_SEG-1:0][TDR_W-1:0] inst_status,
  output logic [NUM_SEG-1:0][TDR_W-1:0] inst_ctrl,
  output logic [NUM_SEG-1:0]            sib_open,
  // observability
  output logic             lower_present,
  output logic             upper_present,
  output logic             global_path,
  output logic [IR_W-1:0]  instr
);

  logic       trst_n, tck, tms, tdi, tap_trst_n, tap_tdo;
  logic       local_tdo, keep_local_tdo, tap_hold, net_return, net_so;
  logic       bsr_so, bsr_sel, bsr_extest, bsr_intest, path_local;
  net_ctrl_t  ctrl_tap, ctrl_net;

  die_detector u_det_dn (.tsv_driven(dn_det_driven), .tsv_level(dn_det_level), .present(lower_present));
  die_detector u_det_up (.tsv_driven(up_det_driven), .tsv_level(up_det_level), .present(upper_present));

  die_jtag_mux u_jmux (
    .lower_present, .upper_present, .keep_local_tdo,
    .pad_trst_n, .pad_tck, .pad_tms, .pad_tdi, .pad_tdo,
    .dn_trst_n, .dn_tck, .dn_tms, .dn_tdi, .dn_tdo,
    .up_tdo, .trst_n, .tck, .tms, .tdi, .local_tdo
  );

  assign tap_trst_n = trst_n & ~tap_hold;

  jtag_tap u_tap (
    .tck, .trst_n(tap_trst_n), .tms, .tdi, .tdo(tap_tdo),
    .bsr_so, .bsr_sel, .bsr_extest, .bsr_intest,
    .net_so(net_return), .net_ctrl(ctrl_tap), .path_global(path_local),
    .state(), .instr
  );

  boundary_scan_register #(.N_IN(N_TSV), .N_OUT(N_TSV)) u_bsr (
    .tck, .rst_n(ctrl_tap.rst_n), .sel(bsr_sel),
    .capture(ctrl_tap.capture), .shift(ctrl_tap.shift), .update(ctrl_tap.update),
    .extest(bsr_extest), .intest(bsr_intest), .si(tdi), .so(bsr_so),
    .pin_in(dn_data), .core_in(core_from_dn), .core_out(core_to_up), .pin_out(up_data)
  );

  p1687_path_mux u_pmux (
    .lower_present, .upper_present, .path_local, .path_dn(dn_path), .global_path,
    .ctrl_tap, .ctrl_dn(dn_ctrl), .ctrl_net, .tap_tdo, .net_so, .up_tdo,
    .net_return, .up_tdi, .local_tdo, .keep_local_tdo, .tap_hold
  );

  p1687_network #(.NUM_SEG(NUM_SEG), .TDR_W(TDR_W)) u_net (
    .tck, .ctrl(ctrl_net), .si(tdi), .so(net_so),
    .inst_status, .inst_ctrl, .sib_open
  );

  assign up_trst_n = trst_n;
  assign up_tck    = tck;
  assign up_tms    = tms;
  assign up_path   = global_path;
  assign up_ctrl   = ctrl_net;

endmodule
