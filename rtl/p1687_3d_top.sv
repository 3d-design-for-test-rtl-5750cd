// p1687_3d_top: the two systems of the design side by side.
//
//  * s_*  - a three-die TSV stack built with the third 3D DFT architecture
//           (JTAG path and P1687 path multiplexed, automatic die detection),
//           see stack3d.sv. Its two modes reproduce the first and second
//           architectures.
//  * i_*  - the passive-interposer test case: Die 0 with JTAG and P1687
//           controls a static-signal die (Die 1) and an IEEE 1500-wrapped die
//           (Die 2), see interposer_sys.sv.
// The two share nothing; each has its own JTAG pins, probe pads, assembly
// state inputs and die-side interfaces. Parameter defaults are the sizes
// the description draws (three dies, three SIB/TDR segments per die); the
// TDR width and TSV/boundary-scan counts are this design's choice.
module p1687_3d_top
  import p1687_pkg::*;
#(
  parameter int unsigned NUM_DIES = 3,
  parameter int unsigned NUM_SEG  = 3,
  parameter int unsigned TDR_W    = 8,
  parameter int unsigned N_TSV    = 4,
  parameter int unsigned N_BSC    = 4
) (
  // ---- 3D stack ----
  input  logic [NUM_DIES-1:1] s_bonded,
  input  logic [NUM_DIES-1:0] s_pad_trst_n,
  input  logic [NUM_DIES-1:0] s_pad_tck,
  input  logic [NUM_DIES-1:0] s_pad_tms,
  input  logic [NUM_DIES-1:0] s_pad_tdi,
  output logic [NUM_DIES-1:0] s_pad_tdo,
  input  logic [N_TSV-1:0]    s_bot_data_in,
  output logic [N_TSV-1:0]    s_top_data_out,
  output logic [NUM_DIES-1:0][N_TSV-1:0] s_core_from_dn,
  input  logic [NUM_DIES-1:0][N_TSV-1:0] s_core_to_up,
  input  logic [NUM_DIES-1:0][NUM_SEG-1:0][TDR_W-1:0] s_inst_status,
  output logic [NUM_DIES-1:0][NUM_SEG-1:0][TDR_W-1:0] s_inst_ctrl,
  output logic [NUM_DIES-1:0][NUM_SEG-1:0]            s_sib_open,
  output logic [NUM_DIES-1:0] s_lower_present,
  output logic [NUM_DIES-1:0] s_upper_present,
  output logic [NUM_DIES-1:0] s_global_path,
  output logic [NUM_DIES-1:0][IR_W-1:0] s_instr,
  // ---- passive interposer ----
  input  logic             i_die0_mounted,
  input  logic             i_die1_mounted,
  input  logic             i_die2_mounted,
  input  logic             i_pkg_trst_n,
  input  logic             i_pkg_tck,
  input  logic             i_pkg_tms,
  input  logic             i_pkg_tdi,
  output logic             i_pkg_tdo,
  input  logic             i_d0_pad_trst_n,
  input  logic             i_d0_pad_tck,
  input  logic             i_d0_pad_tms,
  input  logic             i_d0_pad_tdi,
  output logic             i_d0_pad_tdo,
  input  logic [N_BSC-1:0] i_d0_pin_in,
  output logic [N_BSC-1:0] i_d0_core_in,
  input  logic [N_BSC-1:0] i_d0_core_out,
  output logic [N_BSC-1:0] i_d0_pin_out,
  input  logic             i_d1_pad_start,
  input  logic             i_d1_pad_enable,
  output logic             i_d1_pad_result,
  output logic             i_d1_start,
  output logic             i_d1_enable,
  input  logic             i_d1_result,
  input  wsp_t             i_d2_pad_wsp,
  output logic             i_d2_pad_wso,
  output wsp_t             i_d2_wsp,
  input  logic             i_d2_wso,
  output logic [2:0]       i_mounted_seen,
  output logic [1:0]       i_sib_open,
  output logic [IR_W-1:0]  i_instr
);

  stack3d #(.NUM_DIES(NUM_DIES), .NUM_SEG(NUM_SEG), .TDR_W(TDR_W), .N_TSV(N_TSV)) u_stack (
    .bonded(s_bonded), .pad_trst_n(s_pad_trst_n), .pad_tck(s_pad_tck), .pad_tms(s_pad_tms),
    .pad_tdi(s_pad_tdi), .pad_tdo(s_pad_tdo),
    .bot_data_in(s_bot_data_in), .top_data_out(s_top_data_out),
    .core_from_dn(s_core_from_dn), .core_to_up(s_core_to_up),
    .inst_status(s_inst_status), .inst_ctrl(s_inst_ctrl), .sib_open(s_sib_open),
    .lower_present(s_lower_present), .upper_present(s_upper_present),
    .global_path(s_global_path), .instr(s_instr)
  );

  interposer_sys #(.N_BSC(N_BSC)) u_interposer (
    .die0_mounted(i_die0_mounted), .die1_mounted(i_die1_mounted), .die2_mounted(i_die2_mounted),
    .pkg_trst_n(i_pkg_trst_n), .pkg_tck(i_pkg_tck), .pkg_tms(i_pkg_tms), .pkg_tdi(i_pkg_tdi),
    .pkg_tdo(i_pkg_tdo),
    .d0_pad_trst_n(i_d0_pad_trst_n), .d0_pad_tck(i_d0_pad_tck), .d0_pad_tms(i_d0_pad_tms),
    .d0_pad_tdi(i_d0_pad_tdi), .d0_pad_tdo(i_d0_pad_tdo),
    .d0_pin_in(i_d0_pin_in), .d0_core_in(i_d0_core_in), .d0_core_out(i_d0_core_out),
    .d0_pin_out(i_d0_pin_out),
    .d1_pad_start(i_d1_pad_start), .d1_pad_enable(i_d1_pad_enable), .d1_pad_result(i_d1_pad_result),
    .d1_start(i_d1_start), .d1_enable(i_d1_enable), .d1_result(i_d1_result),
    .d2_pad_wsp(i_d2_pad_wsp), .d2_pad_wso(i_d2_pad_wso), .d2_wsp(i_d2_wsp), .d2_wso(i_d2_wso),
    .mounted_seen(i_mounted_seen), .sib_open(i_sib_open), .instr(i_instr)
  );

endmodule
