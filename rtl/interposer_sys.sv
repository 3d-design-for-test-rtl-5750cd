// interposer_sys: the realistic test case of three dies side by side on a
// passive interposer.
//
// Die 0 (JTAG and P1687) reaches the other two dies over interposer wires:
// Die 1, a die with a static test interface (Tst Start, Tst Enable,
// Tst Result), and Die 2, a die with an IEEE 1500 wrapper (WSP in, WSO out).
// The functional logic of Die 1 and Die 2 is outside this module: their
// test-port multiplexers are here and their core-side signals are ports
// (d1_* and d2_*). Each die also keeps its probe pads, used before the die
// is mounted; the *_mounted inputs stand for the assembly state and drive
// the detection lines: Die 0 takes JTAG from the package pins when mounted,
// and Die 1 / Die 2 take their test inputs from Die 0 when both they and
// Die 0 are mounted. Everything is combinational except inside Die 0.
module interposer_sys
  import p1687_pkg::*;
#(
  parameter int unsigned N_BSC = 4
) (
  input  logic             die0_mounted,
  input  logic             die1_mounted,
  input  logic             die2_mounted,
  // package JTAG pins through the interposer
  input  logic             pkg_trst_n,
  input  logic             pkg_tck,
  input  logic             pkg_tms,
  input  logic             pkg_tdi,
  output logic             pkg_tdo,
  // Die 0 probe pads
  input  logic             d0_pad_trst_n,
  input  logic             d0_pad_tck,
  input  logic             d0_pad_tms,
  input  logic             d0_pad_tdi,
  output logic             d0_pad_tdo,
  // Die 0 logic behind boundary-scan cells
  input  logic [N_BSC-1:0] d0_pin_in,
  output logic [N_BSC-1:0] d0_core_in,
  input  logic [N_BSC-1:0] d0_core_out,
  output logic [N_BSC-1:0] d0_pin_out,
  // Die 1: probe pads and core side
  input  logic             d1_pad_start,
  input  logic             d1_pad_enable,
  output logic             d1_pad_result,
  output logic             d1_start,
  output logic             d1_enable,
  input  logic             d1_result,
  // Die 2: probe pads and core (wrapper) side
  input  wsp_t             d2_pad_wsp,
  output logic             d2_pad_wso,
  output wsp_t             d2_wsp,
  input  logic             d2_wso,
  // observability
  output logic [2:0]       mounted_seen,
  output logic [1:0]       sib_open,
  output logic [IR_W-1:0]  instr
);

  logic tst_start, tst_enable, ip_result, ip_wso;
  wsp_t wsp;

  interposer_die0 #(.N_BSC(N_BSC)) u_die0 (
    .ip_det_driven(die0_mounted), .ip_det_level(1'b1), .mounted(mounted_seen[0]),
    .pad_trst_n(d0_pad_trst_n), .pad_tck(d0_pad_tck), .pad_tms(d0_pad_tms),
    .pad_tdi(d0_pad_tdi), .pad_tdo(d0_pad_tdo),
    .ip_trst_n(pkg_trst_n), .ip_tck(pkg_tck), .ip_tms(pkg_tms), .ip_tdi(pkg_tdi),
    .ip_tdo(pkg_tdo),
    .pin_in(d0_pin_in), .core_in(d0_core_in), .core_out(d0_core_out), .pin_out(d0_pin_out),
    .tst_start, .tst_enable, .tst_result(ip_result),
    .wsp, .wso(ip_wso), .sib_open, .instr
  );

  test_port_mux #(.W_IN(2), .W_OUT(1)) u_d1_port (
    .det_driven(die0_mounted && die1_mounted), .det_level(1'b1), .mounted(mounted_seen[1]),
    .pad_in({d1_pad_enable, d1_pad_start}), .ip_in({tst_enable, tst_start}),
    .core_in({d1_enable, d1_start}),
    .core_out(d1_result), .pad_out(d1_pad_result), .ip_out(ip_result)
  );

  test_port_mux #(.W_IN($bits(wsp_t)), .W_OUT(1)) u_d2_port (
    .det_driven(die0_mounted && die2_mounted), .det_level(1'b1), .mounted(mounted_seen[2]),
    .pad_in(d2_pad_wsp), .ip_in(wsp), .core_in(d2_wsp),
    .core_out(d2_wso), .pad_out(d2_pad_wso), .ip_out(ip_wso)
  );

endmodule
