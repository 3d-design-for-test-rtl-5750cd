// die_jtag_mux: the automatic die-detection multiplexers of one die.
//
// Each JTAG input (TRSTn, TCK, TMS, TDI) is taken from the die's own probe
// pads when no die is detected below (pre-bond test, or the bottom die of a
// stack) and from the TSVs of the die below otherwise. The die's TDO (to its
// pad and down the TSV to the die below) is the upper die's TDO when a die
// is detected above, so that the TDI-TDO path of the whole stack closes
// through the topmost die, and the die's own TDO otherwise. With
// keep_local_tdo set the die always returns its own TDO: the third
// architecture uses this for the bottom TAP when it runs the P1687 path and
// collects the upper dies' data itself. The multiplexers are purely
// combinational; the selects come from the die detectors.
// Multiplexer placement follows the description; keep_local_tdo is this
// design's addition for the third architecture.
module die_jtag_mux (
  input  logic lower_present,
  input  logic upper_present,
  input  logic keep_local_tdo,
  // probe pads of this die
  input  logic pad_trst_n,
  input  logic pad_tck,
  input  logic pad_tms,
  input  logic pad_tdi,
  output logic pad_tdo,
  // TSVs from / to the die below
  input  logic dn_trst_n,
  input  logic dn_tck,
  input  logic dn_tms,
  input  logic dn_tdi,
  output logic dn_tdo,
  // TDO coming down from the die above
  input  logic up_tdo,
  // JTAG signals used inside this die
  output logic trst_n,
  output logic tck,
  output logic tms,
  output logic tdi,
  input  logic local_tdo
);

  always_comb begin
    trst_n = lower_present ? dn_trst_n : pad_trst_n;
    tck    = lower_present ? dn_tck    : pad_tck;
    tms    = lower_present ? dn_tms    : pad_tms;
    tdi    = lower_present ? dn_tdi    : pad_tdi;
  end

  assign pad_tdo = (upper_present && !keep_local_tdo) ? up_tdo : local_tdo;
  assign dn_tdo  = pad_tdo;

endmodule
