// right_die_tdr: the TDR of Die 0 that tests the bottom-right die (Die 1)
// through its static test signals, treating Die 1 as a Type-A instrument.
//
// A 2-bit TDR behind a SIB. Bit 0 drives Tst Start and captures Tst Result;
// bit 1 drives Tst Enable and captures the Tst Enable level now applied.
// A test is therefore run with one scan that sets Enable and Start and, after
// the die's self test has had time to run, a second scan whose capture
// returns the result. The register follows the Select-Capture-Shift-Update
// protocol of tdr.sv (shift on rising TCK, update on falling TCK in
// Update-DR, cleared in Test-Logic-Reset). The signal names come from the
// description's figure; the bit assignment is this design's choice.
module right_die_tdr
  import p1687_pkg::*;
(
  input  logic      tck,
  input  net_ctrl_t ctrl,
  input  logic      si,
  output logic      so,
  output logic      tst_start,
  output logic      tst_enable,
  input  logic      tst_result
);

  logic [1:0] upd;

  tdr #(.W(2)) u_tdr (
    .tck, .ctrl, .si, .so,
    .capture_data({upd[1], tst_result}),
    .update_data(upd)
  );

  assign tst_start  = upd[0];
  assign tst_enable = upd[1];

endmodule
