// top_die_tdr: the TDR of Die 0 that reaches the top die (Die 2) through its
// IEEE 1500 wrapper serial port, treating Die 2 as a Type-C instrument.
//
// The segment behind the SIB is one local bit, SelectWIR, followed by the
// wrapper's own serial path: si -> SelectWIR bit -> WSI ... WSO -> so. The
// wrapper clock is TCK, WRSTn is the network reset, and ShiftWR, CaptureWR
// and UpdateWR are the network's Shift/Capture/Update strobes qualified by
// the segment select, so a DR scan through this segment is a wrapper scan.
// The SelectWIR bit updates on the falling TCK edge in Update-DR like any
// TDR bit; its new value chooses the wrapper instruction register (1) or the
// data register selected by the WIR (0) for the following scans, so a
// wrapper instruction load takes one scan to set SelectWIR and one to shift
// the WIR. The WSP signal names come from the description's figure; the
// translation from P1687 control to WSP signals is this design's choice.
module top_die_tdr
  import p1687_pkg::*;
(
  input  logic      tck,
  input  net_ctrl_t ctrl,
  input  logic      si,
  output logic      so,
  // IEEE 1500 wrapper serial port
  output logic      wrck,
  output logic      wrst_n,
  output logic      shift_wr,
  output logic      capture_wr,
  output logic      update_wr,
  output logic      select_wir,
  output logic      wsi,
  input  logic      wso
);

  logic rst_n;
  assign rst_n = ctrl.rst_n;

  logic selwir_sh;

  always_ff @(posedge tck)
    if (ctrl.sel && ctrl.capture)    selwir_sh <= select_wir;
    else if (ctrl.sel && ctrl.shift) selwir_sh <= si;

  always_ff @(negedge tck or negedge rst_n)
    if (!rst_n)                  select_wir <= 1'b0;
    else if (ctrl.sel && ctrl.update) select_wir <= selwir_sh;

  assign wrck       = tck;
  assign wrst_n     = ctrl.rst_n;
  assign shift_wr   = ctrl.sel & ctrl.shift;
  assign capture_wr = ctrl.sel & ctrl.capture;
  assign update_wr  = ctrl.sel & ctrl.update;
  assign wsi        = selwir_sh;
  assign so         = wso;

endmodule
