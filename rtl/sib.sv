// sib: Segment Insertion Bit of an IEEE P1687 network.
//
// A one-bit scan register with a shadow (update) bit. While the update bit
// is 0 the SIB is closed: the scan path is si -> SIB bit -> so, one bit long.
// When it is 1 the SIB is open: the segment it guards (a TDR) is spliced in,
// so the path becomes si -> segment -> SIB bit -> so, and the segment's
// select (to_sel) is raised. Shift and capture happen on the rising TCK edge
// while the network is selected; capture reads back the update bit. The
// update bit loads on the falling TCK edge in Update-DR and resets to closed.
// The description names SIBs and their role; this is the usual P1687 SIB.
module sib
  import p1687_pkg::*;
(
  input  logic      tck,
  input  net_ctrl_t ctrl,
  input  logic      si,
  output logic      so,
  output logic      to_si,
  output logic      to_sel,
  input  logic      from_so,
  output logic      is_open
);

  logic rst_n;
  assign rst_n = ctrl.rst_n;

  logic sh;

  always_ff @(posedge tck)
    if (ctrl.sel && ctrl.capture)    sh <= is_open;
    else if (ctrl.sel && ctrl.shift) sh <= is_open ? from_so : si;

  always_ff @(negedge tck or negedge rst_n)
    if (!rst_n)                  is_open <= 1'b0;
    else if (ctrl.sel && ctrl.update) is_open <= sh;

  assign so     = sh;
  assign to_si  = si;
  assign to_sel = ctrl.sel & is_open;

endmodule
