// p1687_path_mux: test-path selection of the third stack architecture.
//
// A die runs either the JTAG path (each die's own TAP drives its own P1687
// network; TAPs are daisy-chained) or the P1687 path (the bottom die's TAP
// drives the networks of every die, which form one chain through the stack).
// The active path, `global`, is the die's own PATHSEL register if it is the
// head of the stack (no die below) and the path bit received from the die
// below otherwise; it is passed on to the die above.
//
//  * Control: in the P1687 path a non-head die takes the network control
//    bundle from the TSVs (ctrl_dn), else from its own TAP. The chosen bundle
//    is passed up.
//  * Data (TDI-TDO is shared by both paths): the bit sent up as the upper
//    die's TDI is the TAP's TDO on the JTAG path and the network output on
//    the P1687 path. A non-head die on the P1687 path returns its network
//    output (or the upper die's return) as its TDO. The head die's TAP then
//    reads the returning stream as its Gateway register.
//  * A non-head die on the P1687 path holds its own TAP in reset, so that
//    only the bottom TAP is configured.
// The two paths and the multiplexing of the control signals follow the
// description; which bit selects the path and the TAP hold are this design's
// choice.
module p1687_path_mux
  import p1687_pkg::*;
(
  input  logic      lower_present,
  input  logic      upper_present,
  input  logic      path_local,     // PATHSEL register of this die's TAP
  input  logic      path_dn,        // path bit from the die below (TSV)
  output logic      global_path,
  input  net_ctrl_t ctrl_tap,       // from this die's TAP
  input  net_ctrl_t ctrl_dn,        // from the die below (TSV)
  output net_ctrl_t ctrl_net,       // to this die's network and up the TSVs
  input  logic      tap_tdo,
  input  logic      net_so,
  input  logic      up_tdo,         // TDO returned by the die above
  output logic      net_return,     // to the TAP's Gateway input
  output logic      up_tdi,         // TDI sent to the die above
  output logic      local_tdo,      // this die's own TDO
  output logic      keep_local_tdo,
  output logic      tap_hold        // hold this die's TAP in reset
);

  logic head;

  always_comb begin
    head           = !lower_present;
    global_path    = head ? path_local : path_dn;
    ctrl_net       = (global_path && !head) ? ctrl_dn : ctrl_tap;
    up_tdi         = global_path ? net_so : tap_tdo;
    net_return     = (global_path && head && upper_present) ? up_tdo : net_so;
    local_tdo      = (global_path && !head) ? net_so : tap_tdo;
    keep_local_tdo = global_path && head;
    tap_hold       = global_path && !head;
  end

endmodule
