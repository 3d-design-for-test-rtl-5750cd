// tdr: instrument test data register.
//
// W shift bits with a W-bit update (shadow) register. While sel is high the
// shift bits load capture_data in Capture-DR and shift toward bit 0 in
// Shift-DR (si enters at bit W-1, so is bit 0), on the rising TCK edge. The
// update register takes the shift bits on the falling TCK edge in Update-DR
// and drives the instrument's control inputs (update_data); it clears in
// Test-Logic-Reset. capture_data is the instrument's status. Width and bit
// order are this design's choice; the description only names the TDR.
module tdr
  import p1687_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         tck,
  input  net_ctrl_t    ctrl,
  input  logic         si,
  output logic         so,
  input  logic [W-1:0] capture_data,
  output logic [W-1:0] update_data
);

  logic rst_n;
  assign rst_n = ctrl.rst_n;

  logic [W-1:0] sh;

  always_ff @(posedge tck)
    if (ctrl.sel && ctrl.capture)    sh <= capture_data;
    else if (ctrl.sel && ctrl.shift) sh <= W'({si, sh} >> 1);

  always_ff @(negedge tck or negedge rst_n)
    if (!rst_n)                  update_data <= '0;
    else if (ctrl.sel && ctrl.update) update_data <= sh;

  assign so = sh[0];

endmodule
