// boundary_scan_register: boundary-scan cells on the TSV interface of a die.
//
// N_IN input cells sit between the TSVs arriving from the neighbouring die
// (pin_in) and the die core (core_in); N_OUT output cells sit between the
// core (core_out) and the TSVs leaving the die (pin_out). The scan chain runs
// si -> input cells (0..N_IN-1) -> output cells (0..N_OUT-1) -> so, shifting
// on the rising TCK edge while sel and shift are high. In Capture-DR input
// cells load the TSV values and output cells the core outputs; the update
// latches take the chain on the falling TCK edge in Update-DR and clear in
// Test-Logic-Reset.
// EXTEST drives pin_out from the update latches (inter-die TSV test: the
// die above captures on its input cells); INTEST drives core_in from the
// update latches (internal die test). Otherwise the cells are transparent.
// The description calls for boundary-scan cells, EXTEST for TSV testing and
// INTEST; the cell structure and counts are this design's choice.
module boundary_scan_register #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 4
) (
  input  logic             tck,
  input  logic             rst_n,
  input  logic             sel,
  input  logic             capture,
  input  logic             shift,
  input  logic             update,
  input  logic             extest,
  input  logic             intest,
  input  logic             si,
  output logic             so,
  input  logic [N_IN-1:0]  pin_in,
  output logic [N_IN-1:0]  core_in,
  input  logic [N_OUT-1:0] core_out,
  output logic [N_OUT-1:0] pin_out
);

  localparam int unsigned N = N_IN + N_OUT;

  logic [N-1:0] sh, upd;

  // Bit 0 is nearest si; so is taken from the last bit.
  always_ff @(posedge tck)
    if (sel && capture)    sh <= {core_out, pin_in};
    else if (sel && shift) sh <= {sh[N-2:0], si};

  always_ff @(negedge tck or negedge rst_n)
    if (!rst_n)               upd <= '0;
    else if (sel && update)   upd <= sh;

  assign so      = sh[N-1];
  assign core_in = intest ? upd[N_IN-1:0] : pin_in;
  assign pin_out = extest ? upd[N-1:N_IN] : core_out;

endmodule
