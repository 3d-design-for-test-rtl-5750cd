// die_detector: behavioural model of a die-detection cell (not synthesizable
// logic: it stands for an analog micro-buffer with a pull-down resistor on a
// dedicated TSV).
//
// A neighbouring die, when bonded, drives the detection TSV high. A TSV with
// no die on its other side floats, and the pull-down resistor makes the
// micro-buffer read 0. So `present` is 1 only while the TSV is actively
// driven high. A two-state simulator cannot show a floating net, so the TSV
// is modelled by two inputs: tsv_driven (something drives the TSV) and
// tsv_level (the level driven). The buffer delay is BUF_DELAY time units.
// Function from the description (a micro-buffer that "behaves like a normal
// buffer with an additional pull-down resistance to detect high-impedance");
// the two-input model and the delay are this model's choice.
module die_detector #(
  parameter int unsigned BUF_DELAY = 1
) (
  input  wire  tsv_driven,
  input  wire  tsv_level,
  output logic present
);

  wire resolved = tsv_driven ? tsv_level : 1'b0;  // pull-down wins when floating

  assign #(BUF_DELAY) present = (resolved === 1'b1);

endmodule
