// test_port_mux: pad/interposer selection at the test port of a die on the
// passive interposer (Die 1 and Die 2).
//
// Before assembly a die is tested through its own probe pads; once mounted
// its test inputs come from Die 0 through the interposer. A die detector on
// a detection line of the interposer (driven by Die 0 when mounted) selects
// the source of the W_IN test inputs. The W_OUT test outputs go to both the
// pads and the interposer. Combinational except for the detector's
// behavioural delay. The multiplexers are drawn in the description's figure;
// the detection line is this design's reading of how they are steered,
// following the die-detection scheme of the stacked architectures.
module test_port_mux #(
  parameter int unsigned W_IN  = 2,
  parameter int unsigned W_OUT = 1
) (
  input  logic             det_driven,
  input  logic             det_level,
  output logic             mounted,
  input  logic [W_IN-1:0]  pad_in,
  input  logic [W_IN-1:0]  ip_in,
  output logic [W_IN-1:0]  core_in,
  input  logic [W_OUT-1:0] core_out,
  output logic [W_OUT-1:0] pad_out,
  output logic [W_OUT-1:0] ip_out
);

  die_detector u_det (.tsv_driven(det_driven), .tsv_level(det_level), .present(mounted));

  assign core_in = mounted ? ip_in : pad_in;
  assign pad_out = core_out;
  assign ip_out  = core_out;

endmodule
