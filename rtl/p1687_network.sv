// p1687_network: the IEEE P1687 instrument network of one die.
//
// NUM_SEG segments are daisy-chained; each is a SIB guarding one TDR of
// TDR_W bits (three per die, as drawn in the description's figures). The
// chain order is si -> SIB[0] -> SIB[1] -> ... -> SIB[NUM_SEG-1] -> so. With
// every SIB closed the network is NUM_SEG bits long; opening SIB k inserts
// TDR k (TDR_W bits) in front of that SIB's own bit. Each TDR's update
// register drives inst_ctrl[k] and captures inst_status[k], the interface of
// the embedded instrument. All control comes from one net_ctrl_t bundle so
// that the same network can be driven by the die's own TAP or by the bottom
// die's TAP through TSVs.
module p1687_network
  import p1687_pkg::*;
#(
  parameter int unsigned NUM_SEG = 3,
  parameter int unsigned TDR_W   = 8
) (
  input  logic      tck,
  input  net_ctrl_t ctrl,
  input  logic      si,
  output logic      so,
  input  logic [NUM_SEG-1:0][TDR_W-1:0] inst_status,
  output logic [NUM_SEG-1:0][TDR_W-1:0] inst_ctrl,
  output logic [NUM_SEG-1:0]            sib_open
);

  logic [NUM_SEG:0] chain;
  assign chain[0] = si;
  assign so       = chain[NUM_SEG];

  for (genvar k = 0; k < NUM_SEG; k++) begin : g_seg
    logic      to_si, to_sel, from_so;
    net_ctrl_t seg_ctrl;

    sib u_sib (
      .tck, .ctrl, .si(chain[k]), .so(chain[k+1]),
      .to_si, .to_sel, .from_so, .is_open(sib_open[k])
    );

    always_comb begin
      seg_ctrl     = ctrl;
      seg_ctrl.sel = to_sel;
    end

    tdr #(.W(TDR_W)) u_tdr (
      .tck, .ctrl(seg_ctrl), .si(to_si), .so(from_so),
      .capture_data(inst_status[k]), .update_data(inst_ctrl[k])
    );
  end

endmodule
