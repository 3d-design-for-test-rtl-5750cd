// stack3d: a stack of NUM_DIES dies (three in the description) built with
// the third 3D DFT architecture, connected face to back through TSVs.
//
// Die 0 is the bottom die. bonded[k] (k >= 1) says whether die k sits on
// die k-1; it drives the detection TSVs between the two, so that the
// dies reconfigure themselves for pre-bond (nothing bonded: each die is
// tested through its own probe pads), mid-bond (a partial stack) and
// post-bond test (everything through the bottom die's pads). Every die keeps
// its probe pads as ports of this module; a bonded die ignores them.
// The JTAG signals, path bit, network control and TDI go up; TDO comes
// down. The functional TSVs of each die's boundary-scan cells link die k's
// outputs to die k+1's inputs; bot_data_in feeds die 0 and top_data_out
// leaves the top die. Core and instrument interfaces of every die are ports.
module stack3d
  import p1687_pkg::*;
#(
  parameter int unsigned NUM_DIES = 3,
  parameter int unsigned NUM_SEG  = 3,
  parameter int unsigned TDR_W    = 8,
  parameter int unsigned N_TSV    = 4
) (
  input  logic [NUM_DIES-1:1] bonded,
  input  logic [NUM_DIES-1:0] pad_trst_n,
  input  logic [NUM_DIES-1:0] pad_tck,
  input  logic [NUM_DIES-1:0] pad_tms,
  input  logic [NUM_DIES-1:0] pad_tdi,
  output logic [NUM_DIES-1:0] pad_tdo,
  input  logic [N_TSV-1:0]    bot_data_in,
  output logic [N_TSV-1:0]    top_data_out,
  output logic [NUM_DIES-1:0][N_TSV-1:0] core_from_dn,
  input  logic [NUM_DIES-1:0][N_TSV-1:0] core_to_up,
  input  logic [NUM_DIES-1:0][NUM_SEG-1:0][TDR_W-1:0] inst_status,
  output logic [NUM_DIES-1:0][NUM_SEG-1:0][TDR_W-1:0] inst_ctrl,
  output logic [NUM_DIES-1:0][NUM_SEG-1:0]            sib_open,
  output logic [NUM_DIES-1:0] lower_present,
  output logic [NUM_DIES-1:0] upper_present,
  output logic [NUM_DIES-1:0] global_path,
  output logic [NUM_DIES-1:0][IR_W-1:0] instr
);

  // Signals leaving each die upward / downward.
  logic [NUM_DIES-1:0] up_trst_n, up_tck, up_tms, up_tdi, up_path, dn_tdo;
  net_ctrl_t [NUM_DIES-1:0] up_ctrl;
  logic [NUM_DIES-1:0][N_TSV-1:0] up_data;
  // Detection TSVs: driven high by the neighbour only when bonded.
  logic [NUM_DIES-1:0] det_below, det_above;

  always_comb begin
    det_below = '0;
    det_above = '0;
    for (int k = 1; k < NUM_DIES; k++) begin
      det_below[k]   = bonded[k];
      det_above[k-1] = bonded[k];
    end
  end

  for (genvar k = 0; k < NUM_DIES; k++) begin : g_die
    logic             dn_trst_n, dn_tck, dn_tms, dn_tdi, dn_path, up_tdo;
    net_ctrl_t        dn_ctrl;
    logic [N_TSV-1:0] dn_data;

    if (k == 0) begin : g_bottom
      assign dn_trst_n = 1'b0;
      assign dn_tck    = 1'b0;
      assign dn_tms    = 1'b1;
      assign dn_tdi    = 1'b0;
      assign dn_path   = 1'b0;
      assign dn_ctrl   = '0;
      assign dn_data   = bot_data_in;
    end else begin : g_upper
      assign dn_trst_n = up_trst_n[k-1];
      assign dn_tck    = up_tck[k-1];
      assign dn_tms    = up_tms[k-1];
      assign dn_tdi    = up_tdi[k-1];
      assign dn_path   = up_path[k-1];
      assign dn_ctrl   = up_ctrl[k-1];
      assign dn_data   = up_data[k-1];
    end

    if (k == NUM_DIES - 1) begin : g_top
      assign up_tdo = 1'b0;
    end else begin : g_mid
      assign up_tdo = dn_tdo[k+1];
    end

    stack_die #(.NUM_SEG(NUM_SEG), .TDR_W(TDR_W), .N_TSV(N_TSV)) u_die (
      .pad_trst_n(pad_trst_n[k]), .pad_tck(pad_tck[k]), .pad_tms(pad_tms[k]),
      .pad_tdi(pad_tdi[k]), .pad_tdo(pad_tdo[k]),
      .dn_det_driven(det_below[k]), .dn_det_level(1'b1),
      .up_det_driven(det_above[k]), .up_det_level(1'b1),
      .dn_trst_n, .dn_tck, .dn_tms, .dn_tdi, .dn_path, .dn_ctrl,
      .dn_tdo(dn_tdo[k]), .dn_data,
      .up_trst_n(up_trst_n[k]), .up_tck(up_tck[k]), .up_tms(up_tms[k]),
      .up_tdi(up_tdi[k]), .up_path(up_path[k]), .up_ctrl(up_ctrl[k]),
      .up_tdo, .up_data(up_data[k]),
      .core_from_dn(core_from_dn[k]), .core_to_up(core_to_up[k]),
      .inst_status(inst_status[k]), .inst_ctrl(inst_ctrl[k]), .sib_open(sib_open[k]),
      .lower_present(lower_present[k]), .upper_present(upper_present[k]),
      .global_path(global_path[k]), .instr(instr[k])
    );
  end

  assign top_data_out = up_data[NUM_DIES-1];

endmodule
