// jtag_tap: the classical JTAG logic of one die (TAP controller, instruction
// register and decoder, bypass bit, path-select register and TDO stage).
//
// The TAP controller sequences the IR and DR scans. The bypass bit and the
// one-bit PATHSEL register are local data registers; the boundary-scan
// register and the P1687 instrument network sit outside and return their
// serial outputs on bsr_so and net_so. The TDO multiplexer picks the IR in
// Shift-IR and otherwise the register chosen by the current instruction;
// tdo is re-timed on the falling TCK edge as IEEE 1149.1 requires, so the
// next TAP in a daisy chain samples it safely on the following rising edge.
//
// Outputs:
//  * net_ctrl  - Select/Capture/Shift/Update and reset for the P1687
//                network; sel is high while the Gateway instruction is active.
//  * bsr_*     - controls for the boundary-scan register (EXTEST / INTEST).
//  * path_global - the PATHSEL register: 1 selects the P1687 (right) test
//                path of the third stack architecture, 0 the JTAG (left) one.
//                The description says only that switching paths "requires a
//                configuration step"; using a TAP data register for it is
//                this design's choice. It resets to 0 in Test-Logic-Reset.
module jtag_tap
  import p1687_pkg::*;
(
  input  logic      tck,
  input  logic      trst_n,
  input  logic      tms,
  input  logic      tdi,
  output logic      tdo,
  // boundary-scan register
  input  logic      bsr_so,
  output logic      bsr_sel,
  output logic      bsr_extest,
  output logic      bsr_intest,
  // P1687 network (Gateway)
  input  logic      net_so,
  output net_ctrl_t net_ctrl,
  // third-architecture test-path selection
  output logic      path_global,
  // observability
  output tap_state_e state,
  output logic [IR_W-1:0] instr
);

  logic reset_n, capture_dr, shift_dr, update_dr, capture_ir, shift_ir, update_ir;
  logic ir_so, sel_bypass, sel_extest, sel_intest, sel_gateway, sel_pathsel;
  logic bypass_q, pathsel_sh, tdo_mux;

  tap_controller u_fsm (
    .tck, .trst_n, .tms, .state, .reset_n,
    .capture_dr, .shift_dr, .update_dr, .capture_ir, .shift_ir, .update_ir
  );

  jtag_ir u_ir (
    .tck, .rst_n(reset_n), .tdi, .capture_ir, .shift_ir, .update_ir,
    .ir_so, .instr, .sel_bypass, .sel_extest, .sel_intest, .sel_gateway, .sel_pathsel
  );

  // Bypass bit: captures 0, shifts tdi.
  always_ff @(posedge tck)
    if (sel_bypass && capture_dr)    bypass_q <= 1'b0;
    else if (sel_bypass && shift_dr) bypass_q <= tdi;

  // PATHSEL register: capture returns the active value, update on falling TCK.
  always_ff @(posedge tck)
    if (sel_pathsel && capture_dr)    pathsel_sh <= path_global;
    else if (sel_pathsel && shift_dr) pathsel_sh <= tdi;

  always_ff @(negedge tck or negedge reset_n)
    if (!reset_n)                      path_global <= 1'b0;
    else if (sel_pathsel && update_dr) path_global <= pathsel_sh;

  assign bsr_sel    = sel_extest | sel_intest;
  assign bsr_extest = sel_extest;
  assign bsr_intest = sel_intest;

  assign net_ctrl = '{rst_n:   reset_n,
                      sel:     sel_gateway,
                      capture: capture_dr,
                      shift:   shift_dr,
                      update:  update_dr};

  always_comb begin
    if (state == SHIFT_IR || state == CAPTURE_IR || state == EXIT1_IR ||
        state == PAUSE_IR || state == EXIT2_IR)
      tdo_mux = ir_so;
    else if (bsr_sel)     tdo_mux = bsr_so;
    else if (sel_gateway) tdo_mux = net_so;
    else if (sel_pathsel) tdo_mux = pathsel_sh;
    else                  tdo_mux = bypass_q;
  end

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n) tdo <= 1'b0;
    else         tdo <= tdo_mux;

endmodule
