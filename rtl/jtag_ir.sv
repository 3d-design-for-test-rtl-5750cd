// jtag_ir: instruction register and instruction decoder of a die TAP.
//
// The shift stage loads the fixed capture pattern in Capture-IR and shifts
// LSB first from tdi in Shift-IR (ir_so is its LSB). The update stage takes
// the shifted value on the falling TCK edge in Update-IR and resets to
// BYPASS while the TAP is in Test-Logic-Reset (rst_n low). The decoder
// raises exactly one select: EXTEST and INTEST access the boundary-scan
// register, GATEWAY selects the P1687 instrument network, PATHSEL selects the
// one-bit test-path register of the third stack architecture, and every
// other opcode selects the bypass bit. The instruction set follows the
// description (extest, intest, Gateway); opcodes and PATHSEL are this
// design's choice.
module jtag_ir
  import p1687_pkg::*;
(
  input  logic            tck,
  input  logic            rst_n,
  input  logic            tdi,
  input  logic            capture_ir,
  input  logic            shift_ir,
  input  logic            update_ir,
  output logic            ir_so,
  output logic [IR_W-1:0] instr,
  output logic            sel_bypass,
  output logic            sel_extest,
  output logic            sel_intest,
  output logic            sel_gateway,
  output logic            sel_pathsel
);

  logic [IR_W-1:0] ir_sh;

  always_ff @(posedge tck)
    if (capture_ir)    ir_sh <= IR_CAPTURE;
    else if (shift_ir) ir_sh <= {tdi, ir_sh[IR_W-1:1]};

  always_ff @(negedge tck or negedge rst_n)
    if (!rst_n)         instr <= OP_BYPASS;
    else if (update_ir) instr <= ir_sh;

  assign ir_so = ir_sh[0];

  always_comb begin
    sel_bypass  = 1'b0;
    sel_extest  = 1'b0;
    sel_intest  = 1'b0;
    sel_gateway = 1'b0;
    sel_pathsel = 1'b0;
    case (instr)
      OP_EXTEST:  sel_extest  = 1'b1;
      OP_INTEST:  sel_intest  = 1'b1;
      OP_GATEWAY: sel_gateway = 1'b1;
      OP_PATHSEL: sel_pathsel = 1'b1;
      default:    sel_bypass  = 1'b1;
    endcase
  end

endmodule
