// p1687_pkg: types and constants shared by the JTAG / IEEE P1687 test
// infrastructure of the 3D stack and of the passive-interposer system.
//
// It holds the sixteen IEEE 1149.1 TAP controller states, the instruction
// register width and opcodes, and the bundle of control signals that a TAP
// hands to a P1687 instrument network (and that the third stack architecture
// carries up through TSVs). The instruction names EXTEST, INTEST and the
// Gateway instruction come from the design description; the opcode values,
// the 4-bit width and the extra PATHSEL instruction are this design's choice.
package p1687_pkg;

  typedef enum logic [3:0] {
    TEST_LOGIC_RESET = 4'h0,
    RUN_TEST_IDLE    = 4'h1,
    SELECT_DR_SCAN   = 4'h2,
    CAPTURE_DR       = 4'h3,
    SHIFT_DR         = 4'h4,
    EXIT1_DR         = 4'h5,
    PAUSE_DR         = 4'h6,
    EXIT2_DR         = 4'h7,
    UPDATE_DR        = 4'h8,
    SELECT_IR_SCAN   = 4'h9,
    CAPTURE_IR       = 4'hA,
    SHIFT_IR         = 4'hB,
    EXIT1_IR         = 4'hC,
    PAUSE_IR         = 4'hD,
    EXIT2_IR         = 4'hE,
    UPDATE_IR        = 4'hF
  } tap_state_e;

  localparam int unsigned IR_W = 4;

  // Instruction opcodes. BYPASS is all ones as IEEE 1149.1 requires; any
  // opcode not listed here behaves as BYPASS.
  typedef enum logic [IR_W-1:0] {
    OP_EXTEST  = 4'b0000,
    OP_INTEST  = 4'b0010,
    OP_GATEWAY = 4'b0100,
    OP_PATHSEL = 4'b0101,
    OP_BYPASS  = 4'b1111
  } opcode_e;

  // Value loaded into the IR in Capture-IR (two LSBs "01" per IEEE 1149.1).
  localparam logic [IR_W-1:0] IR_CAPTURE = 4'b0001;

  // Control bundle of a P1687 network: the Select-Capture-Shift-Update
  // protocol plus the network reset (low while the TAP is in
  // Test-Logic-Reset).
  typedef struct packed {
    logic rst_n;
    logic sel;
    logic capture;
    logic shift;
    logic update;
  } net_ctrl_t;

  // IEEE 1500 wrapper serial port inputs (WSP) as seen by a wrapped die.
  typedef struct packed {
    logic wrck;
    logic wrst_n;
    logic shift_wr;
    logic capture_wr;
    logic update_wr;
    logic select_wir;
    logic wsi;
  } wsp_t;

endpackage
