// tap_pkg: types and constants shared by the test access port (TAP) logic of
// the testable multiplier.
//
// The TAP state encoding is the one the IEEE 1149.1 standard suggests. The
// instruction register is 8 bits wide: bits [3:0] hold the opcode and bits
// [7:4] hold the 4-bit address field P3..P0 that the SYNC instruction loads
// into the programmable counter of the PCU. The instruction set (PRELOAD,
// SYNC, BIST-BSR and the standard EXTEST and BYPASS) follows the design. The
// opcode values, the IR width and the capture value are this design's choice.
package tap_pkg;

  typedef enum logic [3:0] {
    TAP_EXIT2_DR  = 4'h0,
    TAP_EXIT1_DR  = 4'h1,
    TAP_SHIFT_DR  = 4'h2,
    TAP_PAUSE_DR  = 4'h3,
    TAP_SEL_IR    = 4'h4,
    TAP_UPDATE_DR = 4'h5,
    TAP_CAPTURE_DR= 4'h6,
    TAP_SEL_DR    = 4'h7,
    TAP_EXIT2_IR  = 4'h8,
    TAP_EXIT1_IR  = 4'h9,
    TAP_SHIFT_IR  = 4'hA,
    TAP_PAUSE_IR  = 4'hB,
    TAP_RTI       = 4'hC,
    TAP_UPDATE_IR = 4'hD,
    TAP_CAPTURE_IR= 4'hE,
    TAP_TLR       = 4'hF
  } tap_state_t;

  localparam int unsigned IR_W = 8;
  localparam int unsigned OP_W = 4;
  localparam int unsigned PW   = 4;   // width of the SYNC address field (P3..P0)

  typedef logic [OP_W-1:0] opcode_t;

  localparam opcode_t OP_EXTEST   = 4'h0;
  localparam opcode_t OP_PRELOAD  = 4'h1;  // SAMPLE/PRELOAD
  localparam opcode_t OP_SYNC     = 4'h2;
  localparam opcode_t OP_BIST_BSR = 4'h3;
  localparam opcode_t OP_BYPASS   = 4'hF;

  // Value loaded into the IR shift stage in Capture-IR (two LSBs "01" as the
  // standard requires).
  localparam logic [IR_W-1:0] IR_CAPTURE = 8'b0000_0001;
  // Instruction held after reset: BYPASS with P3..P0 = 0000 (d = 16).
  localparam logic [IR_W-1:0] IR_RESET   = {4'b0000, OP_BYPASS};

  // Control signals the TAP controller gives the boundary scan cells and the PCU.
  typedef struct packed {
    logic          bsr_capshf;    // BSR_CapShf: BSR capture/shift stage enabled
    logic          bsr_shf;       // BSR_Shf: BSR shifts (1) or captures (0)
    logic          bsr_update;    // Update-DR with the BSR selected
    logic          mode_in;       // input cells drive the core from their update stage
    logic          mode_out;      // output cells drive the pins from their update stage
    logic          enable_sync;   // Enable_Sync: SYNC instruction is current
    logic          bist_mode;     // BIST_mode: BIST-BSR instruction is current
    logic          run_test_idle; // Run_Test_Idle: FSM is in Run-Test/Idle
    logic          tlr;           // FSM is in Test-Logic-Reset
    logic [PW-1:0] p;             // P3..P0, address field of the current instruction
  } tap_ctrl_t;

endpackage
