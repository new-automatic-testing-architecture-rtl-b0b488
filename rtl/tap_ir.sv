// tap_ir: instruction register of the TAP controller.
//
// A shift stage (ir_sr) loads IR_CAPTURE in Capture-IR and shifts TDI in at
// the MSB end in Shift-IR, both on the rising TCK edge; its LSB is the serial
// output. An update stage (ir) copies the shift stage on the falling TCK edge
// in Update-IR, so decoded signals such as Enable_Sync change on a falling TCK
// edge, as the design requires for SYNC. Test-Logic-Reset (or TRST*) clears
// the shift stage and sets the update stage to IR_RESET (BYPASS, d = 16).
// Bits [7:4] of the instruction carry the SYNC address field P3..P0. The width
// and the reset values are this design's choice.
module tap_ir
  import tap_pkg::*;
(
  input  logic            tck,
  input  logic            trst_n,
  input  tap_state_t      state,
  input  logic            tdi,
  output logic            so,
  output logic [IR_W-1:0] ir
);

  logic [IR_W-1:0] ir_sr;

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n)                       ir_sr <= '0;
    else if (state == TAP_TLR)         ir_sr <= '0;
    else if (state == TAP_CAPTURE_IR)  ir_sr <= IR_CAPTURE;
    else if (state == TAP_SHIFT_IR)    ir_sr <= {tdi, ir_sr[IR_W-1:1]};

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n)                       ir <= IR_RESET;
    else if (state == TAP_TLR)         ir <= IR_RESET;
    else if (state == TAP_UPDATE_IR)   ir <= ir_sr;

  assign so = ir_sr[0];

endmodule
