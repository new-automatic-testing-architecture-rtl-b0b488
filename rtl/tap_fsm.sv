// tap_fsm: the 16-state TAP controller state machine of IEEE 1149.1.
//
// The state advances on every rising edge of TCK as TMS selects; TRST* (active
// low) forces Test-Logic-Reset asynchronously. Five rising edges with TMS high
// reach Test-Logic-Reset from any state. The design names this FSM as part of
// its TAP controller and follows the standard; the state encoding is the
// standard's suggested one (tap_pkg).
//
// Interface: tck, tms, trst_n in; state (tap_state_t) and the decoded flag tlr
// out. Timing: state changes only after a rising TCK edge or on TRST*.
module tap_fsm
  import tap_pkg::*;
(
  input  logic       tck,
  input  logic       tms,
  input  logic       trst_n,
  output tap_state_t state,
  output logic       tlr
);

  tap_state_t next;

  always_comb begin
    unique case (state)
      TAP_TLR:        next = tms ? TAP_TLR       : TAP_RTI;
      TAP_RTI:        next = tms ? TAP_SEL_DR    : TAP_RTI;
      TAP_SEL_DR:     next = tms ? TAP_SEL_IR    : TAP_CAPTURE_DR;
      TAP_CAPTURE_DR: next = tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_SHIFT_DR:   next = tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_EXIT1_DR:   next = tms ? TAP_UPDATE_DR : TAP_PAUSE_DR;
      TAP_PAUSE_DR:   next = tms ? TAP_EXIT2_DR  : TAP_PAUSE_DR;
      TAP_EXIT2_DR:   next = tms ? TAP_UPDATE_DR : TAP_SHIFT_DR;
      TAP_UPDATE_DR:  next = tms ? TAP_SEL_DR    : TAP_RTI;
      TAP_SEL_IR:     next = tms ? TAP_TLR       : TAP_CAPTURE_IR;
      TAP_CAPTURE_IR: next = tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_SHIFT_IR:   next = tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_EXIT1_IR:   next = tms ? TAP_UPDATE_IR : TAP_PAUSE_IR;
      TAP_PAUSE_IR:   next = tms ? TAP_EXIT2_IR  : TAP_PAUSE_IR;
      TAP_EXIT2_IR:   next = tms ? TAP_UPDATE_IR : TAP_SHIFT_IR;
      TAP_UPDATE_IR:  next = tms ? TAP_SEL_DR    : TAP_RTI;
      default:        next = TAP_TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) state <= TAP_TLR;
    else         state <= next;

  assign tlr = (state == TAP_TLR);

endmodule
