// tapc: test access port controller (TAPC) of the testable multiplier.
//
// It holds the TAP state machine, the instruction register and the BYPASS
// register, decodes the current instruction into the control signals of the
// boundary scan register (BSR) and of the programmable control unit (PCU),
// and multiplexes the serial outputs onto TDO.
//
// Instructions (opcode in ir[3:0], see tap_pkg):
//   EXTEST    BSR between TDI and TDO; output cells drive the pins.
//   PRELOAD   SAMPLE/PRELOAD: BSR between TDI and TDO; pins and core connected.
//   SYNC      BYPASS between TDI and TDO; Enable_Sync high; input cells drive
//             the core; ir[7:4] is P3..P0 for the PCU's programmable counter.
//   BIST-BSR  BSR between TDI and TDO; BIST_mode high; input cells drive the
//             core. Capture-DR does not capture, so the signature left in the
//             BSR after Run-Test/Idle can be shifted out directly.
//   others    BYPASS.
// The instruction names, Enable_Sync, BIST_mode, Run_Test_Idle, BSR_CapShf
// and BSR_Shf follow the design; the opcodes, the decode table and the
// capture suppression under BIST-BSR are this design's choices.
//
// TDO timing: the serial data on TDO comes straight from the selected
// register's last stage, and tdo_oe is registered on the falling TCK edge
// from "state is Capture-xR or Shift-xR". This reproduces the published
// vector example, where TDO leaves high impedance at the falling edge in
// Capture-IR and shows the captured IR bit after the rising edge into
// Shift-IR. It differs from the standard, which retimes TDO on the falling
// edge.
module tapc
  import tap_pkg::*;
(
  input  logic      tck,
  input  logic      tms,
  input  logic      tdi,
  input  logic      trst_n,
  input  logic      bsr_so,
  output tap_ctrl_t ctrl,
  output logic      tdo,
  output logic      tdo_oe
);

  tap_state_t      state;
  logic            tlr;
  logic            ir_so;
  logic [IR_W-1:0] ir;
  logic            byp_so;
  opcode_t         op;
  logic            bsr_sel;
  logic            ir_path;

  tap_fsm u_fsm (.tck, .tms, .trst_n, .state, .tlr);

  tap_ir u_ir (.tck, .trst_n, .state, .tdi, .so(ir_so), .ir);

  assign op      = ir[OP_W-1:0];
  assign bsr_sel = (op == OP_EXTEST) || (op == OP_PRELOAD) || (op == OP_BIST_BSR);

  bypass_reg u_bypass (
    .tck,
    .capture(!bsr_sel && state == TAP_CAPTURE_DR),
    .shift  (!bsr_sel && state == TAP_SHIFT_DR),
    .tdi,
    .so     (byp_so)
  );

  always_comb begin
    ctrl.bsr_capshf    = bsr_sel && ((state == TAP_SHIFT_DR) ||
                                     (state == TAP_CAPTURE_DR && op != OP_BIST_BSR));
    ctrl.bsr_shf       = bsr_sel && (state == TAP_SHIFT_DR);
    ctrl.bsr_update    = bsr_sel && (state == TAP_UPDATE_DR);
    ctrl.mode_in       = (op == OP_SYNC) || (op == OP_BIST_BSR);
    ctrl.mode_out      = (op == OP_EXTEST) || (op == OP_SYNC) || (op == OP_BIST_BSR);
    ctrl.enable_sync   = (op == OP_SYNC);
    ctrl.bist_mode     = (op == OP_BIST_BSR);
    ctrl.run_test_idle = (state == TAP_RTI);
    ctrl.tlr           = tlr;
    ctrl.p             = ir[IR_W-1 -: PW];
  end

  // IR-side states: Select-IR-Scan is excluded, it still belongs to the DR column.
  assign ir_path = (state == TAP_CAPTURE_IR) || (state == TAP_SHIFT_IR) ||
                   (state == TAP_EXIT1_IR)   || (state == TAP_PAUSE_IR) ||
                   (state == TAP_EXIT2_IR)   || (state == TAP_UPDATE_IR);

  assign tdo = ir_path ? ir_so : (bsr_sel ? bsr_so : byp_so);

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n) tdo_oe <= 1'b0;
    else         tdo_oe <= (state == TAP_CAPTURE_IR) || (state == TAP_SHIFT_IR) ||
                           (state == TAP_CAPTURE_DR) || (state == TAP_SHIFT_DR);

endmodule
