// pcu: programmable control unit of the BIST boundary scan architecture.
//
// The core under test is a pipeline of sequential depth d. In BIST the PCU
// makes the pattern generator (BSR input cells) and the signature register
// (BSR output cells) act once every d TCK cycles, so each pattern is held
// while it propagates through the core, and it switches the core clock from
// Chip_CK to TCK.
//
// How it works, after the schematic of the design:
//  * Prog_Enable = Run_Test_Idle AND Enable_Sync loads P3..P0 into the
//    programmable counter, which counts while BIST_mode is high and gives a
//    one-cycle carry every d cycles.
//  * In Run-Test/Idle, DR_Shf and DR_CapShf are the carry; otherwise they are
//    the TAP controller's BSR_Shf and BSR_CapShf (AND/NOR/INV multiplexers).
//  * BIST_mode_O = Run_Test_Idle AND carry feeds the output cells;
//    BIST_mode_I is BIST_mode_O delayed by one TCK cycle in a resettable flop
//    and feeds the input cells.
//  * HOLD_BILBO_in is NOT carry in Run-Test/Idle and Hold_BILBO otherwise, so
//    BILBO registers would hold for d-1 of every d cycles.
//  * Clock switch: the SyEnable flag is set by Enable_Sync on a rising TCK
//    edge and stays set until RESET; the DivRun flag copies it on the falling
//    TCK edge and selects TCK (channel 1) on multiplexer M1, whose output is
//    CUT_CK.
// Which signal drives each multiplexer select (Run_Test_Idle), the
// carry-derived data inputs and the clock edge of the BIST_mode_I flop are
// read from the schematic's wiring and are this design's reading. DivRun has
// a reset here, which the schematic's plain flop lacks, so that the clock
// select is defined from power-up. M1 is a plain multiplexer, as drawn: it is
// not glitch-free, which is harmless for a core whose inputs are held.
//
// Interface: RESET is active high and asynchronous (driven from
// Test-Logic-Reset). All flops are in the TCK domain. The counter's count
// outputs (Cu0..Cu3) are left open, as in the schematic.
module pcu #(
  parameter int unsigned PW = 4
) (
  input  logic          tck,
  input  logic          cinp_ck,
  input  logic          reset,
  input  logic          bsr_shf,
  input  logic          bsr_capshf,
  input  logic          run_test_idle,
  input  logic          enable_sync,
  input  logic [PW-1:0] p,
  input  logic          bist_mode,
  input  logic          hold_bilbo,
  output logic          dr_shf,
  output logic          dr_capshf,
  output logic          bist_mode_o,
  output logic          bist_mode_i,
  output logic          hold_bilbo_in,
  output logic          cut_ck
);

  logic          prog_enable;
  logic          cary;
  logic [PW-1:0] cu;
  logic          sy_enable;
  logic          div_run;

  assign prog_enable = run_test_idle & enable_sync;

  prog_counter #(.CW(PW)) u_pc (
    .tck, .reset, .prog_enable, .pc(p), .enable(bist_mode), .cary, .cu
  );

  assign dr_shf        = (bsr_shf    & ~run_test_idle) | (cary & run_test_idle);
  assign dr_capshf     = (bsr_capshf & ~run_test_idle) | (cary & run_test_idle);
  assign bist_mode_o   = run_test_idle & cary;
  assign hold_bilbo_in = (hold_bilbo & ~run_test_idle) | (~cary & run_test_idle);

  always_ff @(posedge tck or posedge reset)
    if (reset) bist_mode_i <= 1'b0;
    else       bist_mode_i <= bist_mode_o;

  // A compaction pulse always comes with the BSR capture/shift enables and
  // releases the BILBO hold for that cycle only.
  a_bist_pulse: assert property (@(posedge tck) disable iff (reset)
                  bist_mode_o |-> (dr_shf && dr_capshf && !hold_bilbo_in));

  // SyEnable flag (set on rising TCK, cleared by RESET)
  always_ff @(posedge tck or posedge reset)
    if (reset)            sy_enable <= 1'b0;
    else if (enable_sync) sy_enable <= 1'b1;

  // DivRun flag (falling TCK)
  always_ff @(negedge tck or posedge reset)
    if (reset) div_run <= 1'b0;
    else       div_run <= sy_enable;

  // Multiplexer M1: channel 0 chip clock, channel 1 TCK
  assign cut_ck = div_run ? tck : cinp_ck;

endmodule
