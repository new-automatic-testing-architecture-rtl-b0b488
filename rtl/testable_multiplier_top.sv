// testable_multiplier_top: a 16-bit parallel pipelined multiplier with IEEE
// 1149.1 boundary scan whose boundary cells double as a built-in self-test.
//
// Blocks and connections:
//   tapc                 TAP controller (FSM, IR, BYPASS, decoder, TDO mux)
//   pcu                  programmable control unit: BIST timing and the switch
//                        of the core clock CUT_CK from chip_ck to TCK
//   bsr_in_chain         32 input cells on A (cells 0-15) and B (cells 16-31);
//                        LFSR pattern generator in BIST
//   pipelined_multiplier the core under test, clocked by CUT_CK
//   bsr_out_chain        32 output cells on P; MISR in BIST
// The scan chain runs TDI -> input cells 0..31 -> output cells 0..31 -> TDO.
// All boundary cells are clocked by TCK; the core is clocked by chip_ck in
// normal operation and by TCK once SYNC has been loaded, until the TAP
// returns to Test-Logic-Reset.
//
// BIST sequence: PRELOAD a seed into the 64 cells, load SYNC with P3..P0 (the
// inverse of d-1; 0000 gives d = 16) and pass through Run-Test/Idle, load
// BIST-BSR, stay in Run-Test/Idle (each d TCK cycles the response to the held
// pattern is compacted and a new pattern is applied), then shift the 32-bit
// signature (output cells, first out) and the generator state out through
// TDO, and go to Test-Logic-Reset.
//
// The block structure follows the design. The pin-to-cell order, the chain
// order and the BYPASS path for SYNC are this design's choices. hold_bilbo
// and hold_bilbo_in serve BILBO registers outside this core, which has none.
// WIDTH is the multiplier width; the default LFSR/MISR polynomial (32 cells)
// and the 4-bit d field (d up to 16 = pipeline depth plus one) are sized for
// WIDTH = 16.
//
// Lint tools report the TAP state as used both synchronously and, decoded as
// Test-Logic-Reset, as the PCU's asynchronous reset. That is intended: the
// test logic must release the core clock as soon as the TAP is reset.
module testable_multiplier_top
  import tap_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic               chip_ck,
  input  logic               tck,
  input  logic               tms,
  input  logic               tdi,
  input  logic               trst_n,
  input  logic [WIDTH-1:0]   a_pin,
  input  logic [WIDTH-1:0]   b_pin,
  input  logic               hold_bilbo,
  output logic [2*WIDTH-1:0] p_pin,
  output logic               tdo,
  output logic               tdo_oe,
  output logic               hold_bilbo_in,
  output logic               cut_ck
);

  localparam int unsigned NB = 2 * WIDTH;   // cells per chain

  tap_ctrl_t         ctrl;
  logic              dr_shf, dr_capshf, bist_mode_o, bist_mode_i;
  logic              in_so, out_so;
  logic [NB-1:0]     core_in;
  logic [NB-1:0]     core_out;

  tapc u_tapc (
    .tck, .tms, .tdi, .trst_n, .bsr_so(out_so), .ctrl, .tdo, .tdo_oe
  );

  pcu #(.PW(PW)) u_pcu (
    .tck,
    .cinp_ck      (chip_ck),
    .reset        (ctrl.tlr),
    .bsr_shf      (ctrl.bsr_shf),
    .bsr_capshf   (ctrl.bsr_capshf),
    .run_test_idle(ctrl.run_test_idle),
    .enable_sync  (ctrl.enable_sync),
    .p            (ctrl.p),
    .bist_mode    (ctrl.bist_mode),
    .hold_bilbo,
    .dr_shf, .dr_capshf, .bist_mode_o, .bist_mode_i, .hold_bilbo_in, .cut_ck
  );

  bsr_in_chain #(.N(NB)) u_in (
    .tck, .trst_n,
    .pin        ({b_pin, a_pin}),
    .core       (core_in),
    .si         (tdi),
    .so         (in_so),
    .dr_capshf, .dr_shf,
    .update     (ctrl.bsr_update),
    .mode       (ctrl.mode_in),
    .tpg_en     (ctrl.bist_mode & ctrl.run_test_idle),
    .bist_mode_i
  );

  pipelined_multiplier #(.WIDTH(WIDTH)) u_mult (
    .clk(cut_ck),
    .a  (core_in[WIDTH-1:0]),
    .b  (core_in[NB-1:WIDTH]),
    .p  (core_out)
  );

  bsr_out_chain #(.N(NB)) u_out (
    .tck, .trst_n,
    .core       (core_out),
    .pin        (p_pin),
    .si         (in_so),
    .so         (out_so),
    .dr_capshf, .dr_shf,
    .update     (ctrl.bsr_update),
    .mode       (ctrl.mode_out),
    .bist_mode_o
  );

endmodule
