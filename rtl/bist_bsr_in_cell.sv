// bist_bsr_in_cell: one BIST boundary scan input cell.
//
// A capture/shift flop (clocked by TCK, enabled by DR_CapShf) loads the pin
// when DR_Shf is low and the serial input when DR_Shf is high. An update flop
// copies it on the falling TCK edge in Update-DR or when BIST_mode_I is high,
// and drives the core input when mode is high; otherwise the pin goes straight
// to the core. Chained with feedback (bsr_in_chain) the capture/shift flops
// form the LFSR test pattern generator, and BIST_mode_I moves each new pattern
// to the core once every d cycles. The cell's role follows the design; its
// gate-level insides are this design's choice. TRST* clears both flops.
module bist_bsr_in_cell (
  input  logic tck,
  input  logic trst_n,
  input  logic pin,
  input  logic si,
  input  logic dr_capshf,
  input  logic dr_shf,
  input  logic update,
  input  logic mode,
  input  logic bist_mode_i,
  output logic so,
  output logic core
);

  logic cs, upd;

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n)        cs <= 1'b0;
    else if (dr_capshf) cs <= dr_shf ? si : pin;

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n)                      upd <= 1'b0;
    else if (update || bist_mode_i)   upd <= cs;

  assign so   = cs;
  assign core = mode ? upd : pin;

endmodule
