// bist_bsr_out_cell: one BIST boundary scan output cell.
//
// A capture/shift flop (clocked by TCK, enabled by DR_CapShf) loads the core
// output when DR_Shf is low and the serial input when DR_Shf is high; when
// BIST_mode_O is high the core output is XORed into the shifted bit, which
// makes a chain of these cells a multiple-input signature register (MISR). An
// update flop copies the capture/shift flop on the falling TCK edge in
// Update-DR and drives the pin when mode is high; otherwise the core output
// goes straight to the pin. The cell's role follows the design; its insides
// are this design's choice. TRST* clears both flops.
module bist_bsr_out_cell (
  input  logic tck,
  input  logic trst_n,
  input  logic core,
  input  logic si,
  input  logic dr_capshf,
  input  logic dr_shf,
  input  logic update,
  input  logic mode,
  input  logic bist_mode_o,
  output logic so,
  output logic pin
);

  logic cs, upd;

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n)        cs <= 1'b0;
    else if (dr_capshf) cs <= dr_shf ? (si ^ (bist_mode_o & core)) : core;

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n)     upd <= 1'b0;
    else if (update) upd <= cs;

  assign so  = cs;
  assign pin = mode ? upd : core;

endmodule
