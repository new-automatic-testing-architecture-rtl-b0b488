// bsr_out_chain: the N BIST BSR output cells in series, with the signature
// register feedback.
//
// Cell 0 takes si (the last input cell) and cell N-1 drives so, which goes to
// TDO. When BIST_mode_O is high, cell 0 takes the XOR of the cells selected by
// TAPS instead of si and every cell XORs its core output into the shifted bit,
// so the cells compact one core response into a MISR signature per pulse. The
// default taps give x^32 + x^22 + x^2 + x + 1. The cell count follows the
// design (32 output pins); the polynomial is this design's choice.
module bsr_out_chain #(
  parameter int unsigned  N    = 32,
  parameter logic [N-1:0] TAPS = 32'h8020_0003
) (
  input  logic         tck,
  input  logic         trst_n,
  input  logic [N-1:0] core,
  output logic [N-1:0] pin,
  input  logic         si,
  output logic         so,
  input  logic         dr_capshf,
  input  logic         dr_shf,
  input  logic         update,
  input  logic         mode,
  input  logic         bist_mode_o
);

  logic [N-1:0] cs;
  logic [N-1:0] chain;
  logic         feedback;

  assign feedback = ^(cs & TAPS);
  assign chain    = {cs[N-2:0], bist_mode_o ? feedback : si};

  for (genvar i = 0; i < N; i++) begin : g_cell
    bist_bsr_out_cell u_cell (
      .tck, .trst_n, .core(core[i]), .si(chain[i]), .dr_capshf, .dr_shf,
      .update, .mode, .bist_mode_o, .so(cs[i]), .pin(pin[i])
    );
  end

  assign so = cs[N-1];

endmodule
