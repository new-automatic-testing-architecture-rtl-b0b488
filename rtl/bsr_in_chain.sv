// bsr_in_chain: the N BIST BSR input cells in series, with the pattern
// generator feedback.
//
// Cell 0 is nearest TDI and cell N-1 drives so. On a shift every cell takes
// its neighbour's bit towards so. When tpg_en is high (BIST-BSR current and
// the TAP in Run-Test/Idle) cell 0 takes the XOR of the cells selected by
// TAPS instead of si, so the cells step as a Fibonacci LFSR each time the PCU
// pulses DR_CapShf/DR_Shf; the next BIST_mode_I pulse moves the new pattern to
// the core. With N = 32 the default taps (bits 31, 21, 1, 0) give the
// primitive polynomial x^32 + x^22 + x^2 + x + 1, so the generator has a
// period of 2^32 - 1 from any nonzero seed. The cell count follows the design
// (32 input pins); the polynomial and the bit order are this design's choice.
module bsr_in_chain #(
  parameter int unsigned  N    = 32,
  parameter logic [N-1:0] TAPS = 32'h8020_0003
) (
  input  logic         tck,
  input  logic         trst_n,
  input  logic [N-1:0] pin,
  output logic [N-1:0] core,
  input  logic         si,
  output logic         so,
  input  logic         dr_capshf,
  input  logic         dr_shf,
  input  logic         update,
  input  logic         mode,
  input  logic         tpg_en,
  input  logic         bist_mode_i
);

  logic [N-1:0] cs;      // serial outputs of the cells
  logic [N-1:0] chain;   // serial inputs of the cells
  logic         feedback;

  assign feedback = ^(cs & TAPS);
  assign chain    = {cs[N-2:0], tpg_en ? feedback : si};

  for (genvar i = 0; i < N; i++) begin : g_cell
    bist_bsr_in_cell u_cell (
      .tck, .trst_n, .pin(pin[i]), .si(chain[i]), .dr_capshf, .dr_shf,
      .update, .mode, .bist_mode_i, .so(cs[i]), .core(core[i])
    );
  end

  assign so = cs[N-1];

endmodule
