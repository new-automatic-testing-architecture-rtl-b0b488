// pipelined_multiplier: WIDTH x WIDTH unsigned parallel pipelined multiplier.
//
// Row i (an m16x1 cell) multiplies the multiplicand, delayed by i clocks, by
// bit B[i], adds the partial sum that row i-1 registered, and yields product
// bit P[i]; the last row yields P[2*WIDTH-1:WIDTH-1] from its adder. There
// is one register stage per row on both the multiplicand path and the partial
// sum path, and the multiplier bits go to their rows directly, so the
// operands must be held: after a change of A and B the full product is valid
// once WIDTH-1 rising edges have passed (15 for WIDTH = 16), that is in the
// sixteenth clock cycle counting the one in which the operands were applied.
// No product register follows the last adder and nothing is reset: the output
// is a function of the held operands once the pipeline has filled.
// Structure and width follow the design; only the edge count above is this
// design's reading of "valid after sixteen clocks".
module pipelined_multiplier #(
  parameter int unsigned WIDTH = 16
) (
  input  logic               clk,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);

  logic [WIDTH-1:0] a_row   [WIDTH];  // multiplicand into row i
  logic [WIDTH-1:0] sum_row [WIDTH];  // partial sum into row i
  logic [WIDTH-1:0] a_q     [WIDTH];
  logic [WIDTH-1:0] sum_q   [WIDTH];
  logic [WIDTH:0]   sum_full[WIDTH];
  logic [WIDTH-1:0] p_bit;

  assign a_row[0]   = a;
  assign sum_row[0] = '0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_row
    m16x1 #(.WIDTH(WIDTH)) u_row (
      .clk, .a_in(a_row[i]), .b_bit(b[i]), .sum_in(sum_row[i]),
      .p_bit(p_bit[i]), .sum_full(sum_full[i]), .a_q(a_q[i]), .sum_q(sum_q[i])
    );
    if (i > 0) begin : g_link
      assign a_row[i]   = a_q[i-1];
      assign sum_row[i] = sum_q[i-1];
    end
  end

  // The last row's registers feed nothing and are removed by synthesis; its
  // low sum bit is taken from sum_full, so p_bit of the last row is unused.
  assign p = {sum_full[WIDTH-1], p_bit[WIDTH-2:0]};

endmodule
