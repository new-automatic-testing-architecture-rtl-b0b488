// m16x1: one row ("M-16x1" cell) of the parallel pipelined multiplier.
//
// The row ANDs its multiplicand with one multiplier bit (the 16x1 multiplier
// cell) and adds the result to the upper partial sum handed on by the row
// before (the adder cell). The low bit of the sum is a product bit; the
// multiplicand and the upper WIDTH bits of the sum are registered on the
// rising clock edge for the next row (the two register cells). sum_full gives
// the unregistered WIDTH+1-bit sum, used by the last row for the upper product
// bits. The structure follows the design; the names are this design's.
module m16x1 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a_in,
  input  logic             b_bit,
  input  logic [WIDTH-1:0] sum_in,
  output logic             p_bit,
  output logic [WIDTH:0]   sum_full,
  output logic [WIDTH-1:0] a_q,
  output logic [WIDTH-1:0] sum_q
);

  assign sum_full = {1'b0, sum_in} + {1'b0, a_in & {WIDTH{b_bit}}};
  assign p_bit    = sum_full[0];

  always_ff @(posedge clk) begin
    a_q   <= a_in;
    sum_q <= sum_full[WIDTH:1];
  end

endmodule
