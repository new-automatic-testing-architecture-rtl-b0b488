// prog_counter: the programmable counter "PC" of the programmable control unit.
//
// P3..P0 is the bitwise inverse of d-1, where d is the number of TCK cycles
// each test pattern is held (d = 3 gives 1101, d = 16 gives 0000). While
// prog_enable is high (Enable_Sync and Run-Test/Idle both high) the counter
// and a reload register take P3..P0. While enable (BIST_mode) is high it
// counts up on every rising TCK edge; at all ones it raises cary for one cycle
// and reloads the stored value on the next edge, so cary is high once every d
// cycles. RESET (asynchronous, active high) clears both registers, which
// selects d = 16.
//
// The inputs, the outputs and the meaning of P3..P0 follow the design. The
// reload register, which keeps d after the SYNC instruction has been replaced
// by BIST-BSR, and the reset value are this design's choice.
module prog_counter #(
  parameter int unsigned CW = 4
) (
  input  logic          tck,
  input  logic          reset,
  input  logic          prog_enable,
  input  logic [CW-1:0] pc,
  input  logic          enable,
  output logic          cary,
  output logic [CW-1:0] cu
);

  logic [CW-1:0] preset;

  assign cary = enable && (cu == '1);

  always_ff @(posedge tck or posedge reset)
    if (reset) begin
      preset <= '0;
      cu     <= '0;
    end else if (prog_enable) begin
      preset <= pc;
      cu     <= pc;
    end else if (enable) begin
      cu     <= (cu == '1) ? preset : cu + 1'b1;
    end

endmodule
