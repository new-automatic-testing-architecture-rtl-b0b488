// bypass_reg: the one-bit BYPASS register of IEEE 1149.1.
//
// On a rising TCK edge it loads 0 when capture is high (Capture-DR with
// BYPASS selected) and TDI when shift is high (Shift-DR), giving a one-stage
// path from TDI to TDO. The design names this register; its behaviour is
// the standard's.
module bypass_reg (
  input  logic tck,
  input  logic capture,
  input  logic shift,
  input  logic tdi,
  output logic so
);

  always_ff @(posedge tck)
    if (capture)    so <= 1'b0;
    else if (shift) so <= tdi;

endmodule
