// tb_pc_port_ate: the testable multiplier driven the way a PC drives it
// through its parallel port.
//
// The PC writes one 5-bit vector per step to the data port: D0 = TRST*,
// D1 = TMS, D2 = TCK, D3 = TDI, D4 = Chip_CLK, and reads TDO on status bit 5
// after each write (a TDO in high impedance reads as 1, the port's pull-up).
// The operand pins are tied to constants (A = 1D1C, B = 009C), as on a
// board where only the five port lines reach the chip. The testbench builds
// the whole test as a list of decimal vectors with the expected TDO for each
// (or "don't care"), then plays it and compares each reading (PASS/FAIL per
// vector, counted):
//   * the 13-vector TAP example (TDO Z x11, 0, 1);
//   * 20 chip-clock cycles, then SAMPLE: the captured product must be
//     0011BD10 and the captured pins 009C/1D1C;
//   * a complete self-test with d = 16: PRELOAD seed, SYNC, BIST-BSR,
//     NPER periods in Run-Test/Idle, signature and generator state read back
//     and compared with a model of the LFSR, multiplier and MISR;
//   * Test-Logic-Reset.
module tb_pc_port_ate;
  import tap_pkg::*;
  localparam int NPER = 12;
  localparam logic [31:0] TAPS = 32'h8020_0003;
  localparam logic [15:0] A_TIE = 16'h1D1C, B_TIE = 16'h009C;

  logic [7:0] data_port = 8'h01;       // PC data port (H378), TRST* released
  logic [2*16-1:0] p_pin;
  logic tdo, tdo_oe, hold_bilbo_in, cut_ck;
  logic status_bit5;
  int checks = 0, failures = 0;
  int vec[$], expect_tdo[$];

  testable_multiplier_top dut (
    .chip_ck(data_port[4]), .tck(data_port[2]), .tms(data_port[1]), .tdi(data_port[3]),
    .trst_n(data_port[0]), .a_pin(A_TIE), .b_pin(B_TIE), .hold_bilbo(1'b0),
    .p_pin, .tdo, .tdo_oe, .hold_bilbo_in, .cut_ck
  );

  assign status_bit5 = tdo_oe ? tdo : 1'b1;

  function automatic logic [31:0] lfsr(logic [31:0] s);
    return {s[30:0], ^(s & TAPS)};
  endfunction
  function automatic logic [31:0] misr(logic [31:0] s, logic [31:0] d);
    return {s[30:0], ^(s & TAPS)} ^ d;
  endfunction

  // ---- vector list builders
  function automatic void put(int v, int e); vec.push_back(v); expect_tdo.push_back(e); endfunction
  // one TCK cycle; e = expected TDO before the rising edge (-1: don't care)
  function automatic void tck_cycle(bit tms, bit tdi, int e);
    put(1 + 2 * tms + 8 * tdi, e);
    put(1 + 2 * tms + 4 + 8 * tdi, -1);
  endfunction
  function automatic void ir_scan(opcode_t op, logic [3:0] p);
    logic [7:0] v = {p, op};
    tck_cycle(1, 0, -1); tck_cycle(1, 0, -1); tck_cycle(0, 0, -1); tck_cycle(0, 0, -1);
    for (int i = 0; i < 8; i++) tck_cycle(i == 7, v[i], i < 2 ? (i == 0 ? 1 : 0) : -1);
    tck_cycle(1, 0, -1); tck_cycle(0, 0, -1);
  endfunction
  // DR scan of the 64-bit BSR from Run-Test/Idle
  function automatic void dr_scan(logic [63:0] din, logic [63:0] exp_out, bit check_out);
    tck_cycle(1, 0, -1); tck_cycle(0, 0, -1); tck_cycle(0, 0, -1);
    for (int i = 0; i < 64; i++) tck_cycle(i == 63, din[i], check_out ? int'(exp_out[i]) : -1);
    tck_cycle(1, 0, -1); tck_cycle(0, 0, -1);
  endfunction

  initial begin
    #50_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ex [13] = '{1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 1};   // Z reads as 1
    int t1 [13] = '{2, 3, 7, 1, 5, 3, 7, 3, 7, 1, 5, 1, 5};
    logic [63:0] din, dexp;
    logic [31:0] seed_in, seed_out, lf, sig, prod;
    int pass = 0, fail = 0;
    // 1. TAP example; only vectors 12 and 13 have TDO driven
    for (int n = 0; n < 13; n++) put(t1[n], ex[n]);
    tck_cycle(1, 0, -1); repeat (5) tck_cycle(1, 0, -1); tck_cycle(0, 0, -1);   // reset, RTI
    // 2. chip clock runs the core (tied operands), then SAMPLE
    repeat (20) begin put(1, -1); put(1 + 16, -1); end
    ir_scan(OP_PRELOAD, 4'b0000);
    prod = 32'(A_TIE) * 32'(B_TIE);
    seed_in = 32'h1357_9BDF; seed_out = 32'h0F0F_A5A5;
    for (int i = 0; i < 32; i++) begin
      din[i] = seed_out[31 - i];   din[32 + i] = seed_in[31 - i];
      dexp[i] = prod[31 - i];      dexp[32 + i] = {B_TIE, A_TIE}[31 - i];
    end
    dr_scan(din, dexp, 1);
    // 3. self-test, d = 16
    ir_scan(OP_SYNC, 4'b0000);
    repeat (20) tck_cycle(0, 0, -1);
    ir_scan(OP_BIST_BSR, 4'b0000);
    repeat (16 * NPER - 2) tck_cycle(0, 0, -1);
    tck_cycle(1, 0, -1);
    lf = seed_in; sig = seed_out;
    for (int k = 0; k < NPER; k++) begin
      sig = misr(sig, 32'(lf[15:0]) * 32'(lf[31:16]));
      lf = lfsr(lf);
    end
    for (int i = 0; i < 32; i++) begin dexp[i] = sig[31 - i]; dexp[32 + i] = lf[31 - i]; end
    tck_cycle(0, 0, -1); tck_cycle(0, 0, -1);
    for (int i = 0; i < 64; i++) tck_cycle(i == 63, 0, int'(dexp[i]));
    tck_cycle(1, 0, -1); tck_cycle(0, 0, -1);
    // 4. halt
    repeat (5) tck_cycle(1, 0, -1);

    // ---- play the list as the PC program does
    $display("test program: %0d vectors", vec.size());
    #10;
    for (int n = 0; n < vec.size(); n++) begin
      data_port = 8'(vec[n]);
      #10;
      if (expect_tdo[n] >= 0) begin
        checks++;
        if (status_bit5 == expect_tdo[n][0]) pass++;
        else begin
          fail++; failures++;
          $display("FAIL vector %0d (value %0d): TDO %0d expected %0d", n + 1, vec[n], status_bit5, expect_tdo[n]);
        end
      end
    end
    $display("PASS %0d  FAIL %0d", pass, fail);
    checks++;
    if (cut_ck != data_port[4]) begin failures++; $display("FAIL core not back on the chip clock"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
