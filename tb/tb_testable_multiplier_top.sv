// tb_testable_multiplier_top: end-to-end test of the testable multiplier at
// its default size, driven only through its pins, the way a PC on the
// parallel port drives a board.
//  1. Replays the published 13-vector TAP example and checks TDO.
//  2. Normal operation on the chip clock: the published products
//     0002 x 000C and 1D1C x 009C and random ones, each valid in the 16th
//     clock cycle (after 15 rising edges) and not one edge earlier.
//  3. BYPASS: one-bit delay from TDI to TDO.
//  4. SAMPLE/PRELOAD: captures the 32 input pins and the 32 product bits,
//     shifts them out while shifting a seed in.
//  5. EXTEST: the output cells drive the preloaded seed onto the product pins.
//  6. BIST: SYNC with d = 16 switches the core to TCK, BIST-BSR in
//     Run-Test/Idle for NPER periods, signature and generator state shifted
//     out and compared with a model of the LFSR, the multiplier and the MISR
//     written here; every compacted response is also checked to be the exact
//     product of the held pattern.
//  7. Test-Logic-Reset gives the core back to the chip clock.
//  8. A second self-test with d = 3 (BIST-BSR loaded twice, as allowed to
//     let the seed's response settle): compactions must come every 3 cycles.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_testable_multiplier_top;
  import tap_pkg::*;
  localparam int W = 16, NB = 32, NPER = 24;
  localparam logic [31:0] TAPS = 32'h8020_0003;

  logic chip_ck = 0, tck = 0, tms = 1, tdi = 0, trst_n = 1, hold_bilbo = 0;
  logic [W-1:0] a_pin = 0, b_pin = 0;
  logic [2*W-1:0] p_pin;
  logic tdo, tdo_oe, hold_bilbo_in, cut_ck;
  int checks = 0, failures = 0;
  int n_table = 0, n_normal = 0, n_bypass = 0, n_sample = 0, n_extest = 0,
      n_switch_tck = 0, n_switch_chip = 0, n_tpg = 0, n_misr = 0, n_hold = 0, n_sig = 0,
      n_short_d = 0;
  int cur_d = 16, cyc = 0, last_pulse = -1;

  testable_multiplier_top dut (.*);

  always #3 chip_ck = ~chip_ck;

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [31:0] lfsr(logic [31:0] s);
    return {s[30:0], ^(s & TAPS)};
  endfunction
  function automatic logic [31:0] misr(logic [31:0] s, logic [31:0] d);
    return {s[30:0], ^(s & TAPS)} ^ d;
  endfunction

  // one TCK cycle (period 40); o is TDO just before the rising edge
  task automatic clk(input bit m, input bit d, output bit o);
    tms = m; tdi = d;
    #20 o = tdo;
    tck = 1; #20 tck = 0;
  endtask
  task automatic clk0(input bit m); bit o; clk(m, 0, o); endtask

  task automatic reset_tap;
    repeat (5) clk0(1);
    clk0(0);
  endtask

  task automatic load_ir(input opcode_t op, input logic [3:0] p);
    logic [IR_W-1:0] v;
    bit o;
    v = {p, op};
    clk0(1); clk0(1); clk0(0); clk0(0);
    for (int i = 0; i < IR_W; i++) clk(i == IR_W - 1, v[i], o);
    clk0(1); clk0(0);
  endtask

  // DR scan of the 64-cell chain from RTI; first bit out = output cell 31
  task automatic scan_bsr(input logic [63:0] din, output logic [63:0] dout);
    bit o;
    clk0(1); clk0(0); clk0(0);
    for (int i = 0; i < 64; i++) begin clk(i == 63, din[i], o); dout[i] = o; end
    clk0(1); clk0(0);
  endtask

  // ---- mechanism monitors (observation only)
  always @(posedge tck) begin
    if (dut.bist_mode_o) n_misr++;
    if (dut.bist_mode_i) n_tpg++;
    if (dut.ctrl.run_test_idle && dut.ctrl.bist_mode && !hold_bilbo_in) n_hold++;
  end
  // compactions inside one stay in Run-Test/Idle must be exactly d cycles apart
  always @(posedge tck) begin
    cyc++;
    if (!dut.ctrl.run_test_idle) last_pulse = -1;
    else if (dut.bist_mode_o) begin
      if (last_pulse >= 0) begin
        checks++;
        if (cyc - last_pulse != cur_d) begin
          failures++; $display("FAIL compaction gap %0d, d = %0d", cyc - last_pulse, cur_d);
        end
        if (cur_d != 16) n_short_d++;
      end
      last_pulse = cyc;
    end
  end
  // every compacted response must be the product of the pattern on the core
  always @(posedge tck) if (dut.bist_mode_o && cur_d == 16) begin
    checks++;
    if (dut.core_out !== 32'(dut.core_in[15:0]) * 32'(dut.core_in[31:16])) begin
      failures++;
      $display("FAIL compacted response %h for %h*%h", dut.core_out, dut.core_in[15:0], dut.core_in[31:16]);
    end
  end

  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic normal_mult(logic [W-1:0] x, logic [W-1:0] y);
    logic [31:0] e;
    e = 32'(x) * 32'(y);
    @(negedge chip_ck); a_pin = x; b_pin = y;
    repeat (14) @(posedge chip_ck);
    #1 if (e[31:16] != 0 && p_pin == e) begin failures++; $display("FAIL product before latency"); end
    @(posedge chip_ck); #1;
    check(p_pin == e, $sformatf("normal %h*%h=%h exp %h", x, y, p_pin, e));
    n_normal++;
  endtask

  initial begin
    int vec [13] = '{2, 3, 7, 1, 5, 3, 7, 3, 7, 1, 5, 1, 5};
    int exp_tdo [13] = '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, 0, 1};
    logic [63:0] din, dout;
    logic [31:0] seed_in, seed_out, lf, sig, ax;
    bit o;
    // ---- 1. published vector example (bit4 = Chip_CLK not driven here)
    #1;
    for (int n = 0; n < 13; n++) begin
      trst_n = vec[n][0]; tms = vec[n][1]; tck = vec[n][2]; tdi = vec[n][3];
      #20;
      if (exp_tdo[n] < 0) check(!tdo_oe, $sformatf("vector %0d TDO Z", n + 1));
      else check(tdo_oe && tdo == exp_tdo[n][0], $sformatf("vector %0d TDO", n + 1));
    end
    n_table++;
    tck = 0; #20;
    reset_tap;
    // ---- 2. normal operation
    check(cut_ck == chip_ck, "chip clock drives the core after reset");
    normal_mult(16'h0002, 16'h000C);
    check(p_pin == 32'h0000_0018, "0002 x 000C");
    normal_mult(16'h1D1C, 16'h009C);
    check(p_pin == 32'h0011_BD10, "1D1C x 009C");
    repeat (10) normal_mult(W'($urandom), W'($urandom));
    // ---- 3. BYPASS
    clk0(1); clk0(0); clk0(0);
    ax = $urandom;
    for (int i = 0; i < 32; i++) begin clk(i == 31, ax[i], o); din[i] = o; end
    clk0(1); clk0(0);
    check(din[31:0] == {ax[30:0], 1'b0}, "bypass path");
    n_bypass++;
    // ---- 4. SAMPLE/PRELOAD with seed
    a_pin = 16'h1D1C; b_pin = 16'h009C;
    repeat (40) @(posedge chip_ck);
    load_ir(OP_PRELOAD, 4'b0000);
    seed_in  = $urandom | 32'h1;
    seed_out = $urandom;
    for (int i = 0; i < 32; i++) begin din[i] = seed_out[31-i]; din[32+i] = seed_in[31-i]; end
    scan_bsr(din, dout);
    for (int i = 0; i < 32; i++) begin
      check(dout[i] == p_pin[31-i], $sformatf("sampled product bit %0d", 31 - i));
      check(dout[32+i] == {b_pin, a_pin}[31-i], $sformatf("sampled input pin %0d", 31 - i));
    end
    n_sample++;
    check(p_pin == 32'h0011_BD10, "PRELOAD leaves pins to the core");
    // ---- 5. EXTEST drives the preloaded values
    load_ir(OP_EXTEST, 4'b0000);
    check(p_pin == seed_out, $sformatf("EXTEST drives %h exp %h", p_pin, seed_out));
    a_pin = ~a_pin; #50;
    check(p_pin == seed_out, "EXTEST output held");
    n_extest++;
    // ---- 6. BIST
    load_ir(OP_SYNC, 4'b0000);             // d = 16, passes through RTI
    check(dut.ctrl.enable_sync, "SYNC current");
    #5; repeat (5) begin #3 check(cut_ck == tck, "core on TCK after SYNC"); end
    n_switch_tck++;
    repeat (20) clk0(0);
    load_ir(OP_BIST_BSR, 4'b0000);         // last clk enters RTI
    #1 check(cut_ck == tck, "core still on TCK under BIST-BSR");
    repeat (16 * NPER - 2) clk0(0);
    clk0(1);                               // leaves RTI on the last capture
    clk0(0); clk0(0);                      // Capture-DR (no capture), Shift-DR
    for (int i = 0; i < 64; i++) begin clk(i == 63, 0, o); dout[i] = o; end
    clk0(1); clk0(0);
    lf = seed_in; sig = seed_out;
    for (int k = 0; k < NPER; k++) begin
      sig = misr(sig, 32'(lf[15:0]) * 32'(lf[31:16]));
      lf = lfsr(lf);
    end
    for (int i = 0; i < 32; i++) begin
      check(dout[i] == sig[31-i], $sformatf("signature bit %0d", 31 - i));
      check(dout[32+i] == lf[31-i], $sformatf("generator bit %0d", 31 - i));
    end
    n_sig++;
    check(n_misr == NPER, $sformatf("%0d compactions exp %0d", n_misr, NPER));
    check(n_tpg == NPER, $sformatf("%0d new patterns exp %0d", n_tpg, NPER));
    check(n_hold == NPER, $sformatf("%0d HOLD_BILBO_in release cycles exp %0d", n_hold, NPER));
    // ---- 7. back to normal
    reset_tap;
    repeat (5) begin
      @(posedge chip_ck) #1 check(cut_ck == 1'b1, "chip clock back after TLR (high)");
      @(negedge chip_ck) #1 check(cut_ck == 1'b0, "chip clock back after TLR (low)");
    end
    n_switch_chip++;
    normal_mult(16'h1D1C, 16'h009C);
    // ---- 8. BIST with d = 3 (P3..P0 = 1101), BIST-BSR loaded twice
    load_ir(OP_PRELOAD, 4'b0000);
    for (int i = 0; i < 64; i++) din[i] = 1'($urandom);
    din[63] = 1'b1;
    scan_bsr(din, dout);
    cur_d = 3;
    load_ir(OP_SYNC, 4'b1101);
    repeat (20) clk0(0);
    load_ir(OP_BIST_BSR, 4'b0000);
    repeat (10) clk0(0);
    load_ir(OP_BIST_BSR, 4'b0000);
    repeat (3 * 20) clk0(0);
    check(n_short_d >= 19, $sformatf("%0d compaction gaps seen with d = 3", n_short_d));
    reset_tap;
    cur_d = 16;
    normal_mult(16'hBEEF, 16'h1234);
    // ---- mechanism coverage
    $display("mechanisms: table1=%0d normal=%0d bypass=%0d sample=%0d extest=%0d to_tck=%0d to_chip=%0d tpg=%0d misr=%0d hold_release=%0d signature=%0d short_d=%0d",
             n_table, n_normal, n_bypass, n_sample, n_extest, n_switch_tck, n_switch_chip, n_tpg, n_misr, n_hold, n_sig, n_short_d);
    if (n_table == 0 || n_normal == 0 || n_bypass == 0 || n_sample == 0 || n_extest == 0 ||
        n_switch_tck == 0 || n_switch_chip == 0 || n_tpg == 0 || n_misr == 0 || n_hold == 0 || n_sig == 0 || n_short_d == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
