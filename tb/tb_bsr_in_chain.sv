// tb_bsr_in_chain: self-checking test of the 32 BIST BSR input cells.
// Scan shift (so delays si by 32 cycles), capture of the pins, update on the
// falling edge into the core with mode high, pins straight to the core with
// mode low, and the LFSR steps under tpg_en compared with a reference model of
// x^32 + x^22 + x^2 + x + 1, each new pattern reaching the core after
// BIST_mode_I.
module tb_bsr_in_chain;
  localparam int N = 32;
  logic tck = 0, trst_n = 1, si = 0, so;
  logic [N-1:0] pin = 0, core;
  logic dr_capshf = 0, dr_shf = 0, update = 0, mode = 0, tpg_en = 0, bist_mode_i = 0;
  int checks = 0, failures = 0;
  bsr_in_chain dut (.*);

  task automatic tick; #5 tck = 1; #5 tck = 0; endtask
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic logic [N-1:0] lfsr(logic [N-1:0] s);
    return {s[N-2:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [N-1:0] v, got, state;
    #1 trst_n = 0;
    #2 trst_n = 1;
    // mode low: pins to core
    repeat (5) begin pin = N'($urandom); #1 check(core == pin, "transparent"); end
    // capture pins then shift out
    v = N'($urandom); pin = v;
    dr_capshf = 1; dr_shf = 0; tick;
    dr_shf = 1;
    for (int i = 0; i < N; i++) begin
      got[N-1-i] = so;
      si = 1'($urandom); state[N-1-i] = si;
      tick;
    end
    check(got == v, $sformatf("captured %h exp %h", got, v));
    // shifted-in value now in cells: update and drive core
    dr_capshf = 0; dr_shf = 0;
    update = 1; #2 tck = 1; #3 check(core == pin, "no update on rising edge, mode low");
    #2 tck = 0; #1 update = 0; mode = 1; #1;
    check(core == state, $sformatf("update %h exp %h", core, state));
    if (state == 0) state = 1;
    // reload a nonzero seed
    dr_capshf = 1; dr_shf = 1;
    for (int i = 0; i < N; i++) begin si = state[N-1-i]; tick; end
    // LFSR steps, one every 4 cycles like a short d
    tpg_en = 1;
    for (int k = 0; k < 50; k++) begin
      dr_capshf = 1; dr_shf = 1; tick;
      state = lfsr(state);
      dr_capshf = 0; dr_shf = 0;
      check(core != state, "core waits for BIST_mode_I");
      bist_mode_i = 1; tick; bist_mode_i = 0;
      check(core == state, $sformatf("step %0d core %h exp %h", k, core, state));
      tick; tick;
      check(core == state, "pattern held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
