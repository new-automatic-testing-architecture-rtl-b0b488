// tb_bsr_out_chain: self-checking test of the 32 BIST BSR output cells.
// Core to pins with mode low, capture of the core outputs and scan out, update
// to the pins with mode high, and MISR compaction under BIST_mode_O compared
// with a reference model of x^32 + x^22 + x^2 + x + 1.
module tb_bsr_out_chain;
  localparam int N = 32;
  logic tck = 0, trst_n = 1, si = 0, so;
  logic [N-1:0] core = 0, pin;
  logic dr_capshf = 0, dr_shf = 0, update = 0, mode = 0, bist_mode_o = 0;
  int checks = 0, failures = 0;
  bsr_out_chain dut (.*);

  task automatic tick; #5 tck = 1; #5 tck = 0; endtask
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic logic [N-1:0] misr(logic [N-1:0] s, logic [N-1:0] d);
    return {s[N-2:0], s[31] ^ s[21] ^ s[1] ^ s[0]} ^ d;
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic shift_out(output logic [N-1:0] got, input logic [N-1:0] sin);
    dr_capshf = 1; dr_shf = 1;
    for (int i = 0; i < N; i++) begin got[N-1-i] = so; si = sin[N-1-i]; tick; end
    dr_capshf = 0; dr_shf = 0;
  endtask

  initial begin
    logic [N-1:0] v, got, sig, seed;
    #1 trst_n = 0;
    #2 trst_n = 1;
    repeat (5) begin core = N'($urandom); #1 check(pin == core, "transparent"); end
    v = N'($urandom); core = v;
    dr_capshf = 1; dr_shf = 0; tick;
    seed = N'($urandom);
    shift_out(got, seed);
    check(got == v, $sformatf("captured %h exp %h", got, v));
    update = 1; tick; update = 0; mode = 1; #1;
    check(pin == seed, "update drives pins");
    core = ~seed; #1 check(pin == seed, "pins held from update stage");
    // MISR
    sig = seed;
    for (int k = 0; k < 40; k++) begin
      core = N'($urandom);
      dr_capshf = 1; dr_shf = 1; bist_mode_o = 1; tick;
      sig = misr(sig, core);
      dr_capshf = 0; dr_shf = 0; bist_mode_o = 0;
      check(pin == seed, "pins keep the update stage during compaction");
      core = N'($urandom); tick; tick;
    end
    shift_out(got, seed);
    check(got == sig, $sformatf("signature %h exp %h", got, sig));
    // a capture/shift enable alone must not compact
    for (int k = 0; k < 20; k++) begin
      core = N'($urandom);
      dr_capshf = 0; dr_shf = 1; bist_mode_o = 1; tick;
      dr_capshf = 0; dr_shf = 0; bist_mode_o = 0;
    end
    sig = seed;
    // per-step check: compact once, scan out, restore
    for (int k = 0; k < 16; k++) begin
      logic [N-1:0] d;
      d = N'($urandom);
      core = d;
      dr_capshf = 1; dr_shf = 1; bist_mode_o = 1; tick;
      dr_capshf = 0; dr_shf = 0; bist_mode_o = 0;
      sig = misr(sig, d);
      shift_out(got, sig);
      check(got == sig, $sformatf("step %0d signature %h exp %h", k, got, sig));
    end
    shift_out(got, '0);
    check(got == sig, $sformatf("signature %h exp %h", got, sig));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
