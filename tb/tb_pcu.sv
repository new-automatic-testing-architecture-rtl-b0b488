// tb_pcu: self-checking test of the programmable control unit.
// Checks the clock switch (CUT_CK follows the chip clock until SYNC, then
// TCK from the falling edge after the SyEnable flag is set, and the chip
// clock again after RESET), the loading of d in Run-Test/Idle under SYNC, the
// BIST pulses (BIST_mode_O, DR_Shf, DR_CapShf high one cycle in d,
// BIST_mode_I one cycle later, HOLD_BILBO_in low in the same cycle as
// BIST_mode_O) and the pass-through of BSR_Shf, BSR_CapShf and Hold_BILBO
// outside Run-Test/Idle.
module tb_pcu;
  logic tck = 0, cinp_ck = 0, reset = 0;
  logic bsr_shf = 0, bsr_capshf = 0, run_test_idle = 0, enable_sync = 0, bist_mode = 0, hold_bilbo = 0;
  logic [3:0] p = 0;
  logic dr_shf, dr_capshf, bist_mode_o, bist_mode_i, hold_bilbo_in, cut_ck;
  int checks = 0, failures = 0;
  pcu dut (.*);

  always #4 cinp_ck = ~cinp_ck;

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic rise; #8 tck = 1; #2; endtask
  task automatic fall; #8 tck = 0; #2; endtask
  task automatic tick; rise; fall; endtask

  // CUT_CK must equal the chip clock (sel=0) or TCK (sel=1) at several points
  task automatic check_clk(bit sel, string what);
    #1 check(cut_ck == (sel ? tck : cinp_ck), what);
    repeat (3) begin #2 check(cut_ck == (sel ? tck : cinp_ck), what); end
    #1;
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic bist_run(int d);
    int last_o, cyc, pulses;
    // SYNC in Run-Test/Idle loads d
    p = 4'(~(d - 1)); enable_sync = 1; run_test_idle = 1; tick; tick;
    run_test_idle = 0; tick;
    enable_sync = 0; bist_mode = 1; tick;     // leave via Update-IR
    run_test_idle = 1;
    last_o = -1; pulses = 0;
    for (cyc = 0; cyc < 6 * d; cyc++) begin
      #1;
      check(dr_shf == bist_mode_o && dr_capshf == bist_mode_o, "DR_* follow carry in RTI");
      check(hold_bilbo_in == !bist_mode_o, "HOLD_BILBO_in low with the pulse");
      if (bist_mode_o) begin
        if (last_o >= 0) check(cyc - last_o == d, $sformatf("d=%0d pulse gap %0d", d, cyc - last_o));
        last_o = cyc; pulses++;
      end
      rise; #1;
      check(bist_mode_i == (last_o == cyc), "BIST_mode_I one cycle after BIST_mode_O");
      fall;
    end
    check(pulses >= 5, $sformatf("d=%0d pulses %0d", d, pulses));
    run_test_idle = 0; bist_mode = 0; tick;
  endtask

  initial begin
    #2 reset = 1;
    #2 reset = 0;
    check_clk(0, "chip clock after reset");
    // outside Run-Test/Idle the TAP signals pass through
    repeat (20) begin
      bsr_shf = 1'($urandom); bsr_capshf = 1'($urandom); hold_bilbo = 1'($urandom);
      #1 check(dr_shf == bsr_shf && dr_capshf == bsr_capshf && hold_bilbo_in == hold_bilbo, "pass-through");
      check(!bist_mode_o, "no BIST pulse outside RTI");
    end
    bsr_shf = 0; bsr_capshf = 0; hold_bilbo = 0;
    tick; tick;
    // SYNC: Enable_Sync rises on a falling edge
    enable_sync = 1;
    rise;       // SyEnable set
    check_clk(0, "still chip clock before DivRun");
    fall;       // DivRun set
    check_clk(1, "TCK after DivRun");
    tick; tick;
    check_clk(1, "TCK while SYNC");
    enable_sync = 0; tick;
    check_clk(1, "TCK kept after SYNC is replaced");
    bist_run(16);
    bist_run(3);
    bist_run(7);
    #2 reset = 1; #2 reset = 0;
    check_clk(0, "chip clock after RESET");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
