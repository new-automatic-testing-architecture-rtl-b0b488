// tb_tapc: self-checking test of the TAP controller.
// 1. Replays the published 13-vector example (TRST*, TMS, TCK, TDI given as a
//    decimal value per vector, bit 0 = TRST*, bit 1 = TMS, bit 2 = TCK,
//    bit 3 = TDI): TDO must be high impedance for vectors 1-11 and show 0 and
//    then 1 at vectors 12 and 13.
// 2. Loads each instruction and checks the decoded control signals.
// 3. Checks the BYPASS path (one-cycle delay, captured 0) and the BSR path.
module tb_tapc;
  import tap_pkg::*;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, bsr_so = 0;
  tap_ctrl_t ctrl;
  logic tdo, tdo_oe;
  int checks = 0, failures = 0;
  tapc dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one TCK cycle; returns TDO as seen just before the rising edge
  task automatic clk(input bit m, input bit d, output bit o);
    tms = m; tdi = d;
    #5 o = tdo;
    tck = 1; #5 tck = 0;
  endtask

  task automatic goto_rti;
    bit o;
    repeat (5) clk(1, 0, o);
    clk(0, 0, o);
  endtask

  // from Run-Test/Idle: IR scan of v, back to Run-Test/Idle
  task automatic load_ir(input logic [IR_W-1:0] v, output logic [IR_W-1:0] out);
    bit o;
    clk(1, 0, o); clk(1, 0, o); clk(0, 0, o); clk(0, 0, o);   // Sel-DR, Sel-IR, Cap-IR, Shift-IR
    for (int i = 0; i < IR_W; i++) begin clk(i == IR_W - 1, v[i], o); out[i] = o; end
    clk(1, 0, o); clk(0, 0, o);                               // Update-IR, RTI
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int vec [13] = '{2, 3, 7, 1, 5, 3, 7, 3, 7, 1, 5, 1, 5};
    int exp_tdo [13] = '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, 0, 1};
    logic [IR_W-1:0] out;
    logic [31:0] pat, got;
    bit o;
    #1;
    // ---- 1. published vector example
    for (int n = 0; n < 13; n++) begin
      trst_n = vec[n][0]; tms = vec[n][1]; tck = vec[n][2]; tdi = vec[n][3];
      #10;
      if (exp_tdo[n] < 0) check(!tdo_oe, $sformatf("vector %0d: TDO must be Z", n + 1));
      else check(tdo_oe && tdo == exp_tdo[n][0], $sformatf("vector %0d: TDO=%0d oe=%0d", n + 1, tdo, tdo_oe));
    end
    tck = 0; #5;
    // ---- 2. instructions
    goto_rti;
    check(ctrl.run_test_idle && !ctrl.tlr, "RTI flag");
    check(!ctrl.enable_sync && !ctrl.bist_mode && !ctrl.mode_in && !ctrl.mode_out, "reset instruction is BYPASS");
    load_ir({4'b0000, OP_SYNC}, out);
    check(out == IR_CAPTURE, $sformatf("IR capture shifted out %h", out));
    check(ctrl.enable_sync && !ctrl.bist_mode && ctrl.mode_in && ctrl.p == 4'b0000, "SYNC decode d=16");
    load_ir({4'b1101, OP_SYNC}, out);
    check(ctrl.enable_sync && ctrl.p == 4'b1101, "SYNC address field");
    load_ir({4'b0000, OP_BIST_BSR}, out);
    check(ctrl.bist_mode && !ctrl.enable_sync && ctrl.mode_in && ctrl.mode_out, "BIST-BSR decode");
    load_ir({4'b0000, OP_EXTEST}, out);
    check(!ctrl.mode_in && ctrl.mode_out && !ctrl.bist_mode, "EXTEST decode");
    load_ir({4'b0000, OP_PRELOAD}, out);
    check(!ctrl.mode_in && !ctrl.mode_out, "PRELOAD decode");
    // ---- 3a. BSR path under PRELOAD: capture enabled, TDO = bsr_so
    clk(1, 0, o); clk(0, 0, o);              // Sel-DR, Cap-DR
    check(ctrl.bsr_capshf && !ctrl.bsr_shf, "capture enable in Capture-DR");
    clk(0, 0, o);                            // Shift-DR
    check(ctrl.bsr_capshf && ctrl.bsr_shf, "shift in Shift-DR");
    for (int i = 0; i < 32; i++) begin
      bsr_so = 1'($urandom); pat[i] = bsr_so;
      clk(i == 31, 0, o); got[i] = o;
    end
    check(got == pat, "TDO follows BSR serial out");
    check(!ctrl.bsr_capshf, "no shift in Exit1-DR");
    clk(1, 0, o);
    check(ctrl.bsr_update, "update in Update-DR");
    clk(0, 0, o);
    // ---- 3b. BIST-BSR: no capture in Capture-DR
    load_ir({4'b0000, OP_BIST_BSR}, out);
    clk(1, 0, o); clk(0, 0, o);
    check(!ctrl.bsr_capshf, "Capture-DR does not capture under BIST-BSR");
    clk(1, 0, o); clk(1, 0, o); clk(0, 0, o);
    // ---- 3c. BYPASS
    load_ir({4'b0000, OP_BYPASS}, out);
    clk(1, 0, o); clk(0, 0, o); clk(0, 0, o);  // into Shift-DR
    check(!ctrl.bsr_capshf, "BSR idle under BYPASS");
    pat = $urandom;
    for (int i = 0; i < 32; i++) begin clk(i == 31, pat[i], o); got[i] = o; end
    check(got == {pat[30:0], 1'b0}, $sformatf("bypass got %h exp %h", got, {pat[30:0], 1'b0}));
    clk(1, 0, o); clk(0, 0, o);
    // ---- TLR restores BYPASS
    load_ir({4'b0000, OP_SYNC}, out);
    repeat (5) clk(1, 0, o);
    check(ctrl.tlr && !ctrl.enable_sync, "TLR clears instruction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
