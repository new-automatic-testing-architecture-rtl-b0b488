// tb_tap_ir: self-checking test of the instruction register.
// The testbench drives the TAP state directly: Capture-IR must load the
// capture value (LSB first on so), Shift-IR must shift TDI in, the update
// stage must change only on the falling edge in Update-IR, and
// Test-Logic-Reset must restore BYPASS.
module tb_tap_ir;
  import tap_pkg::*;
  logic tck = 0, trst_n = 1, tdi = 0, so;
  tap_state_t state = TAP_TLR;
  logic [IR_W-1:0] ir;
  int checks = 0, failures = 0;
  tap_ir dut (.*);

  task automatic rise; #4 tck = 1; #1; endtask
  task automatic fall; #4 tck = 0; #1; endtask
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [IR_W-1:0] val, old;
    #1 trst_n = 0;
    #2 check(ir == IR_RESET && so == 0, "reset values");
    trst_n = 1;
    for (int n = 0; n < 40; n++) begin
      val = IR_W'($urandom);
      old = ir;
      state = TAP_CAPTURE_IR; rise; fall;
      state = TAP_SHIFT_IR;
      for (int i = 0; i < IR_W; i++) begin
        check(so == IR_CAPTURE[i], $sformatf("captured bit %0d", i));
        tdi = val[i];
        rise; fall;
      end
      state = TAP_EXIT1_IR; rise; fall;
      check(ir == old, "no update before Update-IR");
      state = TAP_UPDATE_IR; rise;
      check(ir == old, "no update on rising edge");
      fall;
      check(ir == val, $sformatf("updated %h exp %h", ir, val));
      state = TAP_RTI; rise; fall;
      check(ir == val, "holds");
    end
    state = TAP_TLR; rise; fall;
    check(ir == IR_RESET, "TLR restores BYPASS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
