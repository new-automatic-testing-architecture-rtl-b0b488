// tb_bypass_reg: self-checking test of the one-bit BYPASS register.
// Capture must load 0; shift must delay TDI by exactly one TCK cycle; with
// neither, the bit must hold.
module tb_bypass_reg;
  logic tck = 0, capture, shift, tdi, so;
  int checks = 0, failures = 0;
  bypass_reg dut (.*);

  task automatic tick; #5 tck = 1; #5 tck = 0; endtask
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic prev;
    capture = 0; shift = 1; tdi = 1; tick;
    capture = 1; shift = 0; tick; check(so == 0, "capture 0");
    capture = 0; shift = 1;
    prev = so;
    for (int n = 0; n < 100; n++) begin
      tdi = 1'($urandom);
      check(so == prev, "so holds last tdi before edge");
      tick;
      check(so == tdi, "so = tdi after edge");
      prev = tdi;
    end
    shift = 0; tdi = ~so; prev = so; tick; check(so == prev, "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
