// tb_prog_counter: self-checking test of the programmable counter.
// For d = 3 (P3..P0 = 1101, the design's worked example), d = 16 (0000) and
// random d, the value is loaded with prog_enable and the carry must then be
// high for exactly one cycle in every d while enable is high, and never while
// enable is low. RESET must clear the count.
module tb_prog_counter;
  logic tck = 0, reset = 0, prog_enable = 0, enable = 0, cary;
  logic [3:0] pc = 0, cu;
  int checks = 0, failures = 0;
  prog_counter dut (.*);

  task automatic tick; #5 tck = 1; #5 tck = 0; endtask
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_d(int d);
    int last, gaps;
    pc = 4'(~(d - 1));
    prog_enable = 1; tick; prog_enable = 0;
    check(cu == pc, "loaded");
    enable = 1; last = -1; gaps = 0;
    for (int c = 0; c < 8 * d; c++) begin
      #1;
      if (cary) begin
        if (last >= 0) begin
          check(c - last == d, $sformatf("d=%0d carry gap %0d", d, c - last));
          gaps++;
        end else check(c == d - 1, $sformatf("first carry at %0d (d=%0d)", c, d));
        last = c;
      end
      #1 tick;
    end
    check(gaps >= 6, $sformatf("d=%0d carries seen %0d", d, gaps));
    enable = 0;
    repeat (20) begin #1 check(!cary, "no carry when disabled"); tick; end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 reset = 1;
    #2 reset = 0;
    check(cu == 0, "reset");
    run_d(3);
    check(4'(~(3 - 1)) == 4'b1101, "example encoding");
    run_d(16);
    for (int n = 0; n < 10; n++) run_d(1 + $urandom % 16);
    #2 reset = 1; #1 check(cu == 0, "async reset"); reset = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
