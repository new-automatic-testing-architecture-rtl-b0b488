// tb_m16x1: self-checking test of one multiplier row.
// Random multiplicands, multiplier bits and incoming partial sums; the
// combinational sum and product bit are compared with integer arithmetic and
// the two registers with the values they must hold after a rising edge.
module tb_m16x1;
  localparam int W = 16;
  logic clk = 0;
  logic [W-1:0] a_in, sum_in, a_q, sum_q;
  logic b_bit, p_bit;
  logic [W:0] sum_full;
  int checks = 0, failures = 0;

  m16x1 dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W:0] exp_sum;
    for (int n = 0; n < 200; n++) begin
      a_in = W'($urandom); sum_in = W'($urandom); b_bit = 1'($urandom);
      if (n == 0) begin a_in = '1; sum_in = '1; b_bit = 1; end
      #1;
      exp_sum = (W+1)'(sum_in) + (b_bit ? (W+1)'(a_in) : '0);
      check(sum_full == exp_sum, $sformatf("sum %h exp %h", sum_full, exp_sum));
      check(p_bit == exp_sum[0], "p_bit");
      clk = 1; #1;
      check(a_q == a_in, "a_q");
      check(sum_q == exp_sum[W:1], "sum_q");
      clk = 0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
