// tb_pipelined_multiplier: self-checking test of the 16x16 pipelined multiplier.
// Each operand pair is held; the product must equal a*b after 15 rising edges
// (the sixteenth clock cycle). The published example pairs 0002 x 000C =
// 00000018 and 1D1C x 009C = 0011BD10 come first, then random pairs, each
// checked one edge early (must not yet show the new product when it differs
// from the old one in the upper half) and at the latency.
module tb_pipelined_multiplier;
  localparam int W = 16;
  localparam int LAT = W - 1;   // rising edges until the product is valid
  logic clk = 0;
  logic [W-1:0] a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0, early_seen = 0;

  pipelined_multiplier dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(logic [W-1:0] x, logic [W-1:0] y);
    logic [2*W-1:0] expv, prev;
    prev = p;
    @(negedge clk); a = x; b = y;
    expv = (2*W)'(x) * (2*W)'(y);
    repeat (LAT-1) @(posedge clk);
    #1;
    if (expv[2*W-1:W] != prev[2*W-1:W] && $countones(y[W-1:W-2]) != 0) begin
      checks++; early_seen++;
      if (p == expv) begin failures++; $display("FAIL early product %h*%h", x, y); end
    end
    @(posedge clk); #1;
    checks++;
    if (p !== expv) begin failures++; $display("FAIL %h*%h = %h exp %h", x, y, p, expv); end
  endtask

  initial begin
    a = 0; b = 0;
    repeat (20) @(posedge clk);
    run(16'h0002, 16'h000C);
    if (p != 32'h0000_0018) failures++;
    checks++;
    run(16'h1D1C, 16'h009C);
    checks++;
    if (p != 32'h0011_BD10) failures++;
    run(16'hFFFF, 16'hFFFF);
    for (int n = 0; n < 60; n++) run(W'($urandom), W'($urandom));
    checks++;
    if (early_seen == 0) begin failures++; $display("FAIL latency never checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
