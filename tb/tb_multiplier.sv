// tb_multiplier: checks the four-step 53 x 53 multiplier and the exponent
// adder against built-in arithmetic, and that done comes in the cycle after
// the four multiply steps.
module tb_multiplier;
  logic clk = 0, rst_n = 0, start = 0;
  logic [52:0] xm = 0, ym = 0;
  logic [10:0] xe = 0, ye = 0;
  logic busy, done;
  logic [105:0] prod;
  logic [11:0] exp_sum;
  int checks = 0, failures = 0;

  multiplier dut (.*);
  always #5 clk = ~clk;

  task automatic run(logic [52:0] a, logic [52:0] b, logic [10:0] ea, logic [10:0] eb);
    int n;
    @(negedge clk);
    xm = a; ym = b; xe = ea; ye = eb; start = 1;
    @(negedge clk);
    start = 0; xm = '1; ym = '1;   // inputs are latched at start
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    checks += 3;
    if (n != 5) begin failures++; $display("FAIL latency %0d", n); end
    if (prod !== 106'(a) * 106'(b)) begin
      failures++; $display("FAIL %h * %h = %h", a, b, prod);
    end
    if (exp_sum !== 12'(ea) + 12'(eb)) begin
      failures++; $display("FAIL exp %0d + %0d = %0d", ea, eb, exp_sum);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run('1, '1, 11'h7FE, 11'h7FE);
    run({1'b1, 52'h0}, {1'b1, 52'h0}, 1, 1);
    run(53'h1, '1, 1023, 0);
    for (int i = 0; i < 300; i++)
      run({1'b1, 20'($urandom), 32'($urandom)}, {1'($urandom), 20'($urandom), 32'($urandom)},
          11'($urandom), 11'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
