// tb_booth_mul27: checks the 27 x 27 Booth core, p = a*b + addend, against
// the built-in multiplication for corner and random operands.
module tb_booth_mul27;
  logic [26:0] a, b;
  logic [54:0] addend;
  logic [55:0] p;
  int checks = 0, failures = 0;

  booth_mul27 dut (.a, .b, .addend, .p);

  task automatic try(logic [26:0] ta, logic [26:0] tb_, logic [54:0] tc);
    logic [55:0] exp;
    a = ta; b = tb_; addend = tc;
    #1;
    exp = 56'(ta) * 56'(tb_) + 56'(tc);
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL %h * %h + %h = %h, expected %h", ta, tb_, tc, p, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try('1, '1, '1);
    try('1, '1, 0);
    try(0, '1, 55'h12345);
    try(27'h4000000, 27'h5555555, 0);
    try(27'h2AAAAAA, 27'h2AAAAAA, '1);
    for (int i = 0; i < 2000; i++)
      try(27'($urandom), 27'($urandom), {23'($urandom), 32'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
