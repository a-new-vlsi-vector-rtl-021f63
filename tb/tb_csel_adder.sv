// tb_csel_adder: checks the 64-bit carry-select adder's sum and carry out
// against built-in addition, including full-length carry propagation.
module tb_csel_adder;
  logic [63:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  csel_adder dut (.*);

  task automatic try(logic [63:0] ta, logic [63:0] tb_, logic tc);
    logic [64:0] exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = 65'(ta) + 65'(tb_) + 65'(tc);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %b = %b %h", ta, tb_, tc, cout, sum);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try('1, 0, 1);
    try('1, '1, 1);
    try(0, 0, 0);
    try(64'h00FF_00FF_00FF_00FF, 64'h0001_0001_0001_0001, 0);
    try(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 0);
    for (int i = 0; i < 3000; i++)
      try({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
