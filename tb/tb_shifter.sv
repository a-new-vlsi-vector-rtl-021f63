// tb_shifter: checks the shifter in both of its uses against reference
// shifts, for every shift width: the three 64-bit slices of an aligned
// 106-bit product (192-bit left shift), and the rounding extraction of the
// 64 bits starting at every bit position rs of a 128-bit window.
module tb_shifter;
  logic [127:0] data;
  logic [5:0]   sh;
  logic [1:0]   sel;
  logic [63:0]  out;
  int checks = 0, failures = 0;

  shifter dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [191:0] ref_v;
    logic [105:0] prod;
    logic [63:0]  exp;
    for (int t = 0; t < 40; t++) begin
      prod = {10'($urandom), 32'($urandom), 32'($urandom), 32'($urandom)};
      if (t == 0) prod = '1;
      data = 128'(prod);
      for (int s = 0; s < 64; s++) begin
        ref_v = 192'(prod) << s;
        for (int j = 0; j < 3; j++) begin
          sh = 6'(s); sel = 2'(j);
          #1;
          checks++;
          if (out !== ref_v[64*j +: 64]) begin
            failures++;
            $display("FAIL sh=%0d sel=%0d out=%h exp=%h", s, j, out, ref_v[64*j +: 64]);
          end
        end
      end
    end
    // rounding use: bits rs+63..rs of the window
    for (int t = 0; t < 20; t++) begin
      data = {$urandom, $urandom, $urandom, $urandom};
      for (int rs = 0; rs < 128; rs++) begin
        if (rs == 0)       begin sel = 2'd0; sh = 6'd0; end
        else if (rs <= 64) begin sel = 2'd1; sh = 6'(64 - rs); end
        else               begin sel = 2'd2; sh = 6'(128 - rs); end
        exp = 64'(data >> rs);
        #1;
        checks++;
        if (out !== exp) begin
          failures++;
          $display("FAIL rounding rs=%0d out=%h exp=%h", rs, out, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
