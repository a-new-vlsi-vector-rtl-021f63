// tb_reg_file: checks the 32-bit host view of the 4 x 64 bit register file
// (halves, byte enables), the 64-bit data-path read and write ports and
// the reset value, against a reference array.
module tb_reg_file;
  logic clk = 0, rst_n = 0;
  logic h_we = 0, i_we = 0;
  logic [2:0] h_idx = 0;
  logic [3:0] h_be = 0;
  logic [31:0] h_wdata = 0, h_rdata;
  logic [1:0] rd_idx = 0, i_idx = 0;
  logic [63:0] rd_data, i_wdata = 0;
  logic [63:0] ref_r [4];
  int checks = 0, failures = 0;

  reg_file dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
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
    for (int r = 0; r < 4; r++) begin
      ref_r[r] = 0;
      rd_idx = 2'(r); #1;
      chk(rd_data == 0, "reset value");
    end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      h_we = 1'($urandom); h_idx = 3'($urandom); h_be = 4'($urandom); h_wdata = $urandom;
      i_we = ($urandom_range(3) == 0); i_idx = 2'($urandom); i_wdata = {$urandom, $urandom};
      @(negedge clk);
      if (h_we)
        for (int b = 0; b < 4; b++)
          if (h_be[b]) ref_r[h_idx[2:1]][32*h_idx[0] + 8*b +: 8] = h_wdata[8*b +: 8];
      if (i_we) ref_r[i_idx] = i_wdata;
      h_we = 0; i_we = 0;
      h_idx = 3'($urandom); rd_idx = 2'($urandom);
      #1;
      chk(h_rdata == ref_r[h_idx[2:1]][32*h_idx[0] +: 32], $sformatf("host read %0d", h_idx));
      chk(rd_data == ref_r[rd_idx], $sformatf("data path read %0d", rd_idx));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
