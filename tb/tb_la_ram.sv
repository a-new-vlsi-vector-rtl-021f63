// tb_la_ram: writes and reads the 67 x 64 bit LA RAM against a reference
// array, with simultaneous read and write and the one-cycle read latency.
module tb_la_ram;
  logic clk = 0, we = 0, re = 0;
  logic [6:0] waddr = 0, raddr = 0;
  logic [63:0] wdata = 0, rdata;
  logic [63:0] ref_m [67];
  int checks = 0, failures = 0;

  la_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int i = 0; i < 67; i++) begin
      @(negedge clk);
      we = 1; waddr = 7'(i); wdata = {$urandom, $urandom}; ref_m[i] = wdata;
    end
    @(negedge clk); we = 0;
    // random mix of reads and writes
    for (int t = 0; t < 2000; t++) begin
      logic [6:0] ra;
      @(negedge clk);
      ra = 7'($urandom_range(66));
      re = 1; raddr = ra;
      we = 1'($urandom);
      waddr = 7'($urandom_range(66));
      if (waddr == ra) waddr = (ra == 0) ? 7'd1 : ra - 7'd1;
      wdata = {$urandom, $urandom};
      @(negedge clk);
      checks++;
      if (rdata !== ref_m[ra]) begin
        failures++;
        $display("FAIL word %0d read %h expected %h", ra, rdata, ref_m[ra]);
      end
      if (we) ref_m[waddr] = wdata;
      we = 0; re = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
