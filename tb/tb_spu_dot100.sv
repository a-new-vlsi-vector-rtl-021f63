// tb_spu_dot100: the dot product workload of the SPU evaluation: two
// vectors of 100 IEEE doubles, accumulated through the PCI pins exactly as
// a host program would (two 32-bit writes per operand, the last one through
// the add-product address), then rounded to nearest and read back. Three
// vector pairs are run: random values of mixed magnitude and sign, vectors
// whose naive floating-point sum cancels to a wrong value, and random values
// over the whole exponent range. The result is compared with the exact
// reference, and the clock count of each dot product is reported and
// checked against the 9 to 11 clocks per product the design can sustain
// plus the bus transfer time.
module tb_spu_dot100;
  import spu_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        frame_n = 1, irdy_n = 1, idsel = 0;
  logic [3:0]  cbe_n = 4'hF;
  logic [31:0] ad_i = 0;
  logic [31:0] ad_o;
  logic        ad_oe, par_o, par_oe, trdy_n, devsel_n, stop_n, ctl_oe;

  spu_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  localparam logic [31:0] BAR = 32'hFEBC_0000;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- PCI master model ----------------
  int wait_states = 0;
  task automatic pci_xfer(bit cfg, bit wr, logic [31:0] addr, logic [31:0] wdata,
                          output logic [31:0] rdata, input logic [3:0] be = 4'hF);
    int n;
    @(negedge clk);
    frame_n = 0; idsel = cfg; ad_i = addr;
    cbe_n   = cfg ? (wr ? 4'b1011 : 4'b1010) : (wr ? 4'b0111 : 4'b0110);
    @(negedge clk);
    frame_n = 1; irdy_n = 0; idsel = 0; cbe_n = ~be; ad_i = wr ? wdata : 32'h0;
    n = 0;
    #1;
    while (trdy_n) begin
      @(negedge clk); #1;
      n++;
      if (n > 200) begin
        failures++; $display("FAIL no TRDY for %h", addr); break;
      end
    end
    if (!wr) check(ad_oe, "AD driven on read");
    rdata = ad_o;
    if (!cfg && !wr) n = n - 1;   // the read turnaround is not a wait state
    wait_states += n;
    @(posedge clk); #1;
    irdy_n = 1; cbe_n = 4'hF;
  endtask

  task automatic mwr(logic [11:0] off, logic [31:0] d);
    logic [31:0] dummy;
    pci_xfer(0, 1, BAR | 32'(off), d, dummy);
  endtask
  task automatic mrd(logic [11:0] off, output logic [31:0] d);
    pci_xfer(0, 0, BAR | 32'(off), 0, d);
  endtask
  task automatic mwr64(logic [11:0] off, logic [63:0] d);
    mwr(off, d[31:0]); mwr(off + 12'd4, d[63:32]);
  endtask

  // ---------------- SPU operations ----------------
  big_t ref_acc;
  bit   ref_nan, ref_pinf, ref_ninf;
  bit   pair_sel = 0;

  task automatic spu_clear();
    mwr(12'h040, 0);
    ref_acc = 0; ref_nan = 0; ref_pinf = 0; ref_ninf = 0;
  endtask

  task automatic spu_prod(logic [63:0] x, logic [63:0] y, bit sub);
    logic [11:0] base;
    bit sgn;
    base = pair_sel ? 12'h010 : 12'h000;
    mwr64(base, x);
    mwr(base + 12'h8, y[31:0]);
    mwr((sub ? 12'h0C0 : 12'h080) | (base + 12'hC), y[63:32]);
    pair_sel = !pair_sel;
    sgn = x[63] ^ y[63] ^ sub;
    if (is_nan(x) || is_nan(y) || (is_inf(x) && is_zero(y)) || (is_zero(x) && is_inf(y)))
      ref_nan = 1;
    else if (is_inf(x) || is_inf(y)) begin
      if (sgn) ref_ninf = 1; else ref_pinf = 1;
    end else if (sub) ref_acc = ref_acc - prod_val(x, y);
    else ref_acc = ref_acc + prod_val(x, y);
  endtask

  function automatic logic [63:0] ref_result(int mode);
    if (ref_nan || (ref_pinf && ref_ninf)) return 64'h7FF8_0000_0000_0000;
    if (ref_pinf) return 64'h7FF0_0000_0000_0000;
    if (ref_ninf) return 64'hFFF0_0000_0000_0000;
    return ref_round(ref_acc, mode);
  endfunction

  int n_mode[4];
  int n_denorm = 0, n_ovf = 0, n_exc_result = 0;
  task automatic spu_round_check(string tag);
    logic [31:0] lo, hi;
    logic [63:0] exp;
    for (int m = 0; m < 4; m++) begin
      mwr(12'h100 | 12'(m << 2), 0);
      mrd(12'h000, lo); mrd(12'h004, hi);
      exp = ref_result(m);
      check({hi, lo} == exp, $sformatf("%s mode %0d: got %h exp %h", tag, m, {hi, lo}, exp));
      n_mode[m]++;
      if (exp[62:52] == 0 && exp[51:0] != 0) n_denorm++;
      if (exp[62:52] == 11'h7FF) begin
        if (ref_nan || ref_pinf || ref_ninf) n_exc_result++; else n_ovf++;
      end
    end
  endtask


  initial begin
    #40_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, lo, hi;
    logic [63:0] x [100], y [100];
    int c0, c1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    pci_xfer(1, 1, 32'h0000_0010, BAR, d);
    pci_xfer(1, 1, 32'h0000_0004, 32'h0000_0002, d);
    for (int t = 0; t < 3; t++) begin
      for (int i = 0; i < 100; i++) begin
        unique case (t)
          0: begin x[i] = rnd_double(1013, 1033); y[i] = rnd_double(1013, 1033); end
          1: begin
            // large terms that cancel pairwise, hiding small ones
            if (i % 2 == 0) begin x[i] = rnd_double(1023 + 60, 1023 + 60); y[i] = mk(0, 1023, 0); end
            else begin x[i] = {~x[i-1][63], x[i-1][62:0]}; y[i] = mk(0, 1023, 0); end
            if (i % 10 == 5) begin x[i] = rnd_double(1020, 1026); y[i] = rnd_double(1020, 1026); end
          end
          default: begin
            x[i] = rnd_double(1, 2046);
            y[i] = rnd_double(1, 2046);
            y[i][62:52] = 11'(2046 - int'(x[i][62:52]) < 1 ? 1 : 2046 - int'(x[i][62:52]));
          end
        endcase
      end
      c0 = cycle;
      spu_clear();
      for (int i = 0; i < 100; i++) spu_prod(x[i], y[i], 0);
      mwr(12'h100, 0);
      mrd(12'h000, lo); mrd(12'h004, hi);
      c1 = cycle;
      check({hi, lo} == ref_result(0), $sformatf("dot product %0d: %h expected %h", t, {hi, lo}, ref_result(0)));
      $display("dot product %0d of length 100: %0d clocks (%0d ns at 33 MHz)", t, c1 - c0, (c1 - c0) * 30);
      // 100 products at 9..11 clocks each, plus clear, round and result read
      check(c1 - c0 >= 900 && c1 - c0 <= 1100 + 40, "clock count of a length-100 dot product");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
