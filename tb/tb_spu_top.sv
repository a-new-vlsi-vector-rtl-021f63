// tb_spu_top: end-to-end test of the SPU through its PCI pins, at the
// design's default sizes.
//
// A small PCI master model configures the device (BAR0, memory enable),
// then runs dot products: operands are written as 32-bit halves, the last
// half of each pair through the add/subtract-product address, then the LA
// is rounded in all four modes and the result read back. Results are
// compared with an exact reference (spu_ref_pkg). Scenarios cover exact
// cancellation, long carry and borrow chains, random vectors over narrow
// and wide exponent ranges, denormal and overflowing results, NaN and
// infinity operands, zero products, LA save/restore through host LA reads
// and writes, and the status register. The mechanisms of the design are
// counted and each must occur. The product rate is checked: with the host
// keeping up, a product is accepted every 9 clocks, 11 after a carry
// resolution.
module tb_spu_top;
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

  // ---------------- mechanism counters ----------------
  int n_carry = 0, n_borrow = 0, n_skip = 0, n_exc = 0, n_zero = 0, n_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_eng.ev_carry_res)  n_carry++;
    if (dut.u_eng.ev_borrow_res) n_borrow++;
    if (dut.u_eng.ev_flag_skip)  n_skip++;
    if (dut.u_eng.ev_exception)  n_exc++;
    if (dut.u_eng.ev_zero_skip)  n_zero++;
    if (dut.u_eng.ev_acc_stall)  n_stall++;
  end

  // product rate: cycles between products loaded into the accumulation
  // stage while the host keeps the SPU busy; 11 after a product whose carry
  // needed the extra load/add/store of a fourth word, 9 otherwise
  int last_hand = -1, n_gap9 = 0, n_gap11 = 0, n_gap_bad = 0;
  bit had_cy = 0, streaming = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_eng.as == dut.u_eng.A_CY_LOAD) had_cy <= 1;
    if (dut.u_eng.handover) begin
      if (streaming && last_hand >= 0) begin
        if (cycle - last_hand == (had_cy ? 11 : 9)) begin
          if (had_cy) n_gap11++; else n_gap9++;
        end else begin
          n_gap_bad++;
          $display("product gap %0d after carry=%0d", cycle - last_hand, had_cy);
        end
      end
      last_hand <= streaming ? cycle : -1;
      had_cy <= 0;
    end
  end

  initial begin
    #4_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, lo, hi;
    logic [63:0] la_save [67];
    logic [63:0] x, y;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- configuration space ----
    pci_xfer(1, 0, 32'h0000_0000, 0, d);
    check(d == 32'h0001_FFFE, $sformatf("vendor/device id %h", d));
    pci_xfer(1, 1, 32'h0000_0010, 32'hFFFF_FFFF, d);
    pci_xfer(1, 0, 32'h0000_0010, 0, d);
    check(d == 32'hFFFF_F000, $sformatf("BAR0 size probe %h (4 KB)", d));
    pci_xfer(1, 1, 32'h0000_0010, BAR, d);
    pci_xfer(1, 1, 32'h0000_0004, 32'h0000_0002, d);
    pci_xfer(1, 0, 32'h0000_0004, 0, d);
    check(d[1], "memory space enabled");

    // ---- register file ----
    mwr(12'h008, 32'h1234_5678); mwr(12'h00C, 32'h9ABC_DEF0);
    mrd(12'h008, lo); mrd(12'h00C, hi);
    check({hi, lo} == 64'h9ABC_DEF0_1234_5678, "register write/read");
    pci_xfer(0, 1, BAR | 32'h008, 32'hAAAA_AAAA, d, 4'b0101);
    mrd(12'h008, lo);
    check(lo == 32'h12AA_56AA, $sformatf("byte enables %h", lo));

    // ---- exact cancellation: 2^70 + 1 - 2^70 ----
    spu_clear();
    spu_prod(mk(0, 1023 + 70, 0), mk(0, 1023, 0), 0);
    spu_prod(mk(0, 1023, 0),      mk(0, 1023, 0), 0);
    spu_prod(mk(0, 1023 + 70, 0), mk(0, 1023, 0), 1);
    spu_round_check("cancellation");

    // ---- long borrow then carry chain: 2^1600 - 2^-900 + 2^-900 ----
    spu_clear();
    spu_prod(mk(0, 1023 + 800, 0), mk(0, 1023 + 800, 0), 0);
    spu_prod(mk(0, 1023 - 450, 52'h8_0000_0000_0001), mk(0, 1023 - 450, 0), 1);
    spu_round_check("after borrow chain");
    spu_prod(mk(0, 1023 - 450, 52'h8_0000_0000_0001), mk(0, 1023 - 450, 0), 0);
    spu_round_check("after carry chain");
    // negative LA: small positive minus large
    spu_prod(mk(1, 1023 + 900, 52'h1), mk(0, 1023 + 700, 52'h3), 0);
    spu_round_check("negative LA");

    // ---- random vectors ----
    for (int t = 0; t < 12; t++) begin
      int n, elo, ehi;
      spu_clear();
      n = 4 + int'($urandom_range(12));
      unique case (t % 4)
        0: begin elo = 1000; ehi = 1046; end
        1: begin elo = 900;  ehi = 1150; end
        2: begin elo = 1;    ehi = 2046; end
        default: begin elo = 1020; ehi = 1026; end
      endcase
      for (int i = 0; i < n; i++) begin
        x = rnd_double(elo, ehi);
        y = rnd_double(elo, ehi);
        if (t % 4 == 2) y = rnd_double(2047 - int'(x[62:52]) - 40, 2047 - int'(x[62:52]) + 40 > 2046 ? 2046 : 2047 - int'(x[62:52]) + 40);
        spu_prod(x, y, 1'($urandom));
      end
      spu_round_check($sformatf("random set %0d", t));
    end

    // ---- tiny results: denormal ----
    spu_clear();
    spu_prod(mk(0, 1023 - 1000, 52'h1234_5678_9ABC), mk(0, 1023 - 70, 52'hF_0000_0000_0001), 0);
    spu_prod(mk(0, 5, 52'h1), mk(0, 7, 52'h3), 1);
    spu_round_check("denormal");
    spu_clear();
    spu_prod(mk(0, 0, 52'h1), mk(0, 1023 - 3, 0), 0);      // denormal operand
    spu_round_check("denormal operand");

    // ---- overflow ----
    spu_clear();
    spu_prod(mk(0, 2000, 52'hABCDE), mk(0, 2000, 0), 0);
    spu_round_check("overflow +");
    spu_prod(mk(0, 2000, 52'hABCDE), mk(0, 2000, 0), 1);
    spu_prod(mk(0, 2000, 52'hABCDE), mk(0, 2000, 0), 1);
    spu_round_check("overflow -");

    // ---- zero operands and exceptional values ----
    spu_clear();
    spu_prod(64'h0, mk(0, 1500, 52'h1), 0);
    spu_prod(mk(0, 1023, 0), mk(0, 1024, 0), 0);
    spu_round_check("zero product");
    spu_prod(mk(0, 2047, 0), mk(1, 1023, 0), 0);          // -inf
    spu_round_check("-inf");
    spu_clear();
    spu_prod(mk(0, 2047, 0), mk(0, 1023, 0), 0);          // +inf
    spu_round_check("+inf");
    mrd(12'h020, d);
    check(d == 32'h2, $sformatf("status +inf %h", d));
    spu_prod(mk(0, 2047, 0), 64'h0, 0);                   // inf * 0
    spu_round_check("inf*0");
    spu_clear();
    spu_prod(mk(0, 2047, 52'h1), mk(0, 1023, 0), 0);      // NaN
    spu_round_check("NaN");
    mwr(12'h020, 32'h0);
    mrd(12'h020, d);
    check(d == 32'h0, "status write");
    ref_nan = 0;

    // ---- save and restore the LA through host LA accesses ----
    spu_clear();
    for (int i = 0; i < 10; i++) spu_prod(rnd_double(700, 1300), rnd_double(700, 1300), 1'($urandom));
    spu_round_check("before save");
    for (int w = 0; w < 67; w++) begin
      mrd(12'h800 | 12'(w << 3), lo); mrd(12'h804 | 12'(w << 3), hi);
      la_save[w] = {hi, lo};
    end
    begin
      big_t v;
      v = 0;
      for (int w = 66; w >= 0; w--) v = (v <<< 64) | big_t'(la_save[w]);
      if (la_save[66][63]) v = v - (big_t'(1) <<< 4288);
      check(v == ref_acc, "LA contents read by the host");
    end
    mwr(12'h040, 0);
    for (int w = 0; w < 67; w++) begin
      mwr(12'h800 | 12'(w << 3), la_save[w][31:0]);
      mwr(12'h804 | 12'(w << 3), la_save[w][63:32]);
    end
    spu_round_check("after restore");

    // ---- streaming rate: products back to back ----
    spu_clear();
    spu_prod(mk(0, 1023 + 750, 0), mk(0, 1023 + 750, 0), 0);   // LA = 2^1500
    repeat (20) @(posedge clk);
    streaming = 1;
    for (int i = 0; i < 12; i++) spu_prod(mk(0, 1023 + i, 52'h5), mk(0, 1023, 52'h7), 0);
    for (int i = 0; i < 6; i++) begin
      // each product's borrow / carry runs up to the word holding 2^1500
      spu_prod(mk(0, 1023 - 300, 0), mk(0, 1023 - 300, 0), 1);
      spu_prod(mk(0, 1023 - 300, 0), mk(0, 1023 - 300, 0), 0);
    end
    repeat (30) @(posedge clk);
    streaming = 0;
    spu_round_check("streaming");

    repeat (5) @(posedge clk);
    $display("mechanisms: carry=%0d borrow=%0d flag_skip=%0d exc=%0d zero=%0d stall=%0d waits=%0d denorm=%0d ovf=%0d exc_res=%0d gap9=%0d gap11=%0d badgap=%0d",
             n_carry, n_borrow, n_skip, n_exc, n_zero, n_stall, wait_states, n_denorm, n_ovf,
             n_exc_result, n_gap9, n_gap11, n_gap_bad);
    check(n_carry > 0, "carry resolution happened");
    check(n_borrow > 0, "borrow resolution happened");
    check(n_skip > 0, "flag-only update over several words happened");
    check(n_exc > 0, "exceptional operand seen");
    check(n_zero > 0, "zero product skipped");
    check(n_stall > 0, "multiplier waited for accumulation");
    check(wait_states > 0, "PCI wait states inserted");
    check(n_denorm > 0, "denormal result");
    check(n_ovf > 0, "overflow result");
    check(n_exc_result > 0, "exceptional result");
    for (int m = 0; m < 4; m++) check(n_mode[m] > 0, "rounding mode used");
    check(n_gap9 > 0, "9-cycle product rate seen");
    check(n_gap11 > 0, "11-cycle product rate after a carry seen");
    check(n_gap_bad == 0, "no product gap other than 9 or 11 while waiting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
