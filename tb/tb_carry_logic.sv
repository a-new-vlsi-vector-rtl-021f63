// tb_carry_logic: checks the LA flag memory and carry logic against a
// reference copy of the 67 LA words: flags after word writes, flag-only
// range updates and clear; the carry/borrow resolve address; and the
// rounding outputs (leading magnitude word, sticky, negation carry-ins)
// worked out from the LA value as one wide integer.
module tb_carry_logic;
  logic clk = 0, rst_n = 0, clear = 0;
  logic wr_en = 0, rng_en = 0, rng_carry = 0, res_carry = 0, rnd_sign = 0;
  logic [6:0] wr_addr = 0, rng_lo = 0, rng_hi = 0, look_addr = 0, res_start = 0;
  logic [63:0] wr_data = 0;
  logic look_zero, look_one, res_found, rnd_allzero, rnd_sticky, rnd_cin_hi, rnd_cin_lo;
  logic [6:0] res_addr, rnd_lead;
  logic [63:0] la [67];
  int checks = 0, failures = 0;

  carry_logic dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic logic [63:0] rnd_word();
    int k;
    k = $urandom_range(3);
    unique case (k)
      0: return '0;
      1: return '1;
      default: return {$urandom, $urandom};
    endcase
  endfunction

  task automatic check_all();
    logic [4287:0] v, mag;
    bit s;
    int lead, te;
    bit sticky, cz_hi, cz_lo, found;
    int raddr;
    for (int i = 0; i < 67; i++) begin
      look_addr = 7'(i); #1;
      chk(look_zero == (la[i] == '0) && look_one == (la[i] == '1), $sformatf("flags word %0d", i));
    end
    // resolve address
    for (int k = 0; k < 8; k++) begin
      res_start = 7'($urandom_range(66)); res_carry = 1'($urandom); #1;
      found = 0; raddr = 0;
      for (int i = 66; i >= int'(res_start); i--)
        if (res_carry ? la[i] != '1 : la[i] != '0) begin found = 1; raddr = i; end
      chk(res_found == found && (!found || res_addr == 7'(raddr)),
          $sformatf("resolve from %0d carry %0d: %0d/%0d exp %0d/%0d", res_start, res_carry,
                    res_found, res_addr, found, raddr));
    end
    // rounding support
    for (int i = 0; i < 67; i++) v[64*i +: 64] = la[i];
    s = v[4287];
    mag = s ? -v : v;
    rnd_sign = s; #1;
    lead = 0;
    for (int i = 0; i < 67; i++) if (mag[64*i +: 64] != 0) lead = i;
    te = (lead == 0) ? 1 : lead;
    sticky = 0;
    for (int i = 0; i < 64 * (te - 1); i++) if (mag[i]) sticky = 1;
    cz_hi = 1; cz_lo = 1;
    for (int i = 0; i < 64 * te; i++) if (v[i]) cz_hi = 0;
    for (int i = 0; i < 64 * (te - 1); i++) if (v[i]) cz_lo = 0;
    chk(rnd_allzero == (mag == 0), "all zero");
    if (mag != 0) begin
      chk(rnd_lead == 7'(lead), $sformatf("lead %0d exp %0d", rnd_lead, lead));
      chk(rnd_sticky == sticky, "sticky");
      chk(rnd_cin_hi == (s & cz_hi) && rnd_cin_lo == (s & cz_lo), "negation carry-ins");
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 67; i++) la[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all();
    for (int t = 0; t < 300; t++) begin
      int kind;
      kind = $urandom_range(9);
      @(negedge clk);
      unique case (kind)
        0: begin
          clear = 1;
          for (int i = 0; i < 67; i++) la[i] = '0;
        end
        1, 2: begin
          int lo, hi;
          lo = $urandom_range(66); hi = lo + $urandom_range(67 - lo);
          rng_en = 1; rng_lo = 7'(lo); rng_hi = 7'(hi); rng_carry = 1'($urandom);
          for (int i = lo; i < hi; i++) la[i] = rng_carry ? '0 : '1;
        end
        default: begin
          wr_en = 1; wr_addr = 7'($urandom_range(66)); wr_data = rnd_word();
          // the sign word is kept simple so that both signs appear
          la[wr_addr] = wr_data;
        end
      endcase
      @(negedge clk);
      clear = 0; rng_en = 0; wr_en = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
