// tb_rounder: checks IEEE rounding of the two leading LA words in all four
// modes against the reference rounding of the whole LA value (spu_ref_pkg),
// over normal, denormal, overflowing and zero results. The rounder is
// connected to a shifter, which it uses to extract the mantissa. Bits below the two
// words are represented by LA bit 0 when sticky_lo is set. A directed set of
// exact halfway values checks ties-to-even at every window position.
module tb_rounder;
  import spu_pkg::*;
  import spu_ref_pkg::*;
  logic sign, is_zero, sticky_lo, inexact;
  logic [6:0] te;
  logic [63:0] mag_hi, mag_lo, result;
  round_mode_e mode;
  logic [1:0]  sh_sel;
  logic [5:0]  sh_amt;
  logic [63:0] slice;
  int checks = 0, failures = 0;
  int n_den = 0, n_ovf = 0;

  rounder dut (.*);
  // the rounder takes its mantissa bits from the product shifter
  shifter u_sh (.data({mag_hi, mag_lo}), .sh(sh_amt), .sel(sh_sel), .out(slice));

  task automatic try(bit s, int t, logic [63:0] hi, logic [63:0] lo, bit st);
    big_t v;
    logic [63:0] exp;
    v = ((big_t'(hi) <<< 64) | big_t'(lo)) <<< (64 * (t - 1));
    if (st) v = v | 1;
    if (s) v = -v;
    for (int m = 0; m < 4; m++) begin
      sign = s; te = 7'(t); mag_hi = hi; mag_lo = lo; sticky_lo = st;
      is_zero = (hi == 0 && lo == 0 && !st); mode = round_mode_e'(m);
      #1;
      exp = ref_round(v, m);
      checks++;
      if (result !== exp) begin
        failures++;
        $display("FAIL s=%0d te=%0d %h_%h st=%0d mode %0d: %h expected %h", s, t, hi, lo, st, m,
                 result, exp);
      end
      if (exp[62:52] == 0 && exp[51:0] != 0) n_den++;
      if (exp[62:52] == 11'h7FF) n_ovf++;
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(0, 1, 0, 0, 0);                                  // zero
    try(0, 17, 64'h1, 64'h8000_0000_0000_0000, 0);        // exactly representable
    try(0, 17, 64'h8000_0000_0000_0000, 64'h0000_0000_0000_0400, 0);  // tie
    try(1, 17, 64'h8000_0000_0000_0000, 64'h0000_0000_0000_0C00, 0);  // tie, odd
    try(0, 66, 64'h0000_0000_0000_FFFF, '1, 1);           // overflow
    try(0, 50, '1, '1, 1);                                // rounds up to next binade
    try(0, 1, 0, 64'h1, 0);                               // far below denormals
    for (int i = 0; i < 3000; i++) begin
      int t;
      logic [63:0] hi, lo;
      t  = 1 + $urandom_range(65);
      if (i % 3 == 0) t = 1 + $urandom_range(17);         // denormal region
      hi = {$urandom, $urandom} >> $urandom_range(63);
      lo = {$urandom, $urandom};
      if (i % 7 == 0) lo = lo & 64'hFFFF_FFFF_FFFF_F000; // exact ties and zeros
      if (i % 11 == 0) lo = 64'h0000_0000_0000_0400;
      if (hi == 0) hi = 1;
      try(1'($urandom), t, hi, lo, 1'($urandom));
    end
    // exact halfway cases at random positions: 53 result bits, a guard bit
    // of 1 and nothing below, so round-to-nearest must go to the even value
    for (int i = 0; i < 500; i++) begin
      logic [127:0] w;
      int pos;
      pos = 53 + $urandom_range(74);
      w = ((128'({$urandom, $urandom}) | (128'(1) << 52)) & {75'b0, {53{1'b1}}}) << (pos - 52);
      w = w | (128'(1) << (pos - 53));
      try(1'($urandom), 20 + $urandom_range(40), w[127:64], w[63:0], 1'b0);
    end
    if (n_den == 0 || n_ovf == 0) begin
      failures++; $display("FAIL denormal or overflow results not reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
