// spu_ref_pkg: reference model for the SPU testbenches.
//
// Computes an exact dot product with a wide signed integer in units of
// 2^-2150 and rounds it to an IEEE double by integer division against the
// unit in the last place (quotient, remainder compared with half an ulp),
// independently of the guard/sticky scheme used in the design. Also
// provides helpers to build doubles from sign, exponent and mantissa.
package spu_ref_pkg;

  typedef logic signed [4399:0] big_t;

  // exact value of x*y in units of 2^-2150 (finite operands only)
  function automatic big_t prod_val(logic [63:0] x, logic [63:0] y);
    logic [105:0] pm;
    big_t r;
    int ex, ey;
    ex = (x[62:52] == 0) ? 1 : int'(x[62:52]);
    ey = (y[62:52] == 0) ? 1 : int'(y[62:52]);
    pm = 106'({x[62:52] != 0, x[51:0]}) * 106'({y[62:52] != 0, y[51:0]});
    r  = big_t'(pm) <<< (ex + ey);
    if (x[63] ^ y[63]) r = -r;
    return r;
  endfunction

  function automatic bit is_nan(logic [63:0] d);
    return d[62:52] == 11'h7FF && d[51:0] != 0;
  endfunction
  function automatic bit is_inf(logic [63:0] d);
    return d[62:52] == 11'h7FF && d[51:0] == 0;
  endfunction
  function automatic bit is_zero(logic [63:0] d);
    return d[62:0] == 0;
  endfunction

  // mode: 0 nearest-even, 1 toward zero, 2 toward +inf, 3 toward -inf
  function automatic logic [63:0] ref_round(big_t s, int mode);
    bit          neg;
    big_t        m, q, rem, half, ulp;
    int          h, u, ef;
    bit          up;
    logic [63:0] r;
    neg = s < 0;
    m   = neg ? -s : s;
    if (m == 0) return 64'h0;
    h = 0;
    for (int i = 0; i < 4400; i++) if (m[i]) h = i;
    u = (h - 52 > 1076) ? h - 52 : 1076;
    ulp  = big_t'(1) <<< u;
    q    = m >>> u;
    rem  = m - (q <<< u);
    half = ulp >>> 1;
    unique case (mode)
      0: up = (rem > half) || (rem == half && q[0]);
      1: up = 0;
      2: up = !neg && rem != 0;
      default: up = neg && rem != 0;
    endcase
    if (up) q = q + 1;
    if (q == (big_t'(1) <<< 53)) begin q = q >>> 1; u = u + 1; end
    ef = (q >= (big_t'(1) <<< 52)) ? u - 1075 : 0;
    if (ef >= 2047) begin
      bit to_inf;
      to_inf = (mode == 0) || (mode == 2 && !neg) || (mode == 3 && neg);
      r = to_inf ? 64'h7FF0_0000_0000_0000 : 64'h7FEF_FFFF_FFFF_FFFF;
    end else begin
      r = {1'b0, 11'(ef), q[51:0]};
    end
    r[63] = neg;
    return r;
  endfunction

  function automatic logic [63:0] mk(bit s, int e, logic [51:0] f);
    return {s, 11'(e), f};
  endfunction

  // random finite double with biased exponent in [elo, ehi]
  function automatic logic [63:0] rnd_double(int elo, int ehi);
    int e;
    e = elo + int'($urandom_range(ehi - elo));
    return {1'($urandom), 11'(e), 20'($urandom), 32'($urandom)};
  endfunction

endpackage
