// rounder: rounds the magnitude of the long accumulator to an IEEE double.
//
// Inputs are the two LA words at and below the leading nonzero word
// (mag_hi = word te, mag_lo = word te-1, already converted to magnitude),
// te itself (at least 1), the sign of the LA, whether any magnitude bit lies
// below word te-1 (sticky_lo) and the rounding mode. A leading-one detector
// finds the top bit P of the 128-bit window; LA bit P has weight 2^(P-2150).
// The result's last mantissa bit sits at LA bit q = max(P-52, 1076) (1076 is
// the weight 2^-1074 of the smallest denormal), so normal and denormal
// results take the same path. The rounder does not shift itself: it drives
// the window select and shift width (sh_sel, sh_amt) of the product shifter,
// which is idle during rounding and returns the 64 bits starting at window
// bit rs = q - 64(te-1) as `slice`; the low 53 of them are the mantissa. The
// guard bit at q-1 and the sticky bit below decide the rounding; the biased
// exponent is q-1075. Exponent field and mantissa are added as one integer
// so that a rounding carry moves into the exponent. An exponent past the
// range gives infinity or the largest finite number, as the mode demands,
// and an LA of zero gives +0. Purely combinational (mag_* -> sh_* -> slice
// -> result, through the shifter). Finding the leading words, the
// leading-one detector, the use of the shifter for the mantissa, the
// exponent from LA address and shift width and the four IEEE modes follow
// the SPU description; the arithmetic used to do them is this design's.
module rounder
  import spu_pkg::*;
(
  input  logic          sign,
  input  logic          is_zero,
  input  logic [6:0]    te,
  input  logic [63:0]   mag_hi,
  input  logic [63:0]   mag_lo,
  input  logic          sticky_lo,
  input  round_mode_e   mode,
  output logic [1:0]    sh_sel,     // to the shifter: window select
  output logic [5:0]    sh_amt,     // to the shifter: left shift
  input  logic [63:0]   slice,      // from the shifter: window bits rs+63..rs
  output logic [63:0]   result,
  output logic          inexact
);
  logic [127:0] win;
  logic [6:0]   msb;
  logic [13:0]  base, p, q, rs;
  logic [52:0]  mant;
  logic         guard, stk, inc, ovf;
  logic [127:0] mask;
  logic [13:0]  eb;
  logic [63:0]  comp, rnd;

  // leading one, rounding position and shifter control
  always_comb begin
    win = {mag_hi, mag_lo};
    msb = '0;
    for (int i = 0; i < 128; i++) if (win[i]) msb = 7'(i);
    base = 14'(te - 7'd1) << 6;
    p    = base + 14'(msb);
    q    = (p >= 14'd1128) ? p - 14'd52 : 14'd1076;
    rs   = q - base;
    if (rs == 14'd0) begin
      sh_sel = 2'd0; sh_amt = 6'd0;
    end else if (rs <= 14'd64) begin
      sh_sel = 2'd1; sh_amt = 6'(14'd64 - rs);
    end else begin
      sh_sel = 2'd2; sh_amt = 6'(14'd128 - rs);
    end
  end

  // extraction (mantissa from the shifter), guard, sticky and rounding
  always_comb begin
    if (rs >= 14'd128) begin
      mant  = '0;
      guard = (rs == 14'd128) ? win[127] : 1'b0;
      mask  = (rs == 14'd128) ? {1'b0, {127{1'b1}}} : '1;
      stk   = |(win & mask) | sticky_lo;
    end else begin
      mant    = slice[52:0];
      guard   = (rs == 14'd0) ? 1'b0 : win[7'(rs - 14'd1)];
      mask    = (rs <= 14'd1) ? '0 : ({128{1'b1}} >> (14'd129 - rs));
      stk     = |(win & mask) | sticky_lo;
    end
    unique case (mode)
      RM_NEAREST: inc = guard & (stk | mant[0]);
      RM_ZERO:    inc = 1'b0;
      RM_UP:      inc = !sign & (guard | stk);
      default:    inc = sign & (guard | stk);
    endcase
    eb   = q - 14'd1075;
    comp = (64'(eb - 14'd1) << 52) + 64'(mant);
    rnd  = comp + 64'(inc);
    ovf  = (eb >= 14'd2047) || (rnd[62:52] == 11'h7FF);
    inexact = guard | stk;
    if (is_zero) begin
      result  = '0;
      inexact = 1'b0;
    end else if (ovf) begin
      inexact = 1'b1;
      unique case (mode)
        RM_NEAREST: result = POS_INF;
        RM_ZERO:    result = MAX_FIN;
        RM_UP:      result = sign ? MAX_FIN : POS_INF;
        default:    result = sign ? POS_INF : MAX_FIN;
      endcase
      result[63] = sign;
    end else begin
      result = {sign, rnd[62:0]};
    end
  end
endmodule
