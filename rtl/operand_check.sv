// operand_check: classifies an IEEE double operand before multiplication.
//
// Flags NaN, infinity and zero and unpacks the significand with its hidden
// bit and the effective biased exponent (denormals get hidden bit 0 and
// exponent 1, so that every finite operand's value is m * 2^(e - 1075)).
// Purely combinational. The check for exceptional values follows the SPU
// description; the unpacking is the usual IEEE decoding.
module operand_check (
  input  logic [63:0] d,
  output logic        is_nan,
  output logic        is_inf,
  output logic        is_zero,
  output logic        sign,
  output logic [52:0] mant,
  output logic [10:0] exp_eff
);
  logic [10:0] e;
  logic [51:0] f;
  assign sign    = d[63];
  assign e       = d[62:52];
  assign f       = d[51:0];
  assign is_nan  = (e == 11'h7FF) && (f != '0);
  assign is_inf  = (e == 11'h7FF) && (f == '0);
  assign is_zero = (e == 11'h000) && (f == '0);
  assign mant    = {e != 11'h000, f};
  assign exp_eff = (e == 11'h000) ? 11'd1 : e;
endmodule
