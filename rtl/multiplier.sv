// multiplier: 53 x 53 -> 106 bit mantissa multiplier and 11-bit exponent
// adder of the SPU.
//
// To keep the gate count small the product is formed in four clock cycles
// on one 27 x 27 bit Booth core (booth_mul27). With x = {xh, xl} and
// y = {yh, yl} (xl, yl the low 27 bits, xh, yh the high 26 bits) the steps
// are LL, LH, HL, HH; the running sum is fed back into the core's addend
// input, and after the LL and HL steps the 27 low bits of the sum are final
// and are retired into the product register, so the feedback is at most 55
// bits wide. The biased exponents are added by an 11-bit ripple-carry adder.
// Interface: pulse start with the operands (they are latched); the four
// multiply steps take the next four cycles and done pulses for one cycle
// in the cycle after them (start in cycle 0, done in cycle 5), with prod and
// exp_sum valid until the next start. The four-step schedule, the 27 x 27 core and
// the ripple-carry exponent adder follow the SPU description; the split into
// 26/27 bits and the retiring scheme are this design's.
module multiplier (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [52:0]   xm,
  input  logic [52:0]   ym,
  input  logic [10:0]   xe,
  input  logic [10:0]   ye,
  output logic          busy,
  output logic          done,
  output logic [105:0]  prod,
  output logic [11:0]   exp_sum
);
  typedef enum logic [2:0] {M_IDLE, M_LL, M_LH, M_HL, M_HH} mstate_e;
  mstate_e      st;
  logic [52:0]  xr, yr;
  logic [54:0]  fb;          // feedback into the core
  logic [26:0]  ca, cb;
  logic [55:0]  cp;
  logic [53:0]  lo_bits;     // retired low product bits

  booth_mul27 u_core (.a(ca), .b(cb), .addend(fb), .p(cp));

  always_comb begin
    ca = xr[26:0];
    cb = yr[26:0];
    unique case (st)
      M_LH:    begin ca = xr[26:0];          cb = {1'b0, yr[52:27]}; end
      M_HL:    begin ca = {1'b0, xr[52:27]}; cb = yr[26:0];          end
      M_HH:    begin ca = {1'b0, xr[52:27]}; cb = {1'b0, yr[52:27]}; end
      default: begin ca = xr[26:0];          cb = yr[26:0];          end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; xr <= '0; yr <= '0; fb <= '0; lo_bits <= '0;
      prod <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        M_IDLE: if (start) begin
          xr <= xm; yr <= ym; fb <= '0; st <= M_LL;
        end
        M_LL: begin lo_bits[26:0]  <= cp[26:0]; fb <= 55'(cp[55:27]); st <= M_LH; end
        M_LH: begin fb <= cp[54:0]; st <= M_HL; end
        M_HL: begin lo_bits[53:27] <= cp[26:0]; fb <= 55'(cp[55:27]); st <= M_HH; end
        M_HH: begin prod <= {cp[51:0], lo_bits}; done <= 1'b1; st <= M_IDLE; end
        default: st <= M_IDLE;
      endcase
    end
  end

  assign busy = (st != M_IDLE);

  // 11-bit ripple-carry exponent adder, registered at start
  logic [11:0] c;
  logic [10:0] s;
  assign c[0] = 1'b0;
  for (genvar i = 0; i < 11; i++) begin : g_fa
    assign s[i]   = xe[i] ^ ye[i] ^ c[i];
    assign c[i+1] = (xe[i] & ye[i]) | (xe[i] & c[i]) | (ye[i] & c[i]);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) exp_sum <= '0;
    else if (start && st == M_IDLE) exp_sum <= {c[11], s};
  end
endmodule
