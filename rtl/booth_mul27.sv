// booth_mul27: 27 x 27 bit unsigned multiplier core with an addend input,
// p = a * b + addend.
//
// The multiplier b is recoded with the modified Booth (radix-4) algorithm
// into 14 signed digits in {-2,-1,0,+1,+2}; each digit selects 0, a or 2a,
// inverted for negative digits with the +1 added in a correction vector. The
// 14 partial products, the correction vector and the addend are reduced by a
// linear array of 3:2 carry-save adders (three rows into two, one step at a
// time) to two vectors that one carry-propagate adder adds. The addend input is the feedback path that lets
// the four-step 53 x 53 multiplication add up its partial products in the
// same cycles. Purely combinational. Modified Booth recoding, carry-save
// reduction and the feedback input follow the SPU description; the SPU uses
// a Wallace tree, the linear array here is this design's simpler choice
// (same function, longer combinational path).
module booth_mul27 #(
  parameter int unsigned N  = 27,          // operand width
  parameter int unsigned FW = 55,          // addend (feedback) width
  parameter int unsigned PW = 2 * N + 2    // result width
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic [FW-1:0] addend,
  output logic [PW-1:0] p
);
  localparam int unsigned ND = (N + 2) / 2;   // Booth digits of {0, b}
  localparam int unsigned NV = ND + 2;        // rows to reduce

  logic [N+2:0]  bx;          // {0.., b, 0}
  logic [PW-1:0] rows [NV];

  always_comb begin
    logic [2:0]    trip;
    logic [N:0]    mag;       // 0, a or 2a
    logic          neg;
    logic [PW-1:0] pp;
    logic [PW-1:0] corr;
    bx   = {2'b00, b, 1'b0};
    corr = '0;
    for (int i = 0; i < ND; i++) begin
      trip = bx[2*i +: 3];
      unique case (trip)
        3'b001, 3'b010: begin mag = {1'b0, a}; neg = 1'b0; end
        3'b011:         begin mag = {a, 1'b0}; neg = 1'b0; end
        3'b100:         begin mag = {a, 1'b0}; neg = 1'b1; end
        3'b101, 3'b110: begin mag = {1'b0, a}; neg = 1'b1; end
        default:        begin mag = '0;        neg = 1'b0; end
      endcase
      // sign-extended one's complement for negative digits; +1 goes to corr
      pp = neg ? ~PW'(mag) : PW'(mag);
      rows[i] = pp << (2 * i);
      if (neg) corr = corr + (PW'(1) << (2 * i));
    end
    rows[ND]   = corr;
    rows[ND+1] = PW'(addend);
  end

  // Carry-save array: repeatedly replace the last three rows by sum and carry.
  always_comb begin
    logic [PW-1:0] v [NV];
    logic [PW-1:0] s, c;
    for (int i = 0; i < NV; i++) v[i] = rows[i];
    for (int n = NV; n > 2; n--) begin
      s = v[n-3] ^ v[n-2] ^ v[n-1];
      c = ((v[n-3] & v[n-2]) | (v[n-3] & v[n-1]) | (v[n-2] & v[n-1])) << 1;
      v[n-3] = s;
      v[n-2] = c;
    end
    p = v[0] + v[1];
  end
endmodule
