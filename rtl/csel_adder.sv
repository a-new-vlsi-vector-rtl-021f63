// csel_adder: 64-bit carry-select adder used for accumulation, carry
// resolution and the two's-complement to sign-magnitude conversion.
//
// The word is cut into BLK-bit blocks; each block computes its sum for both
// carry-in values in parallel and the incoming block carry selects one,
// so the carry path is one multiplexer per block. sum = a + b + cin, cout is
// the carry out of the top bit. Subtraction is done by the caller with an
// inverted b and cin = 1. Purely combinational. The carry-select structure
// follows the SPU description; the block size is this design's choice.
module csel_adder #(
  parameter int unsigned W   = 64,
  parameter int unsigned BLK = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NB = W / BLK;

  logic [NB:0]      bc;
  logic [BLK:0]     s0 [NB];
  logic [BLK:0]     s1 [NB];

  for (genvar k = 0; k < NB; k++) begin : g_blk
    assign s0[k] = {1'b0, a[k*BLK +: BLK]} + {1'b0, b[k*BLK +: BLK]};
    assign s1[k] = {1'b0, a[k*BLK +: BLK]} + {1'b0, b[k*BLK +: BLK]} + (BLK+1)'(1);
    assign sum[k*BLK +: BLK] = bc[k] ? s1[k][BLK-1:0] : s0[k][BLK-1:0];
    assign bc[k+1] = bc[k] ? s1[k][BLK] : s0[k][BLK];
  end
  assign bc[0] = cin;
  assign cout  = bc[NB];
endmodule
