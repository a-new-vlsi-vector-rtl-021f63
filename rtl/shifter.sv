// shifter: 64-out-of-128 bit extraction, shared by accumulation and rounding.
//
// The input is two 64-bit chunks, data[127:64] (hi) and data[63:0] (lo).
// The input multiplexer puts one of three windows on the 128-bit barrel
// shifter: sel 0 gives {lo, 0}, sel 1 {hi, lo}, sel 2 {0, hi}. The shifter
// moves the window left by sh (0..63) and delivers its upper 64 bits. The
// shift is split into a coarse stage in multiples of eight bits and a fine
// stage of 0..7 bits.
//
// Accumulation: data is the zero-extended 106-bit product. If its least
// significant bit lands at bit offset sh of LA word w, sel j (0..2) produces
// the slice that is added to LA word w+j.
// Rounding: data is the two leading LA words (as magnitude). sel and sh come
// from the rounder and select the 64 bits that start at window bit rs:
// sel 0 with sh 0 for rs = 0, sel 1 with sh 64-rs for rs 1..64, sel 2 with
// sh 128-rs for rs 65..127. The low 53 bits are the result mantissa.
//
// Purely combinational. The input multiplexer, the 64-out-of-128 extraction,
// the coarse/fine split and the use of the same shifter for rounding follow
// the SPU description; the window encoding is this design's.
module shifter (
  input  logic [127:0] data,
  input  logic [5:0]   sh,
  input  logic [1:0]   sel,
  output logic [63:0]  out
);
  logic [127:0] win, coarse, fine;

  always_comb begin
    unique case (sel)
      2'd0:    win = {data[63:0], 64'b0};
      2'd1:    win = data;
      default: win = {64'b0, data[127:64]};
    endcase
    coarse = win << {sh[5:3], 3'b000};
    fine   = coarse << sh[2:0];
    out    = fine[127:64];
  end
endmodule
