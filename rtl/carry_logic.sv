// carry_logic: flag memory and carry-resolution logic of the long
// accumulator.
//
// Every LA word has two flags, "all bits are 0" (zero) and "all bits are 1"
// (one). They are recomputed from the data on every write of a word, so a
// reader can take a flagged word's value from the flags without the RAM.
// When an accumulation leaves a carry (or, for a subtraction, a borrow) above
// its three words, the carry stops at the first word at or above res_start
// that is not all ones (borrow: not all zeros). res_addr gives that word,
// found in parallel from the flags; the words passed over change from all
// ones to all zeros (or back) by a flag-only update over [rng_lo, rng_hi),
// and only the word at res_addr needs a real add. Clearing the LA only sets
// every zero flag. For rounding, the flags give, for the sign of the LA, the
// highest word whose magnitude is nonzero (rnd_lead), whether magnitude bits
// are left below the two words that are read (rnd_sticky), and the carry-in
// that each of those two words needs when a negative LA is negated
// word by word (the +1 of the two's complement reaches word i only if all
// words below i are zero). Interface: flag writes, range updates and clear
// act at the clock edge; every other output is combinational. Reset sets
// the LA to zero. Flags, carry resolve address and flag-only updates follow
// the SPU description; the rounding outputs' exact form is this design's.
module carry_logic #(
  parameter int unsigned WORDS = 67,
  parameter int unsigned W     = 64,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  // flag update for a word written to the LA RAM
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  // flag-only update of the words a carry (borrow) passed over
  input  logic          rng_en,
  input  logic [AW-1:0] rng_lo,
  input  logic [AW-1:0] rng_hi,
  input  logic          rng_carry,
  // flag lookup for a read
  input  logic [AW-1:0] look_addr,
  output logic          look_zero,
  output logic          look_one,
  // carry resolve address
  input  logic [AW-1:0] res_start,
  input  logic          res_carry,
  output logic [AW-1:0] res_addr,
  output logic          res_found,
  // rounding support
  input  logic          rnd_sign,
  output logic          rnd_allzero,
  output logic [AW-1:0] rnd_lead,
  output logic          rnd_sticky,
  output logic          rnd_cin_hi,
  output logic          rnd_cin_lo
);
  logic [WORDS-1:0] fz, fo;       // all-zero and all-one flags
  logic [WORDS:0]   czero;        // czero[i]: all words below i are zero
  logic [WORDS-1:0] magzero;      // magnitude of word i is zero
  logic [AW-1:0]    te;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fz <= '1;
      fo <= '0;
    end else if (clear) begin
      fz <= '1;
      fo <= '0;
    end else begin
      if (rng_en) begin
        for (int i = 0; i < WORDS; i++) begin
          if (AW'(i) >= rng_lo && AW'(i) < rng_hi) begin
            fz[i] <= rng_carry;
            fo[i] <= !rng_carry;
          end
        end
      end
      if (wr_en && wr_addr < AW'(WORDS)) begin
        fz[wr_addr] <= (wr_data == '0);
        fo[wr_addr] <= (wr_data == '1);
      end
    end
  end

  assign look_zero = (look_addr < AW'(WORDS)) ? fz[look_addr] : 1'b1;
  assign look_one  = (look_addr < AW'(WORDS)) ? fo[look_addr] : 1'b0;

  // first word at or above res_start that stops the carry / borrow
  always_comb begin
    res_found = 1'b0;
    res_addr  = '0;
    for (int i = WORDS - 1; i >= 0; i--) begin
      if (AW'(i) >= res_start && (res_carry ? !fo[i] : !fz[i])) begin
        res_found = 1'b1;
        res_addr  = AW'(i);
      end
    end
  end

  // rounding: magnitude of each word of the two's-complement LA
  assign czero[0] = 1'b1;
  for (genvar i = 0; i < WORDS; i++) begin : g_mag
    assign czero[i+1] = czero[i] & fz[i];
    assign magzero[i] = rnd_sign ? ((fo[i] & !czero[i]) | (fz[i] & czero[i])) : fz[i];
  end

  always_comb begin
    rnd_allzero = &magzero;
    rnd_lead    = '0;
    for (int i = 0; i < WORDS; i++)
      if (!magzero[i]) rnd_lead = AW'(i);
    te = (rnd_lead == '0) ? AW'(1) : rnd_lead;
    rnd_sticky = 1'b0;
    for (int i = 0; i < WORDS; i++)
      if (AW'(i) + AW'(1) < te && !magzero[i]) rnd_sticky = 1'b1;
    rnd_cin_hi = rnd_sign & czero[te];
    rnd_cin_lo = rnd_sign & czero[te - AW'(1)];
  end
endmodule
