// la_ram: the dual-ported RAM that holds the long accumulator, 67 words of
// 64 bits.
//
// One write port and one read port work in the same cycle, so the data path
// can store one LA word while it loads the next. The read is synchronous:
// the word addressed in one cycle appears on rdata in the next. The RAM has
// no reset; its contents are only meaningful for words whose all-0/all-1
// flags (carry_logic) are both clear. A read of the word being written in
// the same cycle returns the old contents. Size and dual porting follow the
// SPU description; the one-cycle read latency is this design's choice.
module la_ram #(
  parameter int unsigned WORDS = 67,
  parameter int unsigned W     = 64,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we && waddr < AW'(WORDS)) mem[waddr] <= wdata;
    if (re) rdata <= (raddr < AW'(WORDS)) ? mem[raddr] : '0;
  end
endmodule
