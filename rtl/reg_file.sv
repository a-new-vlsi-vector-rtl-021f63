// reg_file: the 4 x 64 bit register file between the 32-bit PCI bus and the
// 64-bit SPU data path.
//
// The host sees eight 32-bit registers: 32-bit register k is half k%2 of
// 64-bit register k/2 (half 0 = bits 31:0). Registers 0/1 and 2/3 form two
// operand pairs (x, y) so that the host can load one pair while the data
// path works on the other; the rounded result is written to register 0 by the
// data path. Host writes honour the PCI byte enables. All reads are
// combinational, writes take effect at the clock edge; an internal write
// wins over a host write to the same register. Reset clears all registers.
// The size and the 32/64-bit views follow the SPU description; the pairing
// and the result register are this design's choice.
module reg_file #(
  parameter int unsigned NREGS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // host port, 32 bit
  input  logic        h_we,
  input  logic [2:0]  h_idx,
  input  logic [3:0]  h_be,
  input  logic [31:0] h_wdata,
  output logic [31:0] h_rdata,
  // data path read port, 64 bit
  input  logic [1:0]  rd_idx,
  output logic [63:0] rd_data,
  // data path write port, 64 bit
  input  logic        i_we,
  input  logic [1:0]  i_idx,
  input  logic [63:0] i_wdata
);
  logic [63:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      if (h_we) begin
        for (int b = 0; b < 4; b++)
          if (h_be[b]) regs[h_idx[2:1]][32*h_idx[0] + 8*b +: 8] <= h_wdata[8*b +: 8];
      end
      if (i_we) regs[i_idx] <= i_wdata;
    end
  end

  assign h_rdata = regs[h_idx[2:1]][32*h_idx[0] +: 32];
  assign rd_data = regs[rd_idx];
endmodule
