// instr_decode: turns an access to the SPU's 4 KB memory window into an SPU
// instruction.
//
// The host executes SPU instructions by reading and writing addresses in the
// window; the instruction is encoded in the address. Purely combinational.
// Address map (byte offsets, 32-bit accesses; the map is this design's own):
//   0x000-0x01C  register file, eight 32-bit registers (reg k = 64-bit
//                register k/2, half k%2)
//   0x020        status register (exception flags)
//   0x040        write: clear LA
//   0x080-0x09C  write: register write, then add product of pair k/4
//   0x0C0-0x0DC  write: register write, then subtract product of pair k/4
//                (reads of both ranges read the register)
//   0x100-0x10C  write: round the LA into register 0, mode = offset[3:2]
//   0x800-0xA14  LA word offset[10:3], half offset[2]
module instr_decode
  import spu_pkg::*;
(
  input  logic [11:2] addr,   // word address within the 4 KB window
  input  logic        write,
  output instr_t      instr
);
  always_comb begin
    instr         = '0;
    instr.op      = OP_NONE;
    instr.reg_idx = addr[4:2];
    instr.sub     = addr[6];
    instr.mode    = round_mode_e'(addr[3:2]);
    instr.la_word = addr[9:3];
    instr.la_half = addr[2];
    if (addr[11]) begin
      if (addr[10:3] < 8'(LA_WORDS)) instr.op = OP_LA;
    end else begin
      unique case (addr[10:5])
        6'h00: instr.op = OP_REG;
        6'h01: if (addr[4:2] == 3'd0) instr.op = OP_STATUS;
        6'h02: if (addr[4:2] == 3'd0 && write) instr.op = OP_CLEAR;
        6'h04, 6'h06: instr.op = write ? OP_PROD : OP_REG;
        6'h08: if (addr[4] == 1'b0 && write) instr.op = OP_ROUND;
        default: instr.op = OP_NONE;
      endcase
    end
  end
endmodule
