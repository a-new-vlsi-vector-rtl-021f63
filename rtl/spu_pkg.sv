// spu_pkg: constants and types shared by the scalar product unit (SPU).
//
// The long accumulator (LA) is a 4288-bit two's-complement fixed-point
// register, L = k + 2*emax + 2*|emin| + 2*l with l = 53, emin = -1022,
// emax = 1023 and k = 92, held as 67 words of 64 bits. LA bit i has the
// weight 2^(i - LA_FRAC_BITS); a product of two IEEE doubles with biased
// exponents ea, eb (denormals counted as exponent 1) has its least
// significant mantissa bit at LA bit ea + eb. The address map of the 4 KB
// window, the opcode encoding and the rounding-mode encoding are choices of
// this design.
package spu_pkg;

  localparam int unsigned LA_WORDS     = 67;    // 67 x 64 bit LA RAM

  // IEEE rounding modes, encoded in the round instruction address
  typedef enum logic [1:0] {
    RM_NEAREST = 2'd0,  // round to nearest, ties to even
    RM_ZERO    = 2'd1,  // toward zero
    RM_UP      = 2'd2,  // toward +infinity
    RM_DOWN    = 2'd3   // toward -infinity
  } round_mode_e;

  // SPU instructions as decoded from the address within the 4 KB window
  typedef enum logic [2:0] {
    OP_NONE   = 3'd0,  // unmapped address: reads 0, writes ignored
    OP_REG    = 3'd1,  // read/write one 32-bit half of a register
    OP_STATUS = 3'd2,  // read/write the status register
    OP_CLEAR  = 3'd3,  // clear the LA and the exception flags
    OP_PROD   = 3'd4,  // register write, then accumulate x*y of a pair
    OP_ROUND  = 3'd5,  // round the LA into register 0
    OP_LA     = 3'd6   // read/write one 32-bit half of an LA word
  } op_e;

  typedef struct packed {
    op_e          op;
    logic [2:0]   reg_idx;   // 32-bit register index (OP_REG, OP_PROD)
    logic         sub;       // OP_PROD: subtract the product
    round_mode_e  mode;      // OP_ROUND
    logic [6:0]   la_word;   // OP_LA
    logic         la_half;   // OP_LA: 0 = bits 31:0, 1 = bits 63:32
  } instr_t;

  // Status register bits (sticky IEEE exceptional-value flags)
  localparam int unsigned ST_NAN  = 0;
  localparam int unsigned ST_PINF = 1;
  localparam int unsigned ST_NINF = 2;

  localparam logic [63:0] QNAN     = 64'h7FF8_0000_0000_0000;
  localparam logic [63:0] POS_INF  = 64'h7FF0_0000_0000_0000;
  localparam logic [63:0] MAX_FIN  = 64'h7FEF_FFFF_FFFF_FFFF;

endpackage
