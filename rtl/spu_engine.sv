// spu_engine: data path control of the scalar product unit, with the data
// path units it sequences (multiplier, shifter, carry-select adder, LA RAM,
// carry logic and rounder).
//
// Host instructions arrive decoded (instr_t) with a valid/ready handshake;
// the engine answers ready in the cycle the access is done, so the bus
// interface inserts wait states until then. Three activities overlap as in
// a pipeline:
//  * multiplication stage: an "add/subtract product" instruction is decoded
//    in the cycle it is accepted; the next two cycles test x and y for NaN,
//    infinity and zero, the third acts on an exceptional value (sticky status
//    flag) or starts the four-cycle multiplier; in the cycle the product is
//    ready it is loaded into the shifter input latch once the accumulation
//    stage is free. One product per 9 cycles.
//  * accumulation stage: the product touches LA words w, w+1, w+2. For each
//    the word is loaded, the shifted product slice added (subtracted), and
//    the sum stored while the next word is loaded: 7 cycles. If a carry
//    (borrow) leaves word w+2, the flags of the words it passes over are
//    updated in the cycle of the last store, and the word found by the carry
//    logic is loaded, incremented (decremented) and stored: 3 more cycles,
//    11 per product in all.
//  * rounding and host access to the LA and the status register wait until
//    both stages are idle. Rounding reads the top LA word for the sign, finds
//    the leading word from the flags, converts the two leading words to
//    magnitude through the same adder, extracts the mantissa through the
//    same shifter (the rounder drives its select and width) and writes the
//    rounded double to register 0. An exceptional value seen by any product overrides the
//    result (NaN, or an infinity of the sign seen).
// The pipeline split, the cycle counts and the flag-based carry resolution
// follow the SPU description; the handshake, the status register layout
// and the register conventions are this design's choices. Some signals
// drive nothing on purpose: the ev_* strobes are observation points for
// testbenches (carry/borrow resolution, flag-only updates, exceptions,
// skipped zero products, stalls), mul_busy is implied by the stage state,
// and the rounder's inexact flag has no place in the status register.
module spu_engine
  import spu_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // host instruction port
  input  logic          req_valid,
  input  instr_t        instr,
  input  logic          req_write,
  input  logic [31:0]   req_wdata,
  input  logic [3:0]    req_be,
  output logic          req_ready,
  output logic [31:0]   req_rdata,
  // register file
  output logic          rf_h_we,
  input  logic [31:0]   rf_h_rdata,
  output logic [1:0]    rf_rd_idx,
  input  logic [63:0]   rf_rd,
  output logic          rf_i_we,
  output logic [1:0]    rf_i_idx,
  output logic [63:0]   rf_i_wdata
);
  localparam logic [6:0] TOPW = 7'(LA_WORDS - 1);

  typedef enum logic [2:0] {MS_IDLE, MS_TX, MS_TY, MS_TE, MS_MUL, MS_HAND} ms_e;
  typedef enum logic [2:0] {A_IDLE, A_LOAD, A_ADD, A_STORE, A_CY_LOAD, A_CY_ADD,
                            A_CY_STORE} as_e;
  typedef enum logic [2:0] {R_IDLE, R_TOP, R_SIGN, R_HI, R_LO, R_FIN} rs_e;
  typedef enum logic [1:0] {H_IDLE, H_RD, H_WR} hs_e;

  ms_e  ms;
  as_e  as;
  rs_e  rs;
  hs_e  hs;

  logic [2:0]  status;            // sticky NaN, +inf, -inf
  logic        busy_all;
  logic        accept;

  // ---------------- multiplication stage ----------------
  logic        m_pair, m_sub;
  logic        x_nan, x_inf, x_zero, x_sign, y_nan, y_inf, y_zero, y_sign;
  logic [52:0] x_mant, y_mant;
  logic [10:0] x_exp, y_exp;
  logic        c_nan, c_inf, c_zero, c_sign;
  logic [52:0] c_mant;
  logic [10:0] c_exp;
  logic        mul_start, mul_busy, mul_done;
  logic [105:0] mul_prod;
  logic [11:0]  mul_exp;
  logic        handover;

  // operand registers of the pair in use are read one after the other
  assign rf_rd_idx = {m_pair, ms == MS_TY};

  operand_check u_chk (.d(rf_rd), .is_nan(c_nan), .is_inf(c_inf), .is_zero(c_zero),
                       .sign(c_sign), .mant(c_mant), .exp_eff(c_exp));

  multiplier u_mul (.clk, .rst_n, .start(mul_start), .xm(x_mant), .ym(y_mant),
                    .xe(x_exp), .ye(y_exp), .busy(mul_busy), .done(mul_done),
                    .prod(mul_prod), .exp_sum(mul_exp));

  logic ex_nan, ex_inf, ex_zero, ex_sign;
  always_comb begin
    ex_nan  = x_nan | y_nan | (x_inf & y_zero) | (x_zero & y_inf);
    ex_inf  = !ex_nan & (x_inf | y_inf);
    ex_zero = !ex_nan & !ex_inf & (x_zero | y_zero);
    ex_sign = x_sign ^ y_sign ^ m_sub;
  end
  assign mul_start = (ms == MS_TE) && !ex_nan && !ex_inf && !ex_zero;
  assign handover  = ((ms == MS_MUL && mul_done) || ms == MS_HAND) && as == A_IDLE;

  // ---------------- accumulation stage ----------------
  logic [105:0] a_prod;
  logic [5:0]   a_sh;
  logic [6:0]   a_w;
  logic         a_sub;
  logic [1:0]   a_j;
  logic [63:0]  a_sum;
  logic         a_carry;
  logic [6:0]   a_cy_addr;
  logic [63:0]  sh_out;
  logic [127:0] sh_data;
  logic [63:0]  r_hi, r_lo;     // the two leading LA words, as magnitude
  logic [5:0]   sh_amt, r_sh_amt;
  logic [1:0]   sh_sel, r_sh_sel;

  // The shifter serves the accumulation stage, and the rounder while a
  // rounding runs (both stages are idle then).
  assign sh_data = (rs != R_IDLE) ? {r_hi, r_lo} : {22'b0, a_prod};
  assign sh_amt  = (rs != R_IDLE) ? r_sh_amt : a_sh;
  assign sh_sel  = (rs != R_IDLE) ? r_sh_sel : a_j;
  shifter u_sh (.data(sh_data), .sh(sh_amt), .sel(sh_sel), .out(sh_out));

  // ---------------- LA RAM, flags, adder ----------------
  logic        ram_we, ram_re;
  logic [6:0]  ram_waddr, ram_raddr;
  logic [63:0] ram_wdata, ram_rdata;
  logic        rd_zero_q, rd_one_q;
  logic [63:0] la_q;              // flag-corrected word read last cycle
  logic        look_zero, look_one;
  logic        cl_clear, rng_en, rng_carry;
  logic [6:0]  rng_lo, rng_hi;
  logic [6:0]  res_addr;
  logic        res_found;
  logic        rnd_allzero, rnd_sticky, rnd_cin_hi, rnd_cin_lo;
  logic [6:0]  rnd_lead, r_te;
  logic [63:0] ad_a, ad_b, ad_sum;
  logic        ad_cin, ad_cout;

  la_ram #(.WORDS(LA_WORDS), .W(64), .AW(7)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .re(ram_re), .raddr(ram_raddr), .rdata(ram_rdata));

  logic r_sign, cl_sign;
  // the sign is needed by the flag logic in the cycle it is read
  assign cl_sign = (rs == R_SIGN) ? la_q[63] : r_sign;
  carry_logic #(.WORDS(LA_WORDS), .W(64), .AW(7)) u_cl (
    .clk, .rst_n, .clear(cl_clear),
    .wr_en(ram_we), .wr_addr(ram_waddr), .wr_data(ram_wdata),
    .rng_en, .rng_lo, .rng_hi, .rng_carry,
    .look_addr(ram_raddr), .look_zero, .look_one,
    .res_start(a_w + 7'd3), .res_carry(!a_sub), .res_addr, .res_found,
    .rnd_sign(cl_sign), .rnd_allzero, .rnd_lead, .rnd_sticky, .rnd_cin_hi, .rnd_cin_lo);

  csel_adder #(.W(64), .BLK(8)) u_add (.a(ad_a), .b(ad_b), .cin(ad_cin), .sum(ad_sum),
                                       .cout(ad_cout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_zero_q <= 1'b1;
      rd_one_q  <= 1'b0;
    end else if (ram_re) begin
      rd_zero_q <= look_zero;
      rd_one_q  <= look_one;
    end
  end
  assign la_q = rd_zero_q ? '0 : rd_one_q ? '1 : ram_rdata;

  // ---------------- rounding ----------------
  logic [63:0] r_result;
  round_mode_e r_mode;
  logic        r_inexact;
  assign r_te = (rnd_lead == 7'd0) ? 7'd1 : rnd_lead;

  rounder u_rnd (.sign(r_sign), .is_zero(rnd_allzero), .te(r_te), .mag_hi(r_hi),
                 .mag_lo(r_lo), .sticky_lo(rnd_sticky), .mode(r_mode),
                 .sh_sel(r_sh_sel), .sh_amt(r_sh_amt), .slice(sh_out),
                 .result(r_result), .inexact(r_inexact));

  // ---------------- host access ----------------
  logic        pair_busy;
  logic [63:0] h_merged;
  assign busy_all  = (ms != MS_IDLE) || (as != A_IDLE) || (rs != R_IDLE) || (hs != H_IDLE);
  assign pair_busy = (ms == MS_TX || ms == MS_TY || ms == MS_TE) && (m_pair == instr.reg_idx[2]);

  always_comb begin
    req_ready = 1'b0;
    unique case (instr.op)
      OP_REG:    req_ready = (rs == R_IDLE) && !(req_write && pair_busy);
      OP_PROD:   req_ready = (ms == MS_IDLE) && (rs == R_IDLE) && (hs == H_IDLE);
      OP_STATUS, OP_CLEAR, OP_ROUND: req_ready = !busy_all;
      OP_LA:     req_ready = req_write ? (hs == H_WR) : (hs == H_RD);
      default:   req_ready = 1'b1;
    endcase
  end
  assign accept  = req_valid && req_ready;
  assign rf_h_we = accept && req_write && (instr.op == OP_REG || instr.op == OP_PROD);

  always_comb begin
    h_merged = la_q;
    for (int b = 0; b < 4; b++)
      if (req_be[b]) h_merged[32*instr.la_half + 8*b +: 8] = req_wdata[8*b +: 8];
  end

  always_comb begin
    unique case (instr.op)
      OP_REG:    req_rdata = rf_h_rdata;
      OP_STATUS: req_rdata = {29'b0, status};
      OP_LA:     req_rdata = instr.la_half ? la_q[63:32] : la_q[31:0];
      default:   req_rdata = '0;
    endcase
  end

  // ---------------- shared RAM / adder control ----------------
  always_comb begin
    ram_re = 1'b0;  ram_raddr = '0;
    ram_we = 1'b0;  ram_waddr = '0;  ram_wdata = '0;
    rng_en = 1'b0;  rng_lo = '0; rng_hi = '0; rng_carry = !a_sub;
    ad_a = la_q;  ad_b = '0;  ad_cin = 1'b0;
    cl_clear = accept && instr.op == OP_CLEAR;
    // accumulation
    unique case (as)
      A_LOAD: begin ram_re = 1'b1; ram_raddr = a_w; end
      A_ADD: begin
        ad_b   = a_sub ? ~sh_out : sh_out;
        ad_cin = (a_j == 2'd0) ? a_sub : a_carry;
      end
      A_STORE: begin
        ram_we = 1'b1; ram_waddr = a_w + 7'(a_j); ram_wdata = a_sum;
        if (a_j != 2'd2) begin
          ram_re = 1'b1; ram_raddr = a_w + 7'(a_j) + 7'd1;
        end else if (a_sub ? !a_carry : a_carry) begin
          rng_en = 1'b1;
          rng_lo = a_w + 7'd3;
          rng_hi = res_found ? res_addr : 7'(LA_WORDS);
        end
      end
      A_CY_LOAD: begin ram_re = 1'b1; ram_raddr = a_cy_addr; end
      A_CY_ADD: begin
        ad_b   = a_sub ? '1 : '0;
        ad_cin = !a_sub;
      end
      A_CY_STORE: begin ram_we = 1'b1; ram_waddr = a_cy_addr; ram_wdata = a_sum; end
      default: ;
    endcase
    // rounding
    unique case (rs)
      R_TOP: begin ram_re = 1'b1; ram_raddr = TOPW; end
      R_SIGN: begin ram_re = 1'b1; ram_raddr = r_te; end   // r_sign valid next cycle
      R_HI: begin
        ram_re = 1'b1; ram_raddr = r_te - 7'd1;
        ad_a = r_sign ? ~la_q : la_q; ad_cin = rnd_cin_hi;
      end
      R_LO: begin ad_a = r_sign ? ~la_q : la_q; ad_cin = rnd_cin_lo; end
      default: ;
    endcase
    // host LA access
    if (hs == H_IDLE && !busy_all && req_valid && instr.op == OP_LA) begin
      ram_re = 1'b1; ram_raddr = instr.la_word;
    end
    if (hs == H_WR && req_valid) begin
      ram_we = 1'b1; ram_waddr = instr.la_word; ram_wdata = h_merged;
    end
  end

  // event strobes, for observation only
  logic ev_carry_res, ev_borrow_res, ev_flag_skip, ev_exception, ev_zero_skip, ev_acc_stall;
  assign ev_carry_res  = (as == A_STORE) && a_j == 2'd2 && !a_sub && a_carry;
  assign ev_borrow_res = (as == A_STORE) && a_j == 2'd2 && a_sub && !a_carry;
  assign ev_flag_skip  = rng_en && (rng_hi > rng_lo);
  assign ev_exception  = (ms == MS_TE) && (ex_nan || ex_inf);
  assign ev_zero_skip  = (ms == MS_TE) && ex_zero;
  assign ev_acc_stall  = (ms == MS_HAND) || (ms == MS_MUL && mul_done && as != A_IDLE);

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ms <= MS_IDLE; as <= A_IDLE; rs <= R_IDLE; hs <= H_IDLE;
      status <= '0;
      m_pair <= 1'b0; m_sub <= 1'b0;
      {x_nan, x_inf, x_zero, x_sign, y_nan, y_inf, y_zero, y_sign} <= '0;
      x_mant <= '0; y_mant <= '0; x_exp <= '0; y_exp <= '0;
      a_prod <= '0; a_sh <= '0; a_w <= '0; a_sub <= 1'b0; a_j <= '0;
      a_sum <= '0; a_carry <= 1'b0; a_cy_addr <= '0;
      r_sign <= 1'b0; r_hi <= '0; r_lo <= '0; r_mode <= RM_NEAREST;
    end else begin
      // multiplication stage
      unique case (ms)
        MS_IDLE: if (accept && instr.op == OP_PROD) begin
          m_pair <= instr.reg_idx[2];
          m_sub  <= instr.sub;
          ms     <= MS_TX;
        end
        MS_TX: begin
          {x_nan, x_inf, x_zero, x_sign} <= {c_nan, c_inf, c_zero, c_sign};
          x_mant <= c_mant; x_exp <= c_exp;
          ms <= MS_TY;
        end
        MS_TY: begin
          {y_nan, y_inf, y_zero, y_sign} <= {c_nan, c_inf, c_zero, c_sign};
          y_mant <= c_mant; y_exp <= c_exp;
          ms <= MS_TE;
        end
        MS_TE: begin
          if (ex_nan) status[ST_NAN] <= 1'b1;
          if (ex_inf) status[ex_sign ? ST_NINF : ST_PINF] <= 1'b1;
          ms <= mul_start ? MS_MUL : MS_IDLE;
        end
        MS_MUL: if (mul_done) ms <= handover ? MS_IDLE : MS_HAND;
        MS_HAND: if (handover) ms <= MS_IDLE;
        default: ms <= MS_IDLE;
      endcase

      // accumulation stage
      unique case (as)
        A_IDLE: if (handover) begin
          a_prod <= mul_prod;
          a_sh   <= mul_exp[5:0];
          a_w    <= 7'(mul_exp[11:6]);
          a_sub  <= x_sign ^ y_sign ^ m_sub;
          a_j    <= 2'd0;
          as     <= A_LOAD;
        end
        A_LOAD: as <= A_ADD;
        A_ADD: begin
          a_sum   <= ad_sum;
          a_carry <= ad_cout;
          as      <= A_STORE;
        end
        A_STORE: begin
          if (a_j != 2'd2) begin
            a_j <= a_j + 2'd1;
            as  <= A_ADD;
          end else if ((a_sub ? !a_carry : a_carry) && res_found) begin
            a_cy_addr <= res_addr;
            as        <= A_CY_LOAD;
          end else begin
            as <= A_IDLE;
          end
        end
        A_CY_LOAD: as <= A_CY_ADD;
        A_CY_ADD: begin a_sum <= ad_sum; as <= A_CY_STORE; end
        A_CY_STORE: as <= A_IDLE;
        default: as <= A_IDLE;
      endcase

      // rounding
      unique case (rs)
        R_IDLE: if (accept && instr.op == OP_ROUND) begin
          r_mode <= instr.mode;
          rs     <= R_TOP;
        end
        R_TOP:  rs <= R_SIGN;
        R_SIGN: begin r_sign <= la_q[63]; rs <= R_HI; end
        R_HI:   begin r_hi <= ad_sum; rs <= R_LO; end
        R_LO:   begin r_lo <= ad_sum; rs <= R_FIN; end
        R_FIN:  rs <= R_IDLE;
        default: rs <= R_IDLE;
      endcase

      // host LA access
      unique case (hs)
        H_IDLE: if (!busy_all && req_valid && instr.op == OP_LA)
                  hs <= req_write ? H_WR : H_RD;
        default: if (accept || !req_valid) hs <= H_IDLE;
      endcase

      // status register
      if (accept && instr.op == OP_STATUS && req_write) status <= req_wdata[2:0];
      if (accept && instr.op == OP_CLEAR) status <= '0;
    end
  end

  always_comb begin
    rf_i_we    = (rs == R_FIN);
    rf_i_idx   = 2'd0;
    if (status[ST_NAN] || (status[ST_PINF] && status[ST_NINF])) rf_i_wdata = QNAN;
    else if (status[ST_PINF]) rf_i_wdata = POS_INF;
    else if (status[ST_NINF]) rf_i_wdata = {1'b1, POS_INF[62:0]};
    else rf_i_wdata = r_result;
  end
endmodule
