// tb_spu_engine: drives the data path control directly on its instruction
// port, with the register file attached, and checks dot products against
// the exact reference (spu_ref_pkg) in all rounding modes, including
// negative sums, carry and borrow resolution, exceptional operands and LA
// host access. Checks the pipeline timing: with the pipeline idle, a product
// reaches the shifter input latch 8 cycles after its instruction is accepted
// (decode, two operand tests, exception action, four multiply steps) and its
// accumulation takes 7 cycles, 10 with carry resolution; streamed products
// follow each other every 9 cycles, 11 after a carry resolution.
module tb_spu_engine;
  import spu_pkg::*;
  import spu_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_write = 0, req_ready;
  instr_t instr;
  logic [31:0] req_wdata = 0, req_rdata, rf_h_rdata;
  logic [3:0] req_be = 4'hF;
  logic rf_h_we, rf_i_we;
  logic [1:0] rf_rd_idx, rf_i_idx;
  logic [63:0] rf_rd, rf_i_wdata;

  reg_file u_rf (.clk, .rst_n, .h_we(rf_h_we), .h_idx(instr.reg_idx), .h_be(req_be),
                 .h_wdata(req_wdata), .h_rdata(rf_h_rdata), .rd_idx(rf_rd_idx), .rd_data(rf_rd),
                 .i_we(rf_i_we), .i_idx(rf_i_idx), .i_wdata(rf_i_wdata));
  spu_engine dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(negedge clk) cycle++;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // one access; waits for ready; returns the cycle it was accepted
  task automatic acc(op_e op, bit wr, logic [2:0] idx, logic [31:0] d, output logic [31:0] r,
                     input bit sub = 0, input int mode = 0, input int law = 0, input bit lah = 0);
    int g;
    @(negedge clk);
    instr = '0;
    instr.op = op; instr.reg_idx = idx; instr.sub = sub; instr.mode = round_mode_e'(mode);
    instr.la_word = 7'(law); instr.la_half = lah;
    req_valid = 1; req_write = wr; req_wdata = d;
    #1;
    g = 0;
    while (!req_ready) begin @(negedge clk); #1; g++; if (g > 100) break; end
    r = req_rdata;
    @(posedge clk); #1;
    req_valid = 0;
  endtask

  big_t ref_acc;
  bit ref_nan, ref_pinf, ref_ninf, pair = 0;
  int accept_cycle;
  logic [31:0] dummy;

  task automatic clear_la();
    acc(OP_CLEAR, 1, 0, 0, dummy);
    ref_acc = 0; ref_nan = 0; ref_pinf = 0; ref_ninf = 0;
  endtask

  task automatic prod(logic [63:0] x, logic [63:0] y, bit sub);
    logic [2:0] b;
    b = pair ? 3'd4 : 3'd0;
    acc(OP_REG, 1, b, x[31:0], dummy);
    acc(OP_REG, 1, b + 1, x[63:32], dummy);
    acc(OP_REG, 1, b + 2, y[31:0], dummy);
    acc(OP_PROD, 1, b + 3, y[63:32], dummy, sub);
    accept_cycle = cycle;
    pair = !pair;
    if (is_nan(x) || is_nan(y) || (is_inf(x) && is_zero(y)) || (is_zero(x) && is_inf(y))) ref_nan = 1;
    else if (is_inf(x) || is_inf(y)) begin
      if (x[63] ^ y[63] ^ sub) ref_ninf = 1; else ref_pinf = 1;
    end else ref_acc = sub ? ref_acc - prod_val(x, y) : ref_acc + prod_val(x, y);
  endtask

  task automatic round_check(string tag);
    logic [31:0] lo, hi;
    logic [63:0] e;
    for (int m = 0; m < 4; m++) begin
      acc(OP_ROUND, 1, 0, 0, dummy, 0, m);
      acc(OP_REG, 0, 0, 0, lo);
      acc(OP_REG, 0, 1, 0, hi);
      if (ref_nan || (ref_pinf && ref_ninf)) e = QNAN;
      else if (ref_pinf) e = POS_INF;
      else if (ref_ninf) e = {1'b1, POS_INF[62:0]};
      else e = ref_round(ref_acc, m);
      chk({hi, lo} == e, $sformatf("%s mode %0d: %h expected %h", tag, m, {hi, lo}, e));
    end
  endtask

  // read every LA word through the host port and compare with the reference
  task automatic la_check(string tag);
    logic [31:0] lo, hi;
    big_t v;
    bit ok;
    v = ref_acc;
    ok = 1;
    for (int w = 0; w < 67; w++) begin
      acc(OP_LA, 0, 0, 0, lo, 0, 0, w, 0);
      acc(OP_LA, 0, 0, 0, hi, 0, 0, w, 1);
      if ({hi, lo} != v[64*w +: 64]) ok = 0;
    end
    chk(ok, {tag, ": LA contents"});
  endtask

  // timing monitor
  int hand_cycle = -1, n_hand_lat = 0, n_acc7 = 0, n_acc10 = 0, n_gap9 = 0, n_gap11 = 0;
  int acc_start = 0, last_hand = -1;
  bit had_cy = 0, streaming = 0, idle_start = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.handover) begin
      if (idle_start) begin
        chk(cycle - accept_cycle == 8, $sformatf("accept to shifter latch %0d", cycle - accept_cycle));
        n_hand_lat++;
      end
      if (streaming && last_hand >= 0) begin
        chk(cycle - last_hand == (had_cy ? 11 : 9), $sformatf("product gap %0d", cycle - last_hand));
        if (had_cy) n_gap11++; else n_gap9++;
      end
      last_hand <= streaming ? cycle : -1;
      had_cy <= 0;
      acc_start <= cycle;
    end
    if (dut.as == dut.A_CY_LOAD) had_cy <= 1;
    if (dut.as == dut.A_STORE && dut.a_j == 2 && !(dut.a_sub ? !dut.a_carry : dut.a_carry)) begin
      chk(cycle - acc_start == 7, "accumulation without carry takes 7 cycles"); n_acc7++;
    end
    if (dut.as == dut.A_CY_STORE) begin
      chk(cycle - acc_start == 10, "accumulation with carry takes 10 cycles"); n_acc10++;
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] lo, hi;
    instr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    clear_la();
    // single products into an idle pipeline
    idle_start = 1;
    prod(mk(0, 1023 + 700, 0), mk(0, 1023 + 700, 0), 0);
    repeat (20) @(negedge clk);
    prod(mk(0, 1023 - 200, 52'h3), mk(0, 1023 - 200, 0), 1);    // borrow up to 2^1400
    repeat (20) @(negedge clk);
    prod(mk(0, 1023 - 200, 52'h3), mk(0, 1023 - 200, 0), 0);    // carry back
    repeat (20) @(negedge clk);
    idle_start = 0;
    round_check("idle products");
    la_check("idle products");
    // random streams
    for (int t = 0; t < 8; t++) begin
      clear_la();
      for (int i = 0; i < 10; i++) begin
        logic [63:0] x, y;
        x = rnd_double(t < 4 ? 950 : 1, t < 4 ? 1100 : 2046);
        y = rnd_double(t < 4 ? 950 : 1, t < 4 ? 1100 : 2046);
        if (t >= 4) y[62:52] = 11'(2046 - int'(x[62:52]) + int'($urandom_range(40)) - 20 < 1 ? 1 :
                                   2046 - int'(x[62:52]) + int'($urandom_range(40)) - 20);
        prod(x, y, 1'($urandom));
      end
      round_check($sformatf("random %0d", t));
      la_check($sformatf("random %0d", t));
    end
    // exceptional values
    clear_la();
    prod(mk(1, 2047, 0), mk(0, 1000, 0), 0);
    round_check("-inf");
    prod(mk(0, 2047, 52'h5), mk(0, 1000, 0), 0);
    round_check("NaN");
    acc(OP_STATUS, 0, 0, 0, lo);
    chk(lo == 32'h5, $sformatf("status %h", lo));
    // LA host write then read back, and rounding of the written value
    clear_la();
    acc(OP_LA, 1, 0, 32'hDEAD_BEEF, dummy, 0, 0, 20, 1);
    acc(OP_LA, 0, 0, 0, hi, 0, 0, 20, 1);
    acc(OP_LA, 0, 0, 0, lo, 0, 0, 20, 0);
    chk(hi == 32'hDEAD_BEEF && lo == 0, "LA host write/read");
    ref_acc = big_t'(64'hDEAD_BEEF_0000_0000) <<< (64 * 20);
    round_check("LA written by the host");
    // streaming with and without carry resolution
    clear_la();
    prod(mk(0, 1023 + 700, 0), mk(0, 1023 + 700, 0), 0);
    repeat (20) @(negedge clk);
    streaming = 1;
    for (int i = 0; i < 5; i++) prod(mk(0, 1023 + i, 52'h9), mk(0, 1023, 52'h1), 0);
    for (int i = 0; i < 6; i++) prod(mk(0, 1023 - 200, 52'h3), mk(0, 1023 - 200, 0), i % 2 == 0);
    repeat (30) @(negedge clk);
    streaming = 0;
    round_check("streaming");
    chk(n_hand_lat >= 3 && n_acc7 > 0 && n_acc10 > 0 && n_gap9 > 0 && n_gap11 > 0,
        $sformatf("timing cases seen: %0d %0d %0d %0d %0d", n_hand_lat, n_acc7, n_acc10, n_gap9, n_gap11));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
