// tb_instr_decode: checks the decoding of every word address of the 4 KB
// window, for reads and writes, against the address map.
module tb_instr_decode;
  import spu_pkg::*;
  logic [11:2] addr;
  logic write;
  instr_t instr;
  int checks = 0, failures = 0;

  instr_decode dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op_e exp;
    int off;
    for (int w = 0; w < 2; w++) begin
      for (int a = 0; a < 1024; a++) begin
        addr = 10'(a); write = 1'(w);
        off = a * 4;
        #1;
        if (off < 'h20) exp = OP_REG;
        else if (off == 'h20) exp = OP_STATUS;
        else if (off == 'h40 && w == 1) exp = OP_CLEAR;
        else if (off >= 'h80 && off < 'hA0) exp = w ? OP_PROD : OP_REG;
        else if (off >= 'hC0 && off < 'hE0) exp = w ? OP_PROD : OP_REG;
        else if (off >= 'h100 && off < 'h110 && w == 1) exp = OP_ROUND;
        else if (off >= 'h800 && off < 'h800 + 67 * 8) exp = OP_LA;
        else exp = OP_NONE;
        checks++;
        if (instr.op != exp) begin
          failures++;
          $display("FAIL offset %h write %0d: op %0d expected %0d", off, w, instr.op, exp);
        end
        if (exp == OP_PROD) begin
          checks++;
          if (instr.sub != (off >= 'hC0) || instr.reg_idx != 3'((off >> 2) & 7)) begin
            failures++; $display("FAIL product fields at %h", off);
          end
        end
        if (exp == OP_ROUND) begin
          checks++;
          if (instr.mode != round_mode_e'((off >> 2) & 3)) begin
            failures++; $display("FAIL rounding mode at %h", off);
          end
        end
        if (exp == OP_LA) begin
          checks++;
          if (instr.la_word != 7'((off - 'h800) >> 3) || instr.la_half != 1'((off >> 2) & 1)) begin
            failures++; $display("FAIL LA fields at %h", off);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
