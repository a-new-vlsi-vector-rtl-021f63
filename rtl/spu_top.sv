// spu_top: the scalar product unit (SPU), a PCI coprocessor that
// accumulates dot products of IEEE double vectors exactly in a 4288-bit
// long accumulator and rounds the result once.
//
// The host sees a 4 KB memory window (pci_target). The word address of an
// access is decoded into an SPU instruction (instr_decode); operands and the
// result pass through the 4 x 64 bit register file (reg_file); the data path
// control (spu_engine) runs operand checks and the four-cycle multiplier for
// one product while the shifter, adder and carry logic add the previous one
// into the LA RAM, and rounds the LA on request. A product is accepted every
// 9 clocks, or 11 when its carry has to be propagated past its three LA
// words. The pins are those of a 32-bit PCI target with the tri-state pins
// split into input, output and enable. The block structure follows the SPU
// description; the address map and register conventions are this design's
// (see instr_decode and reg_file).
module spu_top
  import spu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_n,
  input  logic        irdy_n,
  input  logic        idsel,
  input  logic [3:0]  cbe_n,
  input  logic [31:0] ad_i,
  output logic [31:0] ad_o,
  output logic        ad_oe,
  output logic        par_o,
  output logic        par_oe,
  output logic        trdy_n,
  output logic        devsel_n,
  output logic        stop_n,
  output logic        ctl_oe
);
  logic        req_valid, req_write, req_ready;
  logic [11:2] req_addr;
  logic [31:0] req_wdata, req_rdata, rf_h_rdata;
  logic [3:0]  req_be;
  instr_t      instr;
  logic        rf_h_we, rf_i_we;
  logic [1:0]  rf_rd_idx, rf_i_idx;
  logic [63:0] rf_rd, rf_i_wdata;

  pci_target u_pci (
    .clk, .rst_n, .frame_n, .irdy_n, .idsel, .cbe_n, .ad_i, .ad_o, .ad_oe,
    .par_o, .par_oe, .trdy_n, .devsel_n, .stop_n, .ctl_oe,
    .req_valid, .req_write, .req_addr, .req_wdata, .req_be, .req_ready, .req_rdata);

  instr_decode u_dec (.addr(req_addr), .write(req_write), .instr);

  reg_file u_rf (
    .clk, .rst_n, .h_we(rf_h_we), .h_idx(instr.reg_idx), .h_be(req_be),
    .h_wdata(req_wdata), .h_rdata(rf_h_rdata), .rd_idx(rf_rd_idx), .rd_data(rf_rd),
    .i_we(rf_i_we), .i_idx(rf_i_idx), .i_wdata(rf_i_wdata));

  spu_engine u_eng (
    .clk, .rst_n, .req_valid, .instr, .req_write, .req_wdata, .req_be, .req_ready,
    .req_rdata, .rf_h_we, .rf_h_rdata, .rf_rd_idx, .rf_rd, .rf_i_we, .rf_i_idx,
    .rf_i_wdata);
endmodule
