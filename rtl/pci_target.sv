// pci_target: 32-bit PCI target (slave) interface of the SPU.
//
// The SPU is a memory-mapped PCI device. Its configuration space holds the
// identification registers, the command register (memory space enable) and
// one base address register that requests a 4 KB memory window; memory
// reads and writes inside that window are handed to the SPU as requests
// (req_valid/req_ready, word address within the window, data, active-high
// byte enables). The target decodes in the address phase and answers with
// DEVSEL# and TRDY# in the first data phase when the SPU is ready (fast
// decode), so a write needs two clocks, address and data phase, and the next
// address phase may follow at once (fast back-to-back); a read adds
// the mandatory turnaround clock before the target drives AD. TRDY# follows
// req_ready combinationally, which gives wait states while the SPU is busy.
// Bursts continue with linearly increasing addresses. PAR is driven one
// clock after the AD it covers. Tri-state pins are split into input, output
// and output-enable. Not handled: STOP# (never asserted: no retry or
// disconnect), I/O space, the latency rule for the first data phase,
// parity error reporting, interrupts. The 32-bit, 33 MHz PCI target with a
// 4 KB memory window follows the SPU description; everything inside it,
// and the identification values, are this design's choices. Assertions at
// the end check the handshake rules.
module pci_target #(
  parameter logic [15:0] VENDOR_ID = 16'hFFFE,
  parameter logic [15:0] DEVICE_ID = 16'h0001,
  parameter logic [23:0] CLASS_CODE = 24'h0B4000   // processor, co-processor
) (
  input  logic        clk,
  input  logic        rst_n,
  // PCI pins
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
  output logic        ctl_oe,     // enable for TRDY#, DEVSEL#, STOP#
  // SPU request port
  output logic        req_valid,
  output logic        req_write,
  output logic [11:2] req_addr,
  output logic [31:0] req_wdata,
  output logic [3:0]  req_be,
  input  logic        req_ready,
  input  logic [31:0] req_rdata
);
  typedef enum logic [2:0] {T_IDLE, T_MEM_TA, T_MEM, T_CFG_TA, T_CFG, T_TURN, T_OTHER} tstate_e;
  tstate_e     st;
  logic        wr_q;
  logic [11:2] addr_q;
  logic [5:0]  cfg_reg_q;
  logic        bus_idle_q;
  logic        mem_en;
  logic [31:12] bar;
  logic [31:0] cfg_rdata;
  logic        in_data, xfer;
  logic        cfg_ready;

  // C/BE# commands in the address phase
  localparam logic [3:0] CMD_MEM_RD  = 4'b0110, CMD_MEM_WR  = 4'b0111,
                         CMD_CFG_RD  = 4'b1010, CMD_CFG_WR  = 4'b1011,
                         CMD_MEM_RDM = 4'b1100, CMD_MEM_RDL = 4'b1110,
                         CMD_MEM_WRI = 4'b1111;

  logic addr_phase, is_mem_rd, is_mem_wr, is_cfg;
  // a new address phase follows an idle bus, or directly the last data
  // phase of a transaction to this target (fast back-to-back)
  assign addr_phase = !frame_n && ((st == T_IDLE && bus_idle_q) || st == T_TURN);
  assign is_mem_rd  = cbe_n == CMD_MEM_RD || cbe_n == CMD_MEM_RDM || cbe_n == CMD_MEM_RDL;
  assign is_mem_wr  = cbe_n == CMD_MEM_WR || cbe_n == CMD_MEM_WRI;
  assign is_cfg     = (cbe_n == CMD_CFG_RD || cbe_n == CMD_CFG_WR) && idsel &&
                      ad_i[1:0] == 2'b00 && ad_i[10:8] == 3'd0;

  // configuration space
  always_comb begin
    unique case (cfg_reg_q)
      6'h00:   cfg_rdata = {DEVICE_ID, VENDOR_ID};
      6'h01:   cfg_rdata = {16'h0000, 14'b0, mem_en, 1'b0};
      6'h02:   cfg_rdata = {CLASS_CODE, 8'h01};
      6'h04:   cfg_rdata = {bar, 12'h000};   // 32-bit, non-prefetchable memory
      default: cfg_rdata = '0;
    endcase
  end
  assign cfg_ready = 1'b1;

  assign in_data   = (st == T_MEM) || (st == T_CFG);
  assign req_valid = (st == T_MEM) && !irdy_n;
  assign req_write = wr_q;
  assign req_addr  = addr_q;
  assign req_wdata = ad_i;
  assign req_be    = ~cbe_n;
  assign xfer      = !irdy_n && ((st == T_MEM && req_ready) || (st == T_CFG && cfg_ready));

  assign devsel_n = !(in_data || st == T_MEM_TA || st == T_CFG_TA);
  assign trdy_n   = !xfer;
  assign stop_n   = 1'b1;
  assign ctl_oe   = !devsel_n || st == T_TURN;
  assign ad_oe    = in_data && !wr_q;
  assign ad_o     = (st == T_CFG) ? cfg_rdata : req_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; wr_q <= 1'b0; addr_q <= '0; cfg_reg_q <= '0;
      bus_idle_q <= 1'b0; mem_en <= 1'b0; bar <= '0;
      par_o <= 1'b0; par_oe <= 1'b0;
    end else begin
      bus_idle_q <= frame_n && irdy_n;
      par_o  <= ^{ad_o, cbe_n};
      par_oe <= ad_oe;
      unique case (st)
        T_IDLE, T_TURN: if (addr_phase) begin
          addr_q    <= ad_i[11:2];
          cfg_reg_q <= ad_i[7:2];
          if ((is_mem_rd || is_mem_wr) && mem_en && ad_i[31:12] == bar) begin
            wr_q <= is_mem_wr;
            st   <= is_mem_wr ? T_MEM : T_MEM_TA;
          end else if (is_cfg) begin
            wr_q <= cbe_n[0];
            st   <= cbe_n[0] ? T_CFG : T_CFG_TA;
          end else begin
            st <= T_OTHER;
          end
        end else begin
          st <= T_IDLE;
        end
        T_MEM_TA: st <= T_MEM;
        T_CFG_TA: st <= T_CFG;
        T_MEM, T_CFG: if (xfer) begin
          if (st == T_CFG && wr_q) begin
            if (cfg_reg_q == 6'h01 && !cbe_n[0]) mem_en <= ad_i[1];
            if (cfg_reg_q == 6'h04) begin
              if (!cbe_n[1]) bar[15:12] <= ad_i[15:12];
              if (!cbe_n[2]) bar[23:16] <= ad_i[23:16];
              if (!cbe_n[3]) bar[31:24] <= ad_i[31:24];
            end
          end
          addr_q <= addr_q + 10'd1;
          if (frame_n) st <= T_TURN;
          else if (st == T_CFG) st <= T_OTHER;   // no configuration bursts
        end
        T_OTHER: if (frame_n && irdy_n) st <= T_IDLE;
        default: st <= T_IDLE;
      endcase
    end
  end

  // Bus rules this target must keep: TRDY# only while DEVSEL# is asserted,
  // AD driven only in the data phase of a read claimed by this target, and a
  // request to the SPU is held unchanged until it is taken (the initiator
  // must hold IRDY# and the write data until TRDY#).
  a_trdy_devsel: assert property (@(posedge clk)
    !trdy_n |-> !devsel_n);
  a_ad_read_only: assert property (@(posedge clk)
    ad_oe |-> !devsel_n && !wr_q);
  a_req_stable: assert property (@(posedge clk)
    req_valid && !req_ready |=> req_valid && $stable(req_addr) &&
                                $stable(req_write) && (!req_write || $stable(req_wdata)));
endmodule
