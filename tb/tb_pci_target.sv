// tb_pci_target: drives the PCI target with a master model against a
// simple memory behind the request port that answers after random wait
// states. Checks configuration reads and writes (IDs, BAR sizing, memory
// enable), single and burst memory writes and reads with byte enables,
// that accesses outside the window get no DEVSEL#, that a write takes two
// clocks when the memory is ready, the read turnaround and PAR.
module tb_pci_target;
  logic        clk = 0, rst_n = 0;
  logic        frame_n = 1, irdy_n = 1, idsel = 0;
  logic [3:0]  cbe_n = 4'hF;
  logic [31:0] ad_i = 0, ad_o;
  logic        ad_oe, par_o, par_oe, trdy_n, devsel_n, stop_n, ctl_oe;
  logic        req_valid, req_write, req_ready;
  logic [11:2] req_addr;
  logic [31:0] req_wdata, req_rdata;
  logic [3:0]  req_be;
  logic [31:0] mem [1024];
  logic [31:0] ref_m [1024];
  int checks = 0, failures = 0;
  bit fast = 0;

  pci_target dut (.*);
  always #5 clk = ~clk;

  localparam logic [31:0] BAR = 32'h8000_3000;

  // memory behind the request port
  always_comb req_rdata = mem[req_addr];
  always @(posedge clk) begin
    req_ready <= fast ? 1'b1 : 1'($urandom);
    if (req_valid && req_ready && req_write)
      for (int b = 0; b < 4; b++)
        if (req_be[b]) mem[req_addr][8*b +: 8] <= req_wdata[8*b +: 8];
  end

  // PAR covers AD and C/BE# of the previous clock when the target drives AD
  logic [31:0] ad_q; logic [3:0] cbe_q; logic oe_q;
  always @(posedge clk) begin
    if (par_oe) begin
      checks++;
      if (par_o != ^{ad_q, cbe_q}) begin failures++; $display("FAIL parity"); end
    end
    ad_q <= ad_o; cbe_q <= cbe_n; oe_q <= ad_oe;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // one transaction of n data phases; returns clocks from address phase to the last transfer
  task automatic xact(bit cfg, bit wr, logic [31:0] addr, int n, input logic [31:0] wd [4],
                      output logic [31:0] rd [4], input logic [3:0] be, output int clocks,
                      output bit claimed);
    int k, guard;
    claimed = 0;
    @(negedge clk);
    frame_n = 0; idsel = cfg; ad_i = addr;
    cbe_n = cfg ? (wr ? 4'b1011 : 4'b1010) : (wr ? 4'b0111 : 4'b0110);
    clocks = 1;
    for (k = 0; k < n; k++) begin
      @(negedge clk);
      clocks++;
      if (k == n - 1) frame_n = 1;
      irdy_n = 0; idsel = 0; cbe_n = ~be; ad_i = wr ? wd[k] : 32'h0;
      #1;
      if (!wr && k == 0) chk(!ad_oe, "no AD drive in the turnaround clock");
      guard = 0;
      while (trdy_n && guard < 40) begin
        if (!devsel_n) claimed = 1;
        @(negedge clk); #1; clocks++; guard++;
      end
      if (!devsel_n) claimed = 1;
      if (guard == 40) begin
        frame_n = 1; irdy_n = 1;
        @(negedge clk); @(negedge clk);
        return;   // master abort
      end
      rd[k] = ad_o;
      @(posedge clk); #1;
    end
    irdy_n = 1; cbe_n = 4'hF;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] wd [4], rd [4];
    int clocks;
    bit claimed;
    for (int i = 0; i < 1024; i++) begin mem[i] = 0; ref_m[i] = 0; end
    wd = '{default: 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // configuration space
    xact(1, 0, 32'h0, 1, wd, rd, 4'hF, clocks, claimed);
    chk(claimed && rd[0] == 32'h0001_FFFE, $sformatf("IDs %h", rd[0]));
    xact(1, 0, 32'h8, 1, wd, rd, 4'hF, clocks, claimed);
    chk(rd[0] == 32'h0B40_0001, $sformatf("class code %h", rd[0]));
    wd[0] = '1;
    xact(1, 1, 32'h10, 1, wd, rd, 4'hF, clocks, claimed);
    xact(1, 0, 32'h10, 1, wd, rd, 4'hF, clocks, claimed);
    chk(rd[0] == 32'hFFFF_F000, "BAR asks for 4 KB of memory space");
    // memory disabled: no claim
    wd[0] = BAR;
    xact(1, 1, 32'h10, 1, wd, rd, 4'hF, clocks, claimed);
    xact(0, 1, BAR, 1, wd, rd, 4'hF, clocks, claimed);
    chk(!claimed, "no claim before memory space is enabled");
    wd[0] = 32'h2;
    xact(1, 1, 32'h4, 1, wd, rd, 4'hF, clocks, claimed);
    // not our window, nor a configuration access without IDSEL
    xact(0, 1, BAR + 32'h1000, 1, wd, rd, 4'hF, clocks, claimed);
    chk(!claimed, "outside the window");

    // random single and burst accesses
    for (int t = 0; t < 300; t++) begin
      int n, a;
      bit wr;
      logic [3:0] be;
      n  = 1 + $urandom_range(3);
      a  = $urandom_range(1023 - n);
      wr = 1'($urandom);
      be = wr ? 4'($urandom) : 4'hF;
      for (int k = 0; k < 4; k++) wd[k] = $urandom;
      xact(0, wr, BAR + 32'(a * 4), n, wd, rd, be, clocks, claimed);
      chk(claimed, "claimed");
      for (int k = 0; k < n; k++) begin
        if (wr) begin
          for (int b = 0; b < 4; b++) if (be[b]) ref_m[a + k][8*b +: 8] = wd[k][8*b +: 8];
        end else begin
          chk(rd[k] == ref_m[a + k], $sformatf("read word %0d: %h exp %h", a + k, rd[k], ref_m[a + k]));
        end
      end
    end
    // a write without wait states takes two clocks
    fast = 1;
    @(negedge clk);
    wd[0] = 32'h1234_5678;
    xact(0, 1, BAR + 32'h40, 1, wd, rd, 4'hF, clocks, claimed);
    chk(clocks == 2, $sformatf("write took %0d clocks", clocks));
    xact(0, 0, BAR + 32'h40, 1, wd, rd, 4'hF, clocks, claimed);
    chk(clocks == 3 && rd[0] == 32'h1234_5678, $sformatf("read took %0d clocks", clocks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
