// Self-checking test of the DMA core.
// Transmit path: three words written before TX_LEN is known -> only two may
// leave (the last is held back); after TX_LEN = 3 the third leaves with
// TLAST. A second packet with TX_LEN written first and a burst larger than
// the FIFO checks write back-pressure. Receive path: a 5-word packet with
// TLAST raises FLAGS bit 0, is counted in RX_FIFO, further data is refused
// until FLAGS is cleared, and an AXI4 read burst returns the words in order
// with RLAST. RESET pulses user_reset for RESET_CYCLES cycles; SIGNATURE
// reads 0x62696E67.
module tb_dma_core;
  import vgg_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DW = 64;     // narrow data for the test
  localparam int DEPTH = 8;

  logic [3:0]  s_awid, s_bid, s_arid, s_rid;
  logic [63:0] s_awaddr, s_araddr;
  logic [7:0]  s_awlen, s_arlen;
  logic s_awvalid, s_awready, s_wlast, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rlast, s_rvalid, s_rready;
  logic [DW-1:0] s_wdata, s_rdata;
  logic [DW/8-1:0] s_wstrb;
  logic [1:0] s_bresp, s_rresp;
  logic [7:0] l_awaddr, l_araddr;
  logic l_awvalid, l_awready, l_wvalid, l_wready, l_bvalid, l_bready, l_arvalid, l_arready, l_rvalid, l_rready;
  logic [31:0] l_wdata, l_rdata;
  logic [1:0] l_bresp, l_rresp;
  logic [DW-1:0] m_axis_tdata, s_axis_tdata;
  logic m_axis_tlast, m_axis_tvalid, m_axis_tready, s_axis_tlast, s_axis_tvalid, s_axis_tready;
  logic user_reset;

  dma_core #(.DATA_W(DW), .TX_DEPTH(DEPTH), .RX_DEPTH(DEPTH), .RESET_CYCLES(16)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic lwrite(logic [7:0] a, logic [31:0] d);
    @(negedge clk); l_awaddr = a; l_wdata = d; l_awvalid = 1; l_wvalid = 1;
    do @(posedge clk); while (!l_awready);
    @(negedge clk); l_awvalid = 0; l_wvalid = 0; l_bready = 1;
    while (!l_bvalid) @(negedge clk);
    @(negedge clk); l_bready = 0;
  endtask

  task automatic lread(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); l_araddr = a; l_arvalid = 1;
    do @(posedge clk); while (!l_arready);
    @(negedge clk); l_arvalid = 0; l_rready = 1;
    while (!l_rvalid) @(negedge clk);
    d = l_rdata;
    @(negedge clk); l_rready = 0;
  endtask

  // AXI4 write burst of n words starting with value base
  task automatic mwrite(int n, logic [DW-1:0] base);
    @(negedge clk); s_awvalid = 1; s_awlen = 8'(n - 1); s_awid = 4'd5; s_awaddr = 64'h1000;
    do @(posedge clk); while (!s_awready);
    @(negedge clk); s_awvalid = 0;
    for (int i = 0; i < n; i++) begin
      s_wvalid = 1; s_wdata = base + DW'(i); s_wlast = (i == n - 1);
      do @(posedge clk); while (!s_wready);
      @(negedge clk);
    end
    s_wvalid = 0; s_bready = 1;
    while (!s_bvalid) @(negedge clk);
    check(s_bid == 4'd5 && s_bresp == 0, "write response");
    @(negedge clk); s_bready = 0;
  endtask

  // stream-out monitor
  logic [DW-1:0] out_q[$];
  logic          outl_q[$];
  always @(posedge clk) if (!rst && m_axis_tvalid && m_axis_tready) begin
    out_q.push_back(m_axis_tdata); outl_q.push_back(m_axis_tlast);
  end

  int rst_cycles = 0;
  always @(posedge clk) if (!rst && user_reset) rst_cycles++;

  initial begin
    logic [31:0] d;
    {s_awvalid, s_wvalid, s_bready, s_arvalid, s_rready, l_awvalid, l_wvalid, l_bready, l_arvalid, l_rready} = '0;
    {s_awid, s_arid, s_awaddr, s_araddr, s_awlen, s_arlen, s_wdata, s_wlast, l_awaddr, l_araddr, l_wdata} = '0;
    s_wstrb = '1; s_axis_tvalid = 0; s_axis_tdata = 0; s_axis_tlast = 0; m_axis_tready = 1;
    repeat (3) @(posedge clk);
    rst = 0;

    lread(DMA_REG_SIGNATURE, d);
    check(d == 32'h6269_6E67, "signature");

    // packet 1: data before length
    mwrite(3, 64'h100);
    repeat (10) @(posedge clk);
    check(out_q.size() == 2, $sformatf("held back last word, got %0d words", out_q.size()));
    lread(DMA_REG_TX_FIFO, d);
    check(d == 1, $sformatf("TX_FIFO occupancy 1, got %0d", d));
    lwrite(DMA_REG_TX_LEN, 3);
    repeat (5) @(posedge clk);
    check(out_q.size() == 3, "third word released");
    for (int i = 0; i < 3; i++) begin
      check(out_q[i] == 64'h100 + i, "tx data");
      check(outl_q[i] == (i == 2), "tx last");
    end
    out_q.delete(); outl_q.delete();

    // packet 2: length first, burst of 20 > FIFO depth, slow consumer
    lwrite(DMA_REG_TX_LEN, 20);
    m_axis_tready = 0;
    fork
      mwrite(20, 64'h200);
      begin
        repeat (40) @(posedge clk);
        check(out_q.size() == 0, "consumer stalled");
        check(dut.tx_count == DEPTH, "FIFO filled to its depth");
        @(negedge clk); m_axis_tready = 1;
      end
    join
    repeat (10) @(posedge clk);
    check(out_q.size() == 20, $sformatf("20 words out, got %0d", out_q.size()));
    for (int i = 0; i < out_q.size(); i++) begin
      check(out_q[i] == 64'h200 + i, "tx data 2");
      check(outl_q[i] == (i == 19), "tx last 2");
    end

    // receive path
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); s_axis_tvalid = 1; s_axis_tdata = 64'h300 + i; s_axis_tlast = (i == 4);
      do @(posedge clk); while (!s_axis_tready);
    end
    @(negedge clk); s_axis_tvalid = 1; s_axis_tdata = 64'hDEAD; s_axis_tlast = 0;
    repeat (4) @(posedge clk);
    check(!s_axis_tready, "no data accepted while FLAGS set");
    lread(DMA_REG_FLAGS, d);   check(d == 1, "FLAGS bit 0 set");
    lread(DMA_REG_RX_FIFO, d); check(d == 5, $sformatf("RX_FIFO 5, got %0d", d));
    @(negedge clk); s_arvalid = 1; s_arlen = 4; s_arid = 4'd9;
    do @(posedge clk); while (!s_arready);
    @(negedge clk); s_arvalid = 0; s_rready = 1;
    for (int i = 0; i < 5; i++) begin
      while (!s_rvalid) @(negedge clk);
      check(s_rdata == 64'h300 + i && s_rid == 4'd9, "read data");
      check(s_rlast == (i == 4), "read last");
      @(negedge clk);
    end
    s_rready = 0;
    lwrite(DMA_REG_FLAGS, 0);
    lread(DMA_REG_FLAGS, d);   check(d == 0, "FLAGS cleared");
    @(posedge clk); #1;
    check(s_axis_tready, "data accepted again after clearing FLAGS");
    @(negedge clk); s_axis_tvalid = 0;

    // user reset
    lwrite(DMA_REG_RESET, 1);
    repeat (30) @(posedge clk);
    check(rst_cycles == 16, $sformatf("user reset 16 cycles, got %0d", rst_cycles));
    check(dut.reset_reg == 0, "RESET register back to zero");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
