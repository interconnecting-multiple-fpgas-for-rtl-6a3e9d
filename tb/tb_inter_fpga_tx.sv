// Self-checking test of the inter-FPGA transmitter. PTR, BURST_LEN = 4 and
// TX_LEN = 10 are programmed, then words trickle into the FIFO slowly. The
// test checks that STATUS bit 0 is set while running and cleared after, that
// each burst address is issued only once the FIFO holds the whole burst,
// that bursts have lengths 4, 4, 2 and go to PTR, that WVALID never drops
// inside a burst, that the data arrive in order with WLAST on the last beat
// of each burst, and that the register file reads back PTR, BURST_LEN and the
// signature 0x464D4C43.
module tb_inter_fpga_tx;
  import vgg_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DW = 64;
  logic [DW-1:0] s_axis_tdata, m_wdata;
  logic s_axis_tlast, s_axis_tvalid, s_axis_tready;
  logic [7:0] l_awaddr, l_araddr;
  logic l_awvalid, l_awready, l_wvalid, l_wready, l_bvalid, l_bready, l_arvalid, l_arready, l_rvalid, l_rready;
  logic [31:0] l_wdata, l_rdata;
  logic [1:0] l_bresp, l_rresp;
  logic [3:0] m_awid, m_bid;
  logic [63:0] m_awaddr;
  logic [7:0] m_awlen;
  logic [2:0] m_awsize;
  logic [1:0] m_awburst, m_bresp;
  logic m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic [DW/8-1:0] m_wstrb;
  logic running;

  inter_fpga_tx #(.DATA_W(DW), .FIFO_DEPTH(16), .MAX_BURST(16)) dut (.*);

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

  // memory-mapped slave model: records bursts, answers after the last beat
  int bursts[$];
  logic [DW-1:0] beats[$];
  int in_burst = 0, beat_in_burst = 0, cur_len = 0;
  int aw_count_ok = 0;
  int wvalid_drops = 0;
  int waits_for_fill = 0;
  assign m_awready = 1'b1;
  assign m_wready  = 1'b1;
  assign m_bid = '0;
  assign m_bresp = '0;
  always @(posedge clk) if (!rst) begin
    if (int'(dut.state) == 1 && !m_awvalid) waits_for_fill++;
    if (m_awvalid && m_awready) begin
      bursts.push_back(int'(m_awlen) + 1);
      cur_len = int'(m_awlen) + 1;
      beat_in_burst = 0;
      in_burst = 1;
      if (m_awaddr == 64'h0000_0040_DEAD_0000 && int'(dut.fifo_count) >= cur_len) aw_count_ok++;
    end
    if (in_burst && !m_wvalid && int'(dut.state) == 2) wvalid_drops++;
    if (m_wvalid && m_wready) begin
      beats.push_back(m_wdata);
      beat_in_burst++;
      if (m_wlast != (beat_in_burst == cur_len)) begin failures++; $display("FAIL wlast position"); end
      if (m_wlast) in_burst = 0;
    end
  end
  // B response one cycle after WLAST
  always @(posedge clk) begin
    if (rst) m_bvalid <= 0;
    else if (m_wvalid && m_wready && m_wlast) m_bvalid <= 1;
    else if (m_bready) m_bvalid <= 0;
  end

  initial begin
    logic [31:0] d;
    {l_awvalid, l_wvalid, l_bready, l_arvalid, l_rready, s_axis_tvalid, s_axis_tlast} = '0;
    {l_awaddr, l_araddr, l_wdata, s_axis_tdata} = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    lread(TX_REG_SIGNATURE, d); check(d == 32'h464D_4C43, "signature");
    lread(TX_REG_STATUS, d);    check(d == 0, "idle");
    lwrite(TX_REG_PTR_HI, 32'h0000_0040);
    lwrite(TX_REG_PTR_LO, 32'hDEAD_0000);
    lwrite(TX_REG_BURST_LEN, 4);
    lread(TX_REG_PTR_HI, d);    check(d == 32'h40, "PTR hi");
    lread(TX_REG_PTR_LO, d);    check(d == 32'hDEAD_0000, "PTR lo");
    lread(TX_REG_BURST_LEN, d); check(d == 4, "BURST_LEN");
    lwrite(TX_REG_TX_LEN, 10);
    lread(TX_REG_STATUS, d);    check(d == 1, "running");
    for (int i = 0; i < 10; i++) begin
      repeat (6) @(negedge clk);
      s_axis_tvalid = 1; s_axis_tdata = DW'(64'hA000 + i); s_axis_tlast = (i == 9);
      do @(posedge clk); while (!s_axis_tready);
      @(negedge clk); s_axis_tvalid = 0;
    end
    repeat (30) @(posedge clk);
    lread(TX_REG_STATUS, d);    check(d == 0, "finished");
    lread(TX_REG_TX_FIFO, d);   check(d == 0, "FIFO empty");
    check(bursts.size() == 3, $sformatf("3 bursts, got %0d", bursts.size()));
    if (bursts.size() == 3) check(bursts[0] == 4 && bursts[1] == 4 && bursts[2] == 2, "burst lengths 4,4,2");
    check(aw_count_ok == 3, $sformatf("address to PTR with full burst buffered: %0d", aw_count_ok));
    check(wvalid_drops == 0, "no WVALID gap inside a burst");
    check(waits_for_fill > 0, "transmitter waited for the FIFO to fill");
    check(beats.size() == 10, "10 beats");
    foreach (beats[i]) check(beats[i] == DW'(64'hA000 + i), "beat data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
