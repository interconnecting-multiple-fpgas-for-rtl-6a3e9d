// Test of the first FPGA on its own at reduced size (32x32x3 images, 4 base
// channels): host DMA core, input width conversion and offset, VGG blocks
// 1-4, output width conversion and the inter-FPGA transmitter. Layers 0-9
// get random parameters over the load bus. The testbench plays the host
// (AXI4 writes of the image, AXI4-Lite register accesses) and the second
// FPGA's DMA window (an AXI4 write slave with random ready gaps). For two
// frames it checks every peer burst (address PTR, INCR, 64-byte beats, WLAST
// on the last beat, burst lengths for BURST_LEN 1 and then 4 with a short
// final burst) and compares the received pool4 map byte by byte with the
// reference model.
module tb_fpga1_accel;
  import vgg_pkg::*;
  import vgg_ref_pkg::*;

  localparam int IMG = 32, BASE = 4, ID_W = 4;
  localparam int IN_WORDS  = IMG * IMG * 3 / 64;                 // 48
  localparam int MID_BYTES = (IMG / 16) * (IMG / 16) * BASE * 8; // 128
  localparam int MID_WORDS = MID_BYTES / 64;                     // 2
  localparam logic [63:0] PTR = 64'h0000_0003_4000_0000;

  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  logic [ID_W-1:0] h_awid, h_bid, h_arid, h_rid, p_awid, p_bid;
  logic [63:0]  h_awaddr, h_araddr, p_awaddr;
  logic [7:0]   h_awlen, h_arlen, p_awlen;
  logic         h_awvalid, h_awready, h_wlast, h_wvalid, h_wready, h_bvalid, h_bready;
  logic [511:0] h_wdata, h_rdata, p_wdata;
  logic [63:0]  h_wstrb, p_wstrb;
  logic [1:0]   h_bresp, h_rresp, p_awburst, p_bresp;
  logic         h_arvalid, h_arready, h_rlast, h_rvalid, h_rready;
  logic [2:0]   p_awsize;
  logic         p_awvalid, p_awready, p_wlast, p_wvalid, p_wready, p_bvalid, p_bready;
  logic [7:0]   d_awaddr, d_araddr, t_awaddr, t_araddr;
  logic         d_awvalid, d_awready, d_wvalid, d_wready, d_bvalid, d_bready;
  logic         d_arvalid, d_arready, d_rvalid, d_rready;
  logic         t_awvalid, t_awready, t_wvalid, t_wready, t_bvalid, t_bready;
  logic         t_arvalid, t_arready, t_rvalid, t_rready;
  logic [31:0]  d_wdata, d_rdata, t_wdata, t_rdata;
  logic [1:0]   d_bresp, d_rresp, t_bresp, t_rresp;
  load_bus_t    load;
  logic         tx_running;

  fpga1_accel #(.IMG(IMG), .BASE_CH(BASE), .ID_W(ID_W)) dut (.*);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- peer write slave ----------------
  byte rx[$];
  int  burst_lens[$];
  int  beats_left = 0, beat_no = 0, cur_len = 0;
  logic pend_b = 0;
  always @(negedge clk) begin
    p_awready <= ($urandom_range(0, 2) != 0) && beats_left == 0 && !pend_b;
    p_wready  <= ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) if (!rst) begin
    if (p_awvalid && p_awready) begin
      checks++;
      if (p_awaddr != PTR || p_awburst != 2'b01 || p_awsize != 3'd6) begin
        failures++; $display("FAIL burst header %h %b %0d", p_awaddr, p_awburst, p_awsize);
      end
      beats_left = int'(p_awlen) + 1; cur_len = beats_left; beat_no = 0;
      burst_lens.push_back(cur_len);
    end else if (p_wvalid && p_wready) begin
      checks++;
      if (beats_left == 0 || p_wlast != (beat_no == cur_len - 1) || p_wstrb != '1) begin
        failures++; $display("FAIL beat: left %0d last %b", beats_left, p_wlast);
      end
      for (int k = 0; k < 64; k++) rx.push_back(byte'(p_wdata[8*k +: 8]));
      beat_no++; beats_left--;
      if (beats_left == 0) pend_b = 1;
    end
    if (p_bvalid && p_bready) pend_b = 0;
  end
  always @(negedge clk) begin
    p_bvalid <= pend_b && !(p_bvalid && p_bready);
  end
  assign p_bid = '0;
  assign p_bresp = 2'b00;

  // ---------------- register helpers (0: DMA core, 1: transmitter) ----------------
  task automatic lw(int p, logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    if (p == 0) begin d_awaddr = a; d_wdata = d; d_awvalid = 1; d_wvalid = 1; end
    else        begin t_awaddr = a; t_wdata = d; t_awvalid = 1; t_wvalid = 1; end
    do @(posedge clk); while (!(p == 0 ? d_awready : t_awready));
    @(negedge clk);
    d_awvalid = 0; d_wvalid = 0; t_awvalid = 0; t_wvalid = 0;
    do @(posedge clk); while (!(p == 0 ? d_bvalid : t_bvalid));
  endtask

  task automatic lr(int p, logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    if (p == 0) begin d_araddr = a; d_arvalid = 1; end
    else        begin t_araddr = a; t_arvalid = 1; end
    do @(posedge clk); while (!(p == 0 ? d_arready : t_arready));
    @(negedge clk);
    d_arvalid = 0; t_arvalid = 0;
    while (!(p == 0 ? d_rvalid : t_rvalid)) @(negedge clk);
    d = (p == 0) ? d_rdata : t_rdata;
    @(posedge clk);
  endtask

  task automatic ld(int l, load_kind_e k, int a, logic [31:0] d);
    @(negedge clk);
    load = '{en: 1'b1, layer: 5'(l), kind: k, addr: 32'(a), data: d};
  endtask

  bytes_t wt[10];
  ints_t  bias[10];
  longint m0[10];
  int     sh[10], zp[10];

  function automatic int blk(int l);
    return (l < 2) ? 1 : (l < 4) ? 2 : (l < 7) ? 3 : 4;
  endfunction
  function automatic int lay_cin(int l);
    return (l == block_first_layer(blk(l))) ? block_in_channels(blk(l), BASE) : block_channels(blk(l), BASE);
  endfunction

  initial begin
    logic [31:0] rd;
    h_awid = 0; h_awaddr = 0; h_awlen = 0; h_awvalid = 0; h_wdata = 0; h_wstrb = '1;
    h_wlast = 0; h_wvalid = 0; h_bready = 1; h_arid = 0; h_araddr = 0; h_arlen = 0;
    h_arvalid = 0; h_rready = 1;
    d_awaddr = 0; d_awvalid = 0; d_wdata = 0; d_wvalid = 0; d_bready = 1; d_araddr = 0;
    d_arvalid = 0; d_rready = 1; t_awaddr = 0; t_awvalid = 0; t_wdata = 0; t_wvalid = 0;
    t_bready = 1; t_araddr = 0; t_arvalid = 0; t_rready = 1;
    load = '0;
    repeat (4) @(posedge clk);
    rst = 0;

    lr(0, DMA_REG_SIGNATURE, rd);
    checks++; if (rd != DMA_SIGNATURE) begin failures++; $display("FAIL DMA signature %h", rd); end
    lr(1, TX_REG_SIGNATURE, rd);
    checks++; if (rd != TX_SIGNATURE) begin failures++; $display("FAIL TX signature %h", rd); end

    for (int l = 0; l < 10; l++) begin
      automatic int cin = lay_cin(l), cout = block_channels(blk(l), BASE);
      wt[l] = new[cout * 9 * cin];
      bias[l] = new[cout];
      foreach (wt[l][i]) begin
        wt[l][i] = byte'($urandom_range(0, 8)) - 8'sd4;
        ld(l, LOAD_WEIGHT, i, 32'(wt[l][i]));
      end
      foreach (bias[l][i]) begin
        bias[l][i] = int'($urandom_range(0, 400)) - 200;
        ld(l, LOAD_BIAS, i, bias[l][i]);
      end
      m0[l] = longint'($urandom_range(32'h4000_0000, 32'h7FFF_FFFF));
      sh[l] = 31 + ($clog2(9 * cin) + 1) / 2;
      zp[l] = int'($urandom_range(0, 10)) - 5;
      ld(l, LOAD_QUANT, 0, 32'(m0[l]));
      ld(l, LOAD_QUANT, 1, 32'(sh[l]));
      ld(l, LOAD_QUANT, 2, 32'(zp[l]));
    end
    @(negedge clk); load.en = 0;

    for (int f = 0; f < 2; f++) begin
      automatic bytes_t img = new[IMG * IMG * 3];
      automatic bytes_t a;
      automatic int s = IMG, l = 0, bl = (f == 0) ? 1 : 4;
      foreach (img[i]) img[i] = byte'($urandom);
      a = new[img.size()];
      foreach (img[i]) a[i] = byte'(int'(img[i]) - 128);
      for (int b = 1; b <= 4; b++) begin
        for (int k = 0; k < block_convs(b); k++) begin
          a = conv(s, s, lay_cin(l), block_channels(b, BASE), a, wt[l], bias[l], m0[l], sh[l], zp[l]);
          l++;
        end
        a = pool(s, s, block_channels(b, BASE), a);
        s = s / 2;
      end
      rx.delete(); burst_lens.delete();

      lw(1, TX_REG_PTR_HI, PTR[63:32]);
      lw(1, TX_REG_PTR_LO, PTR[31:0]);
      lw(1, TX_REG_BURST_LEN, bl);
      lw(1, TX_REG_TX_LEN, MID_WORDS);
      lw(0, DMA_REG_TX_LEN, IN_WORDS);
      for (int bst = 0; bst < IN_WORDS / 8; bst++) begin
        @(negedge clk);
        h_awaddr = 64'(bst * 512); h_awlen = 8'd7; h_awvalid = 1;
        do @(posedge clk); while (!h_awready);
        @(negedge clk); h_awvalid = 0;
        for (int beat = 0; beat < 8; beat++) begin
          for (int k = 0; k < 64; k++) h_wdata[8*k +: 8] = img[(bst * 8 + beat) * 64 + k];
          h_wvalid = 1; h_wlast = (beat == 7);
          do @(posedge clk); while (!h_wready);
          @(negedge clk);
        end
        h_wvalid = 0; h_wlast = 0;
        while (!h_bvalid) @(posedge clk);
      end
      while (tx_running || pend_b || p_bvalid) @(posedge clk);
      repeat (5) @(posedge clk);

      checks++;
      if (rx.size() != MID_BYTES) begin failures++; $display("FAIL frame %0d: %0d bytes", f, rx.size()); end
      for (int i = 0; i < MID_BYTES && i < rx.size(); i++) begin
        checks++;
        if (rx[i] != a[i]) begin
          failures++; $display("FAIL frame %0d byte %0d: got %0d want %0d", f, i, rx[i], a[i]);
        end
      end
      checks++;
      if (burst_lens.size() != (MID_WORDS + bl - 1) / bl ||
          burst_lens[burst_lens.size() - 1] != ((MID_WORDS % bl) == 0 ? bl : MID_WORDS % bl)) begin
        failures++; $display("FAIL frame %0d: %0d bursts", f, burst_lens.size());
      end
      lr(1, TX_REG_STATUS, rd);
      checks++; if (rd[0]) begin failures++; $display("FAIL still running"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
