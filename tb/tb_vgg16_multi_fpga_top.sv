// End-to-end test of the two-FPGA VGG16 pipeline at reduced size: 32x32x3
// input images and 4 base channels (4, 8, 16, 32, 32 channels per block).
// All 13 convolution layers get random int8 weights, random biases and
// requantization constants through the two parameter load buses. Each frame
// goes the way the host software drives it:
//   1. FPGA #2 DMA core: TX_LEN = words of the pool4 map it will receive.
//   2. Transmitter on FPGA #1: PTR, BURST_LEN, then TX_LEN (starts it).
//   3. The host writes the image into FPGA #1's DMA core in 16-beat bursts,
//      and only afterwards writes TX_LEN there (so the last word is held).
//   4. The host reads the result word from FPGA #2; the read waits until the
//      word is there. FLAGS bit 0 is then read as 1 and cleared.
// The received 32 bytes are compared with a reference model (input offset,
// conv+ReLU+requant and 2x2 max pooling, layer by layer). Between frames
// the RESET register of FPGA #1 is used, and the requantization constants,
// which that reset returns to their defaults, are loaded again.
// Mechanisms counted, each must occur: held-back last word, transmitter
// waiting for a full burst, full and short peer bursts, accelerator
// back-pressure on the DMA stream, host read waiting on an empty FIFO,
// FLAGS end-of-packet, user reset pulse.
module tb_vgg16_multi_fpga_top;
  import vgg_pkg::*;
  import vgg_ref_pkg::*;

  localparam int IMG = 32, BASE = 4, ID_W = 4;
  localparam int NFRAMES = 3;
  localparam int IN_WORDS = IMG * IMG * 3 / 64;                     // 48
  localparam int MID_BYTES = (IMG / 16) * (IMG / 16) * BASE * 8;     // 128
  localparam int MID_WORDS = (MID_BYTES + 63) / 64;                  // 2
  localparam int OUT_BYTES = (IMG / 32) * (IMG / 32) * BASE * 8;     // 32
  localparam int OUT_WORDS = (OUT_BYTES + 63) / 64;                  // 1

  logic clk = 0, rst = 1;
  always #4 clk = ~clk;   // 125 MHz
  int checks = 0, failures = 0;

  // host AXI4 to FPGA #1
  logic [ID_W-1:0] h1_awid, h1_bid, h1_arid, h1_rid, h2_arid, h2_rid;
  logic [63:0]  h1_awaddr, h1_araddr, h2_araddr;
  logic [7:0]   h1_awlen, h1_arlen, h2_arlen;
  logic         h1_awvalid, h1_awready, h1_wlast, h1_wvalid, h1_wready;
  logic [511:0] h1_wdata, h1_rdata, h2_rdata;
  logic [63:0]  h1_wstrb;
  logic [1:0]   h1_bresp, h1_rresp, h2_rresp;
  logic         h1_bvalid, h1_bready, h1_arvalid, h1_arready, h1_rlast, h1_rvalid, h1_rready;
  logic         h2_arvalid, h2_arready, h2_rlast, h2_rvalid, h2_rready;
  logic [7:0]   d1_awaddr, t1_awaddr, d2_awaddr, d1_araddr, t1_araddr, d2_araddr;
  logic         d1_awvalid, t1_awvalid, d2_awvalid, d1_awready, t1_awready, d2_awready;
  logic [31:0]  d1_wdata, t1_wdata, d2_wdata, d1_rdata, t1_rdata, d2_rdata;
  logic         d1_wvalid, t1_wvalid, d2_wvalid, d1_wready, t1_wready, d2_wready;
  logic [1:0]   d1_bresp, t1_bresp, d2_bresp, d1_rresp, t1_rresp, d2_rresp;
  logic         d1_bvalid, t1_bvalid, d2_bvalid, d1_bready, t1_bready, d2_bready;
  logic         d1_arvalid, t1_arvalid, d2_arvalid, d1_arready, t1_arready, d2_arready;
  logic         d1_rvalid, t1_rvalid, d2_rvalid, d1_rready, t1_rready, d2_rready;
  load_bus_t    load1, load2;
  logic         tx_running, peer_wbeat;

  vgg16_multi_fpga_top #(.IMG(IMG), .BASE_CH(BASE), .ID_W(ID_W)) dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_holdback = 0, n_wait_fill = 0, n_bursts = 0, n_short = 0, n_full = 0;
  int n_accel_stall = 0, n_read_wait = 0, n_flags = 0, n_ureset = 0;
  int burst_len_now = 1;
  int bursts_expected = 0;
  // burst length per frame: several full bursts and a short final one
  function automatic int frame_burst(int f);
    if (MID_WORDS > 8) return 60;
    return (f == 1) ? 4 : 1;
  endfunction
  always @(posedge clk) if (!rst) begin
    if (dut.u_fpga1.u_dma.tx_len == 0 && dut.u_fpga1.u_dma.tx_count == 1) n_holdback++;
    if (int'(dut.u_fpga1.u_tx.state) == 1) n_wait_fill++;
    if (dut.u_fpga1.p_awvalid && dut.u_fpga1.p_awready) begin
      n_bursts++;
      if (int'(dut.u_fpga1.p_awlen) + 1 < burst_len_now) n_short++; else n_full++;
    end
    if (dut.u_fpga1.in_w_valid && !dut.u_fpga1.in_w_ready) n_accel_stall++;
    if (dut.u_fpga1.user_reset) n_ureset++;
  end

  // ---------------- AXI4-Lite helpers (port 0: d1, 1: t1, 2: d2) ----------------
  task automatic lw(int p, logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    case (p)
      0: begin d1_awaddr = a; d1_wdata = d; d1_awvalid = 1; d1_wvalid = 1; end
      1: begin t1_awaddr = a; t1_wdata = d; t1_awvalid = 1; t1_wvalid = 1; end
      default: begin d2_awaddr = a; d2_wdata = d; d2_awvalid = 1; d2_wvalid = 1; end
    endcase
    forever begin
      @(posedge clk);
      if (p == 0 && d1_awready) break;
      if (p == 1 && t1_awready) break;
      if (p == 2 && d2_awready) break;
    end
    @(negedge clk);
    d1_awvalid = 0; d1_wvalid = 0; t1_awvalid = 0; t1_wvalid = 0; d2_awvalid = 0; d2_wvalid = 0;
    forever begin
      @(posedge clk);
      if (p == 0 && d1_bvalid) break;
      if (p == 1 && t1_bvalid) break;
      if (p == 2 && d2_bvalid) break;
    end
  endtask

  task automatic lr(int p, logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    case (p)
      0: begin d1_araddr = a; d1_arvalid = 1; end
      1: begin t1_araddr = a; t1_arvalid = 1; end
      default: begin d2_araddr = a; d2_arvalid = 1; end
    endcase
    forever begin
      @(posedge clk);
      if (p == 0 && d1_arready) break;
      if (p == 1 && t1_arready) break;
      if (p == 2 && d2_arready) break;
    end
    @(negedge clk);
    d1_arvalid = 0; t1_arvalid = 0; d2_arvalid = 0;
    forever begin
      if (p == 0 && d1_rvalid) begin d = d1_rdata; break; end
      if (p == 1 && t1_rvalid) begin d = t1_rdata; break; end
      if (p == 2 && d2_rvalid) begin d = d2_rdata; break; end
      @(posedge clk); #1;
    end
    @(posedge clk);
  endtask

  task automatic expect32(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  // ---------------- network parameters ----------------
  bytes_t wt[13];
  ints_t  bias[13];
  longint m0[13];
  int     sh[13], zp[13];

  // Sizes the reference model works on. They are held in variables, set at
  // run time, so that the model is never evaluated at elaboration.
  int img_v, base_v;

  function automatic int lay_cin(int l);
    int b = (l < 2) ? 1 : (l < 4) ? 2 : (l < 7) ? 3 : (l < 10) ? 4 : 5;
    return (l == block_first_layer(b)) ? block_in_channels(b, base_v) : block_channels(b, base_v);
  endfunction
  function automatic int lay_cout(int l);
    int b = (l < 2) ? 1 : (l < 4) ? 2 : (l < 7) ? 3 : (l < 10) ? 4 : 5;
    return block_channels(b, base_v);
  endfunction

  task automatic ld(int l, load_kind_e k, int a, logic [31:0] d);
    @(negedge clk);
    if (l >= 10) begin load2 = '{en: 1'b1, layer: 5'(l), kind: k, addr: 32'(a), data: d}; load1.en = 0; end
    else         begin load1 = '{en: 1'b1, layer: 5'(l), kind: k, addr: 32'(a), data: d}; load2.en = 0; end
  endtask

  task automatic load_quant(int first, int last);
    for (int l = first; l <= last; l++) begin
      ld(l, LOAD_QUANT, 0, 32'(m0[l]));
      ld(l, LOAD_QUANT, 1, 32'(sh[l]));
      ld(l, LOAD_QUANT, 2, 32'(zp[l]));
    end
    @(negedge clk); load1.en = 0; load2.en = 0;
  endtask

  // reference: the whole network for one frame, result of pool5
  function automatic bytes_t ref_net(bytes_t img);
    automatic bytes_t a = new[img.size()];
    automatic int s = img_v, l = 0;
    foreach (img[i]) a[i] = byte'(int'(img[i]) - 128);
    for (int b = 1; b <= 5; b++) begin
      for (int k = 0; k < block_convs(b); k++) begin
        a = conv(s, s, lay_cin(l), lay_cout(l), a, wt[l], bias[l], m0[l], sh[l], zp[l]);
        l++;
      end
      a = pool(s, s, block_channels(b, base_v), a);
      s = s / 2;
    end
    return a;
  endfunction

  // ---------------- stimulus ----------------
  initial begin
    logic [31:0] rd;
    h1_awid = 0; h1_awaddr = 0; h1_awlen = 0; h1_awvalid = 0; h1_wdata = 0; h1_wstrb = '1;
    h1_wlast = 0; h1_wvalid = 0; h1_bready = 1; h1_arid = 0; h1_araddr = 0; h1_arlen = 0;
    h1_arvalid = 0; h1_rready = 1; h2_arid = 0; h2_araddr = 0; h2_arlen = 0; h2_arvalid = 0;
    h2_rready = 1;
    d1_awaddr = 0; t1_awaddr = 0; d2_awaddr = 0; d1_araddr = 0; t1_araddr = 0; d2_araddr = 0;
    d1_awvalid = 0; t1_awvalid = 0; d2_awvalid = 0; d1_wdata = 0; t1_wdata = 0; d2_wdata = 0;
    d1_wvalid = 0; t1_wvalid = 0; d2_wvalid = 0; d1_bready = 1; t1_bready = 1; d2_bready = 1;
    d1_arvalid = 0; t1_arvalid = 0; d2_arvalid = 0; d1_rready = 1; t1_rready = 1; d2_rready = 1;
    load1 = '0; load2 = '0;
    img_v = IMG; base_v = BASE;
    repeat (4) @(posedge clk);
    rst = 0;

    // signatures
    lr(0, DMA_REG_SIGNATURE, rd); expect32("FPGA1 DMA signature", rd, DMA_SIGNATURE);
    lr(1, TX_REG_SIGNATURE, rd);  expect32("transmitter signature", rd, TX_SIGNATURE);
    lr(2, DMA_REG_SIGNATURE, rd); expect32("FPGA2 DMA signature", rd, DMA_SIGNATURE);

    // random parameters for all 13 layers
    for (int l = 0; l < 13; l++) begin
      automatic int cin = lay_cin(l), cout = lay_cout(l);
      automatic int lg = $clog2(9 * cin);
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
      sh[l] = 31 + (lg + 1) / 2;
      zp[l] = int'($urandom_range(0, 10)) - 5;
    end
    load_quant(0, 12);

    for (int f = 0; f < NFRAMES; f++) begin
      automatic bytes_t img = new[IMG * IMG * 3];
      automatic bytes_t want;
      automatic logic [511:0] got;
      automatic int wait_cycles = 0;
      automatic int nz = 0;
      foreach (img[i]) img[i] = byte'($urandom);
      want = ref_net(img);
      burst_len_now = frame_burst(f);
      bursts_expected += (MID_WORDS + burst_len_now - 1) / burst_len_now;

      // 1, 2: receiver length, then transmitter setup and start
      lw(2, DMA_REG_TX_LEN, MID_WORDS);
      lw(1, TX_REG_PTR_HI, 32'h0000_0001);
      lw(1, TX_REG_PTR_LO, 32'h2000_0000);
      lw(1, TX_REG_BURST_LEN, burst_len_now);
      lw(1, TX_REG_TX_LEN, MID_WORDS);
      lr(1, TX_REG_STATUS, rd); expect32("transmitter running", rd & 1, 1);

      // 3: image data in bursts of 16 beats, TX_LEN afterwards
      for (int bst = 0; bst < IN_WORDS / 16; bst++) begin
        @(negedge clk);
        h1_awaddr = 64'(bst * 1024); h1_awlen = 8'd15; h1_awvalid = 1;
        do @(posedge clk); while (!h1_awready);
        @(negedge clk); h1_awvalid = 0;
        for (int beat = 0; beat < 16; beat++) begin
          for (int k = 0; k < 64; k++) h1_wdata[8*k +: 8] = img[(bst * 16 + beat) * 64 + k];
          h1_wvalid = 1; h1_wlast = (beat == 15);
          do @(posedge clk); while (!h1_wready);
          @(negedge clk);
        end
        h1_wvalid = 0; h1_wlast = 0;
        while (!h1_bvalid) @(posedge clk);
        checks++;
        if (h1_bresp != 2'b00) begin failures++; $display("FAIL write response"); end
      end
      // wait until only the held-back word is left, then give the length
      do begin
        repeat (100) @(posedge clk);
        lr(0, DMA_REG_TX_FIFO, rd);
      end while (rd > 1);
      lw(0, DMA_REG_TX_LEN, IN_WORDS);

      // 4: read the result from FPGA #2 in bursts of up to 16 beats; a beat
      //    waits until its word is there
      for (int w0 = 0; w0 < OUT_WORDS; w0 += 16) begin
        automatic int nb = (OUT_WORDS - w0 > 16) ? 16 : OUT_WORDS - w0;
        @(negedge clk);
        h2_arlen = 8'(nb - 1); h2_arvalid = 1;
        do @(posedge clk); while (!h2_arready);
        @(negedge clk); h2_arvalid = 0;
        for (int beat = 0; beat < nb; beat++) begin
          #1;
          while (!h2_rvalid) begin
            @(posedge clk); #1;
            wait_cycles++;
          end
          got = h2_rdata;
          checks++;
          if (h2_rlast != (beat == nb - 1) || h2_rresp != 2'b00) begin
            failures++; $display("FAIL read beat flags");
          end
          @(posedge clk);
          for (int k = 0; k < 64 && (w0 + beat) * 64 + k < OUT_BYTES; k++) begin
            automatic int idx = (w0 + beat) * 64 + k;
            checks++;
            if (byte'(got[8*k +: 8]) != want[idx]) begin
              failures++;
              if (failures < 20)
                $display("FAIL frame %0d byte %0d: got %0d want %0d", f, idx, byte'(got[8*k +: 8]), want[idx]);
            end
            if (want[idx] != byte'(zp[12])) nz++;
          end
        end
      end
      if (wait_cycles > 0) n_read_wait++;
      checks++;
      if (nz == 0) begin failures++; $display("FAIL frame %0d: reference output is flat", f); end

      lr(2, DMA_REG_FLAGS, rd); expect32("FLAGS after packet", rd & 1, 1);
      if (rd[0]) n_flags++;
      lw(2, DMA_REG_FLAGS, 0);
      lr(2, DMA_REG_FLAGS, rd); expect32("FLAGS cleared", rd & 1, 0);
      lr(1, TX_REG_STATUS, rd); expect32("transmitter idle", rd & 1, 0);
      lr(0, DMA_REG_TX_FIFO, rd); expect32("FPGA1 TX FIFO empty", rd, 0);
      $display("frame %0d done at %0t, read waited %0d cycles", f, $time, wait_cycles);

      // user reset of FPGA #1's accelerator between frames
      if (f == 0) begin
        lw(0, DMA_REG_RESET, 1);
        repeat (40) @(posedge clk);
        lr(0, DMA_REG_RESET, rd); expect32("RESET reads back zero", rd, 0);
        load_quant(0, 9);
      end
    end

    $display("holdback=%0d wait_fill=%0d bursts=%0d full=%0d short=%0d accel_stall=%0d read_wait=%0d flags=%0d user_reset=%0d",
             n_holdback, n_wait_fill, n_bursts, n_full, n_short, n_accel_stall, n_read_wait, n_flags, n_ureset);
    checks++; if (n_holdback == 0)    begin failures++; $display("FAIL never held back the last word"); end
    checks++; if (n_wait_fill == 0)   begin failures++; $display("FAIL transmitter never waited for a burst"); end
    checks++; if (n_full == 0)        begin failures++; $display("FAIL no full burst"); end
    checks++; if (n_short == 0)       begin failures++; $display("FAIL no short burst"); end
    checks++; if (n_bursts != bursts_expected) begin failures++; $display("FAIL burst count %0d", n_bursts); end
    checks++; if (n_accel_stall == 0) begin failures++; $display("FAIL no accelerator back-pressure"); end
    checks++; if (n_read_wait == 0)   begin failures++; $display("FAIL host read never waited"); end
    checks++; if (n_flags != NFRAMES) begin failures++; $display("FAIL FLAGS count %0d", n_flags); end
    checks++; if (n_ureset == 0)      begin failures++; $display("FAIL user reset never pulsed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
