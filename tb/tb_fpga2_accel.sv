// Test of the second FPGA on its own at reduced size (IMG 64, 4 base
// channels, so block 5 sees a 4x4x32 map and returns 2x2x32). Layers 10-12
// get random parameters over the load bus. The testbench plays FPGA #1's
// transmitter (AXI4 write bursts of 3 beats, the last one short) and the host
// (AXI4 reads of the result, AXI4-Lite registers). It checks the result of
// three frames against the reference model, RLAST, the FLAGS end-of-packet
// bit, and that a finished packet blocks the receive path until the host
// clears FLAGS (frame 2 is sent while FLAGS of frame 1 is still set).
module tb_fpga2_accel;
  import vgg_pkg::*;
  import vgg_ref_pkg::*;

  localparam int IMG = 64, BASE = 4, ID_W = 4;
  localparam int S5 = IMG / 16, CH = BASE * 8;
  localparam int IN_BYTES = S5 * S5 * CH, IN_WORDS = IN_BYTES / 64;            // 512, 8
  localparam int OUT_BYTES = (S5 / 2) * (S5 / 2) * CH, OUT_WORDS = (OUT_BYTES + 63) / 64; // 128, 2

  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  logic [ID_W-1:0] s_awid, s_bid, s_arid, s_rid;
  logic [63:0]  s_awaddr, s_araddr;
  logic [7:0]   s_awlen, s_arlen;
  logic         s_awvalid, s_awready, s_wlast, s_wvalid, s_wready, s_bvalid, s_bready;
  logic [511:0] s_wdata, s_rdata;
  logic [63:0]  s_wstrb;
  logic [1:0]   s_bresp, s_rresp;
  logic         s_arvalid, s_arready, s_rlast, s_rvalid, s_rready;
  logic [7:0]   d_awaddr, d_araddr;
  logic         d_awvalid, d_awready, d_wvalid, d_wready, d_bvalid, d_bready;
  logic         d_arvalid, d_arready, d_rvalid, d_rready;
  logic [31:0]  d_wdata, d_rdata;
  logic [1:0]   d_bresp, d_rresp;
  load_bus_t    load;

  fpga2_accel #(.IMG(IMG), .BASE_CH(BASE), .ID_W(ID_W)) dut (.*);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic lw(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    d_awaddr = a; d_wdata = d; d_awvalid = 1; d_wvalid = 1;
    do @(posedge clk); while (!d_awready);
    @(negedge clk);
    d_awvalid = 0; d_wvalid = 0;
    do @(posedge clk); while (!d_bvalid);
  endtask

  task automatic lr(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    d_araddr = a; d_arvalid = 1;
    do @(posedge clk); while (!d_arready);
    @(negedge clk);
    d_arvalid = 0;
    while (!d_rvalid) @(negedge clk);
    d = d_rdata;
    @(posedge clk);
  endtask

  task automatic ld(int l, load_kind_e k, int a, logic [31:0] d);
    @(negedge clk);
    load = '{en: 1'b1, layer: 5'(l), kind: k, addr: 32'(a), data: d};
  endtask

  bytes_t wt[3];
  ints_t  bias[3];
  longint m0[3];
  int     sh[3], zp[3];

  task automatic send(bytes_t x);
    for (int w0 = 0; w0 < IN_WORDS; w0 += 3) begin
      automatic int nb = (IN_WORDS - w0 > 3) ? 3 : IN_WORDS - w0;
      @(negedge clk);
      s_awaddr = 64'h1_2000_0000; s_awlen = 8'(nb - 1); s_awvalid = 1;
      do @(posedge clk); while (!s_awready);
      @(negedge clk); s_awvalid = 0;
      for (int beat = 0; beat < nb; beat++) begin
        for (int k = 0; k < 64; k++) s_wdata[8*k +: 8] = x[(w0 + beat) * 64 + k];
        s_wvalid = 1; s_wlast = (beat == nb - 1);
        do @(posedge clk); while (!s_wready);
        @(negedge clk);
      end
      s_wvalid = 0; s_wlast = 0;
      while (!s_bvalid) @(posedge clk);
    end
  endtask

  task automatic receive_and_check(int f, bytes_t want);
    @(negedge clk);
    s_arlen = 8'(OUT_WORDS - 1); s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk); s_arvalid = 0;
    for (int beat = 0; beat < OUT_WORDS; beat++) begin
      while (!s_rvalid) @(negedge clk);
      checks++;
      if (s_rlast != (beat == OUT_WORDS - 1)) begin failures++; $display("FAIL rlast"); end
      for (int k = 0; k < 64 && beat * 64 + k < OUT_BYTES; k++) begin
        checks++;
        if (byte'(s_rdata[8*k +: 8]) != want[beat * 64 + k]) begin
          failures++;
          $display("FAIL frame %0d byte %0d: got %0d want %0d", f, beat * 64 + k,
                   byte'(s_rdata[8*k +: 8]), want[beat * 64 + k]);
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    logic [31:0] rd;
    bytes_t x[3], want[3];
    s_awid = 0; s_awaddr = 0; s_awlen = 0; s_awvalid = 0; s_wdata = 0; s_wstrb = '1;
    s_wlast = 0; s_wvalid = 0; s_bready = 1; s_arid = 0; s_araddr = 0; s_arlen = 0;
    s_arvalid = 0; s_rready = 1;
    d_awaddr = 0; d_awvalid = 0; d_wdata = 0; d_wvalid = 0; d_bready = 1; d_araddr = 0;
    d_arvalid = 0; d_rready = 1;
    load = '0;
    repeat (4) @(posedge clk);
    rst = 0;

    for (int l = 0; l < 3; l++) begin
      wt[l] = new[CH * 9 * CH];
      bias[l] = new[CH];
      foreach (wt[l][i]) begin
        wt[l][i] = byte'($urandom_range(0, 8)) - 8'sd4;
        ld(10 + l, LOAD_WEIGHT, i, 32'(wt[l][i]));
      end
      foreach (bias[l][i]) begin
        bias[l][i] = int'($urandom_range(0, 400)) - 200;
        ld(10 + l, LOAD_BIAS, i, bias[l][i]);
      end
      m0[l] = longint'($urandom_range(32'h4000_0000, 32'h7FFF_FFFF));
      sh[l] = 36;
      zp[l] = int'($urandom_range(0, 10)) - 5;
      ld(10 + l, LOAD_QUANT, 0, 32'(m0[l]));
      ld(10 + l, LOAD_QUANT, 1, 32'(sh[l]));
      ld(10 + l, LOAD_QUANT, 2, 32'(zp[l]));
    end
    @(negedge clk); load.en = 0;

    for (int f = 0; f < 3; f++) begin
      x[f] = new[IN_BYTES];
      foreach (x[f][i]) x[f][i] = byte'($urandom_range(0, 127));   // post-ReLU data
      want[f] = conv(S5, S5, CH, CH, x[f], wt[0], bias[0], m0[0], sh[0], zp[0]);
      want[f] = conv(S5, S5, CH, CH, want[f], wt[1], bias[1], m0[1], sh[1], zp[1]);
      want[f] = conv(S5, S5, CH, CH, want[f], wt[2], bias[2], m0[2], sh[2], zp[2]);
      want[f] = pool(S5, S5, CH, want[f]);
    end

    // frame 0: length first; frame 1: length after the data
    lw(DMA_REG_TX_LEN, IN_WORDS);
    send(x[0]);
    receive_and_check(0, want[0]);
    lr(DMA_REG_FLAGS, rd);
    checks++; if (rd[0] != 1'b1) begin failures++; $display("FAIL FLAGS not set"); end
    lw(DMA_REG_FLAGS, 0);

    send(x[1]);
    repeat (8000) @(posedge clk);
    lr(DMA_REG_TX_FIFO, rd);
    checks++; if (rd != 1) begin failures++; $display("FAIL last word not held back: %0d", rd); end
    lw(DMA_REG_TX_LEN, IN_WORDS);
    receive_and_check(1, want[1]);

    // frame 2 while FLAGS of frame 1 is still set: its result must wait
    send(x[2]);
    lw(DMA_REG_TX_LEN, IN_WORDS);
    repeat (70000) @(posedge clk);
    lr(DMA_REG_RX_FIFO, rd);
    checks++; if (rd != 0) begin failures++; $display("FAIL RX not blocked: %0d words", rd); end
    lr(DMA_REG_FLAGS, rd);
    checks++; if (rd[0] != 1'b1) begin failures++; $display("FAIL FLAGS lost"); end
    lw(DMA_REG_FLAGS, 0);
    receive_and_check(2, want[2]);
    lr(DMA_REG_FLAGS, rd);
    checks++; if (rd[0] != 1'b1) begin failures++; $display("FAIL FLAGS frame 2"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
