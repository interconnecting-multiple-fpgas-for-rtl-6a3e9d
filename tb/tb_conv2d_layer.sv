// Self-checking test of the 3x3 convolution layer. Random int8 weights,
// int32 biases and quantizer constants are written over the load bus (also
// writes for another layer id, which must be ignored). Three random 7x5x4
// frames go through with random input gaps and output back-pressure; every
// output value and TLAST is compared with the loop-nest reference. A last
// frame runs with no stalls and its duration is checked against the schedule:
// COUT * 9*CIN/LANES cycles per pixel, plus the window shift.
module tb_conv2d_layer;
  import vgg_pkg::*;
  import vgg_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 7, H = 5, CIN = 4, COUT = 3, LANES = 12, ID = 6;
  localparam int NCH = 9 * CIN / LANES;

  load_bus_t load;
  act_t s_data, m_data;
  logic s_last, s_valid, s_ready, m_last, m_valid, m_ready;

  conv2d_layer #(.LAYER_ID(ID), .W(W), .H(H), .CIN(CIN), .COUT(COUT), .LANES(LANES)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bytes_t wt;
  ints_t  bias;
  longint m0;
  int     sh, zp;

  task automatic ld(int layer, load_kind_e k, int a, logic [31:0] d);
    @(negedge clk);
    load = '{en: 1'b1, layer: 5'(layer), kind: k, addr: 32'(a), data: d};
  endtask

  task automatic load_all();
    wt = new[COUT * 9 * CIN];
    bias = new[COUT];
    foreach (wt[i]) begin
      wt[i] = byte'($urandom_range(0, 40)) - 8'sd20;
      ld(ID, LOAD_WEIGHT, i, 32'(wt[i]));
      ld(ID + 1, LOAD_WEIGHT, i, 32'h55);        // other layer: ignored
    end
    foreach (bias[i]) begin
      bias[i] = int'($urandom_range(0, 4000)) - 2000;
      ld(ID, LOAD_BIAS, i, bias[i]);
    end
    m0 = longint'($urandom_range(32'h4000_0000, 32'h7FFF_FFFF));
    sh = 38;
    zp = int'($urandom_range(0, 20)) - 10;
    ld(ID, LOAD_QUANT, 0, 32'(m0));
    ld(ID, LOAD_QUANT, 1, 32'(sh));
    ld(ID, LOAD_QUANT, 2, 32'(zp));
    ld(ID - 1, LOAD_QUANT, 2, 32'd99);           // other layer: ignored
    @(negedge clk); load.en = 0;
  endtask

  task automatic frame(bit stalls, output int cycles);
    bytes_t x = new[W * H * CIN];
    bytes_t y;
    int oi = 0;
    int t0 = -1, t1 = 0, t = 0;
    foreach (x[i]) x[i] = byte'($urandom);
    y = conv(W, H, CIN, COUT, x, wt, bias, m0, sh, zp);
    fork
      fork
      begin
      for (int i = 0; i < W * H * CIN; i++) begin
        @(negedge clk);
        while (stalls && $urandom_range(0, 3) == 0) begin s_valid = 0; @(negedge clk); end
        s_valid = 1; s_data = x[i]; s_last = (i == W * H * CIN - 1);
        do @(posedge clk); while (!s_ready);
        if (t0 < 0) t0 = t;
      end
      @(negedge clk); s_valid = 0;
      end
      while (oi < y.size()) begin
        @(negedge clk);
        m_ready = stalls ? ($urandom_range(0, 2) != 0) : 1'b1;
        @(posedge clk);
        if (m_valid && m_ready) begin
          checks++;
          if (m_data != y[oi] || m_last != (oi == y.size() - 1)) begin
            failures++;
            $display("FAIL out %0d: %0d/%0d want %0d/%0d", oi, m_data, m_last, y[oi], oi == y.size() - 1);
          end
          oi++;
          t1 = t;
        end
      end
      join
      forever begin @(posedge clk); t++; end
    join_any
    disable fork;
    @(negedge clk); s_valid = 0;
    cycles = t1 - t0;
  endtask

  initial begin
    int cyc;
    int lo, hi;
    load = '0; s_valid = 0; s_data = 0; s_last = 0; m_ready = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    load_all();
    for (int f = 0; f < 3; f++) frame(1'b1, cyc);
    frame(1'b0, cyc);
    lo = H * W * COUT * NCH;
    hi = H * W * (COUT * NCH + 1) + H + 2 * W * CIN + 10;
    checks++;
    if (cyc < lo || cyc > hi) begin
      failures++; $display("FAIL frame took %0d cycles, expected %0d..%0d", cyc, lo, hi);
    end else $display("frame took %0d cycles (bound %0d..%0d)", cyc, lo, hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
