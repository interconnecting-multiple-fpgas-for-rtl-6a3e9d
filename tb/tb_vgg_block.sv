// Self-checking test of a three-convolution VGG block (block 3 structure)
// at reduced size: 6x6 input, 8 input channels, 16 channels in the block.
// The three layers (ids 4, 5, 6) are loaded with random parameters; two
// random frames pass with output back-pressure and are compared with the
// reference conv -> conv -> conv -> pool chain, including TLAST.
module tb_vgg_block;
  import vgg_pkg::*;
  import vgg_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int IMG = 6, BASE = 4, CIN = 8, CH = 16;

  load_bus_t load;
  act_t s_data, m_data;
  logic s_last, s_valid, s_ready, m_last, m_valid, m_ready;

  vgg_block #(.BLOCK(3), .IMG(IMG), .BASE_CH(BASE)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bytes_t wt[3];
  ints_t  bias[3];
  longint m0[3];
  int     sh[3], zp[3];

  task automatic ld(int layer, load_kind_e k, int a, logic [31:0] d);
    @(negedge clk);
    load = '{en: 1'b1, layer: 5'(layer), kind: k, addr: 32'(a), data: d};
  endtask

  initial begin
    load = '0; s_valid = 0; s_data = 0; s_last = 0; m_ready = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int l = 0; l < 3; l++) begin
      automatic int cin = (l == 0) ? CIN : CH;
      wt[l] = new[CH * 9 * cin];
      bias[l] = new[CH];
      foreach (wt[l][i]) begin
        wt[l][i] = byte'($urandom_range(0, 30)) - 8'sd15;
        ld(4 + l, LOAD_WEIGHT, i, 32'(wt[l][i]));
      end
      foreach (bias[l][i]) begin
        bias[l][i] = int'($urandom_range(0, 2000)) - 1000;
        ld(4 + l, LOAD_BIAS, i, bias[l][i]);
      end
      m0[l] = longint'($urandom_range(32'h4000_0000, 32'h7FFF_FFFF));
      sh[l] = 39;
      zp[l] = int'($urandom_range(0, 10)) - 5;
      ld(4 + l, LOAD_QUANT, 0, 32'(m0[l]));
      ld(4 + l, LOAD_QUANT, 1, 32'(sh[l]));
      ld(4 + l, LOAD_QUANT, 2, 32'(zp[l]));
    end
    @(negedge clk); load.en = 0;

    for (int f = 0; f < 2; f++) begin
      automatic bytes_t x = new[IMG * IMG * CIN];
      automatic bytes_t y;
      automatic int oi = 0;
      foreach (x[i]) x[i] = byte'($urandom);
      y = conv(IMG, IMG, CIN, CH, x, wt[0], bias[0], m0[0], sh[0], zp[0]);
      y = conv(IMG, IMG, CH, CH, y, wt[1], bias[1], m0[1], sh[1], zp[1]);
      y = conv(IMG, IMG, CH, CH, y, wt[2], bias[2], m0[2], sh[2], zp[2]);
      y = pool(IMG, IMG, CH, y);
      fork
        begin
          for (int i = 0; i < x.size(); i++) begin
            @(negedge clk);
            s_valid = 1; s_data = x[i]; s_last = (i == x.size() - 1);
            do @(posedge clk); while (!s_ready);
          end
          @(negedge clk); s_valid = 0;
        end
        while (oi < y.size()) begin
          @(negedge clk);
          m_ready = ($urandom_range(0, 3) != 0);
          @(posedge clk);
          if (m_valid && m_ready) begin
            checks++;
            if (m_data != y[oi] || m_last != (oi == y.size() - 1)) begin
              failures++;
              $display("FAIL f%0d out %0d: %0d/%0d want %0d/%0d", f, oi, m_data, m_last, y[oi], oi == y.size() - 1);
            end
            oi++;
          end
        end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
