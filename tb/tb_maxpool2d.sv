// Self-checking test of 2x2/2 max pooling: two random 8x6x3 frames are
// streamed with random valid and ready; the output values, their order and
// TLAST are compared with a loop-nest reference.
module tb_maxpool2d;
  import vgg_pkg::*;
  import vgg_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 8, H = 6, C = 3;
  act_t s_data, m_data;
  logic s_last, s_valid, s_ready, m_last, m_valid, m_ready;

  maxpool2d #(.W(W), .H(H), .C(C)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_valid = 0; m_ready = 0; s_data = 0; s_last = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 2; f++) begin
      automatic bytes_t x = new[W * H * C];
      bytes_t y;
      automatic int oi = 0;
      foreach (x[i]) x[i] = byte'($urandom);
      y = pool(W, H, C, x);
      fork
        for (int i = 0; i < W * H * C; i++) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) begin s_valid = 0; @(negedge clk); end
          s_valid = 1; s_data = x[i]; s_last = (i == W * H * C - 1);
          do @(posedge clk); while (!s_ready);
          @(negedge clk); s_valid = 0;
        end
        while (oi < y.size()) begin
          @(negedge clk);
          m_ready = ($urandom_range(0, 2) != 0);
          @(posedge clk);
          if (m_valid && m_ready) begin
            checks++;
            if (m_data != y[oi] || m_last != (oi == y.size() - 1)) begin
              failures++;
              $display("FAIL out %0d: %0d/%0d want %0d/%0d", oi, m_data, m_last, y[oi], oi == y.size() - 1);
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
