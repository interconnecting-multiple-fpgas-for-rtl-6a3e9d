// Self-checking test of the input quantization stage: with the reset
// constants every sample x must become x - 128; after loading M0, n and the
// zero point over the load bus, samples must follow the reference
// requantization. TLAST must pass through with its sample.
module tb_input_quantize;
  import vgg_pkg::*;
  import vgg_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  load_bus_t load;
  logic [7:0] s_data;
  act_t m_data;
  logic s_last, s_valid, s_ready, m_last, m_valid, m_ready;

  input_quantize dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ld(int a, logic [31:0] d);
    @(negedge clk);
    load = '{en: 1'b1, layer: 5'(INPUT_QUANT_ID), kind: LOAD_QUANT, addr: 32'(a), data: d};
    @(negedge clk);
    load.en = 0;
  endtask

  task automatic stream(int n, longint m0, int sh, int zp);
    byte unsigned xs[$];
    int oi = 0;
    for (int i = 0; i < n; i++) xs.push_back(8'($urandom));
    fork
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        s_valid = 1; s_data = xs[i]; s_last = (i == n - 1);
        do @(posedge clk); while (!s_ready);
        @(negedge clk); s_valid = 0;
      end
      while (oi < n) begin
        @(negedge clk);
        m_ready = ($urandom_range(0, 2) != 0);
        @(posedge clk);
        if (m_valid && m_ready) begin
          automatic byte want = requant(longint'(xs[oi]), m0, sh, zp, 1'b0);
          checks++;
          if (m_data != want || m_last != (oi == n - 1)) begin
            failures++; $display("FAIL %0d: x=%0d got %0d want %0d", oi, xs[oi], m_data, want);
          end
          oi++;
        end
      end
    join
  endtask

  initial begin
    load = '0; s_valid = 0; s_data = 0; s_last = 0; m_ready = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    stream(200, 64'd1 << 30, 30, -128);
    ld(0, 32'h6000_0000);   // M = 0.75 * 2^-6 ... with n below
    ld(1, 33);
    ld(2, 32'hFFFF_FFF6);   // zp = -10
    stream(200, 64'h6000_0000, 33, -10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
