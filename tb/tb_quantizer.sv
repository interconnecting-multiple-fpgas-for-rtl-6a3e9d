// Self-checking test of the requantizer: directed rounding cases (halves of
// positive and negative numbers), clamping, ReLU, and random operands checked
// against a floating-point reference, plus the one-cycle latency.
module tb_quantizer;
  import vgg_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, relu = 0;
  acc_t acc = 0;
  quant_cfg_t cfg;
  logic out_valid;
  act_t q;

  quantizer dut (.clk, .rst, .in_valid, .acc, .cfg, .relu, .out_valid, .q);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_q(int a, longint m0, int sh, int zp, bit r);
    real v = $floor(real'(a) * real'(m0) / (2.0 ** sh) + 0.5);
    v = v + zp;
    if (r && v < zp) v = zp;
    if (v > 127.0) v = 127.0;
    if (v < -128.0) v = -128.0;
    return int'(v);
  endfunction

  task automatic run(int a, longint m0, int sh, int zp, bit r);
    @(negedge clk);
    in_valid = 1; acc = a; cfg.m0 = 32'(m0); cfg.shift = 6'(sh); cfg.zp_out = 8'(zp); relu = r;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || int'(q) != ref_q(a, m0, sh, zp, r)) begin
      failures++;
      $display("FAIL acc=%0d m0=%0d n=%0d zp=%0d relu=%0d: got %0d (valid %0d) want %0d",
               a, m0, sh, zp, r, q, out_valid, ref_q(a, m0, sh, zp, r));
    end
  endtask

  initial begin
    cfg = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    // halves: 2.5 -> 3, -2.5 -> -2, 2.4 -> 2, -2.6 -> -3
    run(5, 1, 1, 0, 0);
    run(-5, 1, 1, 0, 0);
    run(12, 1, 2, 0, 0);      // 3.0
    run(-13, 1, 2, 0, 0);     // -3.25 -> -3
    run(-11, 1, 2, 0, 0);     // -2.75 -> -3
    run(1000, 1 << 30, 30, 5, 0);   // clamp high
    run(-1000, 1 << 30, 30, 5, 0);  // clamp low
    run(-50, 1 << 30, 30, 7, 1);    // relu -> zp
    run(40, 1 << 30, 31, -3, 1);
    for (int i = 0; i < 2000; i++) begin
      automatic int a = int'($urandom_range(0, 2000000)) - 1000000;
      automatic longint m0 = longint'($urandom_range(32'h4000_0000, 32'h7FFF_FFFF));
      automatic int sh = 34 + int'($urandom_range(0, 10));
      automatic int zp = int'($urandom_range(0, 60)) - 30;
      run(a, m0, sh, zp, 1'($urandom_range(0, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
