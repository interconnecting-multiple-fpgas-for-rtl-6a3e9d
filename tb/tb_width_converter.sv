// Self-checking test of the byte gearbox in both directions used by the
// design: 64 -> 3 bytes (DMA side to accelerator bus) and 3 -> 64 bytes.
// Random packets (random length, partial last word), random valid and ready;
// the received byte stream, the per-word keep count and TLAST are compared
// with the sent bytes.
module tb_width_converter;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // 64 -> 3
  logic [511:0] a_sd;  logic [6:0] a_sk; logic a_sl, a_sv, a_sr;
  logic [23:0]  a_md;  logic [1:0] a_mk; logic a_ml, a_mv, a_mr;
  width_converter #(.IN_BYTES(64), .OUT_BYTES(3)) dut_a (
    .clk, .rst, .s_data(a_sd), .s_keep(a_sk), .s_last(a_sl), .s_valid(a_sv), .s_ready(a_sr),
    .m_data(a_md), .m_keep(a_mk), .m_last(a_ml), .m_valid(a_mv), .m_ready(a_mr));
  // 3 -> 64
  logic [23:0]  b_sd;  logic [1:0] b_sk; logic b_sl, b_sv, b_sr;
  logic [511:0] b_md;  logic [6:0] b_mk; logic b_ml, b_mv, b_mr;
  width_converter #(.IN_BYTES(3), .OUT_BYTES(64)) dut_b (
    .clk, .rst, .s_data(b_sd), .s_keep(b_sk), .s_last(b_sl), .s_valid(b_sv), .s_ready(b_sr),
    .m_data(b_md), .m_keep(b_mk), .m_last(b_ml), .m_valid(b_mv), .m_ready(b_mr));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // generic check of one direction, run as two parallel threads
  task automatic run_a(int npkt);
    for (int p = 0; p < npkt; p++) begin
      automatic int nbytes = $urandom_range(1, 400);
      byte unsigned sent[$];
      byte unsigned got[$];
      automatic int sent_i = 0;
      bit got_last = 0;
      for (int i = 0; i < nbytes; i++) sent.push_back(8'($urandom));
      fork
        begin
          while (sent_i < nbytes) begin
            automatic int n = (nbytes - sent_i > 64) ? 64 : nbytes - sent_i;
            @(negedge clk);
            a_sv = ($urandom_range(0, 3) != 0);
            for (int k = 0; k < 64; k++) a_sd[k*8 +: 8] = (k < n) ? sent[sent_i + k] : 8'hAA;
            a_sk = 7'(n); a_sl = (sent_i + n == nbytes);
            @(posedge clk);
            if (a_sv && a_sr) sent_i += n;
          end
          @(negedge clk); a_sv = 0;
        end
        begin
          while (!got_last) begin
            @(negedge clk);
            a_mr = ($urandom_range(0, 3) != 0);
            @(posedge clk);
            if (a_mv && a_mr) begin
              for (int k = 0; k < int'(a_mk); k++) got.push_back(a_md[k*8 +: 8]);
              checks++;
              if (!a_ml && a_mk != 3) begin failures++; $display("FAIL a: partial word not last"); end
              got_last = a_ml;
            end
          end
        end
      join
      checks++;
      if (got != sent) begin failures++; $display("FAIL a: packet %0d bytes mismatch (%0d vs %0d)", p, got.size(), sent.size()); end
    end
  endtask

  task automatic run_b(int npkt);
    for (int p = 0; p < npkt; p++) begin
      automatic int nbytes = $urandom_range(1, 400);
      byte unsigned sent[$];
      byte unsigned got[$];
      automatic int sent_i = 0;
      bit got_last = 0;
      for (int i = 0; i < nbytes; i++) sent.push_back(8'($urandom));
      fork
        begin
          while (sent_i < nbytes) begin
            automatic int n = (nbytes - sent_i > 3) ? 3 : nbytes - sent_i;
            @(negedge clk);
            b_sv = ($urandom_range(0, 3) != 0);
            for (int k = 0; k < 3; k++) b_sd[k*8 +: 8] = (k < n) ? sent[sent_i + k] : 8'h55;
            b_sk = 2'(n); b_sl = (sent_i + n == nbytes);
            @(posedge clk);
            if (b_sv && b_sr) sent_i += n;
          end
          @(negedge clk); b_sv = 0;
        end
        begin
          while (!got_last) begin
            @(negedge clk);
            b_mr = ($urandom_range(0, 3) != 0);
            @(posedge clk);
            if (b_mv && b_mr) begin
              for (int k = 0; k < int'(b_mk); k++) got.push_back(b_md[k*8 +: 8]);
              checks++;
              if (!b_ml && b_mk != 64) begin failures++; $display("FAIL b: partial word not last"); end
              got_last = b_ml;
            end
          end
        end
      join
      checks++;
      if (got != sent) begin failures++; $display("FAIL b: packet %0d bytes mismatch (%0d vs %0d)", p, got.size(), sent.size()); end
    end
  endtask

  initial begin
    a_sv = 0; a_mr = 0; b_sv = 0; b_mr = 0; a_sd = 0; b_sd = 0; a_sk = 0; b_sk = 0; a_sl = 0; b_sl = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    fork
      run_a(40);
      run_b(40);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
