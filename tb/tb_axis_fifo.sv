// Self-checking test of the stream FIFO: random pushes and pops against a
// queue model, checking data, TLAST, occupancy, and that a full FIFO refuses
// data and an empty one shows none.
module tb_axis_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 8;
  logic [15:0] s_data, m_data;
  logic s_last, s_valid, s_ready, m_last, m_valid, m_ready;
  logic [3:0] count;

  axis_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);

  logic [16:0] model[$];
  int full_seen = 0;

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
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      s_valid = ($urandom_range(0, 99) < (i < 2000 ? 70 : 30));
      s_data  = 16'($urandom);
      s_last  = 1'($urandom);
      m_ready = ($urandom_range(0, 99) < (i < 2000 ? 30 : 70));
      #1;
      checks++;
      if (int'(count) != model.size() || s_ready != (model.size() < DEPTH) ||
          m_valid != (model.size() > 0)) begin
        failures++;
        $display("FAIL status: count=%0d model=%0d ready=%0d valid=%0d", count, model.size(), s_ready, m_valid);
      end
      if (m_valid && model.size() > 0) begin
        checks++;
        if ({m_last, m_data} != model[0]) begin
          failures++;
          $display("FAIL data %h want %h", {m_last, m_data}, model[0]);
        end
      end
      if (model.size() == DEPTH) full_seen++;
      begin
        automatic bit pop = m_valid && m_ready;
        automatic bit push = s_valid && s_ready;
        automatic logic [16:0] item = {s_last, s_data};
        @(posedge clk);
        if (pop) void'(model.pop_front());
        if (push) model.push_back(item);
      end
    end
    checks++;
    if (full_seen == 0) begin
      failures++;
      $display("FAIL: FIFO never became full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
