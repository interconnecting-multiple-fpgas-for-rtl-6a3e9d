// Self-checking test of the AXI4-Lite front end: a small register file is
// attached to the native port; writes with address and data presented in
// different cycles, reads with a delayed RREADY, and the one-cycle wr_en and
// rd_en strobes are checked.
module tb_axil_regs;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  s_awaddr, s_araddr, wr_addr, rd_addr;
  logic        s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic        s_arvalid, s_arready, s_rvalid, s_rready, wr_en, rd_en;
  logic [31:0] s_wdata, s_rdata, wr_data, rd_data;
  logic [1:0]  s_bresp, s_rresp;

  axil_regs #(.ADDR_W(8)) dut (.*);

  logic [31:0] regs [16];
  int wr_pulses = 0, rd_pulses = 0;
  assign rd_data = regs[rd_addr[5:2]] ^ 32'hA5A5_0000;
  always_ff @(posedge clk) begin
    if (wr_en) begin regs[wr_addr[5:2]] <= wr_data; wr_pulses++; end
    if (rd_en) rd_pulses++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axil_write(logic [7:0] a, logic [31:0] d, int skew);
    @(negedge clk);
    s_awaddr = a; s_awvalid = 1;
    if (skew == 0) begin s_wdata = d; s_wvalid = 1; end
    repeat (skew) @(negedge clk);
    s_wdata = d; s_wvalid = 1;
    do @(posedge clk); while (!(s_awready && s_wready));
    @(negedge clk); s_awvalid = 0; s_wvalid = 0; s_bready = 1;
    while (!s_bvalid) @(negedge clk);
    checks++; if (s_bresp != 0) failures++;
    @(negedge clk); s_bready = 0;
  endtask

  task automatic axil_read(logic [7:0] a, output logic [31:0] d, input int delay);
    @(negedge clk);
    s_araddr = a; s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk); s_arvalid = 0;
    repeat (delay) @(negedge clk);
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
    s_rready = 1;
    @(negedge clk); s_rready = 0;
  endtask

  initial begin
    logic [31:0] d;
    logic [31:0] expv [16];
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0;
    for (int i = 0; i < 16; i++) regs[i] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 16; i++) begin
      expv[i] = $urandom;
      axil_write(8'(i * 4), expv[i], i % 3);
    end
    for (int i = 15; i >= 0; i--) begin
      axil_read(8'(i * 4), d, i % 4);
      checks++;
      if (d !== (expv[i] ^ 32'hA5A5_0000)) begin
        failures++; $display("FAIL read %0d: %h want %h", i, d, expv[i] ^ 32'hA5A5_0000);
      end
    end
    checks++;
    if (wr_pulses != 16 || rd_pulses != 16) begin
      failures++; $display("FAIL strobes wr=%0d rd=%0d", wr_pulses, rd_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
