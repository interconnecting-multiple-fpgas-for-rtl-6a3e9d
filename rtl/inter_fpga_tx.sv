// Inter-FPGA transmitter: streams a feature map into another FPGA's DMA core.
//
// Data arriving on the AXI4-Stream input is buffered in a FIFO. A DMA writer
// drains it as AXI4 memory-mapped write bursts to the physical address PTR,
// which is the receiving FPGA's DMA core window, so the receiver sees the
// same kind of transfer it would get from the host. Registers (AXI4-Lite):
//   0x00 PTR[63:32] R/W   0x04 PTR[31:0] R/W   endpoint address
//   0x08 TX_LEN     WO    words to send; a write starts the transmitter
//   0x0C TX_FIFO    RO    FIFO occupancy in words
//   0x10 BURST_LEN  R/W   beats per AXI4 burst (1..MAX_BURST)
//   0x14 STATUS     RO    bit 0: running
//   0x18 SIGNATURE  RO    0x464D4C43
// Once running, a burst is started only when the FIFO holds a whole burst
// (BURST_LEN words, or the remaining words for the final, shorter burst), so
// a burst never stalls the bus half way. Each burst waits for its write
// response before the next one. Running ends when TX_LEN words are sent.
// One word is one DATA_W-bit beat. The register map, start condition and
// burst threshold follow the transmitter description; sending every burst to
// the same address PTR (the receiver treats its window as a stream), the
// BURST_LEN reset value of 16 and the FIFO depth are this design's choices.
module inter_fpga_tx
  import vgg_pkg::*;
#(
  parameter int unsigned DATA_W     = 512,
  parameter int unsigned ADDR_W     = 64,
  parameter int unsigned ID_W       = 4,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned MAX_BURST  = 64,
  parameter int unsigned BURST_RST  = 16
) (
  input  logic                clk,
  input  logic                rst,
  // stream from the last layer
  input  logic [DATA_W-1:0]   s_axis_tdata,
  input  logic                s_axis_tlast,
  input  logic                s_axis_tvalid,
  output logic                s_axis_tready,
  // AXI4-Lite registers
  input  logic [7:0]          l_awaddr,
  input  logic                l_awvalid,
  output logic                l_awready,
  input  logic [31:0]         l_wdata,
  input  logic                l_wvalid,
  output logic                l_wready,
  output logic [1:0]          l_bresp,
  output logic                l_bvalid,
  input  logic                l_bready,
  input  logic [7:0]          l_araddr,
  input  logic                l_arvalid,
  output logic                l_arready,
  output logic [31:0]         l_rdata,
  output logic [1:0]          l_rresp,
  output logic                l_rvalid,
  input  logic                l_rready,
  // AXI4 memory-mapped master, write channels only
  output logic [ID_W-1:0]     m_awid,
  output logic [ADDR_W-1:0]   m_awaddr,
  output logic [7:0]          m_awlen,
  output logic [2:0]          m_awsize,
  output logic [1:0]          m_awburst,
  output logic                m_awvalid,
  input  logic                m_awready,
  output logic [DATA_W-1:0]   m_wdata,
  output logic [DATA_W/8-1:0] m_wstrb,
  output logic                m_wlast,
  output logic                m_wvalid,
  input  logic                m_wready,
  input  logic [ID_W-1:0]     m_bid,
  input  logic [1:0]          m_bresp,
  input  logic                m_bvalid,
  output logic                m_bready,
  // running flag, as in STATUS bit 0
  output logic                running
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  typedef enum logic [1:0] {S_IDLE, S_WAIT_FILL, S_DATA, S_RESP} state_e;
  state_e state;

  logic        wr_en, rd_en;
  logic [7:0]  wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;

  axil_regs #(.ADDR_W(8)) u_regs (
    .clk, .rst,
    .s_awaddr(l_awaddr), .s_awvalid(l_awvalid), .s_awready(l_awready),
    .s_wdata(l_wdata), .s_wvalid(l_wvalid), .s_wready(l_wready),
    .s_bresp(l_bresp), .s_bvalid(l_bvalid), .s_bready(l_bready),
    .s_araddr(l_araddr), .s_arvalid(l_arvalid), .s_arready(l_arready),
    .s_rdata(l_rdata), .s_rresp(l_rresp), .s_rvalid(l_rvalid), .s_rready(l_rready),
    .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data
  );

  logic [63:0]   ptr;
  logic [31:0]   burst_len;
  logic [31:0]   remaining;
  logic [8:0]    beats_left;
  logic [CW-1:0] fifo_count;

  always_comb begin
    case (rd_addr)
      TX_REG_PTR_HI:    rd_data = ptr[63:32];
      TX_REG_PTR_LO:    rd_data = ptr[31:0];
      TX_REG_TX_FIFO:   rd_data = 32'(fifo_count);
      TX_REG_BURST_LEN: rd_data = burst_len;
      TX_REG_STATUS:    rd_data = {31'd0, running};
      TX_REG_SIGNATURE: rd_data = TX_SIGNATURE;
      default:          rd_data = 32'd0;
    endcase
  end

  // ---------------- FIFO ----------------
  logic [DATA_W-1:0] f_data;
  logic              f_valid, f_ready;

  axis_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .s_data(s_axis_tdata), .s_last(s_axis_tlast), .s_valid(s_axis_tvalid), .s_ready(s_axis_tready),
    .m_data(f_data), .m_last(), .m_valid(f_valid), .m_ready(f_ready),
    .count(fifo_count)
  );

  // ---------------- DMA writer ----------------
  wire [31:0] this_burst = (remaining < burst_len) ? remaining : burst_len;

  assign running   = (state != S_IDLE);
  assign m_awid    = '0;
  assign m_awaddr  = ADDR_W'(ptr);
  assign m_awsize  = 3'($clog2(DATA_W / 8));
  assign m_awburst = 2'b01;                 // INCR
  assign m_wdata   = f_data;
  assign m_wstrb   = '1;
  assign m_wvalid  = (state == S_DATA) && f_valid;
  assign m_wlast   = (beats_left == 9'd1);
  assign m_bready  = (state == S_RESP);
  assign f_ready   = (state == S_DATA) && m_wready;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      ptr        <= '0;
      burst_len  <= 32'(BURST_RST);
      remaining  <= '0;
      beats_left <= '0;
      m_awvalid  <= 1'b0;
      m_awlen    <= '0;
    end else begin
      if (wr_en && wr_addr == TX_REG_PTR_HI) ptr[63:32] <= wr_data;
      if (wr_en && wr_addr == TX_REG_PTR_LO) ptr[31:0]  <= wr_data;
      if (wr_en && wr_addr == TX_REG_BURST_LEN)
        burst_len <= (wr_data == 0) ? 32'd1 :
                     (wr_data > MAX_BURST) ? 32'(MAX_BURST) : wr_data;
      case (state)
        S_IDLE: begin
          if (wr_en && wr_addr == TX_REG_TX_LEN && wr_data != 0) begin
            remaining <= wr_data;
            state     <= S_WAIT_FILL;
          end
        end
        S_WAIT_FILL: begin
          // wait for one whole burst in the FIFO, then issue the address
          if (!m_awvalid && 32'(fifo_count) >= this_burst) begin
            m_awvalid  <= 1'b1;
            m_awlen    <= 8'(this_burst - 1);
            beats_left <= 9'(this_burst);
          end
          if (m_awvalid && m_awready) begin
            m_awvalid <= 1'b0;
            state     <= S_DATA;
          end
        end
        S_DATA: begin
          if (m_wvalid && m_wready) begin
            beats_left <= beats_left - 9'd1;
            remaining  <= remaining - 32'd1;
            if (m_wlast) state <= S_RESP;
          end
        end
        S_RESP: begin
          if (m_bvalid) state <= (remaining == 0) ? S_IDLE : S_WAIT_FILL;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // AXI master rules: an address is held until accepted; a burst only starts
  // with all of its data buffered, so WVALID never drops inside a burst.
  assert property (@(posedge clk) disable iff (rst)
                   m_awvalid && !m_awready |=> m_awvalid && $stable(m_awlen));
  assert property (@(posedge clk) disable iff (rst)
                   state == S_DATA |-> f_valid);

  logic unused;
  assign unused = ^{m_bid, m_bresp, rd_en};
endmodule
