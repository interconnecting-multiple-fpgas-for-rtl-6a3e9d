// DMA core: the host's memory-mapped window onto the accelerator's streams.
//
// The PCIe DMA engine of the FPGA shell is a 512-bit AXI4 memory-mapped
// master, while the accelerator expects streams. This core is an AXI4
// memory-mapped slave whose writes go into a transmit FIFO that feeds the
// accelerator (m_axis), and whose reads are served from a receive FIFO that
// collects the accelerator's output (s_axis). A stream controller in between
// handles packet boundaries, steered by AXI4-Lite registers:
//   0x00 RX_FIFO   RO  receive FIFO occupancy in words
//   0x04 TX_FIFO   RO  transmit FIFO occupancy in words
//   0x08 FLAGS     R/W bit 0: a word with TLAST has entered the receive FIFO;
//                      no more data is accepted until the host writes zero
//   0x0C TX_LEN    WO  packet length in words; the word that completes it is
//                      sent with TLAST. May be written before or after the
//                      data: until it is known, the newest word is held back
//                      in the FIFO because it might be the last one
//   0x10 RESET     WO  a non-zero write pulses user_reset for RESET_CYCLES
//                      cycles, after which the register reads back zero
//   0x14 SIGNATURE RO  0x62696E67
// A word is one 512-bit beat. The memory-mapped address is ignored: every
// write burst appends to the transmit FIFO, every read burst pops the receive
// FIFO, and a read beat waits until a word is there. Write data is only taken
// while the FIFO has room (WREADY low otherwise). One write and one read
// burst are handled at a time. The register map and behaviour follow the
// DMA core description; FIFO depths, the pulse length, ignoring addresses and
// holding reads while empty are this design's choices.
module dma_core
  import vgg_pkg::*;
#(
  parameter int unsigned DATA_W       = 512,
  parameter int unsigned ADDR_W       = 64,
  parameter int unsigned ID_W         = 4,
  parameter int unsigned TX_DEPTH     = 64,
  parameter int unsigned RX_DEPTH     = 64,
  parameter int unsigned RESET_CYCLES = 16
) (
  input  logic              clk,
  input  logic              rst,
  // AXI4 memory-mapped slave (from the PCIe DMA engine or a peer FPGA)
  input  logic [ID_W-1:0]   s_awid,
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic [7:0]        s_awlen,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [DATA_W-1:0] s_wdata,
  input  logic [DATA_W/8-1:0] s_wstrb,
  input  logic              s_wlast,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [ID_W-1:0]   s_bid,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ID_W-1:0]   s_arid,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic [7:0]        s_arlen,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [ID_W-1:0]   s_rid,
  output logic [DATA_W-1:0] s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rlast,
  output logic              s_rvalid,
  input  logic              s_rready,
  // AXI4-Lite registers
  input  logic [7:0]        l_awaddr,
  input  logic              l_awvalid,
  output logic              l_awready,
  input  logic [31:0]       l_wdata,
  input  logic              l_wvalid,
  output logic              l_wready,
  output logic [1:0]        l_bresp,
  output logic              l_bvalid,
  input  logic              l_bready,
  input  logic [7:0]        l_araddr,
  input  logic              l_arvalid,
  output logic              l_arready,
  output logic [31:0]       l_rdata,
  output logic [1:0]        l_rresp,
  output logic              l_rvalid,
  input  logic              l_rready,
  // stream to the accelerator
  output logic [DATA_W-1:0] m_axis_tdata,
  output logic              m_axis_tlast,
  output logic              m_axis_tvalid,
  input  logic              m_axis_tready,
  // stream from the accelerator
  input  logic [DATA_W-1:0] s_axis_tdata,
  input  logic              s_axis_tlast,
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  // user reset for the accelerator
  output logic              user_reset
);
  localparam int unsigned TXC_W = $clog2(TX_DEPTH + 1);
  localparam int unsigned RXC_W = $clog2(RX_DEPTH + 1);

  // ---------------- register file ----------------
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

  logic [TXC_W-1:0] tx_count;
  logic [RXC_W-1:0] rx_count;
  logic             flag_rx_last;
  logic [31:0]      tx_len;        // 0: length not yet given
  logic [31:0]      tx_sent;       // words of the current packet sent
  logic [31:0]      reset_reg;
  logic [$clog2(RESET_CYCLES+1)-1:0] reset_cnt;

  always_comb begin
    case (rd_addr)
      DMA_REG_RX_FIFO:   rd_data = 32'(rx_count);
      DMA_REG_TX_FIFO:   rd_data = 32'(tx_count);
      DMA_REG_FLAGS:     rd_data = {31'd0, flag_rx_last};
      DMA_REG_SIGNATURE: rd_data = DMA_SIGNATURE;
      default:           rd_data = 32'd0;   // write-only and unused
    endcase
  end

  // ---------------- host writes -> transmit FIFO ----------------
  logic            wr_active;
  logic [ID_W-1:0] wr_id;
  logic            tx_in_ready;

  assign s_awready = !wr_active && !s_bvalid;
  assign s_wready  = wr_active && tx_in_ready;
  assign s_bresp   = 2'b00;
  assign s_bid     = wr_id;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_active <= 1'b0;
      wr_id     <= '0;
      s_bvalid  <= 1'b0;
    end else begin
      if (s_awvalid && s_awready) begin
        wr_active <= 1'b1;
        wr_id     <= s_awid;
      end
      if (s_wvalid && s_wready && s_wlast) begin
        wr_active <= 1'b0;
        s_bvalid  <= 1'b1;
      end else if (s_bvalid && s_bready) begin
        s_bvalid  <= 1'b0;
      end
    end
  end

  logic [DATA_W-1:0] txf_data;
  logic              txf_valid, txf_ready;

  axis_fifo #(.WIDTH(DATA_W), .DEPTH(TX_DEPTH)) u_tx_fifo (
    .clk, .rst,
    .s_data(s_wdata), .s_last(1'b0), .s_valid(s_wvalid && wr_active), .s_ready(tx_in_ready),
    .m_data(txf_data), .m_last(), .m_valid(txf_valid), .m_ready(txf_ready),
    .count(tx_count)
  );

  // ---------------- stream controller, transmit side ----------------
  // A word may leave when it is known not to be the last of an unknown-length
  // packet: either TX_LEN is known, or another word is queued behind it.
  wire len_known = (tx_len != 0);
  wire tx_may_go = len_known ? (tx_sent < tx_len) : (tx_count > 1);
  wire tx_is_last = len_known && (tx_sent + 1 == tx_len);

  assign m_axis_tdata  = txf_data;
  assign m_axis_tvalid = txf_valid && tx_may_go;
  assign m_axis_tlast  = tx_is_last;
  assign txf_ready     = m_axis_tready && tx_may_go;

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_len  <= '0;
      tx_sent <= '0;
    end else begin
      if (m_axis_tvalid && m_axis_tready) begin
        if (tx_is_last) begin
          tx_sent <= '0;
          tx_len  <= '0;
        end else begin
          tx_sent <= tx_sent + 1;
        end
      end
      if (wr_en && wr_addr == DMA_REG_TX_LEN) tx_len <= wr_data;
    end
  end

  // ---------------- stream controller, receive side ----------------
  logic rxf_ready_in;
  assign s_axis_tready = rxf_ready_in && !flag_rx_last;

  always_ff @(posedge clk) begin
    if (rst) begin
      flag_rx_last <= 1'b0;
    end else if (s_axis_tvalid && s_axis_tready && s_axis_tlast) begin
      flag_rx_last <= 1'b1;
    end else if (wr_en && wr_addr == DMA_REG_FLAGS && wr_data == 32'd0) begin
      flag_rx_last <= 1'b0;
    end
  end

  logic [DATA_W-1:0] rxf_data;
  logic              rxf_valid, rxf_ready;

  axis_fifo #(.WIDTH(DATA_W), .DEPTH(RX_DEPTH)) u_rx_fifo (
    .clk, .rst,
    .s_data(s_axis_tdata), .s_last(s_axis_tlast),
    .s_valid(s_axis_tvalid && !flag_rx_last), .s_ready(rxf_ready_in),
    .m_data(rxf_data), .m_last(), .m_valid(rxf_valid), .m_ready(rxf_ready),
    .count(rx_count)
  );

  // ---------------- host reads <- receive FIFO ----------------
  logic            rd_active;
  logic [8:0]      rd_left;
  logic [ID_W-1:0] rd_id;

  assign s_arready = !rd_active;
  assign s_rid     = rd_id;
  assign s_rdata   = rxf_data;
  assign s_rresp   = 2'b00;
  assign s_rvalid  = rd_active && rxf_valid;
  assign s_rlast   = (rd_left == 9'd1);
  assign rxf_ready = rd_active && s_rready;

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_active <= 1'b0;
      rd_left   <= '0;
      rd_id     <= '0;
    end else if (s_arvalid && s_arready) begin
      rd_active <= 1'b1;
      rd_left   <= {1'b0, s_arlen} + 9'd1;
      rd_id     <= s_arid;
    end else if (s_rvalid && s_rready) begin
      rd_left <= rd_left - 9'd1;
      if (s_rlast) rd_active <= 1'b0;
    end
  end

  // ---------------- user reset ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      reset_reg <= '0;
      reset_cnt <= '0;
    end else if (wr_en && wr_addr == DMA_REG_RESET && wr_data != 0) begin
      reset_reg <= wr_data;
      reset_cnt <= ($clog2(RESET_CYCLES+1))'(RESET_CYCLES);
    end else if (reset_cnt != 0) begin
      reset_cnt <= reset_cnt - 1'b1;
      if (reset_cnt == 1) reset_reg <= '0;
    end
  end
  assign user_reset = (reset_cnt != 0);

  // AXI rules on the slave side: a held response must not change.
  assert property (@(posedge clk) disable iff (rst) s_bvalid && !s_bready |=> s_bvalid);
  assert property (@(posedge clk) disable iff (rst)
                   s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

  logic unused;
  assign unused = ^{s_awaddr, s_awlen, s_araddr, s_wstrb, reset_reg, rd_en};
endmodule
