// FPGA #1 of the two-FPGA VGG16 system: input side and blocks 1 to 4.
//
// The host writes the 224x224x3 image (uint8 RGB, row-major) into the DMA
// core over the 512-bit AXI4 memory-mapped port. The core's 512-bit stream
// is cut down to the 24-bit accelerator bus (one RGB pixel per beat) and
// then to single samples, quantized to int8 and sent through VGG blocks 1-4.
// The pool4 output, a 14x14x512 int8 map (100,352 bytes, 1,568 words of 512
// bits), is packed back to 24 bits and then to 512 bits and handed to the
// inter-FPGA transmitter, which writes it into FPGA #2's DMA core with AXI4
// bursts. The DMA core's RESET register resets the accelerator datapath (not
// the DMA core itself); weights and biases survive it, while the
// requantization constants return to their defaults and must be reloaded.
// Its receive path is unused on this FPGA. The partition after block 4 and
// the 24-bit bus follow the system description; the intermediate byte-serial
// stream is this design's choice.
module fpga1_accel
  import vgg_pkg::*;
#(
  parameter int unsigned IMG     = 224,
  parameter int unsigned BASE_CH = 64,
  parameter int unsigned ID_W    = 4
) (
  input  logic               clk,
  input  logic               rst,
  // host -> DMA core, AXI4 memory-mapped slave
  input  logic [ID_W-1:0]    h_awid,
  input  logic [63:0]        h_awaddr,
  input  logic [7:0]         h_awlen,
  input  logic               h_awvalid,
  output logic               h_awready,
  input  logic [511:0]       h_wdata,
  input  logic [63:0]        h_wstrb,
  input  logic               h_wlast,
  input  logic               h_wvalid,
  output logic               h_wready,
  output logic [ID_W-1:0]    h_bid,
  output logic [1:0]         h_bresp,
  output logic               h_bvalid,
  input  logic               h_bready,
  input  logic [ID_W-1:0]    h_arid,
  input  logic [63:0]        h_araddr,
  input  logic [7:0]         h_arlen,
  input  logic               h_arvalid,
  output logic               h_arready,
  output logic [ID_W-1:0]    h_rid,
  output logic [511:0]       h_rdata,
  output logic [1:0]         h_rresp,
  output logic               h_rlast,
  output logic               h_rvalid,
  input  logic               h_rready,
  // DMA core registers, AXI4-Lite
  input  logic [7:0]         d_awaddr,
  input  logic               d_awvalid,
  output logic               d_awready,
  input  logic [31:0]        d_wdata,
  input  logic               d_wvalid,
  output logic               d_wready,
  output logic [1:0]         d_bresp,
  output logic               d_bvalid,
  input  logic               d_bready,
  input  logic [7:0]         d_araddr,
  input  logic               d_arvalid,
  output logic               d_arready,
  output logic [31:0]        d_rdata,
  output logic [1:0]         d_rresp,
  output logic               d_rvalid,
  input  logic               d_rready,
  // transmitter registers, AXI4-Lite
  input  logic [7:0]         t_awaddr,
  input  logic               t_awvalid,
  output logic               t_awready,
  input  logic [31:0]        t_wdata,
  input  logic               t_wvalid,
  output logic               t_wready,
  output logic [1:0]         t_bresp,
  output logic               t_bvalid,
  input  logic               t_bready,
  input  logic [7:0]         t_araddr,
  input  logic               t_arvalid,
  output logic               t_arready,
  output logic [31:0]        t_rdata,
  output logic [1:0]         t_rresp,
  output logic               t_rvalid,
  input  logic               t_rready,
  // transmitter -> peer FPGA, AXI4 memory-mapped write master
  output logic [ID_W-1:0]    p_awid,
  output logic [63:0]        p_awaddr,
  output logic [7:0]         p_awlen,
  output logic [2:0]         p_awsize,
  output logic [1:0]         p_awburst,
  output logic               p_awvalid,
  input  logic               p_awready,
  output logic [511:0]       p_wdata,
  output logic [63:0]        p_wstrb,
  output logic               p_wlast,
  output logic               p_wvalid,
  input  logic               p_wready,
  input  logic [ID_W-1:0]    p_bid,
  input  logic [1:0]         p_bresp,
  input  logic               p_bvalid,
  output logic               p_bready,
  // parameter load bus
  input  load_bus_t          load,
  // status
  output logic               tx_running
);
  logic user_reset;
  logic arst;   // accelerator reset
  assign arst = rst || user_reset;

  // DMA core -> 512-bit stream
  logic [511:0] in_w;
  logic         in_w_last, in_w_valid, in_w_ready;

  dma_core #(.ID_W(ID_W)) u_dma (
    .clk, .rst,
    .s_awid(h_awid), .s_awaddr(h_awaddr), .s_awlen(h_awlen), .s_awvalid(h_awvalid), .s_awready(h_awready),
    .s_wdata(h_wdata), .s_wstrb(h_wstrb), .s_wlast(h_wlast), .s_wvalid(h_wvalid), .s_wready(h_wready),
    .s_bid(h_bid), .s_bresp(h_bresp), .s_bvalid(h_bvalid), .s_bready(h_bready),
    .s_arid(h_arid), .s_araddr(h_araddr), .s_arlen(h_arlen), .s_arvalid(h_arvalid), .s_arready(h_arready),
    .s_rid(h_rid), .s_rdata(h_rdata), .s_rresp(h_rresp), .s_rlast(h_rlast), .s_rvalid(h_rvalid), .s_rready(h_rready),
    .l_awaddr(d_awaddr), .l_awvalid(d_awvalid), .l_awready(d_awready),
    .l_wdata(d_wdata), .l_wvalid(d_wvalid), .l_wready(d_wready),
    .l_bresp(d_bresp), .l_bvalid(d_bvalid), .l_bready(d_bready),
    .l_araddr(d_araddr), .l_arvalid(d_arvalid), .l_arready(d_arready),
    .l_rdata(d_rdata), .l_rresp(d_rresp), .l_rvalid(d_rvalid), .l_rready(d_rready),
    .m_axis_tdata(in_w), .m_axis_tlast(in_w_last), .m_axis_tvalid(in_w_valid), .m_axis_tready(in_w_ready),
    .s_axis_tdata('0), .s_axis_tlast(1'b0), .s_axis_tvalid(1'b0), .s_axis_tready(),
    .user_reset
  );

  // 512-bit -> 24-bit accelerator bus -> samples
  logic [23:0] px;
  logic [1:0]  px_keep;
  logic        px_last, px_valid, px_ready;
  logic [7:0]  smp;
  logic        smp_keep, smp_last, smp_valid, smp_ready;

  width_converter #(.IN_BYTES(64), .OUT_BYTES(3)) u_w512_24 (
    .clk, .rst(arst),
    .s_data(in_w), .s_keep(7'd64), .s_last(in_w_last), .s_valid(in_w_valid), .s_ready(in_w_ready),
    .m_data(px), .m_keep(px_keep), .m_last(px_last), .m_valid(px_valid), .m_ready(px_ready)
  );
  width_converter #(.IN_BYTES(3), .OUT_BYTES(1)) u_w24_8 (
    .clk, .rst(arst),
    .s_data(px), .s_keep(px_keep), .s_last(px_last), .s_valid(px_valid), .s_ready(px_ready),
    .m_data(smp), .m_keep(smp_keep), .m_last(smp_last), .m_valid(smp_valid), .m_ready(smp_ready)
  );

  // input quantization and blocks 1..4
  act_t d [5];
  logic l [5];
  logic v [5];
  logic r [5];

  input_quantize u_inq (
    .clk, .rst(arst), .load,
    .s_data(smp), .s_last(smp_last), .s_valid(smp_valid), .s_ready(smp_ready),
    .m_data(d[0]), .m_last(l[0]), .m_valid(v[0]), .m_ready(r[0])
  );

  for (genvar b = 1; b <= 4; b++) begin : g_block
    vgg_block #(.BLOCK(b), .IMG(IMG >> (b - 1)), .BASE_CH(BASE_CH)) u_block (
      .clk, .rst(arst), .load,
      .s_data(d[b-1]), .s_last(l[b-1]), .s_valid(v[b-1]), .s_ready(r[b-1]),
      .m_data(d[b]), .m_last(l[b]), .m_valid(v[b]), .m_ready(r[b])
    );
  end

  // samples -> 24-bit -> 512-bit -> transmitter
  logic [23:0]  ob;
  logic [1:0]   ob_keep;
  logic         ob_last, ob_valid, ob_ready;
  logic [511:0] ow;
  logic [6:0]   ow_keep;
  logic         ow_last, ow_valid, ow_ready;

  width_converter #(.IN_BYTES(1), .OUT_BYTES(3)) u_w8_24 (
    .clk, .rst(arst),
    .s_data(d[4]), .s_keep(1'b1), .s_last(l[4]), .s_valid(v[4]), .s_ready(r[4]),
    .m_data(ob), .m_keep(ob_keep), .m_last(ob_last), .m_valid(ob_valid), .m_ready(ob_ready)
  );
  width_converter #(.IN_BYTES(3), .OUT_BYTES(64)) u_w24_512 (
    .clk, .rst(arst),
    .s_data(ob), .s_keep(ob_keep), .s_last(ob_last), .s_valid(ob_valid), .s_ready(ob_ready),
    .m_data(ow), .m_keep(ow_keep), .m_last(ow_last), .m_valid(ow_valid), .m_ready(ow_ready)
  );

  inter_fpga_tx #(.ID_W(ID_W)) u_tx (
    .clk, .rst,
    .s_axis_tdata(ow), .s_axis_tlast(ow_last), .s_axis_tvalid(ow_valid), .s_axis_tready(ow_ready),
    .l_awaddr(t_awaddr), .l_awvalid(t_awvalid), .l_awready(t_awready),
    .l_wdata(t_wdata), .l_wvalid(t_wvalid), .l_wready(t_wready),
    .l_bresp(t_bresp), .l_bvalid(t_bvalid), .l_bready(t_bready),
    .l_araddr(t_araddr), .l_arvalid(t_arvalid), .l_arready(t_arready),
    .l_rdata(t_rdata), .l_rresp(t_rresp), .l_rvalid(t_rvalid), .l_rready(t_rready),
    .m_awid(p_awid), .m_awaddr(p_awaddr), .m_awlen(p_awlen), .m_awsize(p_awsize), .m_awburst(p_awburst),
    .m_awvalid(p_awvalid), .m_awready(p_awready),
    .m_wdata(p_wdata), .m_wstrb(p_wstrb), .m_wlast(p_wlast), .m_wvalid(p_wvalid), .m_wready(p_wready),
    .m_bid(p_bid), .m_bresp(p_bresp), .m_bvalid(p_bvalid), .m_bready(p_bready),
    .running(tx_running)
  );

  logic unused;
  assign unused = ^{smp_keep, ow_keep};
endmodule
