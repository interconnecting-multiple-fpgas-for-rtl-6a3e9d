// FPGA #2 of the two-FPGA VGG16 system: block 5 and the result path.
//
// FPGA #1's transmitter writes the 14x14x512 pool4 map into this FPGA's DMA
// core exactly as the host would. The host sets TX_LEN (1,568 words) so the
// last word is tagged. The 512-bit stream is cut to the 24-bit accelerator
// bus and to samples, runs through VGG block 5, and the 7x7x512 pool5 map
// (25,088 bytes, 392 words) is packed back to 512 bits into the DMA core's
// receive FIFO, from which the host reads it with AXI4 read bursts; FLAGS
// bit 0 tells the host that the last word has arrived. The fully connected
// layers run on the host. The DMA core's RESET register resets the
// accelerator datapath (weights and biases are kept, requantization
// constants return to their defaults). Mapping block 5 to the second FPGA
// follows the partitioning of the system; the stream details are this
// design's choice.
module fpga2_accel
  import vgg_pkg::*;
#(
  parameter int unsigned IMG     = 224,
  parameter int unsigned BASE_CH = 64,
  parameter int unsigned ID_W    = 4
) (
  input  logic               clk,
  input  logic               rst,
  // DMA core, AXI4 memory-mapped slave (peer writes, host reads)
  input  logic [ID_W-1:0]    s_awid,
  input  logic [63:0]        s_awaddr,
  input  logic [7:0]         s_awlen,
  input  logic               s_awvalid,
  output logic               s_awready,
  input  logic [511:0]       s_wdata,
  input  logic [63:0]        s_wstrb,
  input  logic               s_wlast,
  input  logic               s_wvalid,
  output logic               s_wready,
  output logic [ID_W-1:0]    s_bid,
  output logic [1:0]         s_bresp,
  output logic               s_bvalid,
  input  logic               s_bready,
  input  logic [ID_W-1:0]    s_arid,
  input  logic [63:0]        s_araddr,
  input  logic [7:0]         s_arlen,
  input  logic               s_arvalid,
  output logic               s_arready,
  output logic [ID_W-1:0]    s_rid,
  output logic [511:0]       s_rdata,
  output logic [1:0]         s_rresp,
  output logic               s_rlast,
  output logic               s_rvalid,
  input  logic               s_rready,
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
  // parameter load bus
  input  load_bus_t          load
);
  localparam int unsigned IMG5 = IMG >> 4;   // block 5 input size (14)

  logic user_reset;
  logic arst;
  assign arst = rst || user_reset;

  logic [511:0] in_w, out_w;
  logic         in_w_last, in_w_valid, in_w_ready;
  logic         out_w_last, out_w_valid, out_w_ready;
  logic [6:0]   out_w_keep;

  dma_core #(.ID_W(ID_W)) u_dma (
    .clk, .rst,
    .s_awid, .s_awaddr, .s_awlen, .s_awvalid, .s_awready,
    .s_wdata, .s_wstrb, .s_wlast, .s_wvalid, .s_wready,
    .s_bid, .s_bresp, .s_bvalid, .s_bready,
    .s_arid, .s_araddr, .s_arlen, .s_arvalid, .s_arready,
    .s_rid, .s_rdata, .s_rresp, .s_rlast, .s_rvalid, .s_rready,
    .l_awaddr(d_awaddr), .l_awvalid(d_awvalid), .l_awready(d_awready),
    .l_wdata(d_wdata), .l_wvalid(d_wvalid), .l_wready(d_wready),
    .l_bresp(d_bresp), .l_bvalid(d_bvalid), .l_bready(d_bready),
    .l_araddr(d_araddr), .l_arvalid(d_arvalid), .l_arready(d_arready),
    .l_rdata(d_rdata), .l_rresp(d_rresp), .l_rvalid(d_rvalid), .l_rready(d_rready),
    .m_axis_tdata(in_w), .m_axis_tlast(in_w_last), .m_axis_tvalid(in_w_valid), .m_axis_tready(in_w_ready),
    .s_axis_tdata(out_w), .s_axis_tlast(out_w_last), .s_axis_tvalid(out_w_valid), .s_axis_tready(out_w_ready),
    .user_reset
  );

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

  act_t b5_data;
  logic b5_last, b5_valid, b5_ready;

  vgg_block #(.BLOCK(5), .IMG(IMG5), .BASE_CH(BASE_CH)) u_block5 (
    .clk, .rst(arst), .load,
    .s_data(act_t'(smp)), .s_last(smp_last), .s_valid(smp_valid), .s_ready(smp_ready),
    .m_data(b5_data), .m_last(b5_last), .m_valid(b5_valid), .m_ready(b5_ready)
  );

  logic [23:0] ob;
  logic [1:0]  ob_keep;
  logic        ob_last, ob_valid, ob_ready;

  width_converter #(.IN_BYTES(1), .OUT_BYTES(3)) u_w8_24 (
    .clk, .rst(arst),
    .s_data(b5_data), .s_keep(1'b1), .s_last(b5_last), .s_valid(b5_valid), .s_ready(b5_ready),
    .m_data(ob), .m_keep(ob_keep), .m_last(ob_last), .m_valid(ob_valid), .m_ready(ob_ready)
  );
  width_converter #(.IN_BYTES(3), .OUT_BYTES(64)) u_w24_512 (
    .clk, .rst(arst),
    .s_data(ob), .s_keep(ob_keep), .s_last(ob_last), .s_valid(ob_valid), .s_ready(ob_ready),
    .m_data(out_w), .m_keep(out_w_keep), .m_last(out_w_last), .m_valid(out_w_valid), .m_ready(out_w_ready)
  );

  logic unused;
  assign unused = ^{smp_keep, out_w_keep};
endmodule
