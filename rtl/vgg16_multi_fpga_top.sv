// VGG16 convolutional inference split over two FPGAs on one PCIe host.
//
// The thirteen 3x3 convolutions and five max-pooling layers of VGG16
// (224x224x3 input, int8) are cut after the fourth pooling layer: FPGA #1
// holds blocks 1-4, FPGA #2 block 5, which balances the weight storage of the
// two devices. FPGA #1 sends the 14x14x512 pool4 map (100,352 bytes per
// frame) directly to FPGA #2 with PCIe peer-to-peer DMA writes from its
// inter-FPGA transmitter into FPGA #2's DMA core. FPGA #2 returns the 7x7x512
// map to the host, which runs the fully connected layers and softmax.
//
// In this top the PCIe fabric between the two devices is a direct connection
// of FPGA #1's write master to FPGA #2's memory-mapped slave (write
// channels); the address the transmitter uses (its PTR register) is
// therefore not decoded. Everything the host touches is brought out: the
// image write port and register ports of FPGA #1, the register port and the
// result read port of FPGA #2, and each device's parameter load bus. Both
// devices share one clock here; at 125 MHz as in the reference system.
module vgg16_multi_fpga_top
  import vgg_pkg::*;
#(
  parameter int unsigned IMG     = 224,
  parameter int unsigned BASE_CH = 64,
  parameter int unsigned ID_W    = 4
) (
  input  logic               clk,
  input  logic               rst,
  // host -> FPGA #1 DMA core (image in)
  input  logic [ID_W-1:0]    h1_awid,
  input  logic [63:0]        h1_awaddr,
  input  logic [7:0]         h1_awlen,
  input  logic               h1_awvalid,
  output logic               h1_awready,
  input  logic [511:0]       h1_wdata,
  input  logic [63:0]        h1_wstrb,
  input  logic               h1_wlast,
  input  logic               h1_wvalid,
  output logic               h1_wready,
  output logic [ID_W-1:0]    h1_bid,
  output logic [1:0]         h1_bresp,
  output logic               h1_bvalid,
  input  logic               h1_bready,
  input  logic [ID_W-1:0]    h1_arid,
  input  logic [63:0]        h1_araddr,
  input  logic [7:0]         h1_arlen,
  input  logic               h1_arvalid,
  output logic               h1_arready,
  output logic [ID_W-1:0]    h1_rid,
  output logic [511:0]       h1_rdata,
  output logic [1:0]         h1_rresp,
  output logic               h1_rlast,
  output logic               h1_rvalid,
  input  logic               h1_rready,
  // host <- FPGA #2 DMA core (result out, read channels)
  input  logic [ID_W-1:0]    h2_arid,
  input  logic [63:0]        h2_araddr,
  input  logic [7:0]         h2_arlen,
  input  logic               h2_arvalid,
  output logic               h2_arready,
  output logic [ID_W-1:0]    h2_rid,
  output logic [511:0]       h2_rdata,
  output logic [1:0]         h2_rresp,
  output logic               h2_rlast,
  output logic               h2_rvalid,
  input  logic               h2_rready,
  // register ports: FPGA #1 DMA core (d1), FPGA #1 transmitter (t1),
  // FPGA #2 DMA core (d2); each AXI4-Lite
  input  logic [7:0]         d1_awaddr, t1_awaddr, d2_awaddr,
  input  logic               d1_awvalid, t1_awvalid, d2_awvalid,
  output logic               d1_awready, t1_awready, d2_awready,
  input  logic [31:0]        d1_wdata, t1_wdata, d2_wdata,
  input  logic               d1_wvalid, t1_wvalid, d2_wvalid,
  output logic               d1_wready, t1_wready, d2_wready,
  output logic [1:0]         d1_bresp, t1_bresp, d2_bresp,
  output logic               d1_bvalid, t1_bvalid, d2_bvalid,
  input  logic               d1_bready, t1_bready, d2_bready,
  input  logic [7:0]         d1_araddr, t1_araddr, d2_araddr,
  input  logic               d1_arvalid, t1_arvalid, d2_arvalid,
  output logic               d1_arready, t1_arready, d2_arready,
  output logic [31:0]        d1_rdata, t1_rdata, d2_rdata,
  output logic [1:0]         d1_rresp, t1_rresp, d2_rresp,
  output logic               d1_rvalid, t1_rvalid, d2_rvalid,
  input  logic               d1_rready, t1_rready, d2_rready,
  // parameter load buses
  input  load_bus_t          load1,
  input  load_bus_t          load2,
  // peer link activity, for observation
  output logic               tx_running,
  output logic               peer_wbeat
);
  // peer link FPGA #1 -> FPGA #2
  logic [ID_W-1:0]  p_awid, p_bid;
  logic [63:0]      p_awaddr;
  logic [7:0]       p_awlen;
  logic [2:0]       p_awsize;
  logic [1:0]       p_awburst, p_bresp;
  logic             p_awvalid, p_awready, p_wlast, p_wvalid, p_wready, p_bvalid, p_bready;
  logic [511:0]     p_wdata;
  logic [63:0]      p_wstrb;

  assign peer_wbeat = p_wvalid && p_wready;

  fpga1_accel #(.IMG(IMG), .BASE_CH(BASE_CH), .ID_W(ID_W)) u_fpga1 (
    .clk, .rst,
    .h_awid(h1_awid), .h_awaddr(h1_awaddr), .h_awlen(h1_awlen), .h_awvalid(h1_awvalid), .h_awready(h1_awready),
    .h_wdata(h1_wdata), .h_wstrb(h1_wstrb), .h_wlast(h1_wlast), .h_wvalid(h1_wvalid), .h_wready(h1_wready),
    .h_bid(h1_bid), .h_bresp(h1_bresp), .h_bvalid(h1_bvalid), .h_bready(h1_bready),
    .h_arid(h1_arid), .h_araddr(h1_araddr), .h_arlen(h1_arlen), .h_arvalid(h1_arvalid), .h_arready(h1_arready),
    .h_rid(h1_rid), .h_rdata(h1_rdata), .h_rresp(h1_rresp), .h_rlast(h1_rlast), .h_rvalid(h1_rvalid), .h_rready(h1_rready),
    .d_awaddr(d1_awaddr), .d_awvalid(d1_awvalid), .d_awready(d1_awready),
    .d_wdata(d1_wdata), .d_wvalid(d1_wvalid), .d_wready(d1_wready),
    .d_bresp(d1_bresp), .d_bvalid(d1_bvalid), .d_bready(d1_bready),
    .d_araddr(d1_araddr), .d_arvalid(d1_arvalid), .d_arready(d1_arready),
    .d_rdata(d1_rdata), .d_rresp(d1_rresp), .d_rvalid(d1_rvalid), .d_rready(d1_rready),
    .t_awaddr(t1_awaddr), .t_awvalid(t1_awvalid), .t_awready(t1_awready),
    .t_wdata(t1_wdata), .t_wvalid(t1_wvalid), .t_wready(t1_wready),
    .t_bresp(t1_bresp), .t_bvalid(t1_bvalid), .t_bready(t1_bready),
    .t_araddr(t1_araddr), .t_arvalid(t1_arvalid), .t_arready(t1_arready),
    .t_rdata(t1_rdata), .t_rresp(t1_rresp), .t_rvalid(t1_rvalid), .t_rready(t1_rready),
    .p_awid, .p_awaddr, .p_awlen, .p_awsize, .p_awburst, .p_awvalid, .p_awready,
    .p_wdata, .p_wstrb, .p_wlast, .p_wvalid, .p_wready,
    .p_bid, .p_bresp, .p_bvalid, .p_bready,
    .load(load1),
    .tx_running
  );

  fpga2_accel #(.IMG(IMG), .BASE_CH(BASE_CH), .ID_W(ID_W)) u_fpga2 (
    .clk, .rst,
    .s_awid(p_awid), .s_awaddr(p_awaddr), .s_awlen(p_awlen), .s_awvalid(p_awvalid), .s_awready(p_awready),
    .s_wdata(p_wdata), .s_wstrb(p_wstrb), .s_wlast(p_wlast), .s_wvalid(p_wvalid), .s_wready(p_wready),
    .s_bid(p_bid), .s_bresp(p_bresp), .s_bvalid(p_bvalid), .s_bready(p_bready),
    .s_arid(h2_arid), .s_araddr(h2_araddr), .s_arlen(h2_arlen), .s_arvalid(h2_arvalid), .s_arready(h2_arready),
    .s_rid(h2_rid), .s_rdata(h2_rdata), .s_rresp(h2_rresp), .s_rlast(h2_rlast), .s_rvalid(h2_rvalid), .s_rready(h2_rready),
    .d_awaddr(d2_awaddr), .d_awvalid(d2_awvalid), .d_awready(d2_awready),
    .d_wdata(d2_wdata), .d_wvalid(d2_wvalid), .d_wready(d2_wready),
    .d_bresp(d2_bresp), .d_bvalid(d2_bvalid), .d_bready(d2_bready),
    .d_araddr(d2_araddr), .d_arvalid(d2_arvalid), .d_arready(d2_arready),
    .d_rdata(d2_rdata), .d_rresp(d2_rresp), .d_rvalid(d2_rvalid), .d_rready(d2_rready),
    .load(load2)
  );

  logic unused;
  assign unused = ^{p_awsize, p_awburst};
endmodule
