// One VGG16 block: two (blocks 1-2) or three (blocks 3-5) 3x3 convolutions
// with ReLU, followed by 2x2 max pooling.
//
// BLOCK selects the block (1..5); IMG is the width and height of the block's
// input map and BASE_CH the channel count of block 1 (64 in VGG16), doubling
// per block up to 8*BASE_CH (512). The layers are chained by channel-serial
// int8 streams with valid/ready. Each convolution gets LANES = 9*CIN/r
// multipliers, r being 1, 2, 4, 8 or 32 for blocks 1-5: every layer then needs
// about the same number of cycles per frame as conv1_2, so no layer starves
// the next. Layer ids for the load bus are the network positions of the
// convolutions (0..12). The block structure follows the network; the lane
// schedule is this design's choice.
module vgg_block
  import vgg_pkg::*;
#(
  parameter int unsigned BLOCK   = 1,
  parameter int unsigned IMG     = 224,
  parameter int unsigned BASE_CH = 64
) (
  input  logic      clk,
  input  logic      rst,
  input  load_bus_t load,
  input  act_t      s_data,
  input  logic      s_last,
  input  logic      s_valid,
  output logic      s_ready,
  output act_t      m_data,
  output logic      m_last,
  output logic      m_valid,
  input  logic      m_ready
);
  localparam int unsigned NCONV = block_convs(BLOCK);
  localparam int unsigned CIN   = block_in_channels(BLOCK, BASE_CH);
  localparam int unsigned COUT  = block_channels(BLOCK, BASE_CH);
  localparam int unsigned RDIV  = block_lane_div(BLOCK);

  act_t d [NCONV+1];
  logic l [NCONV+1];
  logic v [NCONV+1];
  logic r [NCONV+1];

  assign d[0] = s_data;
  assign l[0] = s_last;
  assign v[0] = s_valid;
  assign s_ready = r[0];

  for (genvar i = 0; i < int'(NCONV); i++) begin : g_conv
    localparam int unsigned LCIN = (i == 0) ? CIN : COUT;
    conv2d_layer #(
      .LAYER_ID (block_first_layer(BLOCK) + i),
      .W        (IMG),
      .H        (IMG),
      .CIN      (LCIN),
      .COUT     (COUT),
      .LANES    ((9 * LCIN) / RDIV)
    ) u_conv (
      .clk, .rst, .load,
      .s_data(d[i]), .s_last(l[i]), .s_valid(v[i]), .s_ready(r[i]),
      .m_data(d[i+1]), .m_last(l[i+1]), .m_valid(v[i+1]), .m_ready(r[i+1])
    );
  end

  maxpool2d #(.W(IMG), .H(IMG), .C(COUT)) u_pool (
    .clk, .rst,
    .s_data(d[NCONV]), .s_last(l[NCONV]), .s_valid(v[NCONV]), .s_ready(r[NCONV]),
    .m_data, .m_last, .m_valid, .m_ready
  );
endmodule
