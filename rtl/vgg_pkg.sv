// Shared types and constants of the two-FPGA VGG16 convolution accelerator.
//
// Activations are signed 8-bit values, accumulators and biases signed 32-bit,
// as in an int8-quantized VGG16. Parameters of every convolution layer
// (weights, biases, quantizer constants) are written through one load bus
// that is routed to all layers; a layer reacts when load_layer equals its id.
// The register addresses and signatures are those of the DMA core and the
// inter-FPGA transmitter register maps. The load bus itself and its encoding
// are this design's own choice.
package vgg_pkg;

  typedef logic signed [7:0]  act_t;   // int8 activation or weight
  typedef logic signed [31:0] acc_t;   // int32 accumulator or bias

  // Load bus: which table of a layer a write goes to.
  typedef enum logic [1:0] {
    LOAD_WEIGHT = 2'd0,   // addr = co*9*CIN + (ky*3+kx)*CIN + ci, data[7:0]
    LOAD_BIAS   = 2'd1,   // addr = co, data = int32 bias
    LOAD_QUANT  = 2'd2    // addr 0: M0, 1: shift n, 2: output zero point
  } load_kind_e;

  typedef struct packed {
    logic        en;
    logic [4:0]  layer;
    load_kind_e  kind;
    logic [31:0] addr;
    logic [31:0] data;
  } load_bus_t;

  // Layer ids: conv layers 0..12 in network order, input quantizer 13.
  localparam int unsigned INPUT_QUANT_ID = 13;

  // Quantizer constants of one layer (M = M0 * 2^-n, Eq. M = Si*Sw/So).
  typedef struct packed {
    logic [31:0] m0;
    logic [5:0]  shift;
    act_t        zp_out;
  } quant_cfg_t;

  // DMA core register map.
  localparam logic [7:0] DMA_REG_RX_FIFO   = 8'h00;
  localparam logic [7:0] DMA_REG_TX_FIFO   = 8'h04;
  localparam logic [7:0] DMA_REG_FLAGS     = 8'h08;
  localparam logic [7:0] DMA_REG_TX_LEN    = 8'h0C;
  localparam logic [7:0] DMA_REG_RESET     = 8'h10;
  localparam logic [7:0] DMA_REG_SIGNATURE = 8'h14;
  localparam logic [31:0] DMA_SIGNATURE    = 32'h6269_6E67;

  // Inter-FPGA transmitter register map.
  localparam logic [7:0] TX_REG_PTR_HI    = 8'h00;
  localparam logic [7:0] TX_REG_PTR_LO    = 8'h04;
  localparam logic [7:0] TX_REG_TX_LEN    = 8'h08;
  localparam logic [7:0] TX_REG_TX_FIFO   = 8'h0C;
  localparam logic [7:0] TX_REG_BURST_LEN = 8'h10;
  localparam logic [7:0] TX_REG_STATUS    = 8'h14;
  localparam logic [7:0] TX_REG_SIGNATURE = 8'h18;
  localparam logic [31:0] TX_SIGNATURE    = 32'h464D_4C43;

  // VGG16 channel count of block b (1..5) for base width base_ch (64).
  function automatic int unsigned block_channels(int unsigned b, int unsigned base_ch);
    return base_ch * ((b >= 4) ? 8 : (1 << (b - 1)));
  endfunction

  // Input channels of block b.
  function automatic int unsigned block_in_channels(int unsigned b, int unsigned base_ch);
    return (b == 1) ? 3 : block_channels(b - 1, base_ch);
  endfunction

  // Number of convolutions in block b: two in blocks 1-2, three in 3-5.
  function automatic int unsigned block_convs(int unsigned b);
    return (b <= 2) ? 2 : 3;
  endfunction

  // Global id of the first convolution of block b.
  function automatic int unsigned block_first_layer(int unsigned b);
    return (b <= 1) ? 0 : (b == 2) ? 2 : (b == 3) ? 4 : (b == 4) ? 7 : 10;
  endfunction

  // Schedule: every layer is given the same number of cycles per frame as
  // conv1_2, which emits IMG*IMG*base_ch values. A block whose layers emit
  // 1/r of that many values gets r times fewer multipliers per layer.
  function automatic int unsigned block_lane_div(int unsigned b);
    return (b <= 4) ? (1 << (b - 1)) : 32;
  endfunction

endpackage
