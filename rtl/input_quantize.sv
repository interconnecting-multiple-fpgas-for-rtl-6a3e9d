// Input quantization stage in front of the first convolution.
//
// The host sends the image as unsigned 8-bit RGB samples; the network works
// on int8. Each sample x is mapped to clamp(round(x * M) + zp) by the shared
// quantizer, with M = M0 * 2^-n and zp loaded over the load bus as layer
// INPUT_QUANT_ID (kind LOAD_QUANT, addr 0: M0, 1: n, 2: zp). After reset
// M = 1 and zp = -128, i.e. q = x - 128. The stream is one sample per beat;
// the stage has one cycle of latency and passes TLAST along. Valid/ready
// back-pressure is handled by holding the input while the result register is
// full. The reset constants and the byte-serial stream are this design's
// choices; the stage itself is the "Quantize" step after the network input.
module input_quantize
  import vgg_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  load_bus_t load,
  input  logic [7:0] s_data,
  input  logic      s_last,
  input  logic      s_valid,
  output logic      s_ready,
  output act_t      m_data,
  output logic      m_last,
  output logic      m_valid,
  input  logic      m_ready
);
  quant_cfg_t cfg;

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg.m0     <= 32'h4000_0000;
      cfg.shift  <= 6'd30;
      cfg.zp_out <= -8'sd128;
    end else if (load.en && load.layer == 5'(INPUT_QUANT_ID) && load.kind == LOAD_QUANT) begin
      case (load.addr[1:0])
        2'd0: cfg.m0     <= load.data;
        2'd1: cfg.shift  <= load.data[5:0];
        2'd2: cfg.zp_out <= act_t'(load.data[7:0]);
        default: ;
      endcase
    end
  end

  assign s_ready = !m_valid || m_ready;
  wire take = s_valid && s_ready;

  logic q_valid;
  act_t q;

  quantizer u_q (
    .clk, .rst,
    .in_valid(take), .acc(acc_t'({24'd0, s_data})), .cfg, .relu(1'b0),
    .out_valid(q_valid), .q
  );

  // The quantizer output register is the stage's output register.
  assign m_data  = q;
  always_ff @(posedge clk) begin
    if (rst) begin
      m_valid <= 1'b0;
      m_last  <= 1'b0;
    end else begin
      if (take) begin
        m_valid <= 1'b1;
        m_last  <= s_last;
      end else if (m_ready) begin
        m_valid <= 1'b0;
      end
    end
  end

  logic unused;
  assign unused = ^{q_valid, load.addr[31:2]};
endmodule
