// 2x2 max pooling with stride 2 on a channel-serial int8 feature map.
//
// The input is a W x H x C feature map sent one int8 value per beat, pixel by
// pixel in row-major order and channel fastest (HWC order). The output is the
// (W/2) x (H/2) x C map in the same order. On even columns a value is kept in
// a per-channel register; on odd columns the horizontal maximum is formed. On
// even rows that maximum is stored in a row buffer of W/2 x C values, on odd
// rows it is compared with the stored one and the result is sent. One input
// beat is taken per cycle; an output register with valid/ready back-pressure
// stalls the input while a result is waiting. m_last marks the last value of
// a frame. Max pooling reducing the map to a quarter follows the network
// description; the HWC channel-serial order is this design's choice.
module maxpool2d
  import vgg_pkg::*;
#(
  parameter int unsigned W = 224,
  parameter int unsigned H = 224,
  parameter int unsigned C = 64
) (
  input  logic clk,
  input  logic rst,
  input  act_t s_data,
  input  logic s_last,
  input  logic s_valid,
  output logic s_ready,
  output act_t m_data,
  output logic m_last,
  output logic m_valid,
  input  logic m_ready
);
  act_t hbuf   [C];
  act_t rowbuf [W/2][C];

  logic [$clog2(W)-1:0] x;
  logic [$clog2(H)-1:0] y;
  logic [$clog2(C)-1:0] c;

  function automatic act_t max8(act_t a, act_t b);
    return (a > b) ? a : b;
  endfunction

  assign s_ready = !m_valid || m_ready;
  wire take = s_valid && s_ready;
  wire act_t hmax = max8(hbuf[c], s_data);

  always_ff @(posedge clk) begin
    if (take) begin
      if (!x[0]) hbuf[c] <= s_data;
      else if (!y[0]) rowbuf[x >> 1][c] <= hmax;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0; y <= '0; c <= '0;
      m_valid <= 1'b0;
      m_data  <= '0;
      m_last  <= 1'b0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (take) begin
        if (x[0] && y[0]) begin
          m_valid <= 1'b1;
          m_data  <= max8(rowbuf[x >> 1][c], hmax);
          m_last  <= (x == W - 1) && (y == H - 1) && (c == C - 1);
        end
        if (c == C - 1) begin
          c <= '0;
          if (x == W - 1) begin
            x <= '0;
            y <= (y == H - 1) ? '0 : y + 1'b1;
          end else begin
            x <= x + 1'b1;
          end
        end else begin
          c <= c + 1'b1;
        end
      end
    end
  end

  // The frame length is fixed by the parameters; TLAST must agree with it.
  assert property (@(posedge clk) disable iff (rst)
                   s_valid && s_ready && s_last |-> (x == W - 1) && (y == H - 1) && (c == C - 1));
endmodule
