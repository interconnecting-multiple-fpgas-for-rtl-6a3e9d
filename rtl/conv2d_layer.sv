// 3x3 convolution layer with bias, ReLU and requantization, int8 in and out.
//
// Input and output are channel-serial feature maps: one int8 value per beat,
// pixels in row-major order, channel fastest (HWC). The layer computes a
// same-padded (zero border) 3x3 convolution from CIN to COUT channels, adds a
// 32-bit bias, and requantizes the 32-bit sum to int8 with the layer's
// quantizer (M0, n, output zero point) with ReLU fused into the clamp.
//
// How it works. Incoming rows are written into a line buffer of four rows
// (slot = row mod 4): three rows feed the output row being computed while the
// fourth is being filled, so input and computation overlap. The input stalls
// when it would overwrite a row still in use. For each output pixel a 3x3xCIN
// window register is updated by shifting in one new column of three pixels
// (two at the start of a row). Then, for each output channel, the 9*CIN
// products are summed LANES at a time, LANES multipliers working in parallel,
// so a pixel costs COUT * 9*CIN/LANES cycles plus one. LANES is the layer's
// share of the schedule. The sum plus bias goes through one register and the
// quantizer into a four-entry output FIFO; the last chunk of a channel waits
// while that FIFO could overflow, which is how output back-pressure stalls
// the layer.
//
// Weights, biases and quantizer constants live in on-chip memories written
// through the load bus (layer == LAYER_ID):
//   LOAD_WEIGHT addr = co*9*CIN + (ky*3+kx)*CIN + ci, data[7:0]
//   LOAD_BIAS   addr = co, data = bias (input zero point folded in offline)
//   LOAD_QUANT  addr 0: M0, 1: n, 2: output zero point
// The 3x3 kernels, ReLU, int8 weights with int32 biases and the hardware
// quantizer follow the network description. Line buffering, the window
// register, the lane split and the load bus are this design's choices.
module conv2d_layer
  import vgg_pkg::*;
#(
  parameter int unsigned LAYER_ID = 0,
  parameter int unsigned W        = 224,
  parameter int unsigned H        = 224,
  parameter int unsigned CIN      = 3,
  parameter int unsigned COUT     = 64,
  parameter int unsigned LANES    = 27
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
  localparam int unsigned KSZ   = 9 * CIN;          // window size
  localparam int unsigned NCH   = KSZ / LANES;      // chunks per output channel
  localparam int unsigned WROWS = COUT * NCH;       // weight memory rows
  localparam int unsigned XW    = $clog2(W + 2);
  localparam int unsigned YW    = $clog2(H + 3);
  localparam int unsigned CIW   = (CIN > 1) ? $clog2(CIN) : 1;
  localparam int unsigned COW   = (COUT > 1) ? $clog2(COUT) : 1;
  localparam int unsigned NW    = (NCH > 1) ? $clog2(NCH) : 1;
  localparam int unsigned OF_DEPTH = 4;

  // ---------------- parameter memories ----------------
  act_t       wmem [WROWS][LANES];
  acc_t       bias [COUT];
  quant_cfg_t qcfg;

  wire is_mine = load.en && (load.layer == 5'(LAYER_ID));

  always_ff @(posedge clk) begin
    if (is_mine && load.kind == LOAD_WEIGHT)
      wmem[load.addr / LANES][load.addr % LANES] <= act_t'(load.data[7:0]);
    if (is_mine && load.kind == LOAD_BIAS)
      bias[load.addr[COW-1:0]] <= load.data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      qcfg.m0     <= 32'h4000_0000;
      qcfg.shift  <= 6'd30;
      qcfg.zp_out <= '0;
    end else if (is_mine && load.kind == LOAD_QUANT) begin
      case (load.addr[1:0])
        2'd0: qcfg.m0     <= load.data;
        2'd1: qcfg.shift  <= load.data[5:0];
        2'd2: qcfg.zp_out <= act_t'(load.data[7:0]);
        default: ;
      endcase
    end
  end

  // ---------------- line buffer writer ----------------
  act_t lb [4][W][CIN];

  logic [YW-1:0]  rows_in;    // complete rows of this frame in the buffer
  logic [XW-1:0]  wx;
  logic [CIW-1:0] wc;
  logic [YW-1:0]  y;          // output row being computed
  logic           frame_done;

  assign s_ready = (rows_in < YW'(H)) && (rows_in <= y + YW'(2));
  wire wtake = s_valid && s_ready;

  always_ff @(posedge clk) begin
    if (wtake) lb[rows_in[1:0]][wx][wc] <= s_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rows_in <= '0; wx <= '0; wc <= '0;
    end else if (frame_done) begin
      rows_in <= '0;
    end else if (wtake) begin
      if (wc == CIW'(CIN - 1)) begin
        wc <= '0;
        if (wx == XW'(W - 1)) begin
          wx      <= '0;
          rows_in <= rows_in + 1'b1;
        end else begin
          wx <= wx + 1'b1;
        end
      end else begin
        wc <= wc + 1'b1;
      end
    end
  end

  // ---------------- window and MAC engine ----------------
  typedef enum logic [1:0] {S_WAIT, S_SHIFT, S_MAC} state_e;
  state_e state;

  act_t           win [KSZ];       // index (ky*3+kx)*CIN + ci
  logic [XW-1:0]  x;               // output column
  logic [XW-1:0]  col_ptr;         // next input column to shift in
  logic [COW-1:0] co;
  logic [NW-1:0]  chunk;
  acc_t           acc;

  // rows y-1..y+1 must be complete (y+1 clipped to the frame)
  wire [YW-1:0] need_rows = (y + YW'(2) > YW'(H)) ? YW'(H) : y + YW'(2);
  wire rows_ready = (rows_in >= need_rows);

  // one new column of three input pixels, zero outside the frame
  act_t new_col [3][CIN];
  always_comb begin
    for (int ky = 0; ky < 3; ky++) begin
      automatic int r = int'(y) - 1 + ky;
      for (int ci = 0; ci < int'(CIN); ci++) begin
        if (r < 0 || r >= int'(H) || int'(col_ptr) >= int'(W))
          new_col[ky][ci] = '0;
        else
          new_col[ky][ci] = lb[r[1:0]][col_ptr][ci];
      end
    end
  end

  // LANES products of the current chunk, summed
  function automatic acc_t chunk_dot(logic [COW-1:0] oc, logic [NW-1:0] ch);
    acc_t s = '0;
    for (int i = 0; i < int'(LANES); i++)
      s += acc_t'(win[int'(ch) * int'(LANES) + i]) * acc_t'(wmem[int'(oc) * int'(NCH) + int'(ch)][i]);
    return s;
  endfunction

  // output pipeline: sum register -> quantizer -> FIFO
  logic sum_valid, sum_last, q_valid, q_last;
  acc_t sum_q;
  act_t q;
  logic [$clog2(OF_DEPTH+1)-1:0] of_count;
  logic of_in_ready;

  wire [3:0] in_flight  = 4'(of_count) + 4'(sum_valid) + 4'(q_valid);
  wire       last_chunk = (chunk == NW'(NCH - 1));
  wire       mac_go     = (state == S_MAC) && (!last_chunk || in_flight < 4'(OF_DEPTH));
  wire       px_last    = (y == YW'(H - 1)) && (x == XW'(W - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_WAIT;
      x          <= '0;
      y          <= '0;
      col_ptr    <= '0;
      co         <= '0;
      chunk      <= '0;
      acc        <= '0;
      sum_valid  <= 1'b0;
      sum_last   <= 1'b0;
      sum_q      <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      sum_valid  <= 1'b0;
      case (state)
        S_WAIT: if (rows_ready && !frame_done) state <= S_SHIFT;
        S_SHIFT: begin
          for (int ky = 0; ky < 3; ky++)
            for (int ci = 0; ci < int'(CIN); ci++) begin
              win[(ky*3+0)*int'(CIN)+ci] <= (col_ptr == 0) ? '0 : win[(ky*3+1)*int'(CIN)+ci];
              win[(ky*3+1)*int'(CIN)+ci] <= (col_ptr == 0) ? '0 : win[(ky*3+2)*int'(CIN)+ci];
              win[(ky*3+2)*int'(CIN)+ci] <= new_col[ky][ci];
            end
          col_ptr <= col_ptr + 1'b1;
          if (col_ptr == x + 1'b1) state <= S_MAC;
        end
        S_MAC: if (mac_go) begin
          if (last_chunk) begin
            sum_valid <= 1'b1;
            sum_q     <= acc + chunk_dot(co, chunk) + bias[co];
            sum_last  <= px_last && (co == COW'(COUT - 1));
            acc       <= '0;
            chunk     <= '0;
            if (co == COW'(COUT - 1)) begin
              co <= '0;
              if (x == XW'(W - 1)) begin
                x       <= '0;
                col_ptr <= '0;
                if (y == YW'(H - 1)) begin
                  y          <= '0;
                  frame_done <= 1'b1;
                end else begin
                  y <= y + 1'b1;
                end
                state <= S_WAIT;
              end else begin
                x     <= x + 1'b1;
                state <= S_SHIFT;
              end
            end else begin
              co <= co + 1'b1;
            end
          end else begin
            acc   <= acc + chunk_dot(co, chunk);
            chunk <= chunk + 1'b1;
          end
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  quantizer u_quant (
    .clk, .rst,
    .in_valid(sum_valid), .acc(sum_q), .cfg(qcfg), .relu(1'b1),
    .out_valid(q_valid), .q
  );

  always_ff @(posedge clk) begin
    if (rst) q_last <= 1'b0;
    else if (sum_valid) q_last <= sum_last;
  end

  axis_fifo #(.WIDTH(8), .DEPTH(OF_DEPTH)) u_out_fifo (
    .clk, .rst,
    .s_data(q), .s_last(q_last), .s_valid(q_valid), .s_ready(of_in_ready),
    .m_data(m_data), .m_last(m_last), .m_valid(m_valid), .m_ready(m_ready),
    .count(of_count)
  );

  // The credit check above guarantees the FIFO never refuses a result.
  assert property (@(posedge clk) disable iff (rst) q_valid |-> of_in_ready);
  // The frame length is fixed by the parameters; TLAST must agree with it.
  assert property (@(posedge clk) disable iff (rst)
                   wtake && s_last |-> rows_in == YW'(H - 1) && wx == XW'(W - 1) && wc == CIW'(CIN - 1));

  initial begin
    assert (KSZ % LANES == 0) else $error("LANES must divide 9*CIN");
  end
endmodule
