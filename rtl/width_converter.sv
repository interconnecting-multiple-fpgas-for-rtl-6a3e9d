// Byte-oriented stream width converter (gearbox).
//
// Converts a stream of IN_BYTES-wide words into a stream of OUT_BYTES-wide
// words, byte order preserved, byte 0 in bits [7:0]. It links the 512-bit
// (64-byte) DMA side and the 24-bit (3-byte) accelerator bus, and the 24-bit
// bus and the 8-bit channel-serial stream of the convolution layers. Because
// 64 is not a multiple of 3, words are not mapped one to one: bytes are
// collected in a buffer of IN_BYTES+OUT_BYTES bytes and leave as soon as
// OUT_BYTES are present. s_keep gives the number of valid bytes of an input
// word (valid bytes are the low ones); m_keep does the same on the output, so
// the last output word of a packet may be partial. When an input word with
// s_last enters, no further input is taken until the buffer has drained, and
// the output word holding the final byte carries m_last.
// That the converter works on bytes, and the keep encoding as a byte count,
// are this design's choices.
module width_converter #(
  parameter int unsigned IN_BYTES  = 64,
  parameter int unsigned OUT_BYTES = 3
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic [IN_BYTES*8-1:0]              s_data,
  input  logic [$clog2(IN_BYTES+1)-1:0]      s_keep,
  input  logic                               s_last,
  input  logic                               s_valid,
  output logic                               s_ready,
  output logic [OUT_BYTES*8-1:0]             m_data,
  output logic [$clog2(OUT_BYTES+1)-1:0]     m_keep,
  output logic                               m_last,
  output logic                               m_valid,
  input  logic                               m_ready
);
  localparam int unsigned CAP = IN_BYTES + OUT_BYTES;
  localparam int unsigned CW  = $clog2(CAP + 1);

  logic [7:0]    buf_q [CAP];
  logic [CW-1:0] fill;        // bytes in the buffer
  logic          last_held;   // the packet's last byte is in the buffer

  wire [CW-1:0] out_n = (fill >= CW'(OUT_BYTES)) ? CW'(OUT_BYTES) : fill;

  assign m_valid = (fill >= CW'(OUT_BYTES)) || (last_held && fill != 0);
  assign m_last  = last_held && (fill <= CW'(OUT_BYTES));
  assign m_keep  = ($clog2(OUT_BYTES+1))'(out_n);

  always_comb begin
    for (int i = 0; i < int'(OUT_BYTES); i++)
      m_data[i*8 +: 8] = (i < int'(fill)) ? buf_q[i] : 8'h00;
  end

  wire do_out = m_valid && m_ready;
  wire [CW-1:0] removed = do_out ? out_n : '0;
  // Room is judged after this cycle's output has left.
  assign s_ready = !last_held && ((fill - removed) <= CW'(OUT_BYTES));
  wire do_in = s_valid && s_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      fill      <= '0;
      last_held <= 1'b0;
    end else begin
      for (int i = 0; i < int'(CAP); i++) begin
        automatic int src = i + int'(removed);
        automatic int rel = i - (int'(fill) - int'(removed));
        if (src < int'(fill))
          buf_q[i] <= buf_q[src];
        else if (do_in && rel >= 0 && rel < int'(s_keep))
          buf_q[i] <= s_data[rel*8 +: 8];
      end
      fill <= fill - removed + (do_in ? CW'(s_keep) : '0);
      if (do_in && s_last)
        last_held <= 1'b1;
      else if (do_out && m_last)
        last_held <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (rst) s_valid |-> int'(s_keep) <= int'(IN_BYTES));
endmodule
