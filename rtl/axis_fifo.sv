// AXI4-Stream compatible synchronous FIFO with an occupancy count.
//
// Used as the transmit and receive buffers of the DMA core and as the input
// buffer of the inter-FPGA transmitter. A write happens on s_valid && s_ready,
// a read on m_valid && m_ready; both may happen in the same cycle. The data
// word carries TDATA and TLAST together. Output is first-word-fall-through:
// m_data shows the head entry whenever m_valid is high. count is the number of
// words stored, which the register files report as occupancy "in words".
// The depth and the fall-through style are this design's choice.
module axis_fifo #(
  parameter int unsigned WIDTH = 512,
  parameter int unsigned DEPTH = 64
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [WIDTH-1:0]           s_data,
  input  logic                       s_last,
  input  logic                       s_valid,
  output logic                       s_ready,
  output logic [WIDTH-1:0]           m_data,
  output logic                       m_last,
  output logic                       m_valid,
  input  logic                       m_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem_data [DEPTH];
  logic             mem_last [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  wire do_wr = s_valid && s_ready;
  wire do_rd = m_valid && m_ready;

  assign s_ready = (count < DEPTH[$clog2(DEPTH+1)-1:0]);
  assign m_valid = (count != 0);
  assign m_data  = mem_data[rd_ptr];
  assign m_last  = mem_last[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) begin
      mem_data[wr_ptr] <= s_data;
      mem_last[wr_ptr] <= s_last;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // A full FIFO never accepts, an empty one never presents data.
  assert property (@(posedge clk) disable iff (rst) int'(count) <= int'(DEPTH));
endmodule
