// AXI4-Lite slave front end of a register file.
//
// Turns AXI4-Lite transactions from the host into a native register port:
// a one-cycle wr_en with wr_addr/wr_data for every write, and a one-cycle
// rd_en with rd_addr for every read, whose rd_data (driven combinationally
// by the owner of the registers from rd_addr) is captured into RDATA in the
// same cycle. A write needs AW and W together; the response is OKAY and is
// held until BREADY. A new address is taken only when the previous response
// has been accepted, so at most one read and one write are in flight.
// The register map lives in the parent; the handshake details are this
// design's choice.
module axil_regs #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // native register port
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [31:0]       wr_data,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic [31:0]       rd_data
);
  wire take_wr = s_awvalid && s_wvalid && !s_bvalid;
  wire take_rd = s_arvalid && !s_rvalid;

  assign s_awready = take_wr;
  assign s_wready  = take_wr;
  assign s_arready = take_rd;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  assign wr_en   = take_wr;
  assign wr_addr = s_awaddr;
  assign wr_data = s_wdata;
  assign rd_en   = take_rd;
  assign rd_addr = s_araddr;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_bvalid <= 1'b0;
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (take_wr)                  s_bvalid <= 1'b1;
      else if (s_bready)            s_bvalid <= 1'b0;
      if (take_rd) begin
        s_rvalid <= 1'b1;
        s_rdata  <= rd_data;
      end else if (s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  // A response stays up until the host takes it.
  assert property (@(posedge clk) disable iff (rst) s_bvalid && !s_bready |=> s_bvalid);
  assert property (@(posedge clk) disable iff (rst) s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
endmodule
