// mem_arbiter: shares the GAScore's memory port between the receive unit's
// writes and the transmit unit's reads, round-robin.
//
// Each side raises its request with the address (and write data); the grant
// is combinational in the same cycle and the access happens on that clock
// edge. When both request in one cycle the side that was not served last time
// wins, so under contention the port alternates reads and writes. Read data is
// returned with rd_valid one cycle after the grant, as the memory is
// synchronous. conflict pulses in a cycle where both sides requested.
// Round-robin sharing between reads and writes is the reference design's;
// the request/grant interface is this design's own.
module mem_arbiter #(
  parameter int unsigned AW = 14,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr_req,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  output logic          wr_gnt,
  input  logic          rd_req,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_gnt,
  output logic          rd_valid,
  output logic [DW-1:0] rd_data,
  output logic          m_en,
  output logic          m_we,
  output logic [AW-1:0] m_addr,
  output logic [DW-1:0] m_wdata,
  input  logic [DW-1:0] m_rdata,
  output logic          conflict
);
  logic last_was_rd; // 1: the read side was served last

  always_comb begin
    wr_gnt = 1'b0;
    rd_gnt = 1'b0;
    if (wr_req && rd_req) begin
      if (last_was_rd) wr_gnt = 1'b1;
      else             rd_gnt = 1'b1;
    end else begin
      wr_gnt = wr_req;
      rd_gnt = rd_req;
    end
  end

  assign conflict = wr_req && rd_req;
  assign m_en     = wr_gnt || rd_gnt;
  assign m_we     = wr_gnt;
  assign m_addr   = wr_gnt ? wr_addr : rd_addr;
  assign m_wdata  = wr_data;
  assign rd_data  = m_rdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      last_was_rd <= 1'b0;
      rd_valid    <= 1'b0;
    end else begin
      rd_valid <= rd_gnt;
      if (wr_gnt) last_was_rd <= 1'b0;
      if (rd_gnt) last_was_rd <= 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(wr_gnt && rd_gnt));
endmodule
