// fsl_fifo: a Fast Simplex Link, i.e. a synchronous first-in first-out buffer
// of WIDTH-bit words (32 data bits and one control bit by default).
//
// Used for the four links between a computing element and its GAScore and for
// every link of the on-chip network. Handshake on both sides is valid/ready:
// a word moves when both are high on a rising clock edge. m_data shows the
// oldest word while m_valid is high (first-word fall-through), so a word
// written in one cycle can be read in the next. Depth is a parameter (16 by
// default, this design's choice); DEPTH must be a power of two.
module fsl_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             s_valid,
  output logic             s_ready,
  input  logic [WIDTH-1:0] s_data,
  output logic             m_valid,
  input  logic             m_ready,
  output logic [WIDTH-1:0] m_data,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign s_ready = (count != (AW+1)'(DEPTH));
  assign m_valid = (count != '0);
  assign m_data  = mem[rp];
  assign do_wr   = s_valid && s_ready;
  assign do_rd   = m_valid && m_ready;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= s_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH-1)) == 0)
    else $error("fsl_fifo: DEPTH must be a power of two");
endmodule
