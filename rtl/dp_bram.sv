// dp_bram: the dual-ported local memory of a node (a BlockRAM).
//
// Port A belongs to the computing element, port B to the GAScore. Both ports
// are synchronous: address, enable and write strobe are sampled on the rising
// edge and read data appears on the next edge (read-first when the same port
// writes). The memory is word addressed, WORDS x DW bits; the default is the
// 64 Kbytes each node holds in the reference system. Writes from both ports to
// the same word in one cycle leave port B's value.
module dp_bram #(
  parameter int unsigned WORDS = 16384,
  parameter int unsigned DW    = 32,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end
endmodule
