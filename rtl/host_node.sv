// host_node: a processor node: local memory and GAScore, with the processor
// side of the four FSLs and memory port A brought out for an embedded
// processor (which is not part of this design).
//
// The processor calls handlers by reading FSL 1, returns tokens on FSL 2,
// writes Active Message requests to FSL 3 and reads completions from FSL 4;
// the word formats are given in gas_pkg. FSL depth is FSL_DEPTH words.
// The node shape (memory, GAScore, four FSLs to a processor) follows the
// reference design; the FSL depth and node id are this design's choices.
module host_node
  import gas_pkg::*;
#(
  parameter logic [7:0]  NODE_ID   = 8'd16,
  parameter int unsigned WORDS     = 16384,
  parameter int unsigned FSL_DEPTH = 16,
  localparam int unsigned AW       = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          net_in_valid,
  output logic          net_in_ready,
  input  lword_t        net_in_data,
  output logic          net_out_valid,
  input  logic          net_out_ready,
  output lword_t        net_out_data,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  output logic          fsl1_valid,
  input  logic          fsl1_ready,
  output lword_t        fsl1_data,
  input  logic          fsl2_valid,
  output logic          fsl2_ready,
  input  lword_t        fsl2_data,
  input  logic          fsl3_valid,
  output logic          fsl3_ready,
  input  lword_t        fsl3_data,
  output logic          fsl4_valid,
  input  logic          fsl4_ready,
  output lword_t        fsl4_data,
  output node_ev_t      ev
);
  logic          b_en, b_we;
  logic [AW-1:0] b_addr;
  logic [DW-1:0] b_wdata, b_rdata;
  logic   g1_v, g1_r, g2_v, g2_r, g3_v, g3_r, g4_v, g4_r;
  lword_t g1_d, g2_d, g3_d, g4_d;

  dp_bram #(.WORDS(WORDS), .DW(DW)) u_mem (
    .clk,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  gascore #(.NODE_ID(NODE_ID), .AW(AW)) u_gas (
    .clk, .rst,
    .net_in_valid, .net_in_ready, .net_in_data,
    .net_out_valid, .net_out_ready, .net_out_data,
    .fsl1_valid(g1_v), .fsl1_ready(g1_r), .fsl1_data(g1_d),
    .fsl2_valid(g2_v), .fsl2_ready(g2_r), .fsl2_data(g2_d),
    .fsl3_valid(g3_v), .fsl3_ready(g3_r), .fsl3_data(g3_d),
    .fsl4_valid(g4_v), .fsl4_ready(g4_r), .fsl4_data(g4_d),
    .m_en(b_en), .m_we(b_we), .m_addr(b_addr), .m_wdata(b_wdata), .m_rdata(b_rdata),
    .ev_rx_short(ev.rx_short), .ev_rx_long(ev.rx_long), .ev_tx_reply(ev.tx_reply),
    .ev_tx_done(ev.tx_done), .ev_mem_conflict(ev.mem_conflict), .tok_full(ev.tok_full)
  );
  assign ev.prog       = 1'b0;
  assign ev.pams_reply = 1'b0;
  assign ev.send       = 1'b0;

  fsl_fifo #(.WIDTH(LW), .DEPTH(FSL_DEPTH)) u_fsl1 (
    .clk, .rst, .s_valid(g1_v), .s_ready(g1_r), .s_data(g1_d),
    .m_valid(fsl1_valid), .m_ready(fsl1_ready), .m_data(fsl1_data), .count());
  fsl_fifo #(.WIDTH(LW), .DEPTH(FSL_DEPTH)) u_fsl2 (
    .clk, .rst, .s_valid(fsl2_valid), .s_ready(fsl2_ready), .s_data(fsl2_data),
    .m_valid(g2_v), .m_ready(g2_r), .m_data(g2_d), .count());
  fsl_fifo #(.WIDTH(LW), .DEPTH(FSL_DEPTH)) u_fsl3 (
    .clk, .rst, .s_valid(fsl3_valid), .s_ready(fsl3_ready), .s_data(fsl3_data),
    .m_valid(g3_v), .m_ready(g3_r), .m_data(g3_d), .count());
  fsl_fifo #(.WIDTH(LW), .DEPTH(FSL_DEPTH)) u_fsl4 (
    .clk, .rst, .s_valid(g4_v), .s_ready(g4_r), .s_data(g4_d),
    .m_valid(fsl4_valid), .m_ready(fsl4_ready), .m_data(fsl4_data), .count());
endmodule
