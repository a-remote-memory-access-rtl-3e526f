// gascore: Global Address Space core, the remote memory access engine of a
// node.
//
// It sits between the node's local memory (port B), the on-chip network
// (NetIf) and the computing element. Four FSLs link it to the computing
// element: FSL 1 carries handler calls out, FSL 2 brings tokens back, FSL 3
// brings Active Message requests in and FSL 4 reports their completion. The
// receive and transmit paths are independent so that neither can block the
// other; they share only the token buffer and the memory port, which a
// round-robin arbiter splits between receive-side writes and transmit-side
// reads. The FSL FIFOs themselves sit outside, between this core and the
// computing element. Event outputs pulse for testbench and monitoring use.
// The split into receive, transmit, token buffer and round-robin memory
// sharing follows the reference design; the token count (NTOK) and the
// event outputs are this design's own.
module gascore
  import gas_pkg::*;
#(
  parameter logic [7:0]  NODE_ID = 8'd0,
  parameter int unsigned NTOK    = 16,
  parameter int unsigned AW      = 14
) (
  input  logic          clk,
  input  logic          rst,
  // network
  input  logic          net_in_valid,
  output logic          net_in_ready,
  input  lword_t        net_in_data,
  output logic          net_out_valid,
  input  logic          net_out_ready,
  output lword_t        net_out_data,
  // FSL 1: handler calls to the computing element
  output logic          fsl1_valid,
  input  logic          fsl1_ready,
  output lword_t        fsl1_data,
  // FSL 2: tokens returned by the computing element
  input  logic          fsl2_valid,
  output logic          fsl2_ready,
  input  lword_t        fsl2_data,
  // FSL 3: requests from the computing element
  input  logic          fsl3_valid,
  output logic          fsl3_ready,
  input  lword_t        fsl3_data,
  // FSL 4: completions to the computing element
  output logic          fsl4_valid,
  input  logic          fsl4_ready,
  output lword_t        fsl4_data,
  // local memory port B
  output logic          m_en,
  output logic          m_we,
  output logic [AW-1:0] m_addr,
  output logic [DW-1:0] m_wdata,
  input  logic [DW-1:0] m_rdata,
  // events
  output logic          ev_rx_short,
  output logic          ev_rx_long,
  output logic          ev_tx_reply,
  output logic          ev_tx_done,
  output logic          ev_mem_conflict,
  output logic          tok_full
);
  logic          tok_req, tok_gnt;
  logic [7:0]    tok_node, tok, lk_tok, lk_node;
  logic          wr_req, wr_gnt, rd_req, rd_gnt, rd_valid;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [DW-1:0] wr_data, rd_data;
  logic [$clog2(NTOK):0] free_cnt;

  assign tok_full = (free_cnt == '0);

  token_buffer #(.NTOK(NTOK)) u_tok (
    .clk, .rst,
    .alloc_req(tok_req), .alloc_node(tok_node), .alloc_gnt(tok_gnt), .alloc_tok(tok),
    .lk_tok, .lk_node,
    .fsl2_valid, .fsl2_ready, .fsl2_data,
    .free_cnt
  );

  mem_arbiter #(.AW(AW), .DW(DW)) u_arb (
    .clk, .rst,
    .wr_req, .wr_addr, .wr_data, .wr_gnt,
    .rd_req, .rd_addr, .rd_gnt, .rd_valid, .rd_data,
    .m_en, .m_we, .m_addr, .m_wdata, .m_rdata,
    .conflict(ev_mem_conflict)
  );

  gas_rx #(.AW(AW)) u_rx (
    .clk, .rst,
    .net_valid(net_in_valid), .net_ready(net_in_ready), .net_data(net_in_data),
    .fsl1_valid, .fsl1_ready, .fsl1_data,
    .tok_req, .tok_node, .tok_gnt, .tok,
    .wr_req, .wr_addr, .wr_data, .wr_gnt,
    .ev_short(ev_rx_short), .ev_long(ev_rx_long)
  );

  gas_tx #(.NODE_ID(NODE_ID), .AW(AW)) u_tx (
    .clk, .rst,
    .fsl3_valid, .fsl3_ready, .fsl3_data,
    .fsl4_valid, .fsl4_ready, .fsl4_data,
    .lk_tok, .lk_node,
    .rd_req, .rd_addr, .rd_gnt, .rd_valid, .rd_data,
    .net_valid(net_out_valid), .net_ready(net_out_ready), .net_data(net_out_data),
    .ev_reply(ev_tx_reply), .ev_done(ev_tx_done)
  );
endmodule
