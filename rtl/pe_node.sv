// pe_node: a hardware processing node: local memory, GAScore, sequencer and
// the four FSLs between them.
//
// The custom hardware core that does the computing is not part of this
// module. It uses port A of the local memory and the sequencer's control
// inputs and outputs, which are this module's ports. The GAScore owns port B
// and the network side; the sequencer (pams) stands in for the computing
// element on the four FSLs, so all messaging of the node is programmed by
// Active Messages (H_PROG / H_START) and needs no logic in the core.
module pe_node
  import gas_pkg::*;
#(
  parameter logic [7:0]  NODE_ID    = 8'd0,
  parameter int unsigned WORDS      = 16384,
  parameter int unsigned NCTRL      = 4,
  parameter int unsigned IMEM_WORDS = 512,
  parameter int unsigned FSL_DEPTH  = 16,
  localparam int unsigned AW        = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             net_in_valid,
  output logic             net_in_ready,
  input  lword_t           net_in_data,
  output logic             net_out_valid,
  input  logic             net_out_ready,
  output lword_t           net_out_data,
  // custom core: local memory port A and control bits
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [DW-1:0]    a_wdata,
  output logic [DW-1:0]    a_rdata,
  input  logic [NCTRL-1:0] ctrl_in,
  output logic [NCTRL-1:0] ctrl_out,
  output logic [31:0]      timer,
  output logic [31:0]      arrival_time,
  output logic             running,
  output node_ev_t         ev
);
  logic          b_en, b_we;
  logic [AW-1:0] b_addr;
  logic [DW-1:0] b_wdata, b_rdata;

  // core side (g*) and sequencer side (p*) of the four FSLs
  logic   g1_v, g1_r, p1_v, p1_r;  lword_t g1_d, p1_d;
  logic   g2_v, g2_r, p2_v, p2_r;  lword_t g2_d, p2_d;
  logic   g3_v, g3_r, p3_v, p3_r;  lword_t g3_d, p3_d;
  logic   g4_v, g4_r, p4_v, p4_r;  lword_t g4_d, p4_d;

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

  // FSL 1: GAScore -> sequencer
  fsl_fifo #(.WIDTH(LW), .DEPTH(FSL_DEPTH)) u_fsl1 (
    .clk, .rst, .s_valid(g1_v), .s_ready(g1_r), .s_data(g1_d),
    .m_valid(p1_v), .m_ready(p1_r), .m_data(p1_d), .count());
  // FSL 2: sequencer -> GAScore
  fsl_fifo #(.WIDTH(LW), .DEPTH(FSL_DEPTH)) u_fsl2 (
    .clk, .rst, .s_valid(p2_v), .s_ready(p2_r), .s_data(p2_d),
    .m_valid(g2_v), .m_ready(g2_r), .m_data(g2_d), .count());
  // FSL 3: sequencer -> GAScore
  fsl_fifo #(.WIDTH(LW), .DEPTH(FSL_DEPTH)) u_fsl3 (
    .clk, .rst, .s_valid(p3_v), .s_ready(p3_r), .s_data(p3_d),
    .m_valid(g3_v), .m_ready(g3_r), .m_data(g3_d), .count());
  // FSL 4: GAScore -> sequencer
  fsl_fifo #(.WIDTH(LW), .DEPTH(FSL_DEPTH)) u_fsl4 (
    .clk, .rst, .s_valid(g4_v), .s_ready(g4_r), .s_data(g4_d),
    .m_valid(p4_v), .m_ready(p4_r), .m_data(p4_d), .count());

  pams #(.IMEM_WORDS(IMEM_WORDS), .NCTRL(NCTRL)) u_pams (
    .clk, .rst,
    .fsl1_valid(p1_v), .fsl1_ready(p1_r), .fsl1_data(p1_d),
    .fsl2_valid(p2_v), .fsl2_ready(p2_r), .fsl2_data(p2_d),
    .fsl3_valid(p3_v), .fsl3_ready(p3_r), .fsl3_data(p3_d),
    .fsl4_valid(p4_v), .fsl4_ready(p4_r), .fsl4_data(p4_d),
    .ctrl_in, .ctrl_out, .timer, .arrival_time, .running,
    .msg_done(), .xfer_done(),
    .ev_prog(ev.prog), .ev_reply(ev.pams_reply), .ev_send(ev.send)
  );
endmodule
