// gas_fpga: the logic of one FPGA of the ring system.
//
// Four hardware processing nodes (pe_node, node ids 4*FPGA_ID .. 4*FPGA_ID+3),
// one processor node (host_node, node id 16+FPGA_ID) and two off-chip
// controllers (occc, to FPGA_ID+1 "clockwise" and FPGA_ID-1
// "counter-clockwise") each own a NetIf; the seven NetIfs form a fully
// connected network, with an FSL FIFO of LINK_DEPTH words on every one of the
// 7 x 7 links (the diagonal ones are loopbacks). NetIf port numbers are fixed
// in gas_pkg: 0-3 PEs, 4 processor, 5 clockwise, 6 counter-clockwise. A packet
// that enters from one ring direction and is addressed further on is routed
// by the controller's NetIf straight to the other controller.
module gas_fpga
  import gas_pkg::*;
#(
  parameter int unsigned FPGA_ID    = 0,
  parameter int unsigned N_FPGA     = 4,
  parameter int unsigned WORDS      = 16384,
  parameter int unsigned NCTRL      = 4,
  parameter int unsigned IMEM_WORDS = 512,
  parameter int unsigned FSL_DEPTH  = 16,
  parameter int unsigned LINK_DEPTH = 16,
  parameter int unsigned RX_DEPTH   = 16,
  parameter int unsigned PAD_STAGES = 2,
  localparam int unsigned AW        = $clog2(WORDS),
  localparam int unsigned NPE       = PES_PER_FPGA
) (
  input  logic             clk,
  input  logic             rst,
  // ring, clockwise neighbour
  output logic             cw_tx_valid,
  output lword_t           cw_tx_data,
  input  logic             cw_tx_credit,
  input  logic             cw_rx_valid,
  input  lword_t           cw_rx_data,
  output logic             cw_rx_credit,
  // ring, counter-clockwise neighbour
  output logic             ccw_tx_valid,
  output lword_t           ccw_tx_data,
  input  logic             ccw_tx_credit,
  input  logic             ccw_rx_valid,
  input  lword_t           ccw_rx_data,
  output logic             ccw_rx_credit,
  // custom cores of the four PEs
  input  logic             pe_a_en    [NPE],
  input  logic             pe_a_we    [NPE],
  input  logic [AW-1:0]    pe_a_addr  [NPE],
  input  logic [DW-1:0]    pe_a_wdata [NPE],
  output logic [DW-1:0]    pe_a_rdata [NPE],
  input  logic [NCTRL-1:0] pe_ctrl_in [NPE],
  output logic [NCTRL-1:0] pe_ctrl_out[NPE],
  output logic [31:0]      pe_timer   [NPE],
  output logic [31:0]      pe_arrival [NPE],
  output logic             pe_running [NPE],
  output node_ev_t         pe_ev      [NPE],
  // embedded processor
  input  logic             h_a_en,
  input  logic             h_a_we,
  input  logic [AW-1:0]    h_a_addr,
  input  logic [DW-1:0]    h_a_wdata,
  output logic [DW-1:0]    h_a_rdata,
  output logic             h_fsl1_valid,
  input  logic             h_fsl1_ready,
  output lword_t           h_fsl1_data,
  input  logic             h_fsl2_valid,
  output logic             h_fsl2_ready,
  input  lword_t           h_fsl2_data,
  input  logic             h_fsl3_valid,
  output logic             h_fsl3_ready,
  input  lword_t           h_fsl3_data,
  output logic             h_fsl4_valid,
  input  logic             h_fsl4_ready,
  output lword_t           h_fsl4_data,
  output node_ev_t         h_ev,
  // network events
  output logic [NPORT-1:0] ev_contend,
  output logic [1:0]       ev_no_credit
);
  // local port of every NetIf
  logic   li_v [NPORT], li_r [NPORT], lo_v [NPORT], lo_r [NPORT];
  lword_t li_d [NPORT], lo_d [NPORT];
  // links: x*_[i][j] is the link from NetIf i to NetIf j
  logic [NPORT-1:0] xo_v [NPORT], xo_r [NPORT], xi_v [NPORT], xi_r [NPORT];
  lword_t           xo_d [NPORT][NPORT], xi_d [NPORT][NPORT];

  for (genvar i = 0; i < NPORT; i++) begin : g_net
    netif #(.NP(NPORT), .MY_FPGA(FPGA_ID), .N_FPGA(N_FPGA)) u_netif (
      .clk, .rst,
      .loc_in_valid(li_v[i]), .loc_in_ready(li_r[i]), .loc_in_data(li_d[i]),
      .loc_out_valid(lo_v[i]), .loc_out_ready(lo_r[i]), .loc_out_data(lo_d[i]),
      .lnk_out_valid(xo_v[i]), .lnk_out_ready(xo_r[i]), .lnk_out_data(xo_d[i]),
      .lnk_in_valid(xi_v[i]), .lnk_in_ready(xi_r[i]), .lnk_in_data(xi_d[i]),
      .ev_contend(ev_contend[i])
    );
    for (genvar j = 0; j < NPORT; j++) begin : g_link
      fsl_fifo #(.WIDTH(LW), .DEPTH(LINK_DEPTH)) u_link (
        .clk, .rst,
        .s_valid(xo_v[i][j]), .s_ready(xo_r[i][j]), .s_data(xo_d[i][j]),
        .m_valid(xi_v[j][i]), .m_ready(xi_r[j][i]), .m_data(xi_d[j][i]),
        .count()
      );
    end
  end

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    pe_node #(.NODE_ID(8'(FPGA_ID*NPE + p)), .WORDS(WORDS), .NCTRL(NCTRL),
              .IMEM_WORDS(IMEM_WORDS), .FSL_DEPTH(FSL_DEPTH)) u_pe (
      .clk, .rst,
      .net_in_valid(lo_v[p]), .net_in_ready(lo_r[p]), .net_in_data(lo_d[p]),
      .net_out_valid(li_v[p]), .net_out_ready(li_r[p]), .net_out_data(li_d[p]),
      .a_en(pe_a_en[p]), .a_we(pe_a_we[p]), .a_addr(pe_a_addr[p]),
      .a_wdata(pe_a_wdata[p]), .a_rdata(pe_a_rdata[p]),
      .ctrl_in(pe_ctrl_in[p]), .ctrl_out(pe_ctrl_out[p]),
      .timer(pe_timer[p]), .arrival_time(pe_arrival[p]), .running(pe_running[p]),
      .ev(pe_ev[p])
    );
  end

  host_node #(.NODE_ID(8'(HOST_BASE + FPGA_ID)), .WORDS(WORDS), .FSL_DEPTH(FSL_DEPTH)) u_host (
    .clk, .rst,
    .net_in_valid(lo_v[PORT_HOST]), .net_in_ready(lo_r[PORT_HOST]), .net_in_data(lo_d[PORT_HOST]),
    .net_out_valid(li_v[PORT_HOST]), .net_out_ready(li_r[PORT_HOST]), .net_out_data(li_d[PORT_HOST]),
    .a_en(h_a_en), .a_we(h_a_we), .a_addr(h_a_addr), .a_wdata(h_a_wdata), .a_rdata(h_a_rdata),
    .fsl1_valid(h_fsl1_valid), .fsl1_ready(h_fsl1_ready), .fsl1_data(h_fsl1_data),
    .fsl2_valid(h_fsl2_valid), .fsl2_ready(h_fsl2_ready), .fsl2_data(h_fsl2_data),
    .fsl3_valid(h_fsl3_valid), .fsl3_ready(h_fsl3_ready), .fsl3_data(h_fsl3_data),
    .fsl4_valid(h_fsl4_valid), .fsl4_ready(h_fsl4_ready), .fsl4_data(h_fsl4_data),
    .ev(h_ev)
  );

  occc #(.RX_DEPTH(RX_DEPTH), .PAD_STAGES(PAD_STAGES)) u_occc_cw (
    .clk, .rst,
    .loc_in_valid(lo_v[PORT_CW]), .loc_in_ready(lo_r[PORT_CW]), .loc_in_data(lo_d[PORT_CW]),
    .loc_out_valid(li_v[PORT_CW]), .loc_out_ready(li_r[PORT_CW]), .loc_out_data(li_d[PORT_CW]),
    .tx_valid(cw_tx_valid), .tx_data(cw_tx_data), .tx_credit(cw_tx_credit),
    .rx_valid(cw_rx_valid), .rx_data(cw_rx_data), .rx_credit(cw_rx_credit),
    .ev_no_credit(ev_no_credit[0])
  );

  occc #(.RX_DEPTH(RX_DEPTH), .PAD_STAGES(PAD_STAGES)) u_occc_ccw (
    .clk, .rst,
    .loc_in_valid(lo_v[PORT_CCW]), .loc_in_ready(lo_r[PORT_CCW]), .loc_in_data(lo_d[PORT_CCW]),
    .loc_out_valid(li_v[PORT_CCW]), .loc_out_ready(li_r[PORT_CCW]), .loc_out_data(li_d[PORT_CCW]),
    .tx_valid(ccw_tx_valid), .tx_data(ccw_tx_data), .tx_credit(ccw_tx_credit),
    .rx_valid(ccw_rx_valid), .rx_data(ccw_rx_data), .rx_credit(ccw_rx_credit),
    .ev_no_credit(ev_no_credit[1])
  );
endmodule
