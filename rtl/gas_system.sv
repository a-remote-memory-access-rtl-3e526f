// gas_system: the multi-FPGA test system: N_FPGA FPGAs (gas_fpga) joined in
// a bidirectional ring, 32 data bits plus a last bit per direction and link.
//
// Nodes 0..4*N_FPGA-1 are the hardware processing nodes (four per FPGA);
// nodes 16..16+N_FPGA-1 are the processor nodes, one per FPGA. With the
// default four FPGAs, processor node 16 configures the sequencers and
// collects results. Every node can reach every other node's memory by Active
// Messages; a packet crosses at most N_FPGA/2 ring hops. All custom-core
// ports (memory port A, control bits) and all processor FSLs are brought out
// as arrays indexed by node (PEs) or by FPGA (processors).
// The four-FPGA bidirectional ring with 32-bit links follows the reference
// test system; node numbering and modelling the board links as direct
// wires between neighbouring OCCCs are this design's own choices.
module gas_system
  import gas_pkg::*;
#(
  parameter int unsigned N_FPGA     = 4,
  parameter int unsigned WORDS      = 16384,
  parameter int unsigned NCTRL      = 4,
  parameter int unsigned IMEM_WORDS = 512,
  parameter int unsigned FSL_DEPTH  = 16,
  parameter int unsigned LINK_DEPTH = 16,
  localparam int unsigned AW        = $clog2(WORDS),
  localparam int unsigned NPE       = PES_PER_FPGA * N_FPGA
) (
  input  logic             clk,
  input  logic             rst,
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
  input  logic             h_a_en     [N_FPGA],
  input  logic             h_a_we     [N_FPGA],
  input  logic [AW-1:0]    h_a_addr   [N_FPGA],
  input  logic [DW-1:0]    h_a_wdata  [N_FPGA],
  output logic [DW-1:0]    h_a_rdata  [N_FPGA],
  output logic             h_fsl1_valid [N_FPGA],
  input  logic             h_fsl1_ready [N_FPGA],
  output lword_t           h_fsl1_data  [N_FPGA],
  input  logic             h_fsl2_valid [N_FPGA],
  output logic             h_fsl2_ready [N_FPGA],
  input  lword_t           h_fsl2_data  [N_FPGA],
  input  logic             h_fsl3_valid [N_FPGA],
  output logic             h_fsl3_ready [N_FPGA],
  input  lword_t           h_fsl3_data  [N_FPGA],
  output logic             h_fsl4_valid [N_FPGA],
  input  logic             h_fsl4_ready [N_FPGA],
  output lword_t           h_fsl4_data  [N_FPGA],
  output node_ev_t         h_ev         [N_FPGA],
  output logic [NPORT-1:0] ev_contend   [N_FPGA],
  output logic [1:0]       ev_no_credit [N_FPGA]
);
  // ring wires, indexed by the sending FPGA
  logic   cw_v [N_FPGA], cw_cr [N_FPGA], ccw_v [N_FPGA], ccw_cr [N_FPGA];
  lword_t cw_d [N_FPGA], ccw_d [N_FPGA];

  for (genvar f = 0; f < N_FPGA; f++) begin : g_fpga
    localparam int unsigned NXT = (f + 1) % N_FPGA;
    localparam int unsigned PRV = (f + N_FPGA - 1) % N_FPGA;
    gas_fpga #(.FPGA_ID(f), .N_FPGA(N_FPGA), .WORDS(WORDS), .NCTRL(NCTRL),
               .IMEM_WORDS(IMEM_WORDS), .FSL_DEPTH(FSL_DEPTH), .LINK_DEPTH(LINK_DEPTH)) u_fpga (
      .clk, .rst,
      // the clockwise controller faces NXT's counter-clockwise one
      .cw_tx_valid(cw_v[f]), .cw_tx_data(cw_d[f]), .cw_tx_credit(ccw_cr[NXT]),
      .cw_rx_valid(ccw_v[NXT]), .cw_rx_data(ccw_d[NXT]), .cw_rx_credit(cw_cr[f]),
      .ccw_tx_valid(ccw_v[f]), .ccw_tx_data(ccw_d[f]), .ccw_tx_credit(cw_cr[PRV]),
      .ccw_rx_valid(cw_v[PRV]), .ccw_rx_data(cw_d[PRV]), .ccw_rx_credit(ccw_cr[f]),
      .pe_a_en(pe_a_en[f*PES_PER_FPGA +: PES_PER_FPGA]),
      .pe_a_we(pe_a_we[f*PES_PER_FPGA +: PES_PER_FPGA]),
      .pe_a_addr(pe_a_addr[f*PES_PER_FPGA +: PES_PER_FPGA]),
      .pe_a_wdata(pe_a_wdata[f*PES_PER_FPGA +: PES_PER_FPGA]),
      .pe_a_rdata(pe_a_rdata[f*PES_PER_FPGA +: PES_PER_FPGA]),
      .pe_ctrl_in(pe_ctrl_in[f*PES_PER_FPGA +: PES_PER_FPGA]),
      .pe_ctrl_out(pe_ctrl_out[f*PES_PER_FPGA +: PES_PER_FPGA]),
      .pe_timer(pe_timer[f*PES_PER_FPGA +: PES_PER_FPGA]),
      .pe_arrival(pe_arrival[f*PES_PER_FPGA +: PES_PER_FPGA]),
      .pe_running(pe_running[f*PES_PER_FPGA +: PES_PER_FPGA]),
      .pe_ev(pe_ev[f*PES_PER_FPGA +: PES_PER_FPGA]),
      .h_a_en(h_a_en[f]), .h_a_we(h_a_we[f]), .h_a_addr(h_a_addr[f]),
      .h_a_wdata(h_a_wdata[f]), .h_a_rdata(h_a_rdata[f]),
      .h_fsl1_valid(h_fsl1_valid[f]), .h_fsl1_ready(h_fsl1_ready[f]), .h_fsl1_data(h_fsl1_data[f]),
      .h_fsl2_valid(h_fsl2_valid[f]), .h_fsl2_ready(h_fsl2_ready[f]), .h_fsl2_data(h_fsl2_data[f]),
      .h_fsl3_valid(h_fsl3_valid[f]), .h_fsl3_ready(h_fsl3_ready[f]), .h_fsl3_data(h_fsl3_data[f]),
      .h_fsl4_valid(h_fsl4_valid[f]), .h_fsl4_ready(h_fsl4_ready[f]), .h_fsl4_data(h_fsl4_data[f]),
      .h_ev(h_ev[f]),
      .ev_contend(ev_contend[f]), .ev_no_credit(ev_no_credit[f])
    );
  end
endmodule
