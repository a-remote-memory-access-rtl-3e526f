// netif: one router of the fully connected on-chip network.
//
// Every GAScore and every off-chip controller on an FPGA owns one NetIf, and
// each NetIf has a link to every other one (NPORT links; the link with its
// own index is a loopback). Packets are 33-bit words with bit 32 marking the
// last word; the first word is the Active Message header with the destination
// node in bits [31:24].
//  * Local input: the header's destination selects the outgoing link
//    (gas_pkg::route_port: a node on this FPGA, or the off-chip controller of
//    the shorter ring direction). The packet then streams through cut-through,
//    word for word, until its last word.
//  * Local output: packets arriving on all links are merged round-robin; a
//    granted link keeps the output until its packet's last word.
// There is no buffering inside: the links between NetIfs carry FIFOs.
// ev_contend pulses when a new packet must be chosen among several links.
module netif
  import gas_pkg::*;
#(
  parameter int unsigned NP      = 7,
  parameter int unsigned MY_FPGA = 0,
  parameter int unsigned N_FPGA  = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          loc_in_valid,
  output logic          loc_in_ready,
  input  lword_t        loc_in_data,
  output logic          loc_out_valid,
  input  logic          loc_out_ready,
  output lword_t        loc_out_data,
  output logic [NP-1:0] lnk_out_valid,
  input  logic [NP-1:0] lnk_out_ready,
  output lword_t        lnk_out_data [NP],
  input  logic [NP-1:0] lnk_in_valid,
  output logic [NP-1:0] lnk_in_ready,
  input  lword_t        lnk_in_data [NP],
  output logic          ev_contend
);
  localparam int unsigned PW = $clog2(NP);

  // ---------------- local input -> one link ----------------
  logic          in_busy;
  logic [PW-1:0] in_sel, in_route, in_port;

  assign in_route = PW'(route_port(loc_in_data[31:24], MY_FPGA, N_FPGA));
  assign in_port  = in_busy ? in_sel : in_route;

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      lnk_out_valid[p] = loc_in_valid && (in_port == PW'(p));
      lnk_out_data[p]  = loc_in_data;
    end
    loc_in_ready = lnk_out_ready[in_port];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_busy <= 1'b0;
      in_sel  <= '0;
    end else if (loc_in_valid && loc_in_ready) begin
      if (!in_busy) in_sel <= in_route;
      in_busy <= !loc_in_data[DW];
    end
  end

  // ---------------- links -> local output ----------------
  logic          out_busy;
  logic [PW-1:0] out_sel, rr_next, pick, out_port;
  logic          any;

  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int k = NP-1; k >= 0; k--) begin
      int unsigned idx;
      idx = (32'(rr_next) + 32'(k)) % NP;
      if (lnk_in_valid[idx]) begin
        any  = 1'b1;
        pick = PW'(idx);
      end
    end
  end

  assign out_port      = out_busy ? out_sel : pick;
  assign loc_out_valid = out_busy ? lnk_in_valid[out_sel] : any;
  assign loc_out_data  = lnk_in_data[out_port];

  always_comb begin
    lnk_in_ready = '0;
    lnk_in_ready[out_port] = loc_out_ready && (out_busy || any);
  end

  assign ev_contend = !out_busy && ($countones(lnk_in_valid) > 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_busy <= 1'b0;
      out_sel  <= '0;
      rr_next  <= '0;
    end else if (loc_out_valid && loc_out_ready) begin
      if (!out_busy) begin
        out_sel <= pick;
        rr_next <= (pick == PW'(NP-1)) ? '0 : pick + 1'b1;
      end
      out_busy <= !loc_out_data[DW];
    end
  end
endmodule
