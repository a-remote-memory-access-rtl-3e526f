// occc: Off-Chip Communication Controller, the bridge between a NetIf and
// one direction of the inter-FPGA ring.
//
// Transmit: packets from the NetIf (33-bit words, bit 32 = last) are sent
// off-chip one word per cycle, but only while the controller holds a credit;
// it starts with RX_DEPTH credits, one per free word of the far end's receive
// buffer, spends one per word and gets one back for every word the far end
// has passed on. Receive: incoming words go into a RX_DEPTH-word buffer and
// from there to the Netif; each word leaving the buffer returns a credit.
// All off-chip outputs pass PAD_STAGES register stages, as I/O pads would, so
// a word reaches the far controller's buffer PAD_STAGES+1 cycles after it left
// this one. Credit flow control is this design's choice: a combinational
// ready cannot cross chip boundaries.
module occc
  import gas_pkg::*;
#(
  parameter int unsigned RX_DEPTH   = 16,
  parameter int unsigned PAD_STAGES = 2
) (
  input  logic   clk,
  input  logic   rst,
  // NetIf side
  input  logic   loc_in_valid,
  output logic   loc_in_ready,
  input  lword_t loc_in_data,
  output logic   loc_out_valid,
  input  logic   loc_out_ready,
  output lword_t loc_out_data,
  // off-chip side
  output logic   tx_valid,
  output lword_t tx_data,
  input  logic   tx_credit,
  input  logic   rx_valid,
  input  lword_t rx_data,
  output logic   rx_credit,
  output logic   ev_no_credit
);
  localparam int unsigned CW = $clog2(RX_DEPTH) + 1;

  logic [CW-1:0] credits;
  logic          send;

  assign send         = loc_in_valid && (credits != '0);
  assign loc_in_ready = (credits != '0);
  assign ev_no_credit = loc_in_valid && (credits == '0);

  always_ff @(posedge clk) begin
    if (rst) credits <= CW'(RX_DEPTH);
    else     credits <= credits - CW'(send) + CW'(tx_credit);
  end

  // output pad registers
  logic   pv [PAD_STAGES+1];
  lword_t pd [PAD_STAGES+1];
  logic   pc [PAD_STAGES+1];
  logic   rx_pop;

  always_comb begin
    pv[0] = send;
    pd[0] = loc_in_data;
    pc[0] = rx_pop;
  end

  for (genvar s = 1; s <= PAD_STAGES; s++) begin : g_pad
    always_ff @(posedge clk) begin
      if (rst) begin
        pv[s] <= 1'b0;
        pc[s] <= 1'b0;
        pd[s] <= '0;
      end else begin
        pv[s] <= pv[s-1];
        pc[s] <= pc[s-1];
        pd[s] <= pd[s-1];
      end
    end
  end

  assign tx_valid  = pv[PAD_STAGES];
  assign tx_data   = pd[PAD_STAGES];
  assign rx_credit = pc[PAD_STAGES];

  // receive buffer
  logic rx_ready;
  logic [$clog2(RX_DEPTH):0] rx_count;
  fsl_fifo #(.WIDTH(LW), .DEPTH(RX_DEPTH)) u_rx (
    .clk, .rst,
    .s_valid(rx_valid), .s_ready(rx_ready), .s_data(rx_data),
    .m_valid(loc_out_valid), .m_ready(loc_out_ready), .m_data(loc_out_data),
    .count(rx_count)
  );
  assign rx_pop = loc_out_valid && loc_out_ready;

  assert property (@(posedge clk) disable iff (rst) rx_valid |-> rx_ready)
    else $error("occc: receive buffer overflow, credit protocol violated");
endmodule
