// gas_rx: the GAScore receive unit.
//
// Takes Active Message packets from the NetIf (33-bit words, bit 32 marks the
// last word). For every message it first stores the source node in the token
// buffer and receives a token in exchange. A short message is then forwarded
// cut-through: the handler call header (with the token in place of any node)
// goes out on FSL 1 and the arguments follow word by word as they arrive. A
// long message carries a destination address, a word count and the payload
// ahead of its arguments; the payload is written to local memory through the
// memory arbiter, and only after its last word has been written does the
// handler call (header, address, count, arguments) go out on FSL 1. On FSL 1
// bit 32 marks the header word. A word moves on each valid/ready handshake,
// so a short message's header reaches FSL 1 two cycles after it arrived.
// ev_short / ev_long pulse once per message when its handler call starts.
// The token exchange, payload-before-call ordering for long messages and
// cut-through for short ones are the reference design's; the packet layout
// and handshake are this design's own.
module gas_rx
  import gas_pkg::*;
#(
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          net_valid,
  output logic          net_ready,
  input  lword_t        net_data,
  output logic          fsl1_valid,
  input  logic          fsl1_ready,
  output lword_t        fsl1_data,
  output logic          tok_req,
  output logic [7:0]    tok_node,
  input  logic          tok_gnt,
  input  logic [7:0]    tok,
  output logic          wr_req,
  output logic [AW-1:0] wr_addr,
  output logic [DW-1:0] wr_data,
  input  logic          wr_gnt,
  output logic          ev_short,
  output logic          ev_long
);
  typedef enum logic [2:0] {S_HDR, S_ADDR, S_LEN, S_PAY, S_CALL, S_CADDR, S_CLEN, S_ARGS} state_e;
  state_e      st;
  am_hdr_t     hdr, in_hdr;
  logic [31:0] base_addr, len;
  logic [AW-1:0] ptr;
  logic [31:0] remain;
  logic [3:0]  args_left;

  assign in_hdr   = am_hdr_t'(net_data[DW-1:0]);
  assign tok_node = in_hdr.src;
  assign wr_addr  = ptr;
  assign wr_data  = net_data[DW-1:0];

  always_comb begin
    net_ready  = 1'b0;
    fsl1_valid = 1'b0;
    fsl1_data  = '0;
    tok_req    = 1'b0;
    wr_req     = 1'b0;
    unique case (st)
      S_HDR: begin
        tok_req   = net_valid;
        net_ready = tok_gnt;
      end
      S_ADDR, S_LEN: net_ready = 1'b1;
      S_PAY: begin
        wr_req    = net_valid;
        net_ready = wr_gnt;
      end
      S_CALL: begin
        fsl1_valid = 1'b1;
        fsl1_data  = {1'b1, hdr};
      end
      S_CADDR: begin
        fsl1_valid = 1'b1;
        fsl1_data  = {1'b0, base_addr};
      end
      S_CLEN: begin
        fsl1_valid = 1'b1;
        fsl1_data  = {1'b0, len};
      end
      S_ARGS: begin
        fsl1_valid = net_valid;
        fsl1_data  = {1'b0, net_data[DW-1:0]};
        net_ready  = fsl1_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_HDR;
      hdr <= '0; base_addr <= '0; len <= '0; ptr <= '0; remain <= '0; args_left <= '0;
      ev_short <= 1'b0; ev_long <= 1'b0;
    end else begin
      ev_short <= 1'b0;
      ev_long  <= 1'b0;
      unique case (st)
        S_HDR: if (net_valid && tok_gnt) begin
          hdr       <= in_hdr;
          hdr.node  <= tok;
          hdr.src   <= '0;
          args_left <= in_hdr.nargs;
          st        <= in_hdr.is_long ? S_ADDR : S_CALL;
        end
        S_ADDR: if (net_valid) begin
          base_addr <= net_data[DW-1:0];
          ptr       <= net_data[AW-1:0];
          st        <= S_LEN;
        end
        S_LEN: if (net_valid) begin
          len    <= net_data[DW-1:0];
          remain <= net_data[DW-1:0];
          st     <= (net_data[DW-1:0] == '0) ? S_CALL : S_PAY;
        end
        S_PAY: if (net_valid && wr_gnt) begin
          ptr    <= ptr + 1'b1;
          remain <= remain - 1;
          if (remain == 32'd1) st <= S_CALL;
        end
        S_CALL: if (fsl1_ready) begin
          ev_short <= !hdr.is_long;
          ev_long  <= hdr.is_long;
          st <= hdr.is_long ? S_CADDR : ((hdr.nargs == '0) ? S_HDR : S_ARGS);
        end
        S_CADDR: if (fsl1_ready) st <= S_CLEN;
        S_CLEN:  if (fsl1_ready) st <= (hdr.nargs == '0) ? S_HDR : S_ARGS;
        S_ARGS: if (net_valid && fsl1_ready) begin
          args_left <= args_left - 1'b1;
          if (args_left == 4'd1) st <= S_HDR;
        end
        default: st <= S_HDR;
      endcase
    end
  end

  // The word that ends a packet must be the last word this unit expects.
  assert property (@(posedge clk) disable iff (rst)
                   (st == S_ARGS && net_valid && fsl1_ready) |-> (net_data[DW] == (args_left == 4'd1)))
    else $error("gas_rx: packet framing error");
endmodule
