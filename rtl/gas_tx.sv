// gas_tx: the GAScore transmit unit.
//
// Reads Active Message requests from FSL 3. A request header names either a
// destination node or, for a reply, the token of the message being answered;
// the token is looked up in the token buffer to find the node to reply to. A
// long request carries a local source address, a remote destination address
// and a word count; its payload is read from local memory through the memory
// arbiter, keeping up to three words read ahead so that an uncontended port delivers
// one word per cycle. The packet sent to the NetIf is: header (destination,
// own node as source), for long messages the remote address, the count and
// the payload, then the handler arguments copied from FSL 3. Bit 32 marks the
// packet's last word. When the last word has left, the request header is
// echoed on FSL 4 as completion: the payload has been read and its memory may
// be reused. ev_reply pulses for each reply, ev_done for each completion.
module gas_tx
  import gas_pkg::*;
#(
  parameter logic [7:0]  NODE_ID = 8'd0,
  parameter int unsigned AW      = 14
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          fsl3_valid,
  output logic          fsl3_ready,
  input  lword_t        fsl3_data,
  output logic          fsl4_valid,
  input  logic          fsl4_ready,
  output lword_t        fsl4_data,
  output logic [7:0]    lk_tok,
  input  logic [7:0]    lk_node,
  output logic          rd_req,
  output logic [AW-1:0] rd_addr,
  input  logic          rd_gnt,
  input  logic          rd_valid,
  input  logic [DW-1:0] rd_data,
  output logic          net_valid,
  input  logic          net_ready,
  output lword_t        net_data,
  output logic          ev_reply,
  output logic          ev_done
);
  typedef enum logic [3:0] {T_HDR, T_SRC, T_DST, T_LEN, T_NHDR, T_NADDR, T_NLEN,
                            T_PAY, T_ARGS, T_DONE} state_e;
  state_e      st;
  am_hdr_t     req, in_hdr, net_hdr;
  logic [7:0]  dst;
  logic [31:0] dst_addr, len, issued, sent;
  logic [AW-1:0] rptr;
  logic [3:0]  args_left;
  // four-entry payload buffer (at most three words held or in flight)
  logic [DW-1:0] pb [4];
  logic [1:0]    pb_wp, pb_rp;
  logic [2:0]    pb_cnt;
  logic          inflight;
  logic          pop;

  assign in_hdr = am_hdr_t'(fsl3_data[DW-1:0]);
  assign lk_tok = in_hdr.node;
  assign rd_addr = rptr;

  always_comb begin
    net_hdr       = req;
    net_hdr.node  = dst;
    net_hdr.src   = NODE_ID;
  end

  always_comb begin
    fsl3_ready = 1'b0;
    net_valid  = 1'b0;
    net_data   = '0;
    fsl4_valid = 1'b0;
    fsl4_data  = {1'b1, req};
    rd_req     = 1'b0;
    pop        = 1'b0;
    unique case (st)
      T_HDR, T_SRC, T_DST, T_LEN: fsl3_ready = 1'b1;
      T_NHDR: begin
        net_valid = 1'b1;
        net_data  = {!req.is_long && req.nargs == '0, net_hdr};
      end
      T_NADDR: begin
        net_valid = 1'b1;
        net_data  = {1'b0, dst_addr};
      end
      T_NLEN: begin
        net_valid = 1'b1;
        net_data  = {len == '0 && req.nargs == '0, len};
      end
      T_PAY: begin
        rd_req    = (issued != len) && (pb_cnt + {2'b0, inflight} < 3'd3);
        net_valid = (pb_cnt != '0);
        net_data  = {sent == len - 1 && req.nargs == '0, pb[pb_rp]};
        pop       = net_valid && net_ready;
      end
      T_ARGS: begin
        net_valid  = fsl3_valid;
        net_data   = {args_left == 4'd1, fsl3_data[DW-1:0]};
        fsl3_ready = net_ready;
      end
      T_DONE: fsl4_valid = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= T_HDR;
      req <= '0; dst <= '0; dst_addr <= '0; len <= '0; issued <= '0; sent <= '0;
      rptr <= '0; args_left <= '0; pb_wp <= '0; pb_rp <= '0; pb_cnt <= '0;
      inflight <= 1'b0; ev_reply <= 1'b0; ev_done <= 1'b0;
      for (int i = 0; i < 4; i++) pb[i] <= '0;
    end else begin
      ev_reply <= 1'b0;
      ev_done  <= 1'b0;
      // payload buffer bookkeeping
      inflight <= rd_req && rd_gnt;
      if (rd_req && rd_gnt) begin
        rptr   <= rptr + 1'b1;
        issued <= issued + 1;
      end
      if (rd_valid && inflight) begin
        pb[pb_wp] <= rd_data;
        pb_wp     <= pb_wp + 1'b1;
      end
      if (pop) begin
        pb_rp <= pb_rp + 1'b1;
        sent  <= sent + 1;
      end
      pb_cnt <= pb_cnt + 3'(rd_valid && inflight) - 3'(pop);

      unique case (st)
        T_HDR: if (fsl3_valid) begin
          req       <= in_hdr;
          dst       <= in_hdr.reply ? lk_node : in_hdr.node;
          ev_reply  <= in_hdr.reply;
          args_left <= in_hdr.nargs;
          len       <= '0;
          issued    <= '0;
          sent      <= '0;
          st        <= in_hdr.is_long ? T_SRC : T_NHDR;
        end
        T_SRC: if (fsl3_valid) begin rptr <= fsl3_data[AW-1:0]; st <= T_DST; end
        T_DST: if (fsl3_valid) begin dst_addr <= fsl3_data[DW-1:0]; st <= T_LEN; end
        T_LEN: if (fsl3_valid) begin len <= fsl3_data[DW-1:0]; st <= T_NHDR; end
        T_NHDR: if (net_ready)
          st <= req.is_long ? T_NADDR : ((req.nargs == '0) ? T_DONE : T_ARGS);
        T_NADDR: if (net_ready) st <= T_NLEN;
        T_NLEN: if (net_ready)
          st <= (len != '0) ? T_PAY : ((req.nargs == '0) ? T_DONE : T_ARGS);
        T_PAY: if (pop && sent == len - 1)
          st <= (req.nargs == '0) ? T_DONE : T_ARGS;
        T_ARGS: if (fsl3_valid && net_ready) begin
          args_left <= args_left - 1'b1;
          if (args_left == 4'd1) st <= T_DONE;
        end
        T_DONE: if (fsl4_ready) begin
          ev_done <= 1'b1;
          st      <= T_HDR;
        end
        default: st <= T_HDR;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst)
                   (st == T_HDR && fsl3_valid) |-> fsl3_data[DW])
    else $error("gas_tx: request does not start with a header word");
endmodule
