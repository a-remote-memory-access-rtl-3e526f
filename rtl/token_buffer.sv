// token_buffer: remembers the source node of every Active Message a node has
// received, so that a handler can reply without ever learning that node.
//
// The receive unit asks for a token (alloc_req with alloc_node); in the same
// cycle alloc_gnt returns the lowest free entry as alloc_tok, and the entry is
// stored on the clock edge. While every entry is taken alloc_gnt stays low and
// the receive unit waits. The transmit unit looks a token up combinationally
// (lk_tok -> lk_node) when it sends a reply. The computing element hands a
// token back over FSL 2 (token in bits [7:0]); the buffer always accepts it and
// frees the entry. The three ports are independent, so no locking is needed.
// The token buffer's role and its lock-free use are the reference design's;
// the size (16), lowest-free allocation and the FSL 2 word format are this
// design's own.
module token_buffer
  import gas_pkg::*;
#(
  parameter int unsigned NTOK = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         alloc_req,
  input  logic [7:0]   alloc_node,
  output logic         alloc_gnt,
  output logic [7:0]   alloc_tok,
  input  logic [7:0]   lk_tok,
  output logic [7:0]   lk_node,
  input  logic         fsl2_valid,
  output logic         fsl2_ready,
  input  lword_t       fsl2_data,
  output logic [$clog2(NTOK):0] free_cnt
);
  logic [NTOK-1:0] used;
  logic [7:0]      node_of [NTOK];
  logic            found;
  logic [7:0]      free_tok;

  always_comb begin
    found = 1'b0;
    free_tok = '0;
    for (int i = NTOK-1; i >= 0; i--) begin
      if (!used[i]) begin
        found = 1'b1;
        free_tok = 8'(i);
      end
    end
  end

  assign alloc_gnt  = alloc_req && found;
  assign alloc_tok  = free_tok;
  assign lk_node    = node_of[lk_tok[$clog2(NTOK)-1:0]];
  assign fsl2_ready = 1'b1;

  always_comb begin
    free_cnt = '0;
    for (int i = 0; i < NTOK; i++) free_cnt += ($clog2(NTOK)+1)'(!used[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      used <= '0;
      for (int i = 0; i < NTOK; i++) node_of[i] <= '0;
    end else begin
      if (fsl2_valid) used[fsl2_data[$clog2(NTOK)-1:0]] <= 1'b0;
      if (alloc_gnt) begin
        used[free_tok[$clog2(NTOK)-1:0]]    <= 1'b1;
        node_of[free_tok[$clog2(NTOK)-1:0]] <= alloc_node;
      end
    end
  end

  // A token must be in use when it is returned or looked up for a reply.
  assert property (@(posedge clk) disable iff (rst)
                   fsl2_valid |-> used[fsl2_data[$clog2(NTOK)-1:0]])
    else $error("token_buffer: returned token %0d was not in use", fsl2_data[7:0]);
endmodule
