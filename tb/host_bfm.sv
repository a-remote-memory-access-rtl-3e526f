// host_bfm: test model of an embedded processor on the four FSLs of a
// GAScore (processor side). It offers tasks to request short and long Active
// Messages, records every handler call it receives (handler, token, address,
// word count, first arguments, cycle of arrival), returns each call's token
// on FSL 2 as soon as the call has been read, and counts completions on
// FSL 4. Setting hold_tokens keeps the tokens back until it is cleared
// again, as a slow handler would. It has no logic of the design in it.
// Its message formats are this design's own (see gas_pkg); the behaviour it
// stands in for is the embedded processor of the reference system.
module host_bfm
  import gas_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   fsl1_valid,
  output logic   fsl1_ready,
  input  lword_t fsl1_data,
  output logic   fsl2_valid,
  input  logic   fsl2_ready,
  output lword_t fsl2_data,
  output logic   fsl3_valid,
  input  logic   fsl3_ready,
  output lword_t fsl3_data,
  input  logic   fsl4_valid,
  output logic   fsl4_ready,
  input  lword_t fsl4_data
);
  typedef struct {
    logic [7:0]  handler;
    logic [7:0]  token;
    bit          is_long;
    logic [31:0] addr, len;
    logic [31:0] args[4];
    int          nargs;
    longint      cyc;
  } call_t;

  call_t  calls[$];
  lword_t f3_q[$];
  logic [7:0] tok_q[$];
  int     n_done = 0;
  bit     hold_tokens = 0;
  longint cyc = 0;

  always @(posedge clk) cyc++;

  // FSL 3 and FSL 2 drivers
  always @(negedge clk) begin
    fsl3_valid <= f3_q.size() > 0;
    fsl3_data  <= f3_q.size() > 0 ? f3_q[0] : '0;
    fsl2_valid <= !hold_tokens && tok_q.size() > 0;
    fsl2_data  <= tok_q.size() > 0 ? {25'd0, tok_q[0]} : '0;
  end
  assign fsl1_ready = 1'b1;
  assign fsl4_ready = 1'b1;

  // handler-call parser
  int     widx = 0;
  call_t  cur;
  always @(posedge clk) if (rst) begin
    widx = 0;
  end else begin
    if (fsl3_valid && fsl3_ready) void'(f3_q.pop_front());
    if (fsl2_valid && fsl2_ready) void'(tok_q.pop_front());
    if (fsl4_valid) n_done++;
    if (fsl1_valid) begin
      if (widx == 0) begin
        cur.handler = fsl1_data[15:8];
        cur.token   = fsl1_data[31:24];
        cur.is_long = fsl1_data[2];
        cur.nargs   = int'(fsl1_data[7:4]);
        cur.cyc     = cyc;
        cur.addr = 0; cur.len = 0;
      end else if (cur.is_long && widx == 1) cur.addr = fsl1_data[31:0];
      else if (cur.is_long && widx == 2) cur.len = fsl1_data[31:0];
      else begin
        int ai; ai = widx - (cur.is_long ? 3 : 1);
        if (ai < 4) cur.args[ai] = fsl1_data[31:0];
      end
      widx++;
      if (widx == 1 + (cur.is_long ? 2 : 0) + cur.nargs) begin
        calls.push_back(cur);
        tok_q.push_back(cur.token);
        widx = 0;
      end
    end
  end

  function automatic lword_t hdr(logic [7:0] node, logic [7:0] h, int nargs, bit lng);
    am_hdr_t x;
    x = '0; x.node = node; x.handler = h; x.nargs = 4'(nargs); x.is_long = lng;
    return {1'b1, x};
  endfunction

  task automatic am_short(logic [7:0] dst, logic [7:0] h, logic [31:0] a[]);
    f3_q.push_back(hdr(dst, h, a.size(), 0));
    foreach (a[i]) f3_q.push_back({1'b0, a[i]});
  endtask

  task automatic am_long(logic [7:0] dst, logic [7:0] h, int src, int daddr, int len,
                         logic [31:0] a[]);
    f3_q.push_back(hdr(dst, h, a.size(), 1));
    f3_q.push_back({1'b0, 32'(src)});
    f3_q.push_back({1'b0, 32'(daddr)});
    f3_q.push_back({1'b0, 32'(len)});
    foreach (a[i]) f3_q.push_back({1'b0, a[i]});
  endtask

  // ---- sequencer program helpers (encoding in gas_pkg::pams_op_e) ----
  function automatic logic [31:0] i_msgctr(int k, logic [7:0] h, int thr);
    return {OP_MSGCTR, 2'b0, 2'(k), h, 16'(thr)};
  endfunction
  function automatic logic [31:0] i_xferctr(int k, logic [7:0] h, int thr);
    return {OP_XFERCTR, 2'b0, 2'(k), h, 16'(thr)};
  endfunction
  function automatic logic [31:0] i_ctrl(logic [7:0] v);
    return {OP_CTRL, 20'd0, v};
  endfunction
  function automatic logic [31:0] i_wait(bit tmr, logic [3:0] msg, logic [3:0] xfer,
                                         logic [3:0] in_mask, logic [3:0] in_val);
    return {OP_WAIT, 11'd0, tmr, msg, xfer, in_mask, in_val};
  endfunction
  function automatic logic [31:0] i_send(logic [7:0] dst, logic [7:0] h, int ncode,
                                         bit lng, bit add_timer, bit add_arrival);
    return {OP_SEND, dst, h, 4'(ncode), lng, add_timer, add_arrival, 5'd0};
  endfunction
  localparam logic [31:0] I_TIMER_THR = {OP_TIMER_THR, 28'd0};
  localparam logic [31:0] I_TIMER_OFS = {OP_TIMER_OFS, 28'd0};
  localparam logic [31:0] I_HALT      = {OP_HALT, 28'd0};

  // Load a program into a node's sequencer (H_PROG messages of up to 14
  // instruction words) and optionally start it at address 0.
  task automatic load_program(logic [7:0] node, logic [31:0] prog[$], bit start);
    logic [31:0] a[];
    int base;
    base = 0;
    while (base < prog.size()) begin
      int n;
      n = prog.size() - base;
      if (n > 14) n = 14;
      a = new[n + 1];
      a[0] = 32'(base);
      for (int i = 0; i < n; i++) a[1 + i] = prog[base + i];
      am_short(node, H_PROG, a);
      base += n;
    end
    if (start) begin
      a = new[1]; a[0] = 0;
      am_short(node, H_START, a);
    end
  endtask

  function automatic int count(logic [7:0] h);
    int n; n = 0;
    foreach (calls[i]) if (calls[i].handler == h) n++;
    return n;
  endfunction

  function automatic int find_last(logic [7:0] h);
    for (int i = calls.size() - 1; i >= 0; i--) if (calls[i].handler == h) return i;
    return -1;
  endfunction
endmodule
