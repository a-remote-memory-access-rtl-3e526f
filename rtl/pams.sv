// pams: Programmable Active Message Sequencer.
//
// A small controller that drives a GAScore on behalf of a custom hardware
// core, so the core itself needs no messaging logic. It sits on the
// computing-element side of the four FSLs and contains:
//  * an instruction RAM (IMEM_WORDS x 32) loaded through Active Messages:
//    handler H_PROG writes arguments 1.. into the RAM starting at the address
//    in argument 0, handler H_START starts the program at argument 0;
//  * NMSGCTR message counters, each counting handler calls with one handler
//    code against a threshold, and NXFERCTR transfer counters counting the
//    words that long messages with one handler code wrote into memory;
//  * a 32-bit timer with a threshold, which a program can shift by an offset;
//  * the ArrivalTime register, loaded with the timer whenever a handler call
//    arrives, except for H_POLL calls, which are answered with a reply
//    (handler H_POLL_REPLY) carrying ArrivalTime;
//  * a remote-read responder: an H_GET call (args: local address, requester
//    address, word count, reply handler) is answered with a long reply;
//  * NCTRL control outputs to and inputs from the custom core.
// Every handler call's token is returned over FSL 2; for calls answered with
// a reply only after that reply's completion arrived on FSL 4.
//
// Program instructions (bits [31:28], see gas_pkg::pams_op_e): HALT,
// TIMER_THR and TIMER_OFS (operand in the next word), MSGCTR and XFERCTR
// (counter, handler, threshold; clears the count), CTRL (set outputs), WAIT
// (timer, counters and input pattern, all selected conditions must hold at
// once) and SEND (request an Active Message to a node with arguments from
// code, the timer and ArrivalTime; long sends take local address, remote
// address and word count from the next three words). The instruction RAM is
// read synchronously, so each fetched word costs two cycles.
// The instruction set and its encoding are this design's own; the features
// they control are the ones the sequencer is specified to have.
module pams
  import gas_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 512,
  parameter int unsigned NCTRL      = 4,
  parameter int unsigned NMSGCTR    = 4,
  parameter int unsigned NXFERCTR   = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             fsl1_valid,
  output logic             fsl1_ready,
  input  lword_t           fsl1_data,
  output logic             fsl2_valid,
  input  logic             fsl2_ready,
  output lword_t           fsl2_data,
  output logic             fsl3_valid,
  input  logic             fsl3_ready,
  output lword_t           fsl3_data,
  input  logic             fsl4_valid,
  output logic             fsl4_ready,
  input  lword_t           fsl4_data,
  input  logic [NCTRL-1:0] ctrl_in,
  output logic [NCTRL-1:0] ctrl_out,
  output logic [31:0]      timer,
  output logic [31:0]      arrival_time,
  output logic             running,
  output logic [NMSGCTR-1:0]  msg_done,
  output logic [NXFERCTR-1:0] xfer_done,
  output logic             ev_prog,    // an instruction word was loaded
  output logic             ev_reply,   // a reply was requested
  output logic             ev_send     // the program requested a message
);
  localparam int unsigned IAW = $clog2(IMEM_WORDS);

  // ---------------- counters, timer ----------------
  logic [7:0]  msg_h  [NMSGCTR];
  logic [15:0] msg_thr[NMSGCTR];
  logic [15:0] msg_cnt[NMSGCTR];
  logic [7:0]  xf_h   [NXFERCTR];
  logic [15:0] xf_thr [NXFERCTR];
  logic [31:0] xf_cnt [NXFERCTR];
  logic [31:0] timer_thr;

  always_comb begin
    for (int k = 0; k < NMSGCTR; k++)  msg_done[k]  = (msg_cnt[k] >= msg_thr[k]);
    for (int k = 0; k < NXFERCTR; k++) xfer_done[k] = (xf_cnt[k] >= 32'(xf_thr[k]));
  end

  // ---------------- instruction RAM ----------------
  logic [31:0]  imem [IMEM_WORDS];
  logic [31:0]  imem_q;
  logic [IAW-1:0] pc;
  logic         im_we;
  logic [IAW-1:0] im_waddr;
  logic [31:0]  im_wdata;

  always_ff @(posedge clk) begin
    if (im_we) imem[im_waddr] <= im_wdata;
    imem_q <= imem[pc];
  end

  // ---------------- handler-call side ----------------
  typedef enum logic [2:0] {R_HDR, R_ADDR, R_LEN, R_ARG, R_DISP, R_REPLY, R_TOKEN} rstate_e;
  rstate_e     rs;
  am_hdr_t     call, in_hdr;
  logic [3:0]  arg_i;
  logic [31:0] args [4];
  logic [IAW-1:0] prog_ptr;
  logic        start_req;
  logic [IAW-1:0] start_pc;

  assign in_hdr = am_hdr_t'(fsl1_data[DW-1:0]);

  // reply request to the FSL 3 writer
  logic        rpl_pend;     // reply waiting to be written
  logic        rpl_wait;     // reply written, waiting for its completion
  logic        rpl_long;
  logic [15:0] rpl_tag;
  logic [2:0]  rpl_idx;
  logic [15:0] sent_cnt, done_cnt;
  logic [15:0] rpl_age;    // completions seen since the reply, minus one
  assign rpl_age = done_cnt - rpl_tag - 16'd1;

  // ---------------- FSL 3 writer ownership ----------------
  typedef enum logic [1:0] {OW_NONE, OW_SEQ, OW_RPL} owner_e;
  owner_e owner;
  logic   seq_want, seq_release, rpl_release;

  // ---------------- sequencer ----------------
  typedef enum logic [3:0] {Q_IDLE, Q_F, Q_D, Q_OPF, Q_OPD, Q_WAIT, Q_SOWN, Q_SHDR,
                            Q_SWF, Q_SWD, Q_STIM, Q_SARR} qstate_e;
  qstate_e     qs;
  logic [31:0] ir;
  logic [4:0]  swords;   // instruction words still to copy into the request
  logic        wait_ok;
  int unsigned mk, xk;   // counter selected by a MSGCTR / XFERCTR instruction
  assign mk = 32'(imem_q[25:24]) % NMSGCTR;
  assign xk = 32'(imem_q[25:24]) % NXFERCTR;
  am_hdr_t     send_hdr;

  always_comb begin
    send_hdr         = '0;
    send_hdr.node    = ir[27:20];
    send_hdr.handler = ir[19:12];
    send_hdr.nargs   = ir[11:8] + 4'(ir[6]) + 4'(ir[5]);
    send_hdr.is_long = ir[7];
  end

  always_comb begin
    logic ok;
    ok = 1'b1;
    if (ir[16] && timer < timer_thr) ok = 1'b0;
    for (int k = 0; k < NMSGCTR && k < 4; k++)
      if (ir[12+k] && !msg_done[k]) ok = 1'b0;
    for (int k = 0; k < NXFERCTR && k < 4; k++)
      if (ir[8+k] && !xfer_done[k]) ok = 1'b0;
    for (int k = 0; k < NCTRL && k < 4; k++)
      if (ir[4+k] && (ctrl_in[k] != ir[k])) ok = 1'b0;
    wait_ok = ok;
  end

  assign running  = (qs != Q_IDLE);
  assign seq_want = (qs == Q_SOWN);

  // ---------------- FSL outputs ----------------
  am_hdr_t rpl_hdr;
  always_comb begin
    rpl_hdr         = '0;
    rpl_hdr.node    = call.node;                       // token
    rpl_hdr.reply   = 1'b1;
    rpl_hdr.is_long = rpl_long;
    rpl_hdr.handler = rpl_long ? args[3][7:0] : H_POLL_REPLY;
    rpl_hdr.nargs   = rpl_long ? 4'd0 : 4'd1;
  end

  always_comb begin
    fsl3_valid  = 1'b0;
    fsl3_data   = '0;
    seq_release = 1'b0;
    rpl_release = 1'b0;
    if (owner == OW_RPL) begin
      fsl3_valid = 1'b1;
      unique case (rpl_idx)
        3'd0: fsl3_data = {1'b1, rpl_hdr};
        3'd1: fsl3_data = {1'b0, rpl_long ? args[0] : arrival_time};
        3'd2: fsl3_data = {1'b0, args[1]};
        default: fsl3_data = {1'b0, args[2]};
      endcase
      rpl_release = fsl3_ready && (rpl_long ? rpl_idx == 3'd3 : rpl_idx == 3'd1);
    end else if (owner == OW_SEQ) begin
      unique case (qs)
        Q_SHDR: begin fsl3_valid = 1'b1; fsl3_data = {1'b1, send_hdr}; end
        Q_SWD:  begin fsl3_valid = 1'b1; fsl3_data = {1'b0, imem_q}; end
        Q_STIM: begin fsl3_valid = 1'b1; fsl3_data = {1'b0, timer}; end
        Q_SARR: begin fsl3_valid = 1'b1; fsl3_data = {1'b0, arrival_time}; end
        default: ;
      endcase
      seq_release = fsl3_ready &&
        ((qs == Q_SARR) ||
         (qs == Q_STIM && !ir[5]) ||
         (qs == Q_SWD && swords == 5'd1 && !ir[6] && !ir[5]) ||
         (qs == Q_SHDR && swords == 5'd0 && !ir[6] && !ir[5]));
    end
  end

  assign fsl1_ready = (rs == R_HDR) || (rs == R_ADDR) || (rs == R_LEN) || (rs == R_ARG);
  assign fsl2_valid = (rs == R_TOKEN);
  assign fsl2_data  = {1'b0, 24'd0, call.node};
  assign fsl4_ready = 1'b1;

  assign im_we    = (rs == R_ARG) && fsl1_valid && call.handler == H_PROG && arg_i != 4'd0;
  assign im_waddr = prog_ptr;
  assign im_wdata = fsl1_data[31:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      rs <= R_HDR; call <= '0; arg_i <= '0; prog_ptr <= '0;
      for (int i = 0; i < 4; i++) args[i] <= '0;
      start_req <= 1'b0; start_pc <= '0;
      rpl_pend <= 1'b0; rpl_wait <= 1'b0; rpl_long <= 1'b0; rpl_tag <= '0; rpl_idx <= '0;
      sent_cnt <= '0; done_cnt <= '0;
      owner <= OW_NONE;
      qs <= Q_IDLE; ir <= '0; swords <= '0; pc <= '0;
      timer <= '0; timer_thr <= '0; arrival_time <= '0; ctrl_out <= '0;
      for (int k = 0; k < NMSGCTR; k++) begin msg_h[k] <= '0; msg_thr[k] <= '0; msg_cnt[k] <= '0; end
      for (int k = 0; k < NXFERCTR; k++) begin xf_h[k] <= '0; xf_thr[k] <= '0; xf_cnt[k] <= '0; end
      ev_prog <= 1'b0; ev_reply <= 1'b0; ev_send <= 1'b0;
    end else begin
      ev_prog  <= im_we;
      ev_reply <= 1'b0;
      ev_send  <= 1'b0;
      start_req <= 1'b0;
      timer <= timer + 1;

      // completions and requests in flight
      if (fsl3_valid && fsl3_ready && fsl3_data[DW]) sent_cnt <= sent_cnt + 1;
      if (fsl4_valid) done_cnt <= done_cnt + 1;

      // ---- handler calls ----
      unique case (rs)
        R_HDR: if (fsl1_valid) begin
          call  <= in_hdr;
          arg_i <= '0;
          if (in_hdr.handler != H_POLL) arrival_time <= timer;
          for (int k = 0; k < NMSGCTR; k++)
            if (msg_h[k] == in_hdr.handler) msg_cnt[k] <= msg_cnt[k] + 1;
          rs <= in_hdr.is_long ? R_ADDR : (in_hdr.nargs != '0 ? R_ARG : R_DISP);
        end
        R_ADDR: if (fsl1_valid) rs <= R_LEN;
        R_LEN: if (fsl1_valid) begin
          for (int k = 0; k < NXFERCTR; k++)
            if (xf_h[k] == call.handler) xf_cnt[k] <= xf_cnt[k] + fsl1_data[31:0];
          rs <= (call.nargs != '0) ? R_ARG : R_DISP;
        end
        R_ARG: if (fsl1_valid) begin
          if (arg_i < 4'd4) args[arg_i[1:0]] <= fsl1_data[31:0];
          if (call.handler == H_PROG) begin
            if (arg_i == 4'd0) prog_ptr <= fsl1_data[IAW-1:0];
            else               prog_ptr <= prog_ptr + 1'b1;
          end
          arg_i <= arg_i + 1'b1;
          if (arg_i + 4'd1 == call.nargs) rs <= R_DISP;
        end
        R_DISP: begin
          if (call.handler == H_START) begin
            start_req <= 1'b1;
            start_pc  <= args[0][IAW-1:0];
            rs <= R_TOKEN;
          end else if (call.handler == H_POLL || call.handler == H_GET) begin
            rpl_pend <= 1'b1;
            rpl_long <= (call.handler == H_GET);
            rpl_idx  <= '0;
            ev_reply <= 1'b1;
            rs <= R_REPLY;
          end else begin
            rs <= R_TOKEN;
          end
        end
        R_REPLY: if (rpl_wait && !rpl_age[15]) begin
          // done_cnt has passed the reply's position: its completion arrived
          rpl_wait <= 1'b0;
          rs <= R_TOKEN;
        end
        R_TOKEN: if (fsl2_ready) rs <= R_HDR;
        default: rs <= R_HDR;
      endcase

      // ---- FSL 3 ownership and reply writer ----
      unique case (owner)
        OW_NONE: if (rpl_pend) owner <= OW_RPL;
                 else if (seq_want) owner <= OW_SEQ;
        OW_RPL: if (fsl3_ready) begin
          if (rpl_idx == 3'd0) rpl_tag <= sent_cnt;
          rpl_idx <= rpl_idx + 1'b1;
          if (rpl_release) begin
            owner    <= OW_NONE;
            rpl_pend <= 1'b0;
            rpl_wait <= 1'b1;
          end
        end
        OW_SEQ: if (seq_release) owner <= OW_NONE;
        default: owner <= OW_NONE;
      endcase

      // ---- sequencer ----
      unique case (qs)
        Q_IDLE: if (start_req) begin pc <= start_pc; qs <= Q_F; end
        Q_F: qs <= Q_D;                       // imem_q follows pc
        Q_D: begin
          ir <= imem_q;
          pc <= pc + 1'b1;
          unique case (pams_op_e'(imem_q[31:28]))
            OP_HALT: qs <= Q_IDLE;
            OP_TIMER_THR, OP_TIMER_OFS: qs <= Q_OPF;
            OP_MSGCTR: begin
              msg_h[mk]   <= imem_q[23:16];
              msg_thr[mk] <= imem_q[15:0];
              msg_cnt[mk] <= '0;
              qs <= Q_F;
            end
            OP_XFERCTR: begin
              xf_h[xk]   <= imem_q[23:16];
              xf_thr[xk] <= imem_q[15:0];
              xf_cnt[xk] <= '0;
              qs <= Q_F;
            end
            OP_CTRL: begin ctrl_out <= imem_q[NCTRL-1:0]; qs <= Q_F; end
            OP_WAIT: qs <= Q_WAIT;
            OP_SEND: begin
              swords <= 5'(imem_q[11:8]) + (imem_q[7] ? 5'd3 : 5'd0);
              qs <= Q_SOWN;
            end
            default: qs <= Q_IDLE;
          endcase
        end
        Q_OPF: qs <= Q_OPD;
        Q_OPD: begin
          pc <= pc + 1'b1;
          if (ir[31:28] == OP_TIMER_THR) timer_thr <= imem_q;
          else timer <= timer + 1 + imem_q;
          qs <= Q_F;
        end
        Q_WAIT: if (wait_ok) qs <= Q_F;
        Q_SOWN: if (owner == OW_NONE && !rpl_pend) qs <= Q_SHDR;
        Q_SHDR: if (owner == OW_SEQ && fsl3_ready) begin
          ev_send <= 1'b1;
          qs <= (swords != '0) ? Q_SWF : (ir[6] ? Q_STIM : (ir[5] ? Q_SARR : Q_F));
        end
        Q_SWF: qs <= Q_SWD;
        Q_SWD: if (fsl3_ready) begin
          pc     <= pc + 1'b1;
          swords <= swords - 1'b1;
          qs <= (swords != 5'd1) ? Q_SWF : (ir[6] ? Q_STIM : (ir[5] ? Q_SARR : Q_F));
        end
        Q_STIM: if (fsl3_ready) qs <= ir[5] ? Q_SARR : Q_F;
        Q_SARR: if (fsl3_ready) qs <= Q_F;
        default: qs <= Q_IDLE;
      endcase
    end
  end

  // The FSL 3 stream is owned by one writer at a time; a send only starts
  // when the writer is free.
  assert property (@(posedge clk) disable iff (rst)
                   (qs == Q_SHDR) |-> (owner == OW_SEQ || owner == OW_NONE));
endmodule
