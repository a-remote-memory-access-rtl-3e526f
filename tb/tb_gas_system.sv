// tb_gas_system: end-to-end test of the four-FPGA ring system at its default
// size (16 processing nodes, 4 processor nodes, 64 Kbyte memories). The
// processor model on node 16 does what the configuration processor of the
// real system does: it loads and starts sequencer programs in the processing
// nodes over the network and polls their ArrivalTime registers. Scenarios:
//  1. simple barrier: nodes 1..15 send barrier_call to node 0, which waits
//     for 15 of them and sends barrier_done to each;
//  2. staggered barrier: the first node of each FPGA is a hub that collects
//     its neighbours' calls and forwards one call to node 0 (reprogramming
//     only, no hardware change);
//  3. latencies at ring distance 0, 1 and 2: one-way and ping-pong short
//     messages, a one-word remote write and a one-word remote read;
//  4. effective bandwidth of memory-to-memory transfers of 4 to 1024 bytes;
//  5. a soft barrier on a transfer counter, control bits, the timer offset
//     and a bidirectional bulk exchange in which receive writes and transmit
//     reads meet at the memory;
//  6. a flood: node 16 holds its tokens back while node 4 sends it 40
//     messages, so its token buffer fills, the packets back up through the
//     router into the ring link and FPGA 1 runs out of credits; then the
//     tokens are released and every message must arrive, in order;
//  7. random block moves: node 16 fetches random blocks from random nodes
//     with remote reads and writes them into other random nodes with long
//     messages; the target memories are compared word by word.
// Latencies are taken from the nodes' timers, which all start together at
// reset: a program waits for a common start time T and the receiver's
// ArrivalTime minus T is the latency. The results are printed; checks cover
// correctness, coverage of every mechanism, and cycle bounds on latencies.
// The expected values are worked out in the testbench itself; the scenarios
// are this design's own, except where a comment names a measurement of the
// reference design.
module tb_gas_system;
  import gas_pkg::*;
  localparam int NF = 4, NPE = 16, AW = 14, NC = 4;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  logic             pe_a_en[NPE], pe_a_we[NPE];
  logic [AW-1:0]    pe_a_addr[NPE];
  logic [31:0]      pe_a_wdata[NPE], pe_a_rdata[NPE];
  logic [NC-1:0]    pe_ctrl_in[NPE], pe_ctrl_out[NPE];
  logic [31:0]      pe_timer[NPE], pe_arrival[NPE];
  logic             pe_running[NPE];
  node_ev_t         pe_ev[NPE];
  logic             h_a_en[NF], h_a_we[NF];
  logic [AW-1:0]    h_a_addr[NF];
  logic [31:0]      h_a_wdata[NF], h_a_rdata[NF];
  logic             f1v[NF], f1r[NF], f2v[NF], f2r[NF], f3v[NF], f3r[NF], f4v[NF], f4r[NF];
  lword_t           f1d[NF], f2d[NF], f3d[NF], f4d[NF];
  node_ev_t         h_ev[NF];
  logic [NPORT-1:0] ev_contend[NF];
  logic [1:0]       ev_no_credit[NF];

  gas_system dut (.*, .h_fsl1_valid(f1v), .h_fsl1_ready(f1r), .h_fsl1_data(f1d),
    .h_fsl2_valid(f2v), .h_fsl2_ready(f2r), .h_fsl2_data(f2d),
    .h_fsl3_valid(f3v), .h_fsl3_ready(f3r), .h_fsl3_data(f3d),
    .h_fsl4_valid(f4v), .h_fsl4_ready(f4r), .h_fsl4_data(f4d));

  host_bfm h (.clk, .rst, .fsl1_valid(f1v[0]), .fsl1_ready(f1r[0]), .fsl1_data(f1d[0]),
    .fsl2_valid(f2v[0]), .fsl2_ready(f2r[0]), .fsl2_data(f2d[0]),
    .fsl3_valid(f3v[0]), .fsl3_ready(f3r[0]), .fsl3_data(f3d[0]),
    .fsl4_valid(f4v[0]), .fsl4_ready(f4r[0]), .fsl4_data(f4d[0]));

  // the other three processors are idle
  for (genvar f = 1; f < NF; f++) begin : g_idle
    assign f1r[f] = 1'b1; assign f2v[f] = 1'b0; assign f2d[f] = '0;
    assign f3v[f] = 1'b0; assign f3d[f] = '0;   assign f4r[f] = 1'b1;
  end
  for (genvar f = 0; f < NF; f++) begin : g_hmem
    assign h_a_en[f] = 1'b0; assign h_a_we[f] = 1'b0; assign h_a_addr[f] = '0; assign h_a_wdata[f] = '0;
  end

  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  // ---------------- mechanism coverage ----------------
  int n_short, n_long, n_reply, n_conflict, n_tokfull, n_prog, n_pams_reply, n_send;
  int n_contend, n_nocredit, n_hop2;
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < NPE; i++) begin
      n_short += pe_ev[i].rx_short; n_long += pe_ev[i].rx_long; n_reply += pe_ev[i].tx_reply;
      n_conflict += pe_ev[i].mem_conflict; n_tokfull += pe_ev[i].tok_full;
      n_prog += pe_ev[i].prog; n_pams_reply += pe_ev[i].pams_reply; n_send += pe_ev[i].send;
    end
    for (int f = 0; f < NF; f++) begin
      n_tokfull += h_ev[f].tok_full;
      n_contend += $countones(ev_contend[f]);
      n_nocredit += $countones(ev_no_credit[f]);
    end
  end
  // a packet sent clockwise from FPGA f to an FPGA beyond f+1 transits f+1
  for (genvar f = 0; f < NF; f++) begin : g_transit
    bit first = 1;
    always @(posedge clk) if (!rst && dut.cw_v[f]) begin
      if (first && node_fpga(dut.cw_d[f][31:24]) != (f + 1) % NF) n_hop2++;
      first = dut.cw_d[f][32];
    end
  end

  // ---------------- helpers ----------------
  function automatic int fpga_of(int n); return n / 4; endfunction
  function automatic int ring_dist(int a, int b);
    int d; d = (fpga_of(b) - fpga_of(a) + NF) % NF; return d > NF/2 ? NF - d : d;
  endfunction

  task automatic wait_idle(int nodes[$]);
    bit busy;
    do begin
      @(negedge clk);
      busy = 0;
      foreach (nodes[i]) if (pe_running[nodes[i]]) busy = 1;
    end while (busy);
  endtask

  // start time far enough ahead for all programs to be loaded
  function automatic logic [31:0] start_after(int margin);
    return pe_timer[0] + 32'(margin);
  endfunction

  task automatic load(int node, logic [31:0] prog[$]);
    h.load_program(8'(node), prog, 1);
  endtask

  task automatic wait_loaded(int nodes[$], logic [31:0] t0);
    bit all;
    do begin
      @(negedge clk);
      all = (h.f3_q.size() == 0) && (h.n_done >= done_target);
      foreach (nodes[i]) if (!pe_running[nodes[i]]) all = 0;
    end while (!all);
    chk(pe_timer[0] < t0, $sformatf("programs loaded n_before start time (%0d < %0d)", pe_timer[0], t0));
  endtask
  int done_target = 0;

  function automatic int n_msgs(logic [31:0] prog[$]);
    return (prog.size() + 13) / 14 + 1;
  endfunction

  task automatic poll(int node, output logic [31:0] t);
    int n_before;
    logic [31:0] none[];
    none = new[0];
    n_before = h.count(H_POLL_REPLY);
    h.am_short(8'(node), H_POLL, none);
    while (h.count(H_POLL_REPLY) == n_before) @(negedge clk);
    t = h.calls[h.find_last(H_POLL_REPLY)].args[0];
  endtask

  task automatic pe_write(int n, int addr, logic [31:0] d);
    @(negedge clk); pe_a_en[n] = 1; pe_a_we[n] = 1; pe_a_addr[n] = AW'(addr); pe_a_wdata[n] = d;
    @(negedge clk); pe_a_en[n] = 0; pe_a_we[n] = 0;
  endtask
  task automatic pe_read(int n, int addr, output logic [31:0] d);
    @(negedge clk); pe_a_en[n] = 1; pe_a_addr[n] = AW'(addr);
    @(negedge clk); pe_a_en[n] = 0; d = pe_a_rdata[n];
  endtask

  localparam logic [7:0] BAR_CALL = 8'h20, BAR_DONE = 8'h21, PING = 8'h30, PONG = 8'h31,
                         WR = 8'h32, RD = 8'h33, BULK = 8'h34, SOFT = 8'h35, FLOOD = 8'h36,
                         MOVE_RD = 8'h37, MOVE_WR = 8'h38;

  // ---------------- scenarios ----------------
  task automatic barrier(bit staggered, output int lat0, output int lat_all);
    logic [31:0] t0, prog[$], t;
    int nodes[$];
    t0 = start_after(6000);
    for (int n = 0; n < NPE; n++) begin
      int hub; bit is_hub;
      hub = staggered ? (n / 4) * 4 : 0;
      is_hub = staggered && (n % 4 == 0);
      prog = {h.I_TIMER_THR, t0, h.i_wait(1, 0, 0, 0, 0)};
      if (n == 0) begin
        prog.push_back(h.i_msgctr(0, BAR_CALL, staggered ? 6 : 15));
        prog.push_back(h.i_wait(0, 4'b0001, 0, 0, 0));
        for (int d = 1; d < NPE; d++)
          if (!staggered || d % 4 == 0 || d < 4) prog.push_back(h.i_send(8'(d), BAR_DONE, 0, 0, 0, 0));
      end else if (is_hub) begin
        prog.push_back(h.i_msgctr(0, BAR_CALL, 3));
        prog.push_back(h.i_msgctr(1, BAR_DONE, 1));
        prog.push_back(h.i_wait(0, 4'b0001, 0, 0, 0));
        prog.push_back(h.i_send(8'd0, BAR_CALL, 0, 0, 0, 0));
        prog.push_back(h.i_wait(0, 4'b0010, 0, 0, 0));
        for (int d = n + 1; d < n + 4; d++) prog.push_back(h.i_send(8'(d), BAR_DONE, 0, 0, 0, 0));
      end else begin
        prog.push_back(h.i_msgctr(0, BAR_DONE, 1));
        prog.push_back(h.i_send(8'(hub), BAR_CALL, 0, 0, 0, 0));
        prog.push_back(h.i_wait(0, 4'b0001, 0, 0, 0));
      end
      prog.push_back(h.I_HALT);
      done_target += n_msgs(prog);
      load(n, prog);
      nodes.push_back(n);
    end
    wait_loaded(nodes, t0);
    wait_idle(nodes);
    lat_all = 0;
    for (int n = 0; n < NPE; n++) begin
      poll(n, t);
      if (n == 0) lat0 = int'(t - t0);
      else if (int'(t - t0) > lat_all) lat_all = int'(t - t0);
    end
  endtask

  // one-way, ping-pong, remote write and remote read between a and b
  task automatic latency(int a, int b, output int l1, output int l2, output int lw, output int lr);
    logic [31:0] t0, pa[$], pb[$], t;
    int nodes[$];
    nodes = {a, b};
    // one-way short and ping-pong: a pings, b answers
    t0 = start_after(3000);
    pa = {h.I_TIMER_THR, t0, h.i_msgctr(0, PONG, 1), h.i_wait(1, 0, 0, 0, 0),
          h.i_send(8'(b), PING, 0, 0, 0, 0), h.i_wait(0, 4'b0001, 0, 0, 0), h.I_HALT};
    pb = {h.i_msgctr(0, PING, 1), h.i_wait(0, 4'b0001, 0, 0, 0),
          h.i_send(8'(a), PONG, 0, 0, 0, 0), h.I_HALT};
    done_target += n_msgs(pa) + n_msgs(pb);
    load(b, pb); load(a, pa);
    wait_loaded(nodes, t0); wait_idle(nodes);
    poll(b, t); l1 = int'(t - t0);
    poll(a, t); l2 = int'(t - t0);
    // remote write: one word from a's 100 to b's 200
    t0 = start_after(3000);
    pa = {h.I_TIMER_THR, t0, h.i_wait(1, 0, 0, 0, 0),
          h.i_send(8'(b), WR, 0, 1, 0, 0), 32'd100, 32'd200, 32'd1, h.I_HALT};
    pb = {h.i_msgctr(0, WR, 1), h.i_wait(0, 4'b0001, 0, 0, 0), h.I_HALT};
    done_target += n_msgs(pa) + n_msgs(pb);
    load(b, pb); load(a, pa);
    wait_loaded(nodes, t0); wait_idle(nodes);
    poll(b, t); lw = int'(t - t0);
    // remote read: a asks b for its word 200, into a's 300
    t0 = start_after(3000);
    pa = {h.I_TIMER_THR, t0, h.i_msgctr(0, RD, 1), h.i_wait(1, 0, 0, 0, 0),
          h.i_send(8'(b), H_GET, 4, 0, 0, 0), 32'd200, 32'd300, 32'd1, 32'(RD),
          h.i_wait(0, 4'b0001, 0, 0, 0), h.I_HALT};
    done_target += n_msgs(pa);
    load(a, pa);
    wait_loaded({a}, t0); wait_idle({a});
    poll(a, t); lr = int'(t - t0);
  endtask

  // long transfer of nwords from a to b; returns cycles until b's handler call
  task automatic transfer(int a, int b, int nwords, output int cycles);
    logic [31:0] t0, pa[$], pb[$], t;
    t0 = start_after(3000);
    pa = {h.I_TIMER_THR, t0, h.i_wait(1, 0, 0, 0, 0),
          h.i_send(8'(b), BULK, 0, 1, 0, 0), 32'd1000, 32'd4000, 32'(nwords), h.I_HALT};
    pb = {h.i_xferctr(0, BULK, nwords), h.i_wait(0, 0, 4'b0001, 0, 0), h.I_HALT};
    done_target += n_msgs(pa) + n_msgs(pb);
    load(b, pb); load(a, pa);
    wait_loaded({a, b}, t0); wait_idle({a, b});
    poll(b, t); cycles = int'(t - t0);
  endtask

  initial begin
    int lat0, lat_all, slat0, slat_all;
    int l1[3], l2[3], lw[3], lr[3];
    int bw_cyc[9];
    logic [31:0] d, prog[$], pb[$], t0;
    for (int n = 0; n < NPE; n++) begin
      pe_a_en[n] = 0; pe_a_we[n] = 0; pe_a_addr[n] = 0; pe_a_wdata[n] = 0; pe_ctrl_in[n] = 0;
    end
    {n_short, n_long, n_reply, n_conflict, n_tokfull, n_prog, n_pams_reply, n_send} = '0;
    {n_contend, n_nocredit, n_hop2} = '0;
    repeat (5) @(negedge clk); rst = 0;
    repeat (5) @(negedge clk);

    // 1. and 2. barriers
    barrier(0, lat0, lat_all);
    $display("simple barrier:    to node 0 %0d cycles, to all %0d cycles", lat0, lat_all);
    chk(lat0 > 0 && lat_all > lat0 && lat_all < 1000, "simple barrier completes");
    barrier(1, slat0, slat_all);
    $display("staggered barrier: to node 0 %0d cycles, to all %0d cycles", slat0, slat_all);
    chk(slat0 > 0 && slat_all > slat0 && slat_all < 1000, "staggered barrier completes");

    // 3. latencies at ring distance 0, 1, 2 (node 0 to nodes 1, 4, 8)
    for (int k = 0; k < 3; k++) begin
      int b; b = (k == 0) ? 1 : 4 * k;
      for (int i = 0; i < 1; i++) pe_write(0, 100, 32'hFACE_0000 + 32'(k));
      pe_write(b, 200, 32'hBEEF_0000 + 32'(k));
      latency(0, b, l1[k], l2[k], lw[k], lr[k]);
      $display("distance %0d: one-way %0d, ping-pong %0d, remote write %0d, remote read %0d cycles",
               k, l1[k], l2[k], lw[k], lr[k]);
      pe_read(b, 200, d); chk(d == 32'hFACE_0000 + 32'(k), "remote write data");
      pe_read(0, 300, d); chk(d == 32'hFACE_0000 + 32'(k), "remote read data");
      chk(l2[k] > l1[k] && l2[k] <= 2 * l1[k] + 20, "ping-pong about twice one-way");
      chk(lw[k] > l1[k], "remote write slower than short message");
      chk(lr[k] > l2[k], "remote read slower than ping-pong");
    end
    chk(l1[1] > l1[0] && l1[2] > l1[1], "latency grows with ring distance");
    chk(l1[2] - l1[1] == l1[1] - l1[0], "constant cost per ring hop");
    chk(l1[0] <= 17, $sformatf("on-chip short message within 17 cycles (%0d)", l1[0]));

    // 4. effective bandwidth, node 0 -> node 1
    for (int i = 0; i < 256; i++) pe_write(0, 1000 + i, 32'h0B0B_0000 + 32'(i));
    for (int s = 0; s < 9; s++) begin
      transfer(0, 1, 1 << s, bw_cyc[s]);
      $display("transfer %5d bytes: %4d cycles, %0d%% of 4 bytes/cycle", 4 << s, bw_cyc[s],
               (100 * (4 << s)) / (4 * bw_cyc[s]));
      if (s > 0) chk((1 << s) * bw_cyc[s-1] > (1 << (s-1)) * bw_cyc[s], "bandwidth grows with size");
    end
    for (int i = 0; i < 256; i += 37) begin pe_read(1, 4000 + i, d); chk(d == 32'h0B0B_0000 + 32'(i), "bulk data"); end

    // 5. soft barrier, control bits, timer offset, bidirectional bulk
    //    nodes 5 and 9 exchange 256 words; each waits on its transfer counter,
    //    then on control input 0 from its core, then raises control output 2.
    t0 = start_after(3000);
    for (int k = 0; k < 2; k++) begin
      int me, other; me = k ? 9 : 5; other = k ? 5 : 9;
      for (int i = 0; i < 256; i += 51) pe_write(me, 1000 + i, 32'(me * 65536 + i));
      prog = {h.I_TIMER_THR, t0, h.i_xferctr(2, SOFT, 256), h.i_wait(1, 0, 0, 0, 0),
              h.i_send(8'(other), SOFT, 0, 1, 0, 0), 32'd1000, 32'd2000, 32'd256,
              h.i_wait(0, 0, 4'b0100, 0, 0), h.i_ctrl(8'h1),
              h.i_wait(0, 0, 0, 4'b0001, 4'b0001), h.I_TIMER_OFS, 32'd100000,
              h.i_ctrl(8'h4), h.I_HALT};
      done_target += n_msgs(prog);
      load(me, prog);
    end
    wait_loaded({5, 9}, t0);
    while (!(pe_ctrl_out[5] == 4'h1 && pe_ctrl_out[9] == 4'h1)) @(negedge clk);
    repeat (20) @(negedge clk);
    chk(pe_running[5] && pe_running[9], "wait on control input");
    pe_ctrl_in[5] = 4'h1; pe_ctrl_in[9] = 4'h1;
    wait_idle({5, 9});
    chk(pe_ctrl_out[5] == 4'h4 && pe_ctrl_out[9] == 4'h4, "control outputs after soft barrier");
    chk(pe_timer[5] - pe_timer[0] >= 100000, "timer offset applied");
    for (int i = 0; i < 256; i += 51) begin
      pe_read(9, 2000 + i, d); chk(d == 32'(5 * 65536 + i), "exchange 5->9");
      pe_read(5, 2000 + i, d); chk(d == 32'(9 * 65536 + i), "exchange 9->5");
    end


    // ---------------- flood: token buffer full, ring back-pressure ----------------
    // processor 16 holds its tokens back while node 4 (FPGA 1) sends it 40
    // short messages: after 16 calls the token buffer is full, the messages
    // back up through the router and the receive buffer of the ring link,
    // and FPGA 1 runs out of credits. Releasing the tokens drains it all.
    begin
      int n0, nf; logic [31:0] tstart;
      n0 = h.count(FLOOD);
      h.hold_tokens = 1;
      prog = {};
      for (int k = 0; k < 40; k++) begin
        prog.push_back(h.i_send(8'd16, FLOOD, 3, 0, 0, 0));
        prog.push_back(32'(k)); prog.push_back(32'hF100D); prog.push_back(32'(~k));
      end
      prog.push_back(h.I_HALT);
      load(4, prog);
      tstart = pe_timer[0];
      while (!(h.count(FLOOD) >= n0 + 16 && n_nocredit > 0) && pe_timer[0] - tstart < 20000) @(negedge clk);
      repeat (200) @(negedge clk);
      chk(h.count(FLOOD) == n0 + 16, $sformatf("calls stop when the token buffer is full (%0d)", h.count(FLOOD) - n0));
      chk(pe_running[4], "sender blocked by back-pressure");
      h.hold_tokens = 0;
      wait_idle({4});
      repeat (200) @(negedge clk);
      nf = 0;
      for (int k = 0; k < h.calls.size(); k++)
        if (h.calls[k].handler == FLOOD) begin
          if (h.calls[k].args[0] == 32'(nf) && h.calls[k].args[1] == 32'hF100D && h.calls[k].args[2] == ~32'(nf)) nf++;
        end
      chk(h.count(FLOOD) == n0 + 40 && nf == 40, $sformatf("all flood messages in order (%0d)", nf));
      chk(dut.g_fpga[0].u_fpga.u_host.u_gas.u_tok.free_cnt == 16, "tokens all returned");
    end


    // ---------------- random block moves through the processor ----------------
    // 24 times: fill a random-length block at a random place in a random
    // node's memory, fetch it into node 16 with a remote read (H_GET, long
    // reply), write it from there into another random node with a long
    // message, and compare the target memory word by word.
    begin
      int s_n, d_n, len, sa, da, n_rd, bad;
      logic [31:0] t_arr;
      logic [31:0] blk[], a4[], none0[];
      none0 = new[0];
      for (int t = 0; t < 24; t++) begin
        s_n = $urandom_range(0, NPE - 1);
        do d_n = $urandom_range(0, NPE - 1); while (d_n == s_n);
        len = $urandom_range(1, 96);
        sa = $urandom_range(6000, 7000); da = $urandom_range(8000, 9000);
        blk = new[len];
        foreach (blk[i]) begin blk[i] = $urandom; pe_write(s_n, sa + i, blk[i]); end
        n_rd = h.count(MOVE_RD);
        a4 = new[4]; a4[0] = 32'(sa); a4[1] = 32'(12000); a4[2] = 32'(len); a4[3] = 32'(MOVE_RD);
        h.am_short(8'(s_n), H_GET, a4);
        while (h.count(MOVE_RD) == n_rd) @(negedge clk);
        // the target's ArrivalTime changes when the handler call arrives,
        // which for a long message is after the block is in memory
        t_arr = pe_arrival[d_n];
        h.am_long(8'(d_n), MOVE_WR, 12000, da, len, none0);
        while (pe_arrival[d_n] == t_arr) @(negedge clk);
        repeat (5) @(negedge clk);
        bad = 0;
        for (int i = 0; i < len; i++) begin
          logic [31:0] d;
          pe_read(d_n, da + i, d);
          if (d != blk[i]) bad++;
        end
        chk(bad == 0, $sformatf("block of %0d words moved %0d -> 16 -> %0d (%0d wrong)", len, s_n, d_n, bad));
      end
    end

    // ---------------- coverage ----------------
    $display("events: short %0d long %0d reply %0d mem-conflict %0d token-full %0d prog %0d pams-reply %0d send %0d",
             n_short, n_long, n_reply, n_conflict, n_tokfull, n_prog, n_pams_reply, n_send);
    $display("events: netif contention %0d, off-chip credit stalls %0d, two-hop transits %0d",
             n_contend, n_nocredit, n_hop2);
    chk(n_short > 0, "short messages");
    chk(n_long > 0, "long messages");
    chk(n_reply > 0, "replies by token");
    chk(n_conflict > 0, "memory round-robin contention");
    chk(n_prog > 0, "sequencer program loading");
    chk(n_pams_reply > 0, "poll / remote-read replies");
    chk(n_send > 0, "sequencer sends");
    chk(n_contend > 0, "NetIf merge contention");
    chk(n_hop2 > 0, "ring transit through an FPGA");
    chk(n_tokfull > 0, "token buffer full");
    chk(n_nocredit > 0, "off-chip link out of credits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
