// tb_occc: two off-chip controllers back to back (A's output wired to B's
// input, B's credits back to A). Packets sent into A must come out of B
// unchanged and in order. B's NetIf side is stalled for a while: A must stop
// sending after RX_DEPTH words (credits exhausted) without overflowing B, and
// resume when B drains. With no back-pressure a word needs PAD_STAGES+2
// cycles from A's input to B's output, and the stream runs at one word per
// cycle.
// The expected values are worked out in the testbench itself; the scenarios
// are this design's own, except where a comment names a measurement of the
// reference design.
module tb_occc;
  import gas_pkg::*;
  localparam int RXD = 8, PADS = 2;
  logic clk = 0, rst = 1;
  logic a_iv, a_ir, a_ov, a_or, b_iv, b_ir, b_ov, b_or;
  lword_t a_id, a_od, b_id, b_od;
  logic a_tv, b_tv, a_tc, b_tc, a_rc, b_rc, a_nc, b_nc;
  lword_t a_td, b_td;
  int checks = 0, failures = 0, cyc = 0, no_credit = 0;
  lword_t in_q[$], exp_q[$];

  occc #(.RX_DEPTH(RXD), .PAD_STAGES(PADS)) ua (.clk, .rst,
    .loc_in_valid(a_iv), .loc_in_ready(a_ir), .loc_in_data(a_id),
    .loc_out_valid(a_ov), .loc_out_ready(a_or), .loc_out_data(a_od),
    .tx_valid(a_tv), .tx_data(a_td), .tx_credit(b_rc),
    .rx_valid(b_tv), .rx_data(b_td), .rx_credit(a_rc), .ev_no_credit(a_nc));
  occc #(.RX_DEPTH(RXD), .PAD_STAGES(PADS)) ub (.clk, .rst,
    .loc_in_valid(b_iv), .loc_in_ready(b_ir), .loc_in_data(b_id),
    .loc_out_valid(b_ov), .loc_out_ready(b_or), .loc_out_data(b_od),
    .tx_valid(b_tv), .tx_data(b_td), .tx_credit(a_rc),
    .rx_valid(a_tv), .rx_data(a_td), .rx_credit(b_rc), .ev_no_credit(b_nc));
  assign a_tc = b_rc; assign b_tc = a_rc;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  bit stall_b = 0;
  always @(negedge clk) begin
    a_iv <= in_q.size() > 0;
    a_id <= in_q.size() > 0 ? in_q[0] : '0;
    b_or <= !stall_b;
  end
  int first_in = -1, first_out = -1, n_out = 0, last_out = 0;
  always @(posedge clk) if (!rst) begin
    if (a_iv && a_ir) begin void'(in_q.pop_front()); if (first_in < 0) first_in = cyc; end
    if (b_ov && b_or) begin
      if (first_out < 0) first_out = cyc;
      n_out++; last_out = cyc;
      if (exp_q.size() == 0) chk(0, "unexpected word");
      else begin chk(b_od == exp_q[0], "word order and value"); void'(exp_q.pop_front()); end
    end
    if (a_nc) no_credit++;
  end

  initial begin
    b_iv = 0; b_id = '0; a_or = 1;
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    // latency and throughput
    for (int i = 0; i < 40; i++) begin
      lword_t w; w = {i % 5 == 4, 32'hC000_0000 + 32'(i)};
      in_q.push_back(w); exp_q.push_back(w);
    end
    wait (exp_q.size() == 0); @(negedge clk);
    chk(first_out - first_in == PADS + 1, $sformatf("latency %0d cycles", first_out - first_in + 1));
    chk(last_out - first_out == 39, $sformatf("40 words in %0d cycles", last_out - first_out + 1));
    // credit exhaustion
    stall_b = 1;
    for (int i = 0; i < 30; i++) begin
      lword_t w; w = {i % 3 == 2, 32'hD000_0000 + 32'(i)};
      in_q.push_back(w); exp_q.push_back(w);
    end
    repeat (60) @(negedge clk);
    chk(in_q.size() == 30 - RXD, "sender stops after RX_DEPTH words");
    chk(no_credit > 0, "no-credit stall seen");
    stall_b = 0;
    wait (exp_q.size() == 0); @(negedge clk);
    chk(in_q.size() == 0, "all sent after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
