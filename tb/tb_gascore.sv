// tb_gascore: one GAScore with its local memory. A long message arrives from
// the network; the test checks the payload in memory and the handler call on
// FSL 1, then answers it like a handler would: a long reply addressed only by
// the received token (the GAScore must send it to the original source node),
// waits for the completion on FSL 4 and returns the token on FSL 2. A second
// phase overlaps an incoming long message with an outgoing long request so
// that receive writes and transmit reads meet at the memory port, and checks
// both transfers and that the token was freed and reused.
// The expected values are worked out in the testbench itself; the scenarios
// are this design's own, except where a comment names a measurement of the
// reference design.
module tb_gascore;
  import gas_pkg::*;
  localparam int AW = 10;
  localparam logic [7:0] ME = 8'd6;
  logic clk = 0, rst = 1;
  logic niv, nir, nov, nor_;
  lword_t nid, nod;
  logic f1v, f1r, f2v, f2r, f3v, f3r, f4v, f4r;
  lword_t f1d, f2d, f3d, f4d;
  logic m_en, m_we; logic [AW-1:0] m_addr; logic [DW-1:0] m_wdata, m_rdata;
  logic ev_rx_short, ev_rx_long, ev_tx_reply, ev_tx_done, ev_mem_conflict, tok_full;
  logic a_en = 0, a_we = 0; logic [AW-1:0] a_addr = '0; logic [DW-1:0] a_wdata = '0, a_rdata;
  int checks = 0, failures = 0, conflicts = 0;
  lword_t net_in_q[$], net_out[$], calls[$], dones[$], f3_q[$];

  gascore #(.NODE_ID(ME), .NTOK(4), .AW(AW)) dut (
    .clk, .rst,
    .net_in_valid(niv), .net_in_ready(nir), .net_in_data(nid),
    .net_out_valid(nov), .net_out_ready(nor_), .net_out_data(nod),
    .fsl1_valid(f1v), .fsl1_ready(f1r), .fsl1_data(f1d),
    .fsl2_valid(f2v), .fsl2_ready(f2r), .fsl2_data(f2d),
    .fsl3_valid(f3v), .fsl3_ready(f3r), .fsl3_data(f3d),
    .fsl4_valid(f4v), .fsl4_ready(f4r), .fsl4_data(f4d),
    .m_en, .m_we, .m_addr, .m_wdata, .m_rdata,
    .ev_rx_short, .ev_rx_long, .ev_tx_reply, .ev_tx_done, .ev_mem_conflict, .tok_full
  );
  dp_bram #(.WORDS(2**AW)) mem (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en(m_en), .b_we(m_we), .b_addr(m_addr), .b_wdata(m_wdata), .b_rdata(m_rdata));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge clk) begin
    niv <= net_in_q.size() > 0;
    nid <= net_in_q.size() > 0 ? net_in_q[0] : '0;
    f3v <= f3_q.size() > 0;
    f3d <= f3_q.size() > 0 ? f3_q[0] : '0;
  end
  assign nor_ = 1'b1; assign f1r = 1'b1; assign f4r = 1'b1;
  always @(posedge clk) if (!rst) begin
    if (niv && nir) void'(net_in_q.pop_front());
    if (f3v && f3r) void'(f3_q.pop_front());
    if (nov) net_out.push_back(nod);
    if (f1v) calls.push_back(f1d);
    if (f4v) dones.push_back(f4d);
    if (ev_mem_conflict) conflicts++;
  end


  function automatic lword_t hw(bit ctl, logic [7:0] node, logic [7:0] src, logic [7:0] h,
                                int nargs, bit reply, bit lng);
    am_hdr_t x;
    x = '0; x.node = node; x.src = src; x.handler = h; x.nargs = 4'(nargs); x.reply = reply; x.is_long = lng;
    return {ctl, x};
  endfunction

  task automatic send_long_in(logic [7:0] src, logic [7:0] h, int addr, int len, int seed);
    net_in_q.push_back(hw(0, ME, src, h, 1, 0, 1));
    net_in_q.push_back({1'b0, 32'(addr)});
    net_in_q.push_back({1'b0, 32'(len)});
    for (int i = 0; i < len; i++) net_in_q.push_back({1'b0, 32'(seed + i)});
    net_in_q.push_back({1'b1, 32'h0000_ABCD});
  endtask

  initial begin
    logic [7:0] tok;
    f2v = 0; f2d = '0;
    repeat (3) @(negedge clk); rst = 0;
    // 1. long message from node 33
    send_long_in(8'd33, 8'h21, 100, 8, 32'h7000);
    wait (calls.size() == 4);
    @(negedge clk);
    chk(calls[0][32] && calls[0][15:8] == 8'h21 && calls[0][2], "call header");
    tok = calls[0][31:24];
    chk(calls[1][31:0] == 100 && calls[2][31:0] == 8 && calls[3][31:0] == 32'hABCD, "call address, count, arg");
    for (int i = 0; i < 8; i++) begin
      a_en = 1; a_addr = AW'(100 + i); @(negedge clk); a_en = 0;
      chk(a_rdata == 32'(32'h7000 + i), $sformatf("payload in memory %h", a_rdata));
    end
    calls.delete();
    // 2. long reply by token: read 8 words from 100, write to remote 900
    f3_q.push_back(hw(1, tok, 0, 8'h22, 0, 1, 1));
    f3_q.push_back({1'b0, 32'd100}); f3_q.push_back({1'b0, 32'd900}); f3_q.push_back({1'b0, 32'd8});
    fork
      wait (dones.size() == 1);
      begin repeat (500) @(negedge clk); $display("stuck: f3 %0d net_out %0d st %0d", f3_q.size(), net_out.size(), dut.u_tx.st); end
    join_any
    chk(net_out.size() == 11, "reply packet length");
    chk(net_out[0][31:24] == 8'd33 && net_out[0][23:16] == ME && net_out[0][3], "reply goes to the source node");
    chk(net_out[1][31:0] == 900 && net_out[2][31:0] == 8, "reply address and count");
    for (int i = 0; i < 8; i++) chk(net_out[3+i][31:0] == 32'(32'h7000 + i), "reply payload");
    chk(net_out[10][32], "last word marked");
    // return token
    @(negedge clk); f2v = 1; f2d = {1'b0, 24'd0, tok}; @(negedge clk); f2v = 0;
    net_out.delete(); dones.delete();
    // 3. overlap: incoming 64 words while sending 64 words
    for (int i = 0; i < 64; i++) begin
      a_en = 1; a_we = 1; a_addr = AW'(300 + i); a_wdata = 32'(32'h5500 + i); @(negedge clk);
    end
    a_en = 0; a_we = 0;
    f3_q.push_back(hw(1, 8'd44, 0, 8'h23, 0, 0, 1));
    f3_q.push_back({1'b0, 32'd300}); f3_q.push_back({1'b0, 32'd0}); f3_q.push_back({1'b0, 32'd64});
    send_long_in(8'd34, 8'h24, 500, 64, 32'h9900);
    wait (dones.size() == 1 && calls.size() == 4);
    @(negedge clk);
    chk(calls[0][31:24] == tok, "freed token reused");
    chk(net_out.size() == 67 && net_out[0][31:24] == 8'd44, "request packet");
    for (int i = 0; i < 64; i++) chk(net_out[3+i][31:0] == 32'(32'h5500 + i), "request payload");
    for (int i = 0; i < 64; i++) begin
      a_en = 1; a_addr = AW'(500 + i); @(negedge clk); a_en = 0;
      chk(a_rdata == 32'(32'h9900 + i), "overlapped payload in memory");
    end
    chk(conflicts > 0, "memory contention exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
