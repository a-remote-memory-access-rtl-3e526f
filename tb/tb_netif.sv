// tb_netif: a NetIf of FPGA 1 in a four-FPGA ring. Packets from the local
// port must leave on the link that route_port names (local PEs, the local
// processor, the clockwise or counter-clockwise off-chip controller) with
// their words unchanged. Packets offered on all links at once must reach the
// local output whole (never interleaved), every link must be served, and
// under contention the merge must rotate (round-robin). Random back-pressure
// on all sides.
// The expected values are worked out in the testbench itself; the scenarios
// are this design's own, except where a comment names a measurement of the
// reference design.
module tb_netif;
  import gas_pkg::*;
  localparam int NP = 7;
  logic clk = 0, rst = 1;
  logic liv, lir, lov, lor;
  lword_t lid, lod;
  logic [NP-1:0] xov, xor_, xiv, xir;
  lword_t xod [NP], xid [NP];
  logic ev_contend;
  int checks = 0, failures = 0, contends = 0;

  netif #(.NP(NP), .MY_FPGA(1), .N_FPGA(4)) dut (
    .clk, .rst,
    .loc_in_valid(liv), .loc_in_ready(lir), .loc_in_data(lid),
    .loc_out_valid(lov), .loc_out_ready(lor), .loc_out_data(lod),
    .lnk_out_valid(xov), .lnk_out_ready(xor_), .lnk_out_data(xod),
    .lnk_in_valid(xiv), .lnk_in_ready(xir), .lnk_in_data(xid),
    .ev_contend
  );

  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  lword_t loc_q[$], exp_lnk[NP][$], lnk_q[NP][$];
  int got_from[NP];
  function automatic int expect_port(int dst);
    // FPGA 1 holds PEs 4..7 and processor 17; FPGA 2 is clockwise, FPGA 0
    // counter-clockwise, FPGA 3 two hops away (clockwise on a tie)
    if (dst >= 4 && dst <= 7) return dst - 4;
    if (dst == 17) return 4;
    if (dst == 16 || dst < 4) return 6;
    return 5;
  endfunction

  task automatic add_loc(int dst, int len);
    for (int i = 0; i < len; i++) begin
      lword_t w;
      w = (i == 0) ? {1'b0, 8'(dst), 8'd5, 16'(len)} : {1'b0, 32'(dst * 256 + i)};
      w[32] = (i == len - 1);
      loc_q.push_back(w);
      exp_lnk[expect_port(dst)].push_back(w);
    end
  endtask

  always @(negedge clk) begin
    liv <= loc_q.size() > 0 && ($urandom % 4 != 0);
    lid <= loc_q.size() > 0 ? loc_q[0] : '0;
    lor <= $urandom % 4 != 0;
    for (int p = 0; p < NP; p++) begin
      xiv[p] <= lnk_q[p].size() > 0 && ($urandom % 5 != 0);
      xid[p] <= lnk_q[p].size() > 0 ? lnk_q[p][0] : '0;
      xor_[p] <= $urandom % 3 != 0;
    end
  end

  int cur_src = -1, last_src = -1, rotate_ok = 0;
  always @(posedge clk) if (!rst) begin
    if (liv && lir) void'(loc_q.pop_front());
    for (int p = 0; p < NP; p++) begin
      if (xov[p] && xor_[p]) begin
        if (exp_lnk[p].size() == 0) chk(0, $sformatf("unexpected word on link %0d", p));
        else begin chk(xod[p] == exp_lnk[p][0], $sformatf("link %0d word", p)); void'(exp_lnk[p].pop_front()); end
      end
      if (xiv[p] && xir[p]) void'(lnk_q[p].pop_front());
    end
    if (lov && lor) begin
      int src;
      src = int'(lod[23:16]);     // tb puts the link index in the source field of every word
      if (cur_src >= 0) chk(src == cur_src, "packet not interleaved");
      else begin
        if (last_src >= 0 && src != last_src) rotate_ok++;
        got_from[src]++;
      end
      cur_src  = lod[32] ? -1 : src;
      if (lod[32]) last_src = src;
    end
    if (ev_contend) contends++;
  end

  initial begin
    liv = 0; lor = 0; xiv = '0; xor_ = '0;
    repeat (3) @(negedge clk); rst = 0;
    foreach (got_from[p]) got_from[p] = 0;
    // routing
    for (int n = 0; n < 20; n++) add_loc(n, 1 + n % 4);
    for (int k = 0; k < 100; k++) add_loc($urandom % 20, 1 + $urandom % 6);
    // merge: 6 packets on every link
    for (int p = 0; p < NP; p++)
      for (int k = 0; k < 6; k++) begin
        int len; len = 1 + (p + k) % 5;
        for (int i = 0; i < len; i++) lnk_q[p].push_back({i == len - 1, 8'd0, 8'(p), 16'(k * 16 + i)});
      end
    fork
      wait (loc_q.size() == 0);
      begin
        bit empty;
        do begin
          @(negedge clk);
          empty = 1;
          for (int p = 0; p < NP; p++) if (lnk_q[p].size() > 0) empty = 0;
        end while (!empty);
      end
    join
    repeat (10) @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      chk(exp_lnk[p].size() == 0, $sformatf("all words routed to link %0d", p));
      chk(got_from[p] == 6, $sformatf("all packets of link %0d delivered", p));
    end
    chk(contends > 0 && rotate_ok > 20, "round-robin under contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
