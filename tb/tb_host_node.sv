// tb_host_node: two processor nodes (ids 16 and 17) wired back to back
// through their network ports, each driven by a processor test model. Node 16
// writes a block into node 17's memory with a long message, node 17 answers
// with a long reply read back from that block, and short messages go both
// ways. Checks the handler calls, memory contents through port A, tokens and
// completions.
// The expected values are worked out in the testbench itself; the scenarios
// are this design's own, except where a comment names a measurement of the
// reference design.
module tb_host_node;
  import gas_pkg::*;
  localparam int WORDS = 1024, AW = 10;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  logic v01, r01, v10, r10; lword_t d01, d10;
  logic f1v[2], f1r[2], f2v[2], f2r[2], f3v[2], f3r[2], f4v[2], f4r[2];
  lword_t f1d[2], f2d[2], f3d[2], f4d[2];
  logic a_en[2], a_we[2]; logic [AW-1:0] a_addr[2]; logic [31:0] a_wdata[2], a_rdata[2];
  node_ev_t ev[2];

  host_node #(.NODE_ID(8'd16), .WORDS(WORDS)) n0 (.clk, .rst,
    .net_in_valid(v10), .net_in_ready(r10), .net_in_data(d10),
    .net_out_valid(v01), .net_out_ready(r01), .net_out_data(d01),
    .a_en(a_en[0]), .a_we(a_we[0]), .a_addr(a_addr[0]), .a_wdata(a_wdata[0]), .a_rdata(a_rdata[0]),
    .fsl1_valid(f1v[0]), .fsl1_ready(f1r[0]), .fsl1_data(f1d[0]),
    .fsl2_valid(f2v[0]), .fsl2_ready(f2r[0]), .fsl2_data(f2d[0]),
    .fsl3_valid(f3v[0]), .fsl3_ready(f3r[0]), .fsl3_data(f3d[0]),
    .fsl4_valid(f4v[0]), .fsl4_ready(f4r[0]), .fsl4_data(f4d[0]), .ev(ev[0]));
  host_node #(.NODE_ID(8'd17), .WORDS(WORDS)) n1 (.clk, .rst,
    .net_in_valid(v01), .net_in_ready(r01), .net_in_data(d01),
    .net_out_valid(v10), .net_out_ready(r10), .net_out_data(d10),
    .a_en(a_en[1]), .a_we(a_we[1]), .a_addr(a_addr[1]), .a_wdata(a_wdata[1]), .a_rdata(a_rdata[1]),
    .fsl1_valid(f1v[1]), .fsl1_ready(f1r[1]), .fsl1_data(f1d[1]),
    .fsl2_valid(f2v[1]), .fsl2_ready(f2r[1]), .fsl2_data(f2d[1]),
    .fsl3_valid(f3v[1]), .fsl3_ready(f3r[1]), .fsl3_data(f3d[1]),
    .fsl4_valid(f4v[1]), .fsl4_ready(f4r[1]), .fsl4_data(f4d[1]), .ev(ev[1]));
  host_bfm h0 (.clk, .rst, .fsl1_valid(f1v[0]), .fsl1_ready(f1r[0]), .fsl1_data(f1d[0]),
    .fsl2_valid(f2v[0]), .fsl2_ready(f2r[0]), .fsl2_data(f2d[0]),
    .fsl3_valid(f3v[0]), .fsl3_ready(f3r[0]), .fsl3_data(f3d[0]),
    .fsl4_valid(f4v[0]), .fsl4_ready(f4r[0]), .fsl4_data(f4d[0]));
  host_bfm h1 (.clk, .rst, .fsl1_valid(f1v[1]), .fsl1_ready(f1r[1]), .fsl1_data(f1d[1]),
    .fsl2_valid(f2v[1]), .fsl2_ready(f2r[1]), .fsl2_data(f2d[1]),
    .fsl3_valid(f3v[1]), .fsl3_ready(f3r[1]), .fsl3_data(f3d[1]),
    .fsl4_valid(f4v[1]), .fsl4_ready(f4r[1]), .fsl4_data(f4d[1]));

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

  // every packet leaving a node must carry that node's id as its source
  logic sop01 = 1'b1, sop10 = 1'b1;
  always @(posedge clk) if (!rst) begin
    if (v01 && r01) begin
      if (sop01) chk(d01[23:16] == 8'd16, "source id on packets from node 16");
      sop01 <= d01[32];
    end
    if (v10 && r10) begin
      if (sop10) chk(d10[23:16] == 8'd17, "source id on packets from node 17");
      sop10 <= d10[32];
    end
  end

  task automatic port_a(int n, bit we, int addr, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    a_en[n] = 1; a_we[n] = we; a_addr[n] = AW'(addr); a_wdata[n] = wd;
    @(negedge clk);
    a_en[n] = 0; a_we[n] = 0;
    rd = a_rdata[n];
  endtask

  initial begin
    logic [31:0] rd, none[], one[];
    none = new[0]; one = new[1];
    for (int n = 0; n < 2; n++) begin a_en[n] = 0; a_we[n] = 0; a_addr[n] = 0; a_wdata[n] = 0; end
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 16; i++) port_a(0, 1, 200 + i, 32'hE000_0000 + 32'(i), rd);
    one[0] = 32'd77;
    h0.am_long(8'd17, 8'h50, 200, 600, 16, one);
    while (!(h1.count(8'h50) == 1 && h0.n_done == 1)) @(negedge clk);
    @(negedge clk);
    begin
      int k; k = h1.find_last(8'h50);
      chk(h1.calls[k].is_long && h1.calls[k].addr == 600 && h1.calls[k].len == 16 && h1.calls[k].args[0] == 77,
          "long call at node 17");
    end
    for (int i = 0; i < 16; i++) begin port_a(1, 0, 600 + i, 0, rd); chk(rd == 32'hE000_0000 + 32'(i), "remote write landed"); end
    // node 17 replies with a long message by token (a remote read answer)
    begin
      int k; k = h1.find_last(8'h50);
      h1.f3_q.push_back({1'b1, h1.calls[k].token, 8'd0, 8'h51, 4'd0, 1'b1, 1'b1, 2'b0});
      h1.f3_q.push_back({1'b0, 32'd600}); h1.f3_q.push_back({1'b0, 32'd900}); h1.f3_q.push_back({1'b0, 32'd16});
    end
    while (!(h0.count(8'h51) == 1 && h1.n_done == 1)) @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin port_a(0, 0, 900 + i, 0, rd); chk(rd == 32'hE000_0000 + 32'(i), "reply landed at node 16"); end
    // short messages both ways
    one[0] = 32'hABC;
    h0.am_short(8'd17, 8'h60, one); h1.am_short(8'd16, 8'h61, one);
    while (!(h1.count(8'h60) == 1 && h0.count(8'h61) == 1)) @(negedge clk);
    @(negedge clk);
    chk(h1.calls[h1.find_last(8'h60)].args[0] == 32'hABC && h0.calls[h0.find_last(8'h61)].args[0] == 32'hABC, "short arguments");
    repeat (10) @(negedge clk);
    chk(h0.tok_q.size() == 0 && h1.tok_q.size() == 0, "tokens returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
