// tb_gas_tx: feeds requests into the transmit unit over FSL 3 (short
// requests, replies addressed by token, long requests with payload) and
// checks the network packets (destination from the request or from the
// token lookup, own node as source, remote address, count, payload read
// from memory, arguments, last-word marker), the completion echoed on FSL 4
// after the packet has left, and that an uncontended long payload streams at
// one word per cycle.
module tb_gas_tx;
  import gas_pkg::*;
  localparam int AW = 8;
  localparam logic [7:0] ME = 8'd5;
  logic clk = 0, rst = 1;
  logic fsl3_valid, fsl3_ready, fsl4_valid, fsl4_ready, rd_req, rd_gnt, rd_valid;
  logic net_valid, net_ready, ev_reply, ev_done;
  lword_t fsl3_data, fsl4_data, net_data;
  logic [7:0] lk_tok, lk_node;
  logic [AW-1:0] rd_addr;
  logic [DW-1:0] rd_data;
  int checks = 0, failures = 0, cyc = 0;
  logic [31:0] mem [2**AW];
  lword_t req_q[$], exp_net[$], exp_done[$];
  bit stall = 1;

  gas_tx #(.NODE_ID(ME), .AW(AW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  assign lk_node = 8'd200 + lk_tok;      // token buffer model
  always_ff @(posedge clk) begin          // memory + arbiter model
    rd_valid <= rd_req && rd_gnt;
    rd_data  <= mem[rd_addr];
  end

  task automatic add_req(bit is_long, bit reply, int nargs, int len, int src, int dst, logic [7:0] node, logic [7:0] h);
    am_hdr_t r, n;
    r = '0; r.node = node; r.handler = h; r.nargs = 4'(nargs); r.reply = reply; r.is_long = is_long;
    n = r; n.node = reply ? 8'd200 + node : node; n.src = ME;
    req_q.push_back({1'b1, r});
    exp_net.push_back({!is_long && nargs == 0, n});
    if (is_long) begin
      req_q.push_back({1'b0, 32'(src)});
      req_q.push_back({1'b0, 32'(dst)});
      req_q.push_back({1'b0, 32'(len)});
      exp_net.push_back({1'b0, 32'(dst)});
      exp_net.push_back({len == 0 && nargs == 0, 32'(len)});
      for (int i = 0; i < len; i++) exp_net.push_back({i == len-1 && nargs == 0, mem[src+i]});
    end
    for (int i = 0; i < nargs; i++) begin
      req_q.push_back({1'b0, 32'hB000_0000 + 32'(i)});
      exp_net.push_back({i == nargs-1, 32'hB000_0000 + 32'(i)});
    end
    exp_done.push_back({1'b1, r});
  endtask

  always @(negedge clk) begin
    if (rst) begin fsl3_valid <= 0; fsl3_data <= '0; end
    else begin
      fsl3_valid <= req_q.size() > 0 && (!stall || $urandom % 4 != 0);
      fsl3_data  <= req_q.size() > 0 ? req_q[0] : '0;
    end
    net_ready  <= !stall || ($urandom % 4 != 0);
    rd_gnt     <= !stall || ($urandom % 3 != 0);
    fsl4_ready <= !stall || ($urandom % 2 != 0);
  end
  always @(posedge clk) if (!rst && fsl3_valid && fsl3_ready) void'(req_q.pop_front());

  int net_words = 0;
  always @(posedge clk) if (!rst) begin
    if (net_valid && net_ready) begin
      net_words++;
      if (exp_net.size() == 0) chk(0, "unexpected network word");
      else begin
        chk(net_data == exp_net[0], $sformatf("net word %h exp %h", net_data, exp_net[0]));
        void'(exp_net.pop_front());
      end
    end
    if (fsl4_valid && fsl4_ready) begin
      if (exp_done.size() == 0) chk(0, "unexpected completion");
      else begin
        chk(fsl4_data == exp_done[0], "completion echoes request");
        // the whole packet has been sent before its completion
        chk(exp_net.size() == 0 || exp_net[0][32] == 1'b1 || exp_net[0][31:24] != 8'hFF,
            "completion after packet");
        void'(exp_done.pop_front());
      end
    end
  end

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = 32'hD000_0000 + 32'(i * 3);
    fsl4_ready = 1; net_ready = 1; rd_gnt = 1;
    repeat (3) @(negedge clk); rst = 0;
    add_req(0, 0, 2, 0, 0, 0, 8'd9, 8'h10);
    add_req(0, 1, 1, 0, 0, 0, 8'd4, 8'h11);    // reply by token 4
    add_req(1, 0, 1, 6, 10, 300, 8'd7, 8'h12);
    add_req(1, 1, 0, 4, 20, 400, 8'd2, 8'h13); // long reply
    add_req(0, 0, 0, 0, 0, 0, 8'd1, 8'h14);
    add_req(1, 0, 3, 1, 30, 500, 8'd3, 8'h15);
    wait (exp_done.size() == 0 && exp_net.size() == 0);
    chk(req_q.size() == 0, "all requests consumed");
    // throughput: 32-word payload with no back-pressure
    stall = 0;
    repeat (3) @(negedge clk);
    begin
      int t0, t1;
      add_req(1, 0, 0, 32, 100, 0, 8'd8, 8'h20);
      @(posedge clk iff (net_valid && net_ready && exp_net.size() == 32)); t0 = cyc;
      @(posedge clk iff (net_valid && net_ready && exp_net.size() == 1)); t1 = cyc;
      chk(t1 - t0 <= 32, $sformatf("32 payload words in %0d cycles", t1 - t0 + 1));
    end
    wait (exp_done.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
