// tb_gas_rx: sends short and long Active Message packets into the receive
// unit with random gaps and random memory/FSL back-pressure. Checks the
// handler calls on FSL 1 (token in place of the node, address, count,
// arguments, header marker), the payload written to memory, that a long
// message's call only starts after its last payload word was written, that a
// short message's call leaves two cycles after its header arrived
// (cut-through) and that the unit waits while no token is free.
// The expected values are worked out in the testbench itself; the scenarios
// are this design's own, except where a comment names a measurement of the
// reference design.
module tb_gas_rx;
  import gas_pkg::*;
  localparam int AW = 8;
  logic clk = 0, rst = 1;
  logic net_valid, net_ready, fsl1_valid, fsl1_ready, tok_req, tok_gnt, wr_req, wr_gnt;
  lword_t net_data, fsl1_data;
  logic [7:0] tok_node, tok;
  logic [AW-1:0] wr_addr;
  logic [DW-1:0] wr_data;
  logic ev_short, ev_long;
  int checks = 0, failures = 0;
  logic [31:0] mem [2**AW];
  lword_t in_q[$], exp_q[$];
  int pending_writes = 0;
  bit tok_avail = 1;
  int cyc = 0, hdr_cyc = -1, call_cyc = -1;

  gas_rx #(.AW(AW)) dut (.*);

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

  // token model: token = low bits of a running counter
  logic [7:0] next_tok = 8'd3;
  assign tok_gnt = tok_req && tok_avail;
  assign tok     = next_tok;

  // memory side
  always_ff @(posedge clk) if (wr_req && wr_gnt) mem[wr_addr] <= wr_data;

  // build one message; expected FSL 1 stream queued in exp_q
  task automatic add_msg(bit is_long, int nargs, int len, int addr, logic [7:0] h, logic [7:0] tk);
    am_hdr_t hd, ch;
    hd = '0; hd.node = 8'd1; hd.src = 8'(20 + h); hd.handler = h; hd.nargs = 4'(nargs); hd.is_long = is_long;
    ch = hd; ch.node = tk; ch.src = '0;
    in_q.push_back({!is_long && nargs == 0, hd});
    exp_q.push_back({1'b1, ch});
    if (is_long) begin
      in_q.push_back({1'b0, 32'(addr)});
      in_q.push_back({len == 0 && nargs == 0, 32'(len)});
      for (int i = 0; i < len; i++) in_q.push_back({i == len-1 && nargs == 0, 32'(addr * 1000 + i)});
      exp_q.push_back({1'b0, 32'(addr)});
      exp_q.push_back({1'b0, 32'(len)});
    end
    for (int i = 0; i < nargs; i++) begin
      in_q.push_back({i == nargs-1, 32'hA000_0000 + 32'(h * 16 + i)});
      exp_q.push_back({1'b0, 32'hA000_0000 + 32'(h * 16 + i)});
    end
  endtask

  // driver
  always @(negedge clk) begin
    if (rst) begin net_valid <= 0; net_data <= '0; end
    else begin
      net_valid <= (in_q.size() > 0) && ($urandom % 4 != 0);
      net_data  <= (in_q.size() > 0) ? in_q[0] : '0;
    end
  end
  always @(posedge clk) if (!rst && net_valid && net_ready) begin
    if (in_q.size() > 0) void'(in_q.pop_front());
    if (net_data[31:24] == 8'd1 && tok_req) hdr_cyc = cyc;
  end
  always @(negedge clk) begin
    fsl1_ready <= ($urandom % 5 != 0);
    wr_gnt     <= ($urandom % 3 != 0);
  end

  // monitor
  int long_seen = 0, short_seen = 0;
  logic [31:0] cur_addr, cur_len;
  int widx = 0;
  always @(posedge clk) if (!rst && fsl1_valid && fsl1_ready) begin
    if (exp_q.size() == 0) chk(0, "unexpected FSL 1 word");
    else begin
      chk(fsl1_data == exp_q[0], $sformatf("FSL 1 word %h exp %h", fsl1_data, exp_q[0]));
      void'(exp_q.pop_front());
    end
  end

  initial begin
    net_valid = 0; fsl1_ready = 1; wr_gnt = 1;
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    repeat (3) @(negedge clk); rst = 0;
    // short message, cut-through latency with ready sinks
    add_msg(0, 2, 0, 0, 8'h11, 8'd3);
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    // long messages: check memory is written before the call
    add_msg(1, 1, 8, 16, 8'h22, 8'd3);
    add_msg(1, 0, 3, 40, 8'h23, 8'd3);
    add_msg(0, 0, 0, 0, 8'h24, 8'd3);
    add_msg(1, 3, 12, 60, 8'h25, 8'd3);
    add_msg(0, 4, 0, 0, 8'h26, 8'd3);
    fork
      begin
        // each long call header must find its payload in memory already
        for (int m = 0; m < 3; m++) begin
          @(posedge clk iff (fsl1_valid && fsl1_ready && fsl1_data[32] && fsl1_data[2]));
          #1;
          case (m)
            0: for (int i = 0; i < 8; i++)  chk(mem[16+i] == 32'(16000+i), "long payload 1 in memory at call");
            1: for (int i = 0; i < 3; i++)  chk(mem[40+i] == 32'(40000+i), "long payload 2 in memory at call");
            2: for (int i = 0; i < 12; i++) chk(mem[60+i] == 32'(60000+i), "long payload 3 in memory at call");
          endcase
        end
      end
    join_none
    wait (exp_q.size() == 0 && in_q.size() == 0);
    repeat (5) @(negedge clk);
    // token exhaustion: the unit must wait
    tok_avail = 0;
    add_msg(0, 1, 0, 0, 8'h31, 8'd3);
    repeat (30) @(negedge clk);
    chk(exp_q.size() == 2 && !fsl1_valid, "waits while no token is free");
    tok_avail = 1;
    wait (exp_q.size() == 0);
    // cut-through timing with all sinks ready
    disable fork;
    repeat (3) @(negedge clk);
    begin
      int t0;
      force fsl1_ready = 1'b1;
      add_msg(0, 1, 0, 0, 8'h41, 8'd3);
      @(posedge clk iff (net_valid && net_ready)); t0 = cyc;
      @(posedge clk iff (fsl1_valid && fsl1_ready));
      chk(cyc - t0 == 1, $sformatf("short call header %0d cycles after the network header", cyc - t0 + 1));
      release fsl1_ready;
    end
    wait (exp_q.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
