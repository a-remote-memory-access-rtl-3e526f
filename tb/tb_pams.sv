// tb_pams: plays the GAScore side of the four FSLs of a sequencer. It loads
// a program with H_PROG handler calls, starts it with H_START and checks:
// the timer wait (nothing happens before the threshold), a wait on a message
// counter, a transfer counter and a control-input pattern at once (released
// only when all hold), the control outputs, a short request with arguments
// from code, timer and ArrivalTime, a long request, the timer offset, HALT,
// the ArrivalTime register, the H_POLL reply (which must not update
// ArrivalTime), the H_GET long reply, and that tokens are returned on FSL 2
// (for replies only after their completion on FSL 4).
// The expected values are worked out in the testbench itself; the scenarios
// are this design's own, except where a comment names a measurement of the
// reference design.
module tb_pams;
  import gas_pkg::*;
  logic clk = 0, rst = 1;
  logic f1v, f1r, f2v, f2r, f3v, f3r, f4v, f4r;
  lword_t f1d, f2d, f3d, f4d;
  logic [3:0] ctrl_in, ctrl_out;
  logic [31:0] timer, arrival_time;
  logic running, ev_prog, ev_reply, ev_send;
  logic [3:0] msg_done, xfer_done;
  int checks = 0, failures = 0, cyc = 0;
  lword_t f1_q[$], f3_seen[$];
  logic [7:0] tok_ret[$];
  int hdrs_seen = 0, comps_sent = 0;
  bit auto_complete = 1;

  pams #(.IMEM_WORDS(64)) dut (
    .clk, .rst,
    .fsl1_valid(f1v), .fsl1_ready(f1r), .fsl1_data(f1d),
    .fsl2_valid(f2v), .fsl2_ready(f2r), .fsl2_data(f2d),
    .fsl3_valid(f3v), .fsl3_ready(f3r), .fsl3_data(f3d),
    .fsl4_valid(f4v), .fsl4_ready(f4r), .fsl4_data(f4d),
    .ctrl_in, .ctrl_out, .timer, .arrival_time, .running, .msg_done, .xfer_done,
    .ev_prog, .ev_reply, .ev_send
  );

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

  always @(negedge clk) begin
    f1v <= f1_q.size() > 0;
    f1d <= f1_q.size() > 0 ? f1_q[0] : '0;
    f3r <= ($urandom % 4) != 0;
    f4v <= auto_complete && comps_sent < hdrs_seen;
    f4d <= '0;
  end
  assign f2r = 1'b1;
  always @(posedge clk) if (!rst) begin
    if (f1v && f1r) void'(f1_q.pop_front());
    if (f3v && f3r) begin f3_seen.push_back(f3d); if (f3d[32]) hdrs_seen++; end
    if (f4v) comps_sent++;
    if (f2v) tok_ret.push_back(f2d[7:0]);
  end

  task automatic call(logic [7:0] tok, logic [7:0] h, logic [31:0] a[], bit lng = 0, int len = 0);
    am_hdr_t x;
    x = '0; x.node = tok; x.handler = h; x.nargs = 4'(a.size()); x.is_long = lng;
    f1_q.push_back({1'b1, x});
    if (lng) begin f1_q.push_back({1'b0, 32'd0}); f1_q.push_back({1'b0, 32'(len)}); end
    foreach (a[i]) f1_q.push_back({1'b0, a[i]});
  endtask

  localparam logic [31:0] PROG [16] = '{
    32'h1000_0000, 32'd200,                  // TIMER_THR 200
    32'h6001_0000,                           // WAIT timer
    32'h3030_0003,                           // MSGCTR 0: handler 0x30, 3
    32'h0000_0000,                           // XFERCTR, set below
    32'h5000_0005,                           // CTRL 0101
    32'h6000_1232,                           // WAIT msg0, xfer1, in[1:0]==10
    32'h0000_0000,                           // SEND, set below
    32'h0000_1234,
    32'h0000_0000,                           // SEND long, set below
    32'd5, 32'd77, 32'd4,
    32'h2000_0000, 32'd1000,                 // TIMER_OFS 1000
    32'h0000_0000                            // HALT
  };

  initial begin
    logic [31:0] prog [16];
    logic [31:0] a [];
    int t_before, arr;
    prog = PROG;
    prog[4] = {4'h4, 2'b0, 2'd1, 8'h31, 16'd10};           // XFERCTR 1: handler 0x31, 10 words
    prog[7] = {4'h7, 8'd9, 8'h40, 4'd1, 1'b0, 1'b1, 1'b1, 5'd0};  // SEND to 9, 0x40, 1 code arg, +timer, +arrival
    prog[9] = {4'h7, 8'd3, 8'h41, 4'd0, 1'b1, 7'd0};         // SEND long to 3, 0x41
    ctrl_in = 4'b0000;
    repeat (3) @(negedge clk); rst = 0;
    // load in two H_PROG calls
    a = new[9]; a[0] = 0; for (int i = 0; i < 8; i++) a[1+i] = prog[i]; call(8'd1, H_PROG, a);
    a = new[9]; a[0] = 8; for (int i = 0; i < 8; i++) a[1+i] = prog[8+i]; call(8'd2, H_PROG, a);
    a = new[1]; a[0] = 0; call(8'd3, H_START, a);
    wait (tok_ret.size() == 3); @(negedge clk);
    chk(tok_ret[0] == 1 && tok_ret[1] == 2 && tok_ret[2] == 3, "tokens returned for calls");
    for (int i = 0; i < 16; i++) chk(dut.imem[i] == prog[i], "instruction RAM loaded");
    chk(running, "running after H_START");
    // before timer threshold nothing happens
    while (timer < 190) begin @(negedge clk); chk(ctrl_out == 0, "no CTRL before timer threshold"); end
    repeat (40) @(negedge clk);
    chk(ctrl_out == 4'b0101, "CTRL after timer wait");
    // feed counters partially; must stay waiting
    a = new[0];
    call(8'd4, 8'h30, a); call(8'd5, 8'h30, a);
    call(8'd6, 8'h31, a, 1, 6);
    ctrl_in = 4'b0010;
    repeat (60) @(negedge clk);
    chk(hdrs_seen == 0, "waits for all conditions");
    chk(!msg_done[0] && !xfer_done[1], "counters below threshold");
    call(8'd7, 8'h30, a);
    repeat (30) @(negedge clk);
    chk(hdrs_seen == 0 && msg_done[0], "msg counter reached, transfer not yet");
    ctrl_in = 4'b0000;
    call(8'd8, 8'h31, a, 1, 4);
    repeat (30) @(negedge clk);
    chk(xfer_done[1] && hdrs_seen == 0, "control input still blocks");
    arr = int'(arrival_time);
    t_before = int'(timer);
    ctrl_in = 4'b0110;
    wait (hdrs_seen == 2 && f3_seen.size() == 8); @(negedge clk);
    chk(f3_seen[0] == {1'b1, 8'd9, 8'd0, 8'h40, 4'd3, 4'b0}, "short request header");
    chk(f3_seen[1][31:0] == 32'h1234, "code argument");
    chk(int'(f3_seen[2][31:0]) >= t_before && int'(f3_seen[2][31:0]) < t_before + 40, "timer argument");
    chk(int'(f3_seen[3][31:0]) == arr, "ArrivalTime argument");
    chk(f3_seen[4] == {1'b1, 8'd3, 8'd0, 8'h41, 4'd0, 4'b0100}, "long request header");
    chk(f3_seen[5][31:0] == 5 && f3_seen[6][31:0] == 77 && f3_seen[7][31:0] == 4, "long request words");
    t_before = int'(timer);
    wait (!running); @(negedge clk);
    chk(int'(timer) - t_before > 1000, "timer offset applied, then HALT");
    f3_seen.delete(); tok_ret.delete();
    // poll ArrivalTime; completion is held back to check the token waits
    auto_complete = 0;
    arr = int'(arrival_time);
    repeat (20) @(negedge clk);
    a = new[0]; call(8'd9, H_POLL, a);
    wait (f3_seen.size() == 2); @(negedge clk);
    chk(f3_seen[0] == {1'b1, 8'd9, 8'd0, H_POLL_REPLY, 4'd1, 4'b1000}, "poll reply header by token");
    chk(int'(f3_seen[1][31:0]) == arr && int'(arrival_time) == arr, "poll returns ArrivalTime, leaves it");
    repeat (20) @(negedge clk);
    chk(tok_ret.size() == 0, "token held until reply completed");
    auto_complete = 1;
    wait (tok_ret.size() == 1); @(negedge clk);
    chk(tok_ret[0] == 9, "token returned after completion");
    // remote read: long reply
    f3_seen.delete();
    a = new[4]; a[0] = 8; a[1] = 99; a[2] = 2; a[3] = 32'h55; call(8'd10, H_GET, a);
    wait (tok_ret.size() == 2); @(negedge clk);
    chk(f3_seen.size() == 4, "get reply length");
    chk(f3_seen[0] == {1'b1, 8'd10, 8'd0, 8'h55, 4'd0, 4'b1100}, "get reply header");
    chk(f3_seen[1][31:0] == 8 && f3_seen[2][31:0] == 99 && f3_seen[3][31:0] == 2, "get reply words");
    chk(int'(arrival_time) != arr, "ordinary call updates ArrivalTime");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
