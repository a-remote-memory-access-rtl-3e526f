// tb_pe_node: a processing node (id 0) wired back to back with a processor
// node (id 16) driven by the processor test model; the testbench also plays
// the custom core on memory port A and the control bits. The processor loads
// and starts a sequencer program over the network; the program raises a
// control output, waits for the core's control input, sends the core's
// result block to the processor as a long message, waits for two messages of
// one handler and raises another control output. Then the processor reads
// the node's memory remotely (H_GET) and polls its ArrivalTime (H_POLL).
// The expected values are worked out in the testbench itself; the scenarios
// are this design's own, except where a comment names a measurement of the
// reference design.
module tb_pe_node;
  import gas_pkg::*;
  localparam int WORDS = 1024, AW = 10;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  logic v01, r01, v10, r10; lword_t d01, d10;
  logic f1v, f1r, f2v, f2r, f3v, f3r, f4v, f4r;
  lword_t f1d, f2d, f3d, f4d;
  logic a_en, a_we; logic [AW-1:0] a_addr; logic [31:0] a_wdata, a_rdata;
  logic h_en, h_we; logic [AW-1:0] h_addr; logic [31:0] h_wdata, h_rdata;
  logic [3:0] ctrl_in, ctrl_out;
  logic [31:0] timer, arrival_time;
  logic running;
  node_ev_t ev, hev;

  pe_node #(.NODE_ID(8'd0), .WORDS(WORDS), .IMEM_WORDS(64)) dut (.clk, .rst,
    .net_in_valid(v10), .net_in_ready(r10), .net_in_data(d10),
    .net_out_valid(v01), .net_out_ready(r01), .net_out_data(d01),
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .ctrl_in, .ctrl_out, .timer, .arrival_time, .running, .ev);
  host_node #(.NODE_ID(8'd16), .WORDS(WORDS)) host (.clk, .rst,
    .net_in_valid(v01), .net_in_ready(r01), .net_in_data(d01),
    .net_out_valid(v10), .net_out_ready(r10), .net_out_data(d10),
    .a_en(h_en), .a_we(h_we), .a_addr(h_addr), .a_wdata(h_wdata), .a_rdata(h_rdata),
    .fsl1_valid(f1v), .fsl1_ready(f1r), .fsl1_data(f1d),
    .fsl2_valid(f2v), .fsl2_ready(f2r), .fsl2_data(f2d),
    .fsl3_valid(f3v), .fsl3_ready(f3r), .fsl3_data(f3d),
    .fsl4_valid(f4v), .fsl4_ready(f4r), .fsl4_data(f4d), .ev(hev));
  host_bfm h (.clk, .rst, .fsl1_valid(f1v), .fsl1_ready(f1r), .fsl1_data(f1d),
    .fsl2_valid(f2v), .fsl2_ready(f2r), .fsl2_data(f2d),
    .fsl3_valid(f3v), .fsl3_ready(f3r), .fsl3_data(f3d),
    .fsl4_valid(f4v), .fsl4_ready(f4r), .fsl4_data(f4d));

  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
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
      if (sop01) chk(d01[23:16] == 8'd0, "source id on packets from node 0");
      sop01 <= d01[32];
    end
    if (v10 && r10) begin
      if (sop10) chk(d10[23:16] == 8'd16, "source id on packets from node 16");
      sop10 <= d10[32];
    end
  end
  task automatic host_read(int addr, output logic [31:0] rd);
    @(negedge clk); h_en = 1; h_addr = AW'(addr); @(negedge clk); h_en = 0; rd = h_rdata;
  endtask

  initial begin
    logic [31:0] prog[$], rd, none[], a[];
    none = new[0];
    a_en = 0; a_we = 0; a_addr = 0; a_wdata = 0; h_en = 0; h_we = 0; h_addr = 0; h_wdata = 0;
    ctrl_in = 0;
    repeat (3) @(negedge clk); rst = 0;
    prog = {h.i_ctrl(8'h1),
            h.i_wait(0, 4'b0, 4'b0, 4'b0001, 4'b0001),
            h.i_send(8'd16, 8'h70, 1, 1, 0, 0), 32'd50, 32'd700, 32'd8, 32'h0000_CAFE,
            h.i_msgctr(0, 8'h71, 2),
            h.i_wait(0, 4'b0001, 4'b0, 4'b0, 4'b0),
            h.i_ctrl(8'h3),
            h.I_HALT};
    h.load_program(8'd0, prog, 1);
    while (ctrl_out != 4'h1) @(negedge clk);
    chk(running, "sequencer running after load");
    // the core computes its result into memory, then signals
    for (int i = 0; i < 8; i++) begin
      a_en = 1; a_we = 1; a_addr = AW'(50 + i); a_wdata = 32'h1234_0000 + 32'(i); @(negedge clk);
    end
    a_en = 0; a_we = 0;
    repeat (20) @(negedge clk);
    chk(h.count(8'h70) == 0, "no send before control input");
    ctrl_in = 4'h1;
    while (h.count(8'h70) == 0) @(negedge clk);
    @(negedge clk);
    begin
      int k; k = h.find_last(8'h70);
      chk(h.calls[k].addr == 700 && h.calls[k].len == 8 && h.calls[k].args[0] == 32'hCAFE, "long call at processor");
    end
    for (int i = 0; i < 8; i++) begin host_read(700 + i, rd); chk(rd == 32'h1234_0000 + 32'(i), "result block at processor"); end
    a = new[1]; a[0] = 1;
    h.am_short(8'd0, 8'h71, a);
    repeat (100) @(negedge clk);
    chk(ctrl_out == 4'h1, "waits for second message");
    h.am_short(8'd0, 8'h71, a);
    while (running) @(negedge clk);
    chk(ctrl_out == 4'h3, "control output after message counter");
    // remote read of 8 words at 50 into processor address 800
    a = new[4]; a[0] = 50; a[1] = 800; a[2] = 8; a[3] = 32'h72;
    h.am_short(8'd0, H_GET, a);
    while (h.count(8'h72) == 0) @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin host_read(800 + i, rd); chk(rd == 32'h1234_0000 + 32'(i), "remote read data"); end
    // poll ArrivalTime
    h.am_short(8'd0, H_POLL, none);
    while (h.count(H_POLL_REPLY) == 0) @(negedge clk);
    @(negedge clk);
    chk(h.calls[h.find_last(H_POLL_REPLY)].args[0] == arrival_time, "polled ArrivalTime");
    repeat (20) @(negedge clk);
    chk(h.tok_q.size() == 0 && dut.u_gas.u_tok.free_cnt == 16, "all tokens free at both ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
