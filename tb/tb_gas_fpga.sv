// tb_gas_fpga: FPGA 0 of a four-FPGA ring on its own; the testbench plays the
// two neighbouring FPGAs on the ring ports (returning a credit for every word
// it takes) and the processor on node 16. Checks: an on-chip barrier among
// PEs 0..3 loaded and started by the processor; packets for other FPGAs leave
// on the ring side with fewer hops (clockwise on a tie) unchanged; a packet
// coming in from the ring reaches its PE, and the reply it triggers goes back
// out towards the sender; a packet entering from one ring side for the FPGA
// beyond leaves on the other side (transit).
module tb_gas_fpga;
  import gas_pkg::*;
  localparam int AW = 10, NC = 4;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  logic cw_tv, cw_tc, cw_rv, cw_rc, ccw_tv, ccw_tc, ccw_rv, ccw_rc;
  lword_t cw_td, cw_rd, ccw_td, ccw_rd;
  logic pe_a_en[4], pe_a_we[4]; logic [AW-1:0] pe_a_addr[4]; logic [31:0] pe_a_wdata[4], pe_a_rdata[4];
  logic [NC-1:0] pe_ctrl_in[4], pe_ctrl_out[4];
  logic [31:0] pe_timer[4], pe_arrival[4];
  logic pe_running[4];
  node_ev_t pe_ev[4], h_ev;
  logic f1v, f1r, f2v, f2r, f3v, f3r, f4v, f4r;
  lword_t f1d, f2d, f3d, f4d;
  logic [NPORT-1:0] ev_contend;
  logic [1:0] ev_no_credit;

  gas_fpga #(.FPGA_ID(0), .N_FPGA(4), .WORDS(1024), .IMEM_WORDS(64)) dut (.clk, .rst,
    .cw_tx_valid(cw_tv), .cw_tx_data(cw_td), .cw_tx_credit(cw_tc),
    .cw_rx_valid(cw_rv), .cw_rx_data(cw_rd), .cw_rx_credit(cw_rc),
    .ccw_tx_valid(ccw_tv), .ccw_tx_data(ccw_td), .ccw_tx_credit(ccw_tc),
    .ccw_rx_valid(ccw_rv), .ccw_rx_data(ccw_rd), .ccw_rx_credit(ccw_rc),
    .pe_a_en, .pe_a_we, .pe_a_addr, .pe_a_wdata, .pe_a_rdata, .pe_ctrl_in, .pe_ctrl_out,
    .pe_timer, .pe_arrival, .pe_running, .pe_ev,
    .h_a_en(1'b0), .h_a_we(1'b0), .h_a_addr('0), .h_a_wdata('0), .h_a_rdata(),
    .h_fsl1_valid(f1v), .h_fsl1_ready(f1r), .h_fsl1_data(f1d),
    .h_fsl2_valid(f2v), .h_fsl2_ready(f2r), .h_fsl2_data(f2d),
    .h_fsl3_valid(f3v), .h_fsl3_ready(f3r), .h_fsl3_data(f3d),
    .h_fsl4_valid(f4v), .h_fsl4_ready(f4r), .h_fsl4_data(f4d),
    .h_ev, .ev_contend, .ev_no_credit);
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

  // ring neighbours: collect words, return one credit per word
  lword_t cw_out[$], ccw_out[$], cw_in[$], ccw_in[$];
  always @(posedge clk) begin
    cw_tc  <= !rst && cw_tv;
    ccw_tc <= !rst && ccw_tv;
    if (!rst && cw_tv)  cw_out.push_back(cw_td);
    if (!rst && ccw_tv) ccw_out.push_back(ccw_td);
  end
  always @(negedge clk) begin
    cw_rv  <= cw_in.size() > 0;   cw_rd  <= cw_in.size() > 0 ? cw_in.pop_front() : '0;
    ccw_rv <= ccw_in.size() > 0;  ccw_rd <= ccw_in.size() > 0 ? ccw_in.pop_front() : '0;
  end

  function automatic lword_t hw(int dst, int src, logic [7:0] hd, int nargs, bit last);
    return {last, 8'(dst), 8'(src), hd, 4'(nargs), 4'b0};
  endfunction

  initial begin
    logic [31:0] prog[$], a[];
    for (int i = 0; i < 4; i++) begin
      pe_a_en[i] = 0; pe_a_we[i] = 0; pe_a_addr[i] = 0; pe_a_wdata[i] = 0; pe_ctrl_in[i] = 0;
    end
    repeat (4) @(negedge clk); rst = 0;
    // on-chip barrier: node 0 collects 3 calls, answers with done
    for (int n = 0; n < 4; n++) begin
      if (n == 0) begin
        prog = {h.i_msgctr(0, 8'h20, 3), h.i_wait(0, 4'b0001, 0, 0, 0)};
        for (int d = 1; d < 4; d++) prog.push_back(h.i_send(8'(d), 8'h21, 0, 0, 0, 0));
        prog.push_back(h.i_send(8'd16, 8'h22, 0, 0, 1, 0));
      end else
        prog = {h.i_msgctr(0, 8'h21, 1), h.i_send(8'd0, 8'h20, 0, 0, 0, 0),
                h.i_wait(0, 4'b0001, 0, 0, 0), h.i_ctrl(8'h8)};
      prog.push_back(h.I_HALT);
      h.load_program(8'(n), prog, 1);
    end
    while (h.count(8'h22) == 0) @(negedge clk);
    repeat (40) @(negedge clk);
    for (int n = 1; n < 4; n++) chk(pe_ctrl_out[n] == 4'h8 && !pe_running[n], "barrier done at PE");
    chk(!pe_running[0], "node 0 finished");
    chk(cw_out.size() == 0 && ccw_out.size() == 0, "no on-chip traffic leaks off-chip");
    // routing off-chip: node 4 (FPGA 1) and 8 (FPGA 2, tie) clockwise, node 12 / 19 counter-clockwise
    a = new[1]; a[0] = 32'h4444;
    h.am_short(8'd4, 8'h40, a); h.am_short(8'd8, 8'h41, a); h.am_short(8'd12, 8'h42, a); h.am_short(8'd19, 8'h43, a);
    repeat (80) @(negedge clk);
    chk(cw_out.size() == 4 && ccw_out.size() == 4, "off-chip packet counts");
    if (cw_out.size() == 4 && ccw_out.size() == 4) begin
      chk(cw_out[0] == hw(4, 16, 8'h40, 1, 0) && cw_out[1] == {1'b1, 32'h4444}, "packet to node 4 clockwise");
      chk(cw_out[2] == hw(8, 16, 8'h41, 1, 0), "packet to node 8 clockwise (tie)");
      chk(ccw_out[0] == hw(12, 16, 8'h42, 1, 0), "packet to node 12 counter-clockwise");
      chk(ccw_out[2] == hw(19, 16, 8'h43, 1, 0), "packet to processor 19 counter-clockwise");
    end
    cw_out.delete(); ccw_out.delete();
    // from FPGA 1: node 5 polls node 2; the reply must go back clockwise to 5
    cw_in.push_back(hw(2, 5, H_POLL, 0, 1));
    repeat (80) @(negedge clk);
    chk(cw_out.size() == 2 && cw_out[0][31:24] == 8'd5 && cw_out[0][15:8] == H_POLL_REPLY &&
        cw_out[1][31:0] == pe_arrival[2], "poll reply to node 5");
    cw_out.delete();
    // transit: from FPGA 3 (counter-clockwise side) to node 4 on FPGA 1
    ccw_in.push_back(hw(4, 13, 8'h50, 2, 0)); ccw_in.push_back({1'b0, 32'd1}); ccw_in.push_back({1'b1, 32'd2});
    repeat (60) @(negedge clk);
    chk(cw_out.size() == 3 && cw_out[0] == hw(4, 13, 8'h50, 2, 0) && cw_out[2] == {1'b1, 32'd2}, "transit to the other ring side");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
