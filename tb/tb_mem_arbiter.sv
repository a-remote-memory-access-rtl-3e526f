// tb_mem_arbiter: drives random write and read requests into the memory
// arbiter with a memory model behind it; checks that only one side is
// granted per cycle, that grants alternate under contention (round-robin),
// that writes land and that read data returns one cycle after the grant.
// The expected values are worked out in the testbench itself; the scenarios
// are this design's own, except where a comment names a measurement of the
// reference design.
module tb_mem_arbiter;
  localparam int AW = 6, DW = 32;
  logic clk = 0, rst = 1;
  logic wr_req, wr_gnt, rd_req, rd_gnt, rd_valid, m_en, m_we, conflict;
  logic [AW-1:0] wr_addr, rd_addr, m_addr;
  logic [DW-1:0] wr_data, rd_data, m_wdata, m_rdata;
  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0, conflicts = 0;
  bit last_rd = 0;
  logic [DW-1:0] exp_rd; bit exp_v = 0;

  mem_arbiter #(.AW(AW), .DW(DW)) dut (.*);

  always_ff @(posedge clk) begin
    if (m_en) begin
      m_rdata <= mem[m_addr];
      if (m_we) mem[m_addr] <= m_wdata;
    end
  end

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

  initial begin
    for (int i = 0; i < 2**AW; i++) begin mem[i] = DW'(i); model[i] = DW'(i); end
    wr_req = 0; rd_req = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int c = 0; c < 3000; c++) begin
      wr_req = $urandom % 2; rd_req = $urandom % 2;
      wr_addr = AW'($urandom); rd_addr = AW'($urandom); wr_data = $urandom;
      #1;
      chk(!(wr_gnt && rd_gnt), "one grant per cycle");
      if (wr_req && rd_req) begin
        conflicts++;
        chk(wr_gnt == last_rd && rd_gnt == !last_rd, "round-robin under contention");
      end else begin
        chk(wr_gnt == wr_req && rd_gnt == rd_req, "lone request granted");
      end
      @(posedge clk);
      if (exp_v) chk(rd_valid && rd_data == exp_rd, "read data one cycle after grant");
      else       chk(!rd_valid, "no spurious rd_valid");
      exp_v = rd_gnt;
      if (rd_gnt) exp_rd = model[rd_addr];
      if (wr_gnt) model[wr_addr] = wr_data;
      if (wr_gnt) last_rd = 0;
      if (rd_gnt) last_rd = 1;
      @(negedge clk);
    end
    wr_req = 0; rd_req = 0; @(negedge clk); @(negedge clk);
    for (int i = 0; i < 2**AW; i++) chk(mem[i] == model[i], "memory contents");
    chk(conflicts > 100, "contention exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
