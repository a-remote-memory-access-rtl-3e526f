// tb_dp_bram: writes random words through both ports of the dual-ported
// local memory and reads them back through the other port; checks the
// one-cycle read latency and read-first behaviour.
// The expected values are worked out in the testbench itself; the scenarios
// are this design's own, except where a comment names a measurement of the
// reference design.
module tb_dp_bram;
  localparam int WORDS = 16384, DW = 32, AW = 14;
  logic clk = 0;
  logic a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [DW-1:0] a_wdata, a_rdata, b_wdata, b_rdata;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [int];

  dp_bram dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [AW-1:0] addrs[200];
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      addrs[i] = AW'(i * 83 + 5);
      if (i % 2 == 0) begin a_en = 1; a_we = 1; a_addr = addrs[i]; a_wdata = $urandom; model[addrs[i]] = a_wdata; end
      else            begin b_en = 1; b_we = 1; b_addr = addrs[i]; b_wdata = $urandom; model[addrs[i]] = b_wdata; end
      @(negedge clk);
      a_en = 0; a_we = 0; b_en = 0; b_we = 0;
    end
    // read back on the opposite port
    for (int i = 0; i < 200; i++) begin
      if (i % 2 == 0) begin b_en = 1; b_addr = addrs[i]; end
      else            begin a_en = 1; a_addr = addrs[i]; end
      @(negedge clk);
      a_en = 0; b_en = 0;
      if (i % 2 == 0) chk(b_rdata == model[addrs[i]], "port B reads port A write");
      else            chk(a_rdata == model[addrs[i]], "port A reads port B write");
    end
    // read-first: write new data and observe the old one in the same access
    a_en = 1; a_we = 1; a_addr = addrs[0]; a_wdata = 32'hCAFE_0001;
    @(negedge clk);
    chk(a_rdata == model[addrs[0]], "read-first on write");
    a_we = 0;
    @(negedge clk);
    chk(a_rdata == 32'hCAFE_0001, "new value after write");
    // highest address
    b_en = 1; b_we = 1; b_addr = AW'(WORDS-1); b_wdata = 32'h5A5A_A5A5;
    @(negedge clk); b_we = 0; @(negedge clk);
    chk(b_rdata == 32'h5A5A_A5A5, "last word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
