// tb_fsl_fifo: random traffic through a Fast Simplex Link FIFO, checked
// against a queue model; also checks that the FIFO reports full after DEPTH
// words, empty after draining, and that a word written in one cycle can be
// read in the next.
// The expected values are worked out in the testbench itself; the scenarios
// are this design's own, except where a comment names a measurement of the
// reference design.
module tb_fsl_fifo;
  localparam int W = 33, D = 16;
  logic clk = 0, rst = 1;
  logic s_valid, s_ready, m_valid, m_ready;
  logic [W-1:0] s_data, m_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  fsl_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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
    s_valid = 0; m_ready = 0; s_data = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    chk(!m_valid && s_ready && count == 0, "empty after reset");
    // fill
    for (int i = 0; i < D; i++) begin
      s_valid = 1; s_data = W'(i * 7 + 1);
      @(posedge clk); model.push_back(s_data);
      @(negedge clk);
    end
    s_valid = 0;
    chk(!s_ready && count == D, "full after DEPTH writes");
    chk(m_valid && m_data == W'(1), "head word after fill");
    // drain
    while (model.size() > 0) begin
      m_ready = 1;
      chk(m_valid && m_data == model[0], "drain order");
      @(posedge clk); void'(model.pop_front());
      @(negedge clk);
    end
    m_ready = 0;
    chk(!m_valid && count == 0, "empty after drain");
    // fall-through latency: write, next cycle readable
    s_valid = 1; s_data = 33'h1_2345_6789;
    @(posedge clk); @(negedge clk); s_valid = 0;
    chk(m_valid && m_data == 33'h1_2345_6789, "readable one cycle after write");
    m_ready = 1; @(posedge clk); @(negedge clk); m_ready = 0;
    // random traffic
    for (int c = 0; c < 4000; c++) begin
      s_valid = ($urandom % 3) != 0;
      s_data  = {$urandom, 1'($urandom)};
      m_ready = ($urandom % 2) != 0;
      #1;
      if (m_valid) chk(model.size() > 0 && m_data == model[0], "random order");
      chk(s_ready == (model.size() < D), "ready matches fill level");
      @(posedge clk);
      if (m_valid && m_ready) void'(model.pop_front());
      if (s_valid && s_ready) model.push_back(s_data);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
