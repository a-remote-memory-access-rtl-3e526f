// tb_token_buffer: allocates tokens for source nodes, looks them up, frees
// them through the FSL 2 port and checks that the buffer refuses allocation
// when full, reuses freed entries and counts free entries correctly.
// The expected values are worked out in the testbench itself; the scenarios
// are this design's own, except where a comment names a measurement of the
// reference design.
module tb_token_buffer;
  import gas_pkg::*;
  localparam int NTOK = 16;
  logic clk = 0, rst = 1;
  logic alloc_req, alloc_gnt, fsl2_valid, fsl2_ready;
  logic [7:0] alloc_node, alloc_tok, lk_tok, lk_node;
  lword_t fsl2_data;
  logic [$clog2(NTOK):0] free_cnt;
  int checks = 0, failures = 0;
  logic [7:0] node_of [NTOK];
  bit used [NTOK];

  token_buffer #(.NTOK(NTOK)) dut (.*);

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

  function automatic int first_free();
    for (int i = 0; i < NTOK; i++) if (!used[i]) return i;
    return -1;
  endfunction

  initial begin
    alloc_req = 0; alloc_node = 0; lk_tok = 0; fsl2_valid = 0; fsl2_data = '0;
    repeat (2) @(negedge clk); rst = 0; @(negedge clk);
    chk(free_cnt == NTOK, "all free after reset");
    // fill completely
    for (int i = 0; i < NTOK; i++) begin
      alloc_req = 1; alloc_node = 8'(100 + i); #1;
      chk(alloc_gnt && alloc_tok == 8'(first_free()), "lowest free token");
      used[alloc_tok] = 1; node_of[alloc_tok] = alloc_node;
      @(negedge clk);
    end
    alloc_req = 1; #1;
    chk(!alloc_gnt, "no grant when full");
    chk(free_cnt == 0, "zero free");
    alloc_req = 0;
    for (int t = 0; t < NTOK; t++) begin
      lk_tok = 8'(t); #1; chk(lk_node == node_of[t], "lookup");
    end
    // random free / alloc
    for (int c = 0; c < 2000; c++) begin
      int t;
      t = $urandom % NTOK;
      fsl2_valid = used[t] && ($urandom % 2);
      fsl2_data  = {1'b0, 24'd0, 8'(t)};
      alloc_req  = ($urandom % 2);
      alloc_node = 8'($urandom);
      #1;
      if (alloc_req) begin
        chk(alloc_gnt == (first_free() >= 0), "grant iff free entry");
        if (alloc_gnt) chk(alloc_tok == 8'(first_free()), "lowest free token (random)");
      end
      @(posedge clk);
      if (alloc_req && alloc_gnt) begin used[alloc_tok] = 1; node_of[alloc_tok] = alloc_node; end
      if (fsl2_valid) used[t] = 0;
      @(negedge clk);
      begin
        int n; n = 0;
        for (int i = 0; i < NTOK; i++) n += !used[i];
        chk(free_cnt == n, "free count");
      end
      lk_tok = 8'($urandom % NTOK); #1;
      if (used[lk_tok]) chk(lk_node == node_of[lk_tok], "lookup (random)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
