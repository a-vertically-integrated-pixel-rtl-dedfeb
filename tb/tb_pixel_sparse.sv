// tb_pixel_sparse: chains K sparsification cells as in one array row and
// checks the look-ahead token readout against a reference list of the set
// pixels: transparency of empty pixels, the token stopping at set pixels,
// selection by data_clk in chain order, the latch clear on selection, the
// token running ahead while a pixel is selected, read_anyway, and read_done.
module tb_pixel_sparse;
  localparam int K = 12;
  logic clk = 0, rst_n = 0, report = 0, data_clk = 0;
  logic hit [K];
  logic ra  [K];
  logic tok [K+1];
  logic rel [K];
  int checks = 0, failures = 0;

  assign tok[0] = report;
  for (genvar i = 0; i < K; i++) begin : g
    pixel_sparse dut (.clk, .rst_n, .hit(hit[i]), .read_anyway(ra[i]),
                      .token_in(tok[i]), .data_clk, .token_out(tok[i+1]),
                      .release_data(rel[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int selected();
    int s = -1, n = 0;
    for (int i = 0; i < K; i++) if (rel[i]) begin s = i; n++; end
    return (n > 1) ? -2 : s;
  endfunction

  initial begin
    bit set [K];
    int order [$];
    foreach (hit[i]) begin hit[i] = 0; ra[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      automatic int mode = $urandom_range(0, 3);
      order.delete();
      // acquisition: random hits (or forced reads)
      @(negedge clk);
      for (int i = 0; i < K; i++) begin
        set[i] = (mode == 3) ? 1'b1 : ($urandom_range(0, 3) == 0);
        if (mode == 3) ra[i] = 1; else hit[i] = set[i];
        if (set[i]) order.push_back(i);
      end
      @(negedge clk);
      foreach (hit[i]) begin hit[i] = 0; ra[i] = 0; end
      // readout
      report = 1; #1;
      ck(tok[K] == (order.size() == 0), "read_done before first data_clk");
      ck(selected() == -1, "nothing selected before first data_clk");
      for (int r = 0; r < order.size(); r++) begin
        @(negedge clk); data_clk = 1; @(negedge clk); data_clk = 0;
        #1;
        ck(selected() == order[r], $sformatf("pixel %0d selected in order", order[r]));
        // look-ahead: token already stops at the next set pixel or leaves
        ck(tok[K] == (r == order.size() - 1), "token runs ahead");
        if (r + 1 < order.size()) ck(tok[order[r+1]] == 1 && tok[order[r+1]+1] == 0,
                                     "token waits at next set pixel");
        repeat ($urandom_range(0, 4)) @(negedge clk);
      end
      @(negedge clk); data_clk = 1; @(negedge clk); data_clk = 0; #1;
      ck(selected() == -1, "nothing selected after the last pixel");
      ck(tok[K] == 1, "array transparent after readout");
      report = 0;
      @(negedge clk); #1;
      ck(tok[K] == 0, "no token without report");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
