// tb_pixel_ts_mem: checks the pixel time-stamp store: preset to all ones,
// a hit stores the bus code, bits only fall (a second hit ANDs), the output is
// 0 unless released, and no write happens without hit.
module tb_pixel_ts_mem;
  localparam int W = 5;
  logic clk = 0, rst_n = 0, preset = 0, hit = 0, release_data = 0;
  logic [W-1:0] code_in = '0, ts_out;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  pixel_ts_mem #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(input string what);
    release_data = 1;
    #1;
    checks++;
    if (ts_out !== model) begin failures++; $display("FAIL %s: %b exp %b", what, ts_out, model); end
    release_data = 0;
    #1;
    checks++;
    if (ts_out !== '0) begin failures++; $display("FAIL %s: drives bus while not released", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = '1;
    @(negedge clk);
    check_out("reset preset");
    for (int t = 0; t < 200; t++) begin
      automatic int op = $urandom_range(0, 9);
      code_in = W'($urandom);
      if (op == 0) begin
        preset = 1; model = '1;
      end else if (op < 4) begin
        hit = 1; model = model & code_in;
      end
      @(negedge clk);
      preset = 0; hit = 0;
      check_out("random op");
    end
    // single hit after preset stores exactly the bus code
    for (int c = 0; c < 2**W; c++) begin
      preset = 1; @(negedge clk); preset = 0;
      code_in = W'(c); hit = 1; @(negedge clk); hit = 0;
      code_in = '0; @(negedge clk);
      model = W'(c);
      check_out("single hit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
