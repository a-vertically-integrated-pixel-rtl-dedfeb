// tb_gray_counter: checks the time-slice counter against a reference binary
// count converted to Gray code, checks that consecutive codes differ in one
// bit, that clear has priority and that the 32 codes of a train are distinct.
module tb_gray_counter;
  localparam int W = 5;
  logic clk = 0, rst_n = 0, clear = 0, adv = 0;
  logic [W-1:0] gray, prev;
  int checks = 0, failures = 0;
  int ref_bin = 0;
  bit seen [2**W];

  gray_counter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (gray !== exp) begin
      failures++;
      $display("FAIL %s: gray=%b exp=%b", what, gray, exp);
    end
  endtask

  function automatic logic [W-1:0] to_gray(input int b);
    logic [W-1:0] v = W'(b);
    return v ^ (v >> 1);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check('0, "after reset");
    // one full train of slices plus wrap
    for (int s = 0; s < 40; s++) begin
      prev = gray;
      adv = 1;
      @(negedge clk);
      adv = 0;
      ref_bin = (ref_bin + 1) % (2**W);
      check(to_gray(ref_bin), "step");
      checks++;
      if ($countones(gray ^ prev) != 1) begin
        failures++;
        $display("FAIL more than one bit changed %b -> %b", prev, gray);
      end
      @(negedge clk);
      check(to_gray(ref_bin), "hold");
    end
    // clear has priority over adv
    clear = 1; adv = 1;
    @(negedge clk);
    clear = 0; adv = 0; ref_bin = 0;
    check('0, "clear");
    // random stepping, with all codes of a train distinct
    for (int s = 0; s < 2**W; s++) begin
      checks++;
      if (seen[gray]) begin failures++; $display("FAIL code %b repeated", gray); end
      seen[gray] = 1;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      adv = 1; @(negedge clk); adv = 0;
      ref_bin = (ref_bin + 1) % (2**W);
      check(to_gray(ref_bin), "random step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
