// tb_inject_shift_reg: shifts random patterns through the injection chain and
// checks every pixel enable bit and the chain output against a reference.
module tb_inject_shift_reg;
  localparam int LEN = 37;
  logic clk = 0, rst_n = 0, shift = 0, sin = 0, sout;
  logic [LEN-1:0] en;
  logic [LEN-1:0] pat;
  int checks = 0, failures = 0;

  inject_shift_reg #(.LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (en !== '0) begin failures++; $display("FAIL reset"); end
    for (int t = 0; t < 30; t++) begin
      for (int i = 0; i < LEN; i++) pat[i] = $urandom_range(0, 1);
      // the first bit shifted in ends at bit 0
      for (int i = 0; i < LEN; i++) begin
        sin = pat[i]; shift = 1; @(negedge clk);
        shift = 0;
        if ($urandom_range(0, 2) == 0) @(negedge clk);   // idle clocks hold
      end
      checks++;
      if (en !== pat) begin failures++; $display("FAIL pattern %h exp %h", en, pat); end
      checks++;
      if (sout !== pat[0]) begin failures++; $display("FAIL sout"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
