// tb_analog_ts_sh: checks that the analog time-stamp cell holds the ramp value
// seen at the first hit after preset, ignores later hits, and drives its bus
// only while released.
module tb_analog_ts_sh;
  localparam int W = 10;
  logic clk = 0, rst_n = 0, preset = 0, hit = 0, release_data = 0;
  logic [W-1:0] ramp = '0, an_ts;
  int checks = 0, failures = 0;

  analog_ts_sh #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  // the ramp rises by one code per clock, as a slow chip-wide ramp would
  always @(posedge clk) ramp <= ramp + 1'b1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk); preset = 1; @(negedge clk); preset = 0;
      repeat ($urandom_range(1, 40)) @(negedge clk);
      exp = ramp;
      hit = 1; @(negedge clk); hit = 0;
      repeat ($urandom_range(1, 10)) @(negedge clk);
      hit = 1; @(negedge clk); hit = 0;    // a later hit must not overwrite
      #1;
      checks++;
      if (an_ts !== '0) begin failures++; $display("FAIL drives bus while idle"); end
      release_data = 1; #1;
      checks++;
      if (an_ts !== exp) begin failures++; $display("FAIL held %0d exp %0d", an_ts, exp); end
      release_data = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
