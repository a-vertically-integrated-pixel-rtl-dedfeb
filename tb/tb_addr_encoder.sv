// tb_addr_encoder: drives each single active line of a 64-line edge and
// checks the 1-based address and its 7-bit width, then the idle bus.
module tb_addr_encoder;
  localparam int N = 64;
  localparam int W = $clog2(N + 1);
  logic [N-1:0] lines;
  logic [W-1:0] addr;
  logic         valid;
  int checks = 0, failures = 0;

  addr_encoder #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (W != 7) begin failures++; $display("FAIL width %0d", W); end
    for (int i = 0; i < N; i++) begin
      lines = '0; lines[i] = 1'b1; #1;
      checks++;
      if (addr !== W'(i + 1) || !valid) begin
        failures++; $display("FAIL line %0d addr %0d", i, addr);
      end
    end
    lines = '0; #1;
    checks++;
    if (addr !== '0 || valid) begin failures++; $display("FAIL idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
