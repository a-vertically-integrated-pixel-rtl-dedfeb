// tb_vip_serializer: loads random words back to back, one every FW clocks,
// receives the serial stream and checks sync bit, fields, status bits and the
// FW-clock word period (22 clocks for 7-bit addresses and a 5-bit stamp).
module tb_vip_serializer;
  localparam int XW = 7, YW = 7, TW = 5;
  localparam int FW = 1 + XW + YW + TW + 2;
  logic clk = 0, rst_n = 0, load = 0, last = 0, serial_out;
  logic [XW-1:0] x = '0;
  logic [YW-1:0] y = '0;
  logic [TW-1:0] ts = '0;
  int checks = 0, failures = 0;

  vip_serializer #(.XW(XW), .YW(YW), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [FW-1:0] exp, got;
    checks++;
    if (FW != 22) begin failures++; $display("FAIL word length %0d", FW); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 100; t++) begin
      x = XW'($urandom); y = YW'($urandom); ts = TW'($urandom); last = 1'($urandom);
      exp = {1'b1, x, y, ts, last, ^{x, y, ts}};
      load = 1; @(negedge clk); load = 0;
      // bits appear one per clock starting the clock after the load
      for (int b = FW - 1; b >= 0; b--) begin
        got[b] = serial_out;
        if (b > 0) @(negedge clk);
      end
      checks++;
      if (got !== exp) begin failures++; $display("FAIL word %h exp %h", got, exp); end
      // next load lands exactly FW clocks after this one
    end
    @(negedge clk);
    repeat (3) begin
      checks++;
      if (serial_out !== 1'b0) begin failures++; $display("FAIL idle line"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
