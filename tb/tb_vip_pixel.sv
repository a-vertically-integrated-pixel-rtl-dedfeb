// tb_vip_pixel: runs one complete pixel through bunch trains. Each train:
// preset, front-end reset sequence, a charge (above or below threshold, or a
// test injection, or a forced read) at a random time code and ramp value,
// then readout with the token. Checks that the pixel stops the token only
// when it holds a hit, that data_clk selects it and lets the token pass, and
// that the stored time code, ramp value and samples appear only while it is
// selected.
module tb_vip_pixel;
  import vip_pkg::*;
  localparam int THR = 530;
  logic clk = 0, rst_n = 0;
  logic fe_rst = 1, d_rst = 1, inj_en = 0, inj_step = 0, preset = 0;
  logic read_anyway = 0, token_in = 0, data_clk = 0, token_out, release_data;
  charge_t vth = '0, q_in = '0, inj_q = '0, an_out1, an_out2;
  tstamp_t ts_code = '0, ts_out;
  ramp_t ramp = '0, an_ts;
  int checks = 0, failures = 0;

  vip_pixel #(.THR_INTRINSIC(THR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int kind, q;
    tstamp_t code;
    ramp_t rv;
    bit expect_read, expect_hit;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      kind = $urandom_range(0, 3);   // 0 hit, 1 below threshold, 2 injection, 3 forced read
      code = TS_W'($urandom); rv = A_W'($urandom);
      @(negedge clk); preset = 1; fe_rst = 1; d_rst = 1;
      @(negedge clk); preset = 0; fe_rst = 0;
      @(negedge clk); d_rst = 0;
      @(negedge clk);
      ts_code = code; ramp = rv;
      q = (kind == 1) ? $urandom_range(0, THR - 1) : $urandom_range(THR, 5000);
      expect_hit  = (kind == 0 || kind == 2);
      expect_read = (kind != 1);
      case (kind)
        0, 1: q_in = charge_t'(q);
        2: begin inj_en = 1; inj_step = 1; inj_q = charge_t'(q); end
        default: read_anyway = 1;
      endcase
      @(negedge clk);
      q_in = '0; inj_step = 0; read_anyway = 0;
      repeat (4) @(negedge clk);
      ts_code = ~code; ramp = ~rv;            // bus moves on after the hit
      inj_en = 0;
      fe_rst = 1; d_rst = 1;                  // front end off after the train
      repeat (2) @(negedge clk);
      // readout
      ck(ts_out == '0 && an_ts == '0 && an_out2 == '0, "outputs idle before selection");
      token_in = 1; #1;
      ck(token_out == !expect_read, "token stops only at a pending pixel");
      @(negedge clk); data_clk = 1; @(negedge clk); data_clk = 0; #1;
      ck(release_data == expect_read, "data_clk selects a pending pixel");
      ck(token_out == 1, "token passes once selected or empty");
      if (expect_read) begin
        ck(ts_out == (expect_hit ? code : '1), "stored time code");
        if (expect_hit) begin
          ck(an_ts == rv, "analog time stamp");
          ck(an_out2 == charge_t'(q) && an_out1 == '0, "samples");
        end
      end
      @(negedge clk); data_clk = 1; @(negedge clk); data_clk = 0; #1;
      ck(release_data == 0 && token_out == 1, "deselected, transparent");
      token_in = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
