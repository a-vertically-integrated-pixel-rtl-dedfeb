// tb_pixel_frontend: runs the front-end model through its reset sequence
// (FeRst and DRst high, FeRst released, DRst released) and checks the
// discriminator threshold, the single one-clock hit pulse, both samples, the
// effect of the external threshold, test injection, and the released outputs.
module tb_pixel_frontend;
  import vip_pkg::*;
  localparam int THR = 530;
  logic clk = 0, rst_n = 0, fe_rst = 1, d_rst = 1, inj_en = 0, inj_step = 0;
  logic release_data = 0, hit;
  charge_t q_in = '0, inj_q = '0, vth = '0, out1, out2;
  int checks = 0, failures = 0;
  int hits_seen = 0;

  pixel_frontend #(.THR_INTRINSIC(THR)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (hit) hits_seen++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic arm(input int pre_charge);
    fe_rst = 1; d_rst = 1; q_in = '0;
    repeat (2) @(negedge clk);
    fe_rst = 0;
    q_in = charge_t'(pre_charge); @(negedge clk); q_in = '0;   // charge before arming
    d_rst = 0;
    @(negedge clk);
  endtask

  task automatic ck(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int base, tot, step, h0, vt;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      base = $urandom_range(0, 50);
      vt   = $signed($urandom_range(0, 200)) - 100;
      vth  = charge_t'(vt);
      arm(base);
      h0 = hits_seen;
      // deposit charge in steps until well past threshold
      tot = base;
      for (int k = 0; k < 20; k++) begin
        step = $urandom_range(20, 120);
        q_in = charge_t'(step);
        @(negedge clk);
        q_in = '0;
        tot += step;
        // the discriminator compares the accumulated level after this clock
        if (tot < THR + vt) begin
          @(posedge clk); #1;
          ck(hits_seen == h0, "no hit below threshold");
          @(negedge clk);
        end else break;
      end
      repeat (3) @(negedge clk);
      ck(hits_seen == h0 + 1, "exactly one hit above threshold");
      // more charge must not re-trigger the latched discriminator
      q_in = 16'sd2000; @(negedge clk); q_in = '0; repeat (3) @(negedge clk);
      ck(hits_seen == h0 + 1, "latched discriminator");
      ck(out1 == 0 && out2 == 0, "outputs idle when not released");
      release_data = 1; #1;
      ck(out1 == charge_t'(base), "sample 1 = level at DRst release");
      ck(out2 == charge_t'(tot), "sample 2 = level at trigger");
      ck(out2 - out1 >= charge_t'(THR + vt - base), "CDS amplitude above threshold");
      release_data = 0;
    end
    // test injection: only an enabled pixel gets the step
    vth = '0;
    arm(0);
    h0 = hits_seen;
    inj_q = 16'sd600; inj_en = 0; inj_step = 1; @(negedge clk); inj_step = 0;
    repeat (3) @(negedge clk);
    ck(hits_seen == h0, "no injection when disabled");
    inj_en = 1; inj_step = 1; @(negedge clk); inj_step = 0;
    repeat (3) @(negedge clk);
    ck(hits_seen == h0 + 1, "injection hit when enabled");
    release_data = 1; #1;
    ck(out2 == 16'sd600, "injected charge sampled");
    release_data = 0; inj_en = 0;
    // integrator held in reset: no signal reaches the discriminator
    fe_rst = 1; d_rst = 1; @(negedge clk); d_rst = 0; @(negedge clk);
    h0 = hits_seen;
    q_in = 16'sd3000; repeat (3) @(negedge clk); q_in = '0; repeat (2) @(negedge clk);
    ck(hits_seen == h0, "no hit with integrator reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
