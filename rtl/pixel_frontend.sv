// pixel_frontend: behavioural model of the analog front end of one pixel
// (tier closest to the sensor). This is a model of an analog circuit, not
// logic to be synthesised as it stands.
//
// The real circuit is a charge integrator with a ~4 fF feedback capacitor, a
// single-ended discriminator capacitively coupled to the integrator output
// and auto-zeroed by its own reset, two 52 fF sample/hold cells forming a
// correlated double sampler, and a small timing circuit that turns the
// discriminator edge into a short "hit" pulse. This model keeps that
// behaviour with integer arithmetic, measuring every analog level in
// electrons referred to the integrator input:
//
//  * integ accumulates the sensor charge q_in and, in pixels whose injection
//    flip-flop is set, the test charge inj_q at each InjClk step (inj_step).
//    FeRst holds it at 0 (feedback capacitor reset).
//  * The discriminator is armed while DRst is low. Releasing DRst takes the
//    first sample (baseline, sample 1). The effective threshold is the
//    intrinsic threshold set by the reset-switch charge injection
//    (THR_INTRINSIC, 530 e- as measured on the chip) plus the chip-wide
//    external threshold step vth (signed, electrons).
//  * When the armed discriminator sees integ >= threshold it fires once:
//    the second sample is taken and `hit` is high for one clock. It stays
//    latched (no further hits) until DRst is asserted again.
//  * While release_data is high both samples are driven onto the two analog
//    output buses (out1, out2); otherwise the pixel drives 0, so each bus is
//    an OR of all pixels. The signal amplitude is out2 - out1.
//
// The reset sequence (FeRst and DRst high, FeRst released, then DRst
// released), the sample points and the single hit per train follow the chip.
// The sign convention (positive electrons instead of a negative-going
// voltage), the one-clock hit pulse and the integer levels are choices of
// this model. Noise, gain error and leakage are not modelled.
//
// Interface: clk, rst_n, fe_rst, d_rst, q_in (charge arriving this clock),
// inj_en, inj_step, inj_q, vth, release_data; outputs hit, out1, out2.
// hit rises one clock after the charge that crosses the threshold.
module pixel_frontend
  import vip_pkg::*;
#(
  parameter int THR_INTRINSIC = 530
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    fe_rst,
  input  logic    d_rst,
  input  charge_t q_in,
  input  logic    inj_en,
  input  logic    inj_step,
  input  charge_t inj_q,
  input  charge_t vth,
  input  logic    release_data,
  output logic    hit,
  output charge_t out1,
  output charge_t out2
);
  charge_t integ, s1, s2, thr;
  logic    d_rst_q;   // previous DRst, to find its release
  logic    fired;     // discriminator output latch

  assign thr = charge_t'(THR_INTRINSIC) + vth;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ   <= '0;
      s1      <= '0;
      s2      <= '0;
      d_rst_q <= 1'b1;
      fired   <= 1'b0;
      hit     <= 1'b0;
    end else begin
      d_rst_q <= d_rst;
      hit     <= 1'b0;
      if (fe_rst) integ <= '0;
      else        integ <= integ + q_in + ((inj_en && inj_step) ? inj_q : charge_t'(0));

      if (d_rst) begin
        fired <= 1'b0;
      end else begin
        if (d_rst_q) s1 <= integ;            // DRst just released: sample 1
        else if (!fired && integ >= thr) begin
          fired <= 1'b1;                     // discriminator triggers
          s2    <= integ;                    // sample 2
          hit   <= 1'b1;
        end
      end
    end
  end

  assign out1 = release_data ? s1 : '0;
  assign out2 = release_data ? s2 : '0;
endmodule
