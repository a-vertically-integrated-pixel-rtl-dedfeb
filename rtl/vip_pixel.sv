// vip_pixel: one pixel of the three-tier readout chip.
//
// The pixel stacks three circuits that sit on three bonded tiers of the real
// device, joined by vertical vias:
//  * the analog front end (tier nearest the sensor): integrator,
//    discriminator, double sampler and hit-pulse former (pixel_frontend);
//  * time stamping (middle tier): the 5-bit digital time-stamp store
//    (pixel_ts_mem) and the analog ramp sample/hold (analog_ts_sh), both
//    written by the hit pulse;
//  * sparsification (far tier): hit latch, token logic and the data_clk
//    flip-flop (pixel_sparse).
// release_data runs back up through all tiers and puts the pixel's stored
// time stamp and analog samples on the buses while the pixel is selected.
// The injection flip-flop of this pixel lives in inject_shift_reg; its output
// arrives here as inj_en. This partition follows the chip.
//
// Interface: global controls (fe_rst, d_rst, vth, preset, inj_step, inj_q,
// ramp, data_clk), the sensor charge q_in, the pixel's inj_en and
// read_anyway, the token chain (token_in/token_out), the time-stamp bus as
// seen by the pixel (ts_code), and the outputs that are 0 unless the pixel is
// released: ts_out, an_out1, an_out2, an_ts, plus release_data itself.
module vip_pixel
  import vip_pkg::*;
#(
  parameter int THR_INTRINSIC = 530
) (
  input  logic    clk,
  input  logic    rst_n,
  // front end
  input  logic    fe_rst,
  input  logic    d_rst,
  input  charge_t vth,
  input  charge_t q_in,
  input  logic    inj_en,
  input  logic    inj_step,
  input  charge_t inj_q,
  // time stamping
  input  logic    preset,
  input  tstamp_t ts_code,
  input  ramp_t   ramp,
  // sparsified readout
  input  logic    read_anyway,
  input  logic    token_in,
  input  logic    data_clk,
  output logic    token_out,
  output logic    release_data,
  output tstamp_t ts_out,
  output charge_t an_out1,
  output charge_t an_out2,
  output ramp_t   an_ts
);
  logic hit;

  pixel_frontend #(.THR_INTRINSIC(THR_INTRINSIC)) u_fe (
    .clk, .rst_n, .fe_rst, .d_rst, .q_in, .inj_en, .inj_step, .inj_q, .vth,
    .release_data, .hit, .out1(an_out1), .out2(an_out2)
  );

  pixel_ts_mem #(.W(TS_W)) u_ts (
    .clk, .rst_n, .preset, .hit, .code_in(ts_code), .release_data, .ts_out
  );

  analog_ts_sh #(.W(A_W)) u_ats (
    .clk, .rst_n, .preset, .hit, .ramp, .release_data, .an_ts
  );

  pixel_sparse u_sp (
    .clk, .rst_n, .hit, .read_anyway, .token_in, .data_clk, .token_out,
    .release_data
  );
endmodule
