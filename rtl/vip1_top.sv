// vip1_top: pixel readout chip for a linear-collider vertex detector, with
// M x N pixels (64 x 64 by default) and its periphery.
//
// The chip works in two phases per bunch train. In acquisition (report low)
// the Gray counter, cleared by train_start and stepped by ts_adv once per
// time slice, is broadcast to all pixels; a pixel whose discriminator fires
// latches the current code, freezes the analog ramp and keeps both
// correlated-double-sampler samples, and sets its hit latch. In readout
// (report high, the start token) the look-ahead token stops at the first hit
// pixel; each data_clk strobe selects the pixel the token waits at and lets
// the token run on. The selected pixel drives its column and row lines, which
// the peripheral address registers turn into X and Y addresses (1-based), and
// its time stamp reaches the periphery through the column buffers. A
// new_serial_word strobe loads X, Y, time stamp and status into the
// serializer, which ships them out at one bit per clock; the pixel's analog
// values are on an_out1, an_out2 and an_ts at the same time, for an external
// ADC. read_done is the token leaving the array.
//
// An external controller sequences the readout, as for the chip: with report
// high, repeat { data_clk for one clock; new_serial_word one clock later;
// wait FW clocks from that load } until a word is loaded with read_done
// high (its `last` status bit is then 1). With data_clk issued in the clock
// after each load, words follow back to back, one hit every
// FW = XW + YW + 5 + 3 clocks. read_all or read_first_col, pulsed before
// readout, force all pixels or the first pixel of every row to be read.
// Test patterns are shifted into the injection chain (inj_sin, inj_shift);
// inj_step applies the test charge inj_q to the selected pixels.
//
// Everything runs on one clock (the serial clock, 50 MHz on the chip); the
// strobes are clock enables. Single-clock operation, the word layout and the
// status bits are this design's choices; the rest follows the chip.
module vip1_top
  import vip_pkg::*;
#(
  parameter int unsigned M  = 64,
  parameter int unsigned N  = 64,
  parameter int          THR_INTRINSIC = 530,
  parameter int unsigned XW = addr_width(M),
  parameter int unsigned YW = addr_width(N),
  parameter int unsigned FW = 1 + XW + YW + TS_W + ST_W
) (
  input  logic    clk,
  input  logic    rst_n,
  // bunch train timing
  input  logic    train_start,
  input  logic    ts_adv,
  // front end
  input  logic    fe_rst,
  input  logic    d_rst,
  input  charge_t vth,
  input  ramp_t   ramp,
  input  charge_t q_in [N][M],
  // test injection
  input  logic    inj_shift,
  input  logic    inj_sin,
  input  logic    inj_step,
  input  charge_t inj_q,
  output logic    inj_sout,
  // readout
  input  logic    read_all,
  input  logic    read_first_col,
  input  logic    report,
  input  logic    data_clk,
  input  logic    new_serial_word,
  output logic    read_done,
  output logic    serial_out,
  output charge_t an_out1,
  output charge_t an_out2,
  output ramp_t   an_ts
);
  tstamp_t        gray, ts_bus;
  logic [M-1:0]   x_lines;
  logic [N-1:0]   y_lines;
  logic [XW-1:0]  x_addr;
  logic [YW-1:0]  y_addr;
  logic           x_valid, y_valid;

  gray_counter #(.W(TS_W)) u_cnt (
    .clk, .rst_n, .clear(train_start), .adv(ts_adv), .gray
  );

  vip_matrix #(.M(M), .N(N), .THR_INTRINSIC(THR_INTRINSIC)) u_mat (
    .clk, .rst_n, .fe_rst, .d_rst, .vth, .preset(train_start), .ts_code(gray),
    .ramp, .q_in, .inj_shift, .inj_sin, .inj_step, .inj_q, .inj_sout,
    .read_all, .read_first_col, .report, .data_clk, .read_done,
    .x_lines, .y_lines, .ts_bus, .an_out1, .an_out2, .an_ts
  );

  addr_encoder #(.N(M), .W(XW)) u_xenc (.lines(x_lines), .addr(x_addr), .valid(x_valid));
  addr_encoder #(.N(N), .W(YW)) u_yenc (.lines(y_lines), .addr(y_addr), .valid(y_valid));

  vip_serializer #(.XW(XW), .YW(YW), .TW(TS_W), .FW(FW)) u_ser (
    .clk, .rst_n, .load(new_serial_word), .x(x_addr), .y(y_addr), .ts(ts_bus),
    .last(read_done), .serial_out
  );

  // Exactly one pixel is selected whenever a word is loaded during readout.
  a_one_pixel: assert property (@(posedge clk) disable iff (!rst_n)
      (report && new_serial_word) |-> (x_valid && y_valid && $onehot(x_lines) && $onehot(y_lines)));
endmodule
