// vip_matrix: the M x N pixel array with its token chain, wire-OR lines,
// column time-stamp buffers, analog buses and injection chain.
//
// Pixels are named (x, y) with x = 0..M-1 the column and y = 0..N-1 the row.
// The readout token enters at pixel (0,0) from `report`, runs along row 0 to
// pixel (M-1,0), continues at (0,1), and so on row by row; the token output
// of the last pixel is `read_done`. Pixels whose hit latch is clear pass the
// token combinationally, so after each data_clk the token settles at the next
// hit pixel (or leaves the array) within the same clock; the chip assumes
// about 0.2 ns per empty pixel for this ripple.
//
// The selected pixel drives its column's x_line and its row's y_line (OR of
// release_data over the column or row). Its time stamp, both analog samples
// and its analog time stamp go out on buses formed as the OR of all pixels
// (unselected pixels drive 0).
//
// Each column has a bidirectional time-stamp buffer at its foot: while
// `report` is low (acquisition) it drives the Gray counter value ts_code up
// the column to all pixels; while `report` is high (readout) it carries the
// selected pixel's stored code down to the chip-level bus ts_bus, which is 0
// during acquisition. The pixels see the column bus in both phases, as on the
// chip's shared lines.
//
// read_anyway of a pixel is read_all, or read_first_col for pixels of column
// 0 (the first pixel of every row), the two forced-readout options of the
// chip. The injection chain follows the token order (bit y*M + x).
//
// The array organisation, the token order, the wire-OR lines, the shared
// bidirectional time-stamp lines and the two read-anyway options follow the
// chip; the OR-of-zeros buses stand in for the chip's tri-state and wire-OR
// lines, and using `report` as the bus direction control is this design's
// choice.
module vip_matrix
  import vip_pkg::*;
#(
  parameter int unsigned M = 64,
  parameter int unsigned N = 64,
  parameter int          THR_INTRINSIC = 530
) (
  input  logic    clk,
  input  logic    rst_n,
  // acquisition controls
  input  logic    fe_rst,
  input  logic    d_rst,
  input  charge_t vth,
  input  logic    preset,
  input  tstamp_t ts_code,
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
  output logic    read_done,
  output logic [M-1:0] x_lines,
  output logic [N-1:0] y_lines,
  output tstamp_t ts_bus,
  output charge_t an_out1,
  output charge_t an_out2,
  output ramp_t   an_ts
);
  localparam int unsigned NPIX = M * N;

  logic           tok     [NPIX+1];
  logic           rel     [N][M];
  tstamp_t        ts_pix  [N][M];
  charge_t        a1_pix  [N][M];
  charge_t        a2_pix  [N][M];
  ramp_t          at_pix  [N][M];
  tstamp_t        col_up  [M];     // column bus driven towards the periphery
  tstamp_t        col_bus [M];     // column bus as seen by the pixels
  logic [NPIX-1:0] inj_en;

  assign tok[0]    = report;
  assign read_done = tok[NPIX];

  inject_shift_reg #(.LEN(NPIX)) u_inj (
    .clk, .rst_n, .shift(inj_shift), .sin(inj_sin), .en(inj_en), .sout(inj_sout)
  );

  for (genvar y = 0; y < N; y++) begin : g_row
    for (genvar x = 0; x < M; x++) begin : g_col
      vip_pixel #(.THR_INTRINSIC(THR_INTRINSIC)) u_pix (
        .clk, .rst_n, .fe_rst, .d_rst, .vth,
        .q_in        (q_in[y][x]),
        .inj_en      (inj_en[y*M + x]),
        .inj_step, .inj_q, .preset,
        .ts_code     (col_bus[x]),
        .ramp,
        .read_anyway (read_all | (read_first_col && x == 0)),
        .token_in    (tok[y*M + x]),
        .data_clk,
        .token_out   (tok[y*M + x + 1]),
        .release_data(rel[y][x]),
        .ts_out      (ts_pix[y][x]),
        .an_out1     (a1_pix[y][x]),
        .an_out2     (a2_pix[y][x]),
        .an_ts       (at_pix[y][x])
      );
    end
  end

  // Wire-OR lines and buses. Every line is gathered into a packed vector
  // with one bit per contributing pixel and reduced with a single OR.
  logic [N-1:0]    rel_col [M];          // column x: release flags of its rows
  logic [M-1:0]    rel_row [N];          // row y: release flags of its columns
  logic [N-1:0]    ts_col  [M][TS_W];    // column x, bit b: pixel stamp bits
  logic [NPIX-1:0] a1_bit  [Q_W];        // bus bit b: one bit per pixel
  logic [NPIX-1:0] a2_bit  [Q_W];
  logic [NPIX-1:0] at_bit  [A_W];
  logic [M-1:0]    bus_bit [TS_W];       // chip bus bit b: one bit per column

  for (genvar y = 0; y < N; y++) begin : g_or_row
    for (genvar x = 0; x < M; x++) begin : g_or_col
      assign rel_col[x][y] = rel[y][x];
      assign rel_row[y][x] = rel[y][x];
      for (genvar b = 0; b < TS_W; b++) begin : g_ts
        assign ts_col[x][b][y] = ts_pix[y][x][b];
      end
      for (genvar b = 0; b < Q_W; b++) begin : g_a
        assign a1_bit[b][y*M + x] = a1_pix[y][x][b];
        assign a2_bit[b][y*M + x] = a2_pix[y][x][b];
      end
      for (genvar b = 0; b < A_W; b++) begin : g_at
        assign at_bit[b][y*M + x] = at_pix[y][x][b];
      end
    end
    assign y_lines[y] = |rel_row[y];
  end

  // Column buffers: towards the pixels during acquisition, towards the
  // periphery during readout.
  for (genvar x = 0; x < M; x++) begin : g_colbuf
    assign x_lines[x]  = |rel_col[x];
    for (genvar b = 0; b < TS_W; b++) begin : g_b
      assign col_up[x][b]  = |ts_col[x][b];
      assign bus_bit[b][x] = col_up[x][b];
    end
    assign col_bus[x] = report ? col_up[x] : ts_code;
  end

  for (genvar b = 0; b < TS_W; b++) begin : g_bus
    assign ts_bus[b] = report & (|bus_bit[b]);
  end
  for (genvar b = 0; b < Q_W; b++) begin : g_abus
    assign an_out1[b] = |a1_bit[b];
    assign an_out2[b] = |a2_bit[b];
  end
  for (genvar b = 0; b < A_W; b++) begin : g_atbus
    assign an_ts[b] = |at_bit[b];
  end
endmodule
