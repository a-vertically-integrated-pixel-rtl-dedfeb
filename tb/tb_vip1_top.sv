// tb_vip1_top: end-to-end test of the readout chip. The testbench plays the
// sensor (per-pixel charge), the external sequencer (bunch-train timing, the
// front-end reset sequence, injection programming, the readout strobes) and
// the serial receiver. Each train's expected hit list is built from the
// charges it deposits; the received serial words must match it in token
// order (row by row, column by column within a row) with correct 1-based
// X/Y addresses, Gray time stamp, status bits and analog values, at one word
// every FW clocks.
//
// Trains run: empty array; sparse random hits over all 32 time slices, with
// sub-threshold charges that must not read out; read-all; read-first-column;
// test-charge injection through the shift register; injection with a raised
// external threshold (nothing fires). Each mechanism is counted and a
// mechanism that never happened is a failure.
module tb_vip1_top;
  import vip_pkg::*;
  localparam int M = 8;
  localparam int N = 6;
  localparam int THR = 530;
  localparam int XW = addr_width(M);
  localparam int YW = addr_width(N);
  localparam int FW = 1 + XW + YW + TS_W + ST_W;
  localparam int SLICE = 8;        // clocks per time slice in this test
  localparam int NSLICE = 2 ** TS_W;

  logic clk = 0, rst_n = 0;
  logic train_start = 0, ts_adv = 0, fe_rst = 1, d_rst = 1;
  charge_t vth = '0, inj_q = '0;
  ramp_t ramp = '0;
  charge_t q_in [N][M];
  logic inj_shift = 0, inj_sin = 0, inj_step = 0, inj_sout;
  logic read_all = 0, read_first_col = 0, report = 0, data_clk = 0, new_serial_word = 0;
  logic read_done, serial_out;
  charge_t an_out1, an_out2;
  ramp_t an_ts;

  vip1_top #(.M(M), .N(N)) dut (.*);

  always #10 clk = ~clk;     // 50 MHz

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // mechanism counters
  int n_empty = 0, n_skip = 0, n_subthr = 0, n_readall = 0, n_firstcol = 0;
  int n_inject = 0, n_thr_block = 0, n_slices [NSLICE];
  int n_words = 0, n_backtoback = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic tstamp_t to_gray(input int s);
    tstamp_t b = TS_W'(s);
    return b ^ (b >> 1);
  endfunction

  // ---------------- reference of the current train ----------------
  bit      e_read [N][M];     // pixel expected in the readout
  bit      e_hit  [N][M];     // pixel really hit (analog values defined)
  tstamp_t e_ts   [N][M];
  charge_t e_q    [N][M];
  ramp_t   e_ramp [N][M];

  // ---------------- serial receiver ----------------
  logic [FW-1:0] rx_words [$];
  int            rx_time  [$];
  charge_t       cap_a2 [$];
  ramp_t         cap_at [$];
  int            rx_cnt = -1;
  logic [FW-1:0] rx_sh;
  always @(posedge clk) begin
    if (rx_cnt < 0) begin
      if (serial_out) begin rx_cnt = FW - 1; rx_sh = '0; rx_sh[FW-1] = 1'b1; rx_time.push_back(cyc); end
    end else begin
      rx_cnt--;
      rx_sh[rx_cnt] = serial_out;
      if (rx_cnt == 0) begin rx_words.push_back(rx_sh); rx_cnt = -1; end
    end
  end

  // ---------------- sequencer pieces ----------------
  task automatic clear_q();
    for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) q_in[y][x] = '0;
  endtask

  task automatic start_train();
    for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) begin
      e_read[y][x] = 0; e_hit[y][x] = 0; e_ts[y][x] = '1; e_q[y][x] = '0; e_ramp[y][x] = '0;
    end
    @(negedge clk);
    train_start = 1; fe_rst = 1; d_rst = 1; ramp = '0;
    @(negedge clk);
    train_start = 0;
    @(negedge clk);
    fe_rst = 0;                 // release integrator reset first
    @(negedge clk);
    d_rst = 0;                  // then arm the discriminator
    @(negedge clk);
  endtask

  // One bunch train: in every slice, deposit charge in chosen pixels.
  // kind 0: none, 1: random hits (+ sub-threshold), 2: injection at slice
  // inj_slice, 3: one hit in every slice
  task automatic acquire(input int kind, input int density, input int inj_slice);
    bit used [N][M];
    for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) used[y][x] = 0;
    for (int s = 0; s < NSLICE; s++) begin
      ramp = ramp_t'(s * 29 + 3);
      @(negedge clk);
      if (kind == 1) begin
        for (int y = 0; y < N; y++) for (int x = 0; x < M; x++)
          if (!used[y][x] && $urandom_range(0, 999) < density) begin
            used[y][x] = 1;
            if ($urandom_range(0, 4) == 0) begin
              q_in[y][x] = charge_t'($urandom_range(50, THR - 60));   // below threshold
              n_subthr++;
            end else begin
              q_in[y][x] = charge_t'($urandom_range(THR, 3000));
              e_read[y][x] = 1; e_hit[y][x] = 1; e_ts[y][x] = to_gray(s);
              e_q[y][x] = q_in[y][x]; e_ramp[y][x] = ramp;
              n_slices[s]++;
            end
          end
      end else if (kind == 3 && s < M * N) begin
        // one hit per slice, pixel number s in token order
        int y = s / M, x = s % M;
        q_in[y][x] = charge_t'($urandom_range(THR, 3000));
        e_read[y][x] = 1; e_hit[y][x] = 1; e_ts[y][x] = to_gray(s);
        e_q[y][x] = q_in[y][x]; e_ramp[y][x] = ramp;
        n_slices[s]++;
      end else if (kind == 2 && s == inj_slice) begin
        inj_step = 1;
      end
      @(negedge clk);
      clear_q();
      inj_step = 0;
      repeat (SLICE - 3) @(negedge clk);
      ts_adv = 1;
      @(negedge clk);
      ts_adv = 0;
    end
    // end of train: front end reset (switched off) until the next train
    fe_rst = 1; d_rst = 1;
    @(negedge clk);
  endtask

  // Readout: returns after the last word has been received.
  task automatic readout();
    int nexp = 0, k = 0;
    int ex [$], ey [$];
    rx_words.delete(); rx_time.delete(); cap_a2.delete(); cap_at.delete();
    for (int y = 0; y < N; y++) for (int x = 0; x < M; x++)
      if (e_read[y][x]) begin ex.push_back(x); ey.push_back(y); nexp++; end
    for (int i = 1; i < nexp; i++)
      if (ey[i] * M + ex[i] > ey[i-1] * M + ex[i-1] + 1) n_skip++;
    @(negedge clk);
    report = 1;
    #1;
    ck(read_done == (nexp == 0), "read_done at start matches empty array");
    if (nexp == 0) n_empty++;
    if (!read_done) begin
      data_clk = 1; @(negedge clk); data_clk = 0;
      forever begin
        bit last;
        new_serial_word = 1;
        last = read_done;
        cap_a2.push_back(an_out2); cap_at.push_back(an_ts);
        ck(an_out1 == 0 || !e_hit[ey[k < nexp ? k : 0]][ex[k < nexp ? k : 0]], "sample 1 baseline");
        k++;
        @(negedge clk);
        new_serial_word = 0;
        data_clk = 1; @(negedge clk); data_clk = 0;
        if (last) break;
        repeat (FW - 2) @(negedge clk);
      end
      repeat (FW + 2) @(negedge clk);
    end
    report = 0;
    ck(rx_words.size() == nexp, $sformatf("word count %0d exp %0d", rx_words.size(), nexp));
    for (int i = 0; i < rx_words.size() && i < nexp; i++) begin
      logic [FW-1:0] w = rx_words[i];
      logic [XW-1:0] gx; logic [YW-1:0] gy; tstamp_t gts; logic glast, gpar;
      {gx, gy, gts, glast, gpar} = w[FW-2:0];
      ck(w[FW-1] == 1'b1, "sync bit");
      ck(gx == XW'(ex[i] + 1) && gy == YW'(ey[i] + 1),
         $sformatf("address (%0d,%0d) exp (%0d,%0d)", gx, gy, ex[i] + 1, ey[i] + 1));
      ck(gts == e_ts[ey[i]][ex[i]], $sformatf("time stamp %b exp %b", gts, e_ts[ey[i]][ex[i]]));
      ck(glast == (i == nexp - 1), "last status bit");
      ck(gpar == ^{gx, gy, gts}, "parity status bit");
      if (e_hit[ey[i]][ex[i]]) begin
        ck(cap_a2[i] == e_q[ey[i]][ex[i]], "sample 2 = deposited charge");
        ck(cap_at[i] == e_ramp[ey[i]][ex[i]], "analog time stamp = ramp at hit");
      end else begin
        ck(cap_at[i] == '0, "no analog time stamp without hit");
      end
      if (i > 0) begin
        ck(rx_time[i] - rx_time[i-1] == FW, $sformatf("word period %0d", rx_time[i] - rx_time[i-1]));
        n_backtoback++;
      end
      n_words++;
    end
    // the array is now transparent: a new report sees read_done at once
    @(negedge clk); report = 1; #1;
    ck(read_done == 1, "array empty after readout");
    @(negedge clk); report = 0;
  endtask

  task automatic shift_pattern(input bit pat [N][M]);
    // the first bit shifted in reaches the chain position 0 = pixel (0,0)
    for (int i = 0; i < M * N; i++) begin
      inj_sin = pat[i / M][i % M]; inj_shift = 1; @(negedge clk);
    end
    inj_shift = 0;
  endtask

  function automatic bit in_cluster(input int x, input int y);
    // 64 x 64: square clusters totalling 119 pixels; smaller arrays: a fixed
    // pseudo-random pattern
    if (M == 64 && N == 64) begin
      if (x >= 30 && x < 37 && y >= 30 && y < 37) return 1;   // 49
      if (x >= 10 && x < 15 && y >= 40 && y < 45) return 1;   // 25
      if (x >= 50 && x < 54 && y >= 51 && y < 55) return 1;   // 16
      if (x >= 13 && x < 16 && y >= 17 && y < 20) return 1;   // 9
      if (x >= 34 && x < 36 && y >= 14 && y < 16) return 1;   // 4
      if (x >= 51 && x < 55 && y >= 11 && y < 15) return 1;   // 16
      return 0;
    end
    return ((x * 7 + y * 13) % 5) == 1;
  endfunction

  initial begin
    bit pat [N][M];
    clear_q();
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. empty array
    start_train(); acquire(0, 0, 0); readout();

    // 2. sparse random hits, several trains
    for (int t = 0; t < 4; t++) begin
      start_train(); acquire(1, 12, 0); readout();
    end

    // 3. read all pixels
    start_train();
    read_all = 1; @(negedge clk); read_all = 0;
    for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) e_read[y][x] = 1;
    acquire(1, 8, 0);
    for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) e_read[y][x] = 1;
    n_readall++;
    readout();

    // 4. read the first pixel of every row plus the real hits
    start_train();
    read_first_col = 1; @(negedge clk); read_first_col = 0;
    acquire(1, 10, 0);
    for (int y = 0; y < N; y++) e_read[y][0] = 1;
    n_firstcol++;
    readout();

    // 5. test-charge injection into a programmed pattern
    for (int t = 0; t < 2; t++) begin
      automatic int sl = $urandom_range(0, NSLICE - 1);
      automatic int cnt = 0;
      for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) begin
        pat[y][x] = in_cluster(x, y);
        cnt += pat[y][x];
      end
      if (M == 64 && N == 64) ck(cnt == 119, "119-pixel pattern");
      shift_pattern(pat);
      start_train();
      inj_q = 16'sd700;
      for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) if (pat[y][x]) begin
        e_read[y][x] = 1; e_hit[y][x] = 1; e_ts[y][x] = to_gray(sl);
        e_q[y][x] = inj_q; e_ramp[y][x] = ramp_t'(sl * 29 + 3);
      end
      acquire(2, 0, sl);
      n_slices[sl]++;
      readout();
      n_inject++;
    end

    // 6. injection below a raised external threshold: nothing fires
    start_train();
    vth = 16'sd400;
    acquire(2, 0, 5);
    readout();
    vth = '0;
    n_thr_block++;

    // 7. a hit in every time slice, one slice per pixel (slice coverage)
    start_train();
    acquire(3, 0, 0);
    readout();

    ck(n_empty > 0, "mechanism: empty-array readout");
    ck(n_skip > 0, "mechanism: token skipping empty pixels");
    ck(n_subthr > 0, "mechanism: sub-threshold charge");
    ck(n_readall > 0 && n_firstcol > 0, "mechanism: forced readout modes");
    ck(n_inject > 0 && n_thr_block > 0, "mechanism: test injection and threshold");
    ck(n_backtoback > 0, "mechanism: back-to-back words");
    begin
      int covered = 0;
      for (int s = 0; s < NSLICE; s++) if (n_slices[s] > 0) covered++;
      ck(covered == NSLICE, $sformatf("time slices covered %0d of %0d", covered, NSLICE));
    end
    $display("mechanisms: empty=%0d skip=%0d subthr=%0d readall=%0d firstcol=%0d inject=%0d thrblock=%0d words=%0d",
             n_empty, n_skip, n_subthr, n_readall, n_firstcol, n_inject, n_thr_block, n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
