// tb_vip_matrix: a small array (5 columns x 4 rows) driven directly. Each
// train sets random hits at random time codes and ramp values (or forces
// reads, or injects through the shift register), then steps the readout with
// data_clk and checks, for every selected pixel in token order, the one-hot
// column and row lines, the time-stamp bus through the column buffers, the
// analog buses, read_done, and the time-stamp bus staying 0 in acquisition.
module tb_vip_matrix;
  import vip_pkg::*;
  localparam int M = 5, N = 4, THR = 530;
  logic clk = 0, rst_n = 0;
  logic fe_rst = 1, d_rst = 1, preset = 0;
  charge_t vth = '0, inj_q = '0;
  tstamp_t ts_code = '0, ts_bus;
  ramp_t ramp = '0, an_ts;
  charge_t q_in [N][M];
  logic inj_shift = 0, inj_sin = 0, inj_step = 0, inj_sout;
  logic read_all = 0, read_first_col = 0, report = 0, data_clk = 0, read_done;
  logic [M-1:0] x_lines;
  logic [N-1:0] y_lines;
  charge_t an_out1, an_out2;
  int checks = 0, failures = 0;

  vip_matrix #(.M(M), .N(N), .THR_INTRINSIC(THR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  bit      e_read [N][M];
  bit      e_hit  [N][M];
  tstamp_t e_ts   [N][M];
  charge_t e_q    [N][M];
  ramp_t   e_r    [N][M];

  initial begin
    for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) q_in[y][x] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      automatic int mode = t % 4;   // 0,1 hits; 2 forced reads; 3 injection
      bit pat [N][M];
      if (mode == 3) begin
        for (int i = 0; i < M * N; i++) begin
          pat[i / M][i % M] = $urandom_range(0, 2) == 0;
          inj_sin = pat[i / M][i % M]; inj_shift = 1; @(negedge clk);
        end
        inj_shift = 0;
      end
      for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) begin
        e_read[y][x] = 0; e_hit[y][x] = 0; e_ts[y][x] = '1; e_q[y][x] = '0; e_r[y][x] = '0;
      end
      @(negedge clk); preset = 1; fe_rst = 1; d_rst = 1;
      @(negedge clk); preset = 0; fe_rst = 0;
      @(negedge clk); d_rst = 0;
      @(negedge clk);
      if (mode == 2) begin
        if (t % 8 == 2) read_all = 1; else read_first_col = 1;
        for (int y = 0; y < N; y++) for (int x = 0; x < M; x++)
          if (read_all || x == 0) e_read[y][x] = 1;
        @(negedge clk); read_all = 0; read_first_col = 0;
      end
      for (int s = 0; s < 6; s++) begin
        ts_code = TS_W'($urandom); ramp = A_W'($urandom);
        if (mode == 3 && s == 3) begin
          inj_q = 16'sd800; inj_step = 1;
          for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) if (pat[y][x]) begin
            e_read[y][x] = 1; e_hit[y][x] = 1; e_ts[y][x] = ts_code; e_q[y][x] = inj_q; e_r[y][x] = ramp;
          end
        end else if (mode != 3) begin
          for (int y = 0; y < N; y++) for (int x = 0; x < M; x++)
            if (!e_hit[y][x] && $urandom_range(0, 9) == 0) begin
              q_in[y][x] = charge_t'($urandom_range(THR, 4000));
              e_read[y][x] = 1; e_hit[y][x] = 1; e_ts[y][x] = ts_code;
              e_q[y][x] = q_in[y][x]; e_r[y][x] = ramp;
            end
        end
        @(negedge clk);
        inj_step = 0;
        for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) q_in[y][x] = '0;
        repeat (3) @(negedge clk);
        ck(ts_bus == '0, "time-stamp bus idle during acquisition");
      end
      fe_rst = 1; d_rst = 1;
      @(negedge clk);
      // readout
      report = 1; #1;
      begin
        automatic int n = 0;
        for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) n += e_read[y][x];
        ck(read_done == (n == 0), "read_done reflects an empty array");
      end
      for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) if (e_read[y][x]) begin
        @(negedge clk); data_clk = 1; @(negedge clk); data_clk = 0; #1;
        ck(x_lines == M'(1) << x && y_lines == N'(1) << y,
           $sformatf("lines for (%0d,%0d): x=%b y=%b", x, y, x_lines, y_lines));
        ck(ts_bus == e_ts[y][x], "time stamp on bus");
        if (e_hit[y][x]) ck(an_out2 == e_q[y][x] && an_out1 == '0 && an_ts == e_r[y][x], "analog buses");
        else             ck(an_ts == '0, "no analog time stamp without hit");
      end
      @(negedge clk); data_clk = 1; @(negedge clk); data_clk = 0; #1;
      ck(x_lines == '0 && y_lines == '0 && read_done, "array empty after readout");
      report = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
