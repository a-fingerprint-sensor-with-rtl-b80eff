// End-to-end test of fingerprint_sensor at its default size (88 x 2 cells,
// 8-stage pipeline, 16-clock stagger; no parameter overrides). Row 0 holds the
// prototype's finger pattern: ridges of 0.6, 0.75, 0.45 and 0.75 fF on the
// first four cells, valleys of 0.3 fF elsewhere; row 1 a random pattern.
// One capture is run for each of the integration intervals 16, 32 and 112,
// plus an out-of-range request (200) that the driver clamps to 112. At every
// evaluation strobe the output of both rows is compared with a step model of
// the cell computed here, and the strobe's time is checked: column c is
// evaluated 16*c + I integration clocks after the first reset (4 clk cycles per
// integration clock), so the column rate is independent of I. Each pipeline
// mechanism is counted and must occur: resets from every generator, the token
// wrapping from V_CK8 back to V_CK1, XDEC group changes, several columns
// integrating at once, the interval clamp, and the end of a capture.
module tb_fingerprint_sensor;
  localparam int N = fps_pkg::N_COLS_DEF, R = fps_pkg::ROWS_DEF;
  localparam int M = fps_pkg::M_DEF, SLOT = fps_pkg::SLOT_DEF, G = N / M;
  localparam int INT_W = fps_pkg::INT_W;

  logic clk = 0, rst_n = 0, start = 0;
  logic [INT_W-1:0] int_clks;
  fps_pkg::cap_t  cap  [R][N];
  fps_pkg::volt_t vout [R];
  logic eval, busy, done, phi1, phi2, tick;
  logic [$clog2(N)-1:0] eval_idx;
  logic [M-1:0] cell_rst, col_sel;
  logic [G-1:0] grp_sel;

  int checks = 0, failures = 0;
  int ivals[4] = '{16, 32, 112, 200};
  int I, nstrobe, cyc, t_start, t_first_rst;
  int n_rst [M];
  int n_wrap = 0, n_grp = 0, n_overlap = 0, n_clamp = 0, n_done = 0, n_ridge = 0;
  int last_rst_gen = -1;
  logic [G-1:0] prev_grp;
  int integ_since [M];   // -1: idle, else reset period of the generator
  int p;
  bit running;
  int v16_ridge, v16_valley, v112_ridge, v112_valley;

  fingerprint_sensor dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (I=%0d strobe %0d)", what, I, nstrobe); end
  endtask

  function automatic int expect_mv(int c, int n);
    int s = c * 97 - 8333;
    int acc = 0;
    if (s < 0) s = 0;
    repeat (n) begin
      acc = acc - acc / 25 + s;
      if (acc > 1800000) acc = 1800000;
    end
    return acc / 1000;
  endfunction

  // per integration clock, just before the driver updates
  always @(posedge clk) if (running && tick) begin
    automatic int nint = 0;
    if (p >= 0) begin
      for (int k = 0; k < M; k++) if (cell_rst[k]) begin
        n_rst[k]++;
        if (k == 0 && last_rst_gen == M - 1) n_wrap++;
        last_rst_gen = k;
        integ_since[k] = p;
        if (p == 0) t_first_rst = cyc;
      end
      for (int k = 0; k < M; k++) begin
        if (col_sel[k]) integ_since[k] = -1;
        if (integ_since[k] >= 0) nint++;
      end
      if (nint >= 2) n_overlap++;
      if (grp_sel != prev_grp && p > 0) n_grp++;
      prev_grp = grp_sel;
      if (eval) begin
        check(p == I + SLOT * nstrobe, "strobe at 16*c + I integration clocks");
        check(int'(eval_idx) == nstrobe, "columns evaluated in order");
        check(cyc - t_first_rst == 4 * (I + SLOT * nstrobe), "strobe time in clk cycles");
        for (int r = 0; r < R; r++)
          check(int'(vout[r]) == expect_mv(int'(cap[r][nstrobe]), I), "sensor output");
        if (nstrobe == 0) begin
          if (I == 16)  v16_ridge  = vout[0];
          if (I == 112) v112_ridge = vout[0];
        end
        if (nstrobe == 10) begin
          if (I == 16)  v16_valley  = vout[0];
          if (I == 112) v112_valley = vout[0];
        end
        if (nstrobe < 4 && vout[0] > expect_mv(300, I)) n_ridge++;
        nstrobe++;
      end
      if (done) begin
        n_done++;
        check(nstrobe == N, "every column evaluated once");
        check(p == I + SLOT * (N - 1), "capture time N*16 + I - 16 clocks");
      end
    end
    p++;
  end

  initial begin
    for (int c = 0; c < N; c++) begin
      cap[0][c] = 11'd300;
      cap[1][c] = fps_pkg::cap_t'($urandom_range(0, 1) ? $urandom_range(450, 800) : 300);
    end
    cap[0][0] = 11'd600; cap[0][1] = 11'd750; cap[0][2] = 11'd450; cap[0][3] = 11'd750;
    foreach (n_rst[k]) begin n_rst[k] = 0; integ_since[k] = -1; end
    prev_grp = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    foreach (ivals[n]) begin
      I = (ivals[n] > (M - 1) * SLOT) ? (M - 1) * SLOT : ivals[n];
      if (ivals[n] != I) n_clamp++;
      repeat ($urandom_range(1, 7)) @(negedge clk);
      int_clks = INT_W'(ivals[n]);
      start = 1;
      t_start = cyc;
      @(negedge clk);
      start = 0;
      nstrobe = 0;
      last_rst_gen = -1;
      p = -1;
      running = 1;
      wait (n_done == n + 1);
      repeat (8) @(posedge clk);
      check(!busy, "idle after the capture");
      running = 0;
      check(nstrobe == N, "capture complete");
      $display("I=%0d: %0d columns in %0d clk cycles", I, nstrobe, cyc - t_start);
      @(negedge clk);
    end
    // the longer interval widens the ridge/valley difference
    check(v112_ridge - v112_valley > v16_ridge - v16_valley, "longer interval, larger ridge-valley difference");
    $display("ridge/valley at 16 clocks: %0d/%0d mV, at 112 clocks: %0d/%0d mV",
             v16_ridge, v16_valley, v112_ridge, v112_valley);
    for (int k = 0; k < M; k++) check(n_rst[k] > 0, "every column generator resets");
    check(n_wrap > 0, "token wraps from V_CK8 to V_CK1");
    check(n_grp > 0, "XDEC changes group");
    check(n_overlap > 0, "several columns integrate at once");
    check(n_clamp > 0, "interval clamped");
    check(n_done == 4, "every capture ends");
    check(n_ridge > 0, "ridge above valley");
    $display("mechanisms: resets/gen=%0d wraps=%0d group changes=%0d overlap clocks=%0d clamps=%0d captures=%0d",
             n_rst[0], n_wrap, n_grp, n_overlap, n_clamp, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
