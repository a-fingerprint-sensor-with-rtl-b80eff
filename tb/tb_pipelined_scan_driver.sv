// Self-checking test of pipelined_scan_driver at its default sizes (88
// columns, 8 generators, 16-clock stagger). For the prototype's integration
// intervals 16, 32 and 112, and an out-of-range 200 that must be clamped to
// 112, and 0 that must become 1, every integration clock of a capture is compared with a schedule
// computed here: column c is reset by generator c mod 8 at clock 16c, its
// evaluation window is clocks 16c+I .. 16c+I+15, XDEC selects group c/8 during
// it, the evaluation strobe comes at 16c+I, and the capture ends at 16*87+I.
// The four-phase clock relation (phi1, phi2, tick) is checked on every fast
// clock. A start pulse with another interval in the middle of a capture must be
// ignored.
module tb_pipelined_scan_driver;
  localparam int N = 88, M = 8, SLOT = 16, G = N / M, INT_W = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [INT_W-1:0] int_clks;
  logic phi1, phi2, tick, eval, busy, done;
  logic [M-1:0] cell_rst, col_sel;
  logic [G-1:0] grp_sel;
  logic [$clog2(N)-1:0] eval_idx;
  int checks = 0, failures = 0;
  int ivals[5] = '{16, 32, 112, 200, 0};
  int p, I;
  bit running;

  pipelined_scan_driver dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s period=%0d I=%0d", what, p, I); end
  endtask

  // column whose evaluation window contains period q, or -1
  function automatic int eval_col(int q);
    if (q < I) return -1;
    if ((q - I) / SLOT >= N) return -1;
    return (q - I) / SLOT;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (phi1 && phi2) begin failures++; $display("FAIL phases overlap"); end
    if (tick != phi2) begin failures++; $display("FAIL tick not in phase 2"); end
  end

  // sample each integration clock's outputs just before they change
  always @(posedge clk) if (running && tick) begin
    if (p >= 0) begin
      automatic int c = eval_col(p);
      automatic int last = I + (N - 1) * SLOT;
      for (int k = 0; k < M; k++)
        check(cell_rst[k] == (p % SLOT == 0 && p / SLOT < N && (p / SLOT) % M == k), "V_CK reset");
      check(col_sel == ((c >= 0) ? M'(1 << (c % M)) : '0), "1st-stage select (evaluation window)");
      if (c >= 0) check(grp_sel == G'(1 << (c / M)), "XDEC group");
      check(eval == (c >= 0 && (p - I) % SLOT == 0), "evaluation strobe");
      if (eval) check(int'(eval_idx) == c, "evaluated column");
      check(done == (p == last), "done");
      // the ring counter ends its last slot at 16*N - 1 even when I < 16
      check(busy == (p < ((last > N * SLOT - 1) ? last : N * SLOT - 1)), "busy");
    end
    p++;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    foreach (ivals[n]) begin
      I = (ivals[n] > (M - 1) * SLOT) ? (M - 1) * SLOT : (ivals[n] == 0) ? 1 : ivals[n];
      repeat ($urandom_range(1, 7)) @(negedge clk);
      int_clks = INT_W'(ivals[n]);
      start = 1;
      @(negedge clk);
      start = 0;
      p = -1;
      running = 1;
      // a start while busy must change nothing
      wait (p == 300);
      @(negedge clk);
      int_clks = 8'd50;
      start = 1;
      @(negedge clk);
      start = 0;
      wait (p == I + N * SLOT + 4);
      running = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
