// Self-checking test of eval_gen at its default size (88 columns): for the
// prototype's integration intervals 16, 32 and 112 the first strobe comes
// int_clks clocks after the trigger and the following 87 exactly 16 clocks
// apart, with the column index counting up; 'done' comes with the last one.
module tb_eval_gen;
  localparam int SLOT = 16, N = 88, INT_W = 8;
  logic clk = 0, rst_n = 0, ce = 0, trigger = 0;
  logic [INT_W-1:0] int_clks;
  logic eval, busy, done;
  logic [$clog2(N)-1:0] idx;
  int checks = 0, failures = 0, nstrobe;
  int ivals[3] = '{16, 32, 112};

  eval_gen #(.SLOT(SLOT), .N_CELLS(N), .INT_W(INT_W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what, int p);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s period=%0d", what, p); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (ivals[n]) begin
      int_clks = INT_W'(ivals[n]);
      @(negedge clk); ce = 1; trigger = 1;
      @(negedge clk); trigger = 0;
      nstrobe = 0;
      for (int p = 0; p < ivals[n] + N * SLOT + 10; p++) begin
        automatic bit exp = (p >= ivals[n]) && ((p - ivals[n]) % SLOT == 0)
                            && ((p - ivals[n]) / SLOT < N);
        check(eval == exp, "strobe time", p);
        if (eval) begin
          check(int'(idx) == nstrobe, "column index", p);
          nstrobe++;
        end
        check(done == (p == ivals[n] + (N - 1) * SLOT), "done with last strobe", p);
        check(busy == (p < ivals[n] + (N - 1) * SLOT), "busy", p);
        @(negedge clk);
      end
      check(nstrobe == N, "one strobe per column", 0);
      ce = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
