// Self-checking test of column_signal_gen: after a trigger the reset is high for
// exactly one integration clock, and the evaluation window opens int_clks
// clocks after the reset and lasts 16 clocks, for the prototype's intervals
// (16, 32, 112) and a few others. A trigger during an open window restarts
// the cycle. The clock enable is toggled at random.
module tb_column_signal_gen;
  localparam int SLOT = 16, INT_W = 8;
  logic clk = 0, rst_n = 0, ce = 0, trigger = 0;
  logic [INT_W-1:0] int_clks;
  logic cell_rst, sel, sel_start;
  int checks = 0, failures = 0;
  int ivals[6] = '{16, 32, 112, 1, 5, 100};

  column_signal_gen #(.SLOT(SLOT), .INT_W(INT_W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what, int p);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s period=%0d int=%0d", what, p, int_clks); end
  endtask

  // advance one enabled clock, with random idle clocks in between
  task automatic step(bit trig);
    while ($urandom_range(0, 2) == 0) begin
      ce = 0; trigger = 0; @(negedge clk);
    end
    ce = 1; trigger = trig; @(negedge clk);
    ce = 0; trigger = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (ivals[n]) begin
      int_clks = INT_W'(ivals[n]);
      step(1);  // edge E0: reset issued for period 0
      for (int p = 0; p < ivals[n] + SLOT + 8; p++) begin
        check(cell_rst == (p == 0), "reset one clock", p);
        check(sel == (p >= ivals[n] && p < ivals[n] + SLOT), "evaluation window", p);
        check(sel_start == (p == ivals[n]), "window start", p);
        step(0);
      end
    end
    // retrigger while the window is open: reset wins, window closes
    int_clks = 8'd4;
    step(1);
    repeat (6) step(0);
    check(sel, "window open before retrigger", 0);
    step(1);
    check(cell_rst && !sel, "retrigger closes window and resets", 0);
    repeat (3) step(0);
    check(!sel, "integrating again", 0);
    step(0);
    check(sel && sel_start, "new window after retrigger", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
