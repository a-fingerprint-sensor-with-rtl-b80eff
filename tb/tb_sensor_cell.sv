// Self-checking test of the sensor_cell model: with a locally generated
// two-phase clock, the output after a reset and n integration clocks equals
// the leaky-integrator recurrence computed here from the capacitance, and the
// prototype's reported levels are met (0.6 fF near 0.6 V after 16 clocks, over
// 1.1 V and more than 0.7 V above a 0.3 fF valley after 112 clocks); the output holds and appears on the column line only while
// 'eval' is high; a reset clears it. Capacitances are the prototype's ridge
// (0.6, 0.75, 0.45 fF) and valley (0.3 fF) values plus random ones.
module tb_sensor_cell;
  logic clk = 0, rst_n = 0, phi1 = 0, phi2 = 0, cell_rst = 0, eval = 0;
  fps_pkg::cap_t cap;
  fps_pkg::volt_t vout, col;
  int checks = 0, failures = 0;
  int caps[4] = '{600, 750, 450, 300};

  sensor_cell dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s cap=%0d vout=%0d col=%0d", what, cap, vout, col); end
  endtask

  // one integration clock: phi1 pulse, gap, phi2 pulse, gap
  task automatic iclk();
    @(negedge clk) phi1 = 1;
    @(negedge clk) phi1 = 0;
    @(negedge clk) phi2 = 1;
    @(negedge clk) phi2 = 0;
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

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 16; trial++) begin
      int n;
      cap = fps_pkg::cap_t'((trial < 4) ? caps[trial] : $urandom_range(0, 1200));
      n   = (trial % 3 == 0) ? 16 : (trial % 3 == 1) ? 32 : 112;
      eval = 0;
      cell_rst = 1; iclk(); cell_rst = 0;   // reset + first integration
      repeat (n - 1) iclk();
      @(negedge clk);
      check(int'(vout) == expect_mv(int'(cap), n), "integrated output");
      check(col == 0, "column line released while integrating");
      eval = 1;
      repeat (4) iclk();
      check(int'(vout) == expect_mv(int'(cap), n), "output held during evaluation");
      check(col == vout, "column line driven during evaluation");
      eval = 0;
    end
    // the prototype's 16-clock figures: ridge clearly above valley
    cap = 11'd600; cell_rst = 1; iclk(); cell_rst = 0; repeat (15) iclk();
    @(negedge clk);
    check(vout > 550 && vout < 650, "0.6 fF ridge near 0.6 V after 16 clocks");
    begin
      int ridge, valley;
      cap = 11'd600; cell_rst = 1; iclk(); cell_rst = 0; repeat (111) iclk();
      @(negedge clk); ridge = vout;
      cap = 11'd300; cell_rst = 1; iclk(); cell_rst = 0; repeat (111) iclk();
      @(negedge clk); valley = vout;
      check(ridge > 1100, "0.6 fF ridge above 1.1 V after 112 clocks");
      check(ridge - valley > 700, "ridge-valley difference above 0.7 V after 112 clocks");
    end
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
