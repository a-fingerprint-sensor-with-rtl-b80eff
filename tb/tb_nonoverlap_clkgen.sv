// Self-checking test of nonoverlap_clkgen: phi1 and phi2 never overlap, each is
// high for one of every four clk cycles with a low cycle between them, 'tick'
// has a period of 4 and coincides with phi2, and 'en' low parks both phases.
module tb_nonoverlap_clkgen;
  logic clk = 0, rst_n = 0, en = 1;
  logic phi1, phi2, tick;
  int checks = 0, failures = 0, cyc = 0;
  logic [3:0] hist1, hist2;

  nonoverlap_clkgen dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    hist1 = '0; hist2 = '0;
    repeat (200) begin
      @(negedge clk);
      cyc++;
      hist1 = {hist1[2:0], phi1};
      hist2 = {hist2[2:0], phi2};
      check(!(phi1 && phi2), "overlap");
      check(tick == phi2, "tick aligned with phi2");
      if (cyc > 4) begin
        check($countones(hist1) == 1, "phi1 duty 1/4");
        check($countones(hist2) == 1, "phi2 duty 1/4");
        // phi2 follows phi1 two cycles later (one gap cycle between)
        check(hist2[0] == hist1[2], "phi1 -> gap -> phi2");
      end
    end
    en = 0;
    repeat (3) @(negedge clk);
    repeat (20) begin
      @(negedge clk);
      check(!phi1 && !phi2, "parked when disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
