// Self-checking test of xdec with its default 11 groups: the first 'adv' of a
// capture keeps group 0, every later one selects the next group in the same
// clock, the select is one-hot, the last group is held, and 'clear' returns to
// group 0.
module tb_xdec;
  localparam int G = 11;
  logic clk = 0, rst_n = 0, ce = 0, clear = 0, adv = 0;
  logic [G-1:0] grp_sel;
  logic [$clog2(G+1)-1:0] grp;
  int checks = 0, failures = 0, expg;

  xdec #(.G(G)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s exp=%0d grp=%0d sel=%b", what, expg, grp, grp_sel); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0; ce = 1;
      expg = 0;
      for (int a = 0; a < G + 3; a++) begin
        repeat ($urandom_range(1, 5)) begin
          @(negedge clk);
          check(grp_sel == G'(1 << expg) && int'(grp) == expg, "group held between advances");
        end
        // clock without enable: no change
        ce = 0; adv = 0; @(negedge clk); ce = 1;
        adv = 1;
        if (a > 0 && expg < G - 1) expg++;
        #1 check(grp_sel == G'(1 << expg) && int'(grp) == expg, "group changes in the advancing clock");
        @(negedge clk); adv = 0; #1;
        check(grp_sel == G'(1 << expg), "group kept after advance");
      end
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
