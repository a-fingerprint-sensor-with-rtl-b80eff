// Self-checking test of ring_counter at its default sizes (8 positions,
// 16-clock slots, 11 turns): the token position, slot start, turn number and
// the length of a capture are compared every clock with values computed from
// the elapsed clock count. The clock enable is toggled at random so that held
// clocks are covered.
module tb_ring_counter;
  localparam int M = 8, SLOT = 16, ROUNDS = 11;
  logic clk = 0, rst_n = 0, ce = 0, start = 0;
  logic [M-1:0] token;
  logic slot_start, active;
  logic [$clog2(ROUNDS+1)-1:0] round;
  int checks = 0, failures = 0;
  int t;  // enabled clocks since start

  ring_counter #(.M(M), .SLOT(SLOT), .ROUNDS(ROUNDS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0d", what, t); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cap = 0; cap < 2; cap++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      t = 0;
      while (t < M * SLOT * ROUNDS + 5) begin
        // state for enabled-clock count t
        if (t < M * SLOT * ROUNDS) begin
          check(active, "active");
          check(token == M'(1 << ((t / SLOT) % M)), "token position");
          check(slot_start == (t % SLOT == 0), "slot start");
          check(int'(round) == t / (M * SLOT), "turn number");
        end else begin
          check(!active && !slot_start, "capture ended after ROUNDS turns");
        end
        ce = ($urandom_range(0, 3) != 0);
        @(negedge clk);
        if (ce) t++;
      end
      ce = 0;
      // start while idle restarts; no effect otherwise checked by first loop
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
