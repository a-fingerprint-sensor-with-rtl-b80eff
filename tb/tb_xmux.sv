// Self-checking test of the two-stage xmux at its default size (88 columns,
// 8 per group, 11 groups): with generator k evaluating and XDEC on group g,
// column 8g+k reaches the output.
module tb_xmux;
  localparam int N = 88, M = 8, G = N / M;
  fps_pkg::volt_t col_line [N];
  logic [M-1:0] col_sel;
  logic [G-1:0] grp_sel;
  fps_pkg::volt_t out;
  int checks = 0, failures = 0;

  xmux #(.N_COLS(N), .M(M)) dut (.*);

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int k = $urandom_range(0, M - 1), g = $urandom_range(0, G - 1);
      for (int i = 0; i < N; i++) col_line[i] = fps_pkg::volt_t'($urandom_range(1, 1800));
      col_sel = M'(1 << k);
      grp_sel = G'(1 << g);
      #1;
      checks++;
      if (out != col_line[g * M + k]) begin
        failures++; $display("FAIL k=%0d g=%0d out=%0d exp=%0d", k, g, out, col_line[g*M+k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
