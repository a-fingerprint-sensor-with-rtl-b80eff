// Self-checking test of xmux_stage1 (8 inputs): the selected input reaches the
// output, and nothing selected reads 0 mV.
module tb_xmux_stage1;
  localparam int M = 8;
  fps_pkg::volt_t in [M];
  logic [M-1:0] sel;
  fps_pkg::volt_t out;
  int checks = 0, failures = 0;

  xmux_stage1 #(.M(M)) dut (.*);

  initial begin
    for (int t = 0; t < 400; t++) begin
      int s = $urandom_range(0, M);   // M means none selected
      for (int i = 0; i < M; i++) in[i] = fps_pkg::volt_t'($urandom_range(0, 1800));
      sel = (s == M) ? '0 : M'(1 << s);
      #1;
      checks++;
      if (out != ((s == M) ? 12'd0 : in[s])) begin
        failures++; $display("FAIL sel=%b out=%0d", sel, out);
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
