// Self-checking test of the sensor_array model with 16 columns, 2 rows and 8
// generators: each generator's reset and evaluation reach columns k and k+8 of
// both rows and no other; integrated outputs match a step model computed here.
module tb_sensor_array;
  localparam int N = 16, R = 2, M = 8;
  logic clk = 0, rst_n = 0, phi1 = 0, phi2 = 0;
  logic [M-1:0] cell_rst = '0, col_sel = '0;
  fps_pkg::cap_t  cap  [R][N];
  fps_pkg::volt_t vout [R][N];
  fps_pkg::volt_t col_line [R][N];
  int checks = 0, failures = 0;
  int nint [R][N];   // integration clocks since reset, per cell

  sensor_array #(.N_COLS(N), .ROWS(R), .M(M)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
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

  task automatic iclk();
    @(negedge clk) phi1 = 1;
    @(negedge clk) phi1 = 0;
    @(negedge clk) phi2 = 1;
    @(negedge clk) phi2 = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < N; c++) begin
        if (cell_rst[c % M]) nint[r][c] = 0;
        if (!col_sel[c % M]) nint[r][c]++;
      end
  endtask

  initial begin
    for (int r = 0; r < R; r++)
      for (int c = 0; c < N; c++) cap[r][c] = fps_pkg::cap_t'($urandom_range(300, 800));
    repeat (2) @(posedge clk);
    rst_n = 1;
    cell_rst = '1; iclk(); cell_rst = '0;
    for (int step = 0; step < 40; step++) begin
      cell_rst = M'(1 << $urandom_range(0, M - 1)) & M'($urandom_range(0, 1) ? '1 : '0);
      col_sel  = M'(1 << $urandom_range(0, M - 1)) & ~cell_rst;
      repeat ($urandom_range(1, 6)) begin
        iclk();
        cell_rst = '0;
      end
      @(negedge clk);
      for (int r = 0; r < R; r++)
        for (int c = 0; c < N; c++) begin
          check(int'(vout[r][c]) == expect_mv(int'(cap[r][c]), nint[r][c]), "cell output");
          check(col_line[r][c] == (col_sel[c % M] ? vout[r][c] : '0), "column line");
        end
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
