// Behavioural model (not synthesizable analog): N-input two-stage column
// multiplexer. The N column lines form G = N/M groups of M adjacent columns.
// Each group has a 1st-stage M:1 XMUX switched by the column signal generators'
// evaluation windows (column g*M+k is passed while generator k evaluates); a
// 2nd-stage G:1 XMUX switched by XDEC passes one group to the output.
// Purely combinational.
module xmux #(
  parameter int unsigned N_COLS = fps_pkg::N_COLS_DEF,
  parameter int unsigned M      = fps_pkg::M_DEF,
  localparam int unsigned G     = N_COLS / M
) (
  input  fps_pkg::volt_t col_line [N_COLS],
  input  logic [M-1:0]   col_sel,   // 1st-stage selects (V_CK1..M)
  input  logic [G-1:0]   grp_sel,   // 2nd-stage selects (XDEC)
  output fps_pkg::volt_t out
);
  fps_pkg::volt_t stage1 [G];

  for (genvar g = 0; g < G; g++) begin : g_grp
    fps_pkg::volt_t grp_in [M];
    for (genvar k = 0; k < M; k++) begin : g_in
      assign grp_in[k] = col_line[g*M + k];
    end
    xmux_stage1 #(.M(M)) u_s1 (.in(grp_in), .sel(col_sel), .out(stage1[g]));
  end

  xmux_stage2 #(.G(G)) u_s2 (.in(stage1), .sel(grp_sel), .out(out));
endmodule
