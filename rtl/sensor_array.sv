// Behavioural model (not synthesizable analog): the ROWS x N_COLS sensor array.
// Every cell is a sensor_cell model. Column c takes its reset and evaluation
// signals from column signal generator c mod M, so generator k drives columns
// k, k+M, k+2M, ... in every row. Each row has its own column lines.
// The finger is given as one capacitance per cell ('cap', attofarads).
// Shared control per column follows the document; separate column lines per row
// (both rows read in parallel) is this design's reading of the 2-row prototype.
module sensor_array #(
  parameter int unsigned N_COLS = fps_pkg::N_COLS_DEF,
  parameter int unsigned ROWS   = fps_pkg::ROWS_DEF,
  parameter int unsigned M      = fps_pkg::M_DEF
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           phi1,
  input  logic           phi2,
  input  logic [M-1:0]   cell_rst,                 // V_CK1..M resets
  input  logic [M-1:0]   col_sel,                  // V_CK1..M evaluation windows
  input  fps_pkg::cap_t  cap  [ROWS][N_COLS],
  output fps_pkg::volt_t vout [ROWS][N_COLS],      // integrator outputs
  output fps_pkg::volt_t col_line [ROWS][N_COLS]   // column lines
);
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < N_COLS; c++) begin : g_col
      sensor_cell u_cell (
        .clk, .rst_n, .phi1, .phi2,
        .cell_rst(cell_rst[c % M]),
        .eval    (col_sel[c % M]),
        .cap     (cap[r][c]),
        .vout    (vout[r][c]),
        .col     (col_line[r][c])
      );
    end
  end
endmodule
