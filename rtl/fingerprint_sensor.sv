// Fingerprint sensor with a pipelined scan driver: ROWS x N_COLS cells (88 x 2
// by default) of integrating AOVF capacitive sensor cells, read through one
// two-stage XMUX per row, with the synthesizable pipelined_scan_driver doing all
// the sequencing. The sensor cells and the multiplexers are behavioural models
// of analog circuits; voltages are mV codes and the finger is one capacitance
// per cell in aF.
// Use: pulse 'start' while 'busy' is low, with the integration interval on
// 'int_clks' (1 .. 112 integration clocks, e.g. 16, 32 or 112). Column c of
// every row appears on vout[row] during its evaluation window, and 'eval'
// strobes once per column with eval_idx = c, at integration clock
// int_clks + 16*c after the first reset (one integration clock = 4 clk cycles).
// 'done' pulses with the last strobe.
// The structure follows the document; reading both rows in parallel is this
// design's choice.
module fingerprint_sensor #(
  parameter int unsigned N_COLS = fps_pkg::N_COLS_DEF,
  parameter int unsigned ROWS   = fps_pkg::ROWS_DEF,
  parameter int unsigned M      = fps_pkg::M_DEF,
  parameter int unsigned SLOT   = fps_pkg::SLOT_DEF,
  parameter int unsigned INT_W  = fps_pkg::INT_W,
  localparam int unsigned G     = N_COLS / M
) (
  input  logic             clk,        // fast clock, 4x integration clock
  input  logic             rst_n,
  input  logic             start,
  input  logic [INT_W-1:0] int_clks,
  input  fps_pkg::cap_t    cap  [ROWS][N_COLS],  // finger capacitance per cell
  output fps_pkg::volt_t   vout [ROWS],          // sensor output per row
  output logic             eval,
  output logic [$clog2(N_COLS)-1:0] eval_idx,
  output logic             busy,
  output logic             done,
  // driver signals brought out for observation
  output logic             phi1,
  output logic             phi2,
  output logic             tick,
  output logic [M-1:0]     cell_rst,
  output logic [M-1:0]     col_sel,
  output logic [G-1:0]     grp_sel
);
  fps_pkg::volt_t col_line [ROWS][N_COLS];

  pipelined_scan_driver #(.N_COLS(N_COLS), .M(M), .SLOT(SLOT), .INT_W(INT_W)) u_drv (
    .clk, .rst_n, .start, .int_clks,
    .phi1, .phi2, .tick, .cell_rst, .col_sel, .grp_sel,
    .eval, .eval_idx, .busy, .done
  );

  sensor_array #(.N_COLS(N_COLS), .ROWS(ROWS), .M(M)) u_array (
    .clk, .rst_n, .phi1, .phi2, .cell_rst, .col_sel, .cap,
    .vout(), .col_line
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    xmux #(.N_COLS(N_COLS), .M(M)) u_xmux (
      .col_line(col_line[r]), .col_sel, .grp_sel, .out(vout[r])
    );
  end
endmodule
