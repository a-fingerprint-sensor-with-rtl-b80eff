// Pipelined scan driver of an integrating fingerprint sensor.
// An integrating sensor cell needs many clocks to build up a usable signal, so
// scanning the columns one after another would make the capture time
// N * (integration interval). This driver overlaps the integrations instead:
// M column signal generators (V_CK1..V_CKM) are started one after another,
// SLOT clocks apart, by an M-position ring counter. Each resets its columns,
// lets them integrate for the programmed interval and then opens their
// evaluation window. Up to M columns are therefore integrating at once, and one
// column is evaluated every SLOT clocks whatever the interval; only the first
// evaluation moves later when the interval grows. The last column is evaluated
// (N-1)*SLOT + int_clks integration clocks after the first reset (1408 clocks
// for 88 columns and a 16-clock interval), against N*int_clks for a scan that
// integrates one column at a time.
//
// Generator k (k = 0..M-1) serves columns k, k+M, k+2M, ...; each turn of the
// ring counter scans one group of M adjacent columns, N/M turns cover the
// array. The 1st-stage XMUX selects are the generators' evaluation windows
// ('col_sel'); the 2nd-stage selects come from XDEC ('grp_sel'). An independent
// evaluation generator gives one strobe per column ('eval', 'eval_idx').
// The fast clock 'clk' runs at 4x the integration clock; the non-overlapping
// phases phi1/phi2 and the integration-clock enable come from the built-in
// two-phase generator. Outputs change between phi2 and the next phi1.
//
// Interface: pulse 'start' while 'busy' is low; 'int_clks' is sampled then and
// clamped to 1 .. (M-1)*SLOT (112 clocks by default), the range in which every
// evaluation window closes before the same generator resets again. 'done'
// pulses with the last evaluation strobe; 'busy' falls after it, or, for
// intervals under SLOT, when the ring counter ends its last slot.
// The architecture (ring counter, M generators, independent evaluation signal,
// 16-clock stagger, XDEC-driven 2nd stage) follows the document; handshake,
// clamping and the one-shot capture are this design's choices.
module pipelined_scan_driver #(
  parameter int unsigned N_COLS = fps_pkg::N_COLS_DEF,  // sensor columns (n)
  parameter int unsigned M      = fps_pkg::M_DEF,       // pipeline depth (m)
  parameter int unsigned SLOT   = fps_pkg::SLOT_DEF,    // stagger between generators
  parameter int unsigned INT_W  = fps_pkg::INT_W,
  localparam int unsigned G     = N_COLS / M            // column groups (n/m)
) (
  input  logic             clk,       // fast clock (4x integration clock)
  input  logic             rst_n,
  input  logic             start,     // begin a capture
  input  logic [INT_W-1:0] int_clks,  // integration interval in integration clocks
  output logic             phi1,      // integrator phase 1
  output logic             phi2,      // integrator phase 2
  output logic             tick,      // integration-clock enable (one clk cycle)
  output logic [M-1:0]     cell_rst,  // V_CKk reset, to columns k, k+M, ...
  output logic [M-1:0]     col_sel,   // V_CKk evaluation window, 1st-stage XMUX select
  output logic [G-1:0]     grp_sel,   // XDEC output, 2nd-stage XMUX select
  output logic             eval,      // evaluation strobe, one per column
  output logic [$clog2(N_COLS)-1:0] eval_idx,  // column being evaluated
  output logic             busy,
  output logic             done
);
  localparam int unsigned INT_MAX = (M - 1) * SLOT;

  logic [M-1:0]     token;
  logic             slot_start, ring_active;
  logic [$clog2(G+1)-1:0] round, xdec_grp;  // xdec_grp: observation only
  logic [INT_W-1:0] int_q;
  logic [M-1:0]     sel_start;
  logic             eval_busy, accept;

  assign busy   = ring_active || eval_busy;
  assign accept = start && !busy;

  // integration interval, held for the whole capture
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      int_q <= INT_W'(SLOT);
    else if (accept) begin
      if (int_clks == '0)
        int_q <= INT_W'(1);
      else if (32'(int_clks) > INT_MAX)
        int_q <= INT_W'(INT_MAX);
      else
        int_q <= int_clks;
    end
  end

  nonoverlap_clkgen u_clkgen (
    .clk, .rst_n, .en(1'b1), .phi1, .phi2, .tick
  );

  ring_counter #(.M(M), .SLOT(SLOT), .ROUNDS(G)) u_ring (
    .clk, .rst_n, .ce(tick), .start(accept),
    .token, .slot_start, .active(ring_active), .round
  );

  for (genvar k = 0; k < M; k++) begin : g_vck
    column_signal_gen #(.SLOT(SLOT), .INT_W(INT_W)) u_vck (
      .clk, .rst_n, .ce(tick),
      .trigger  (slot_start && token[k]),
      .int_clks (int_q),
      .cell_rst (cell_rst[k]),
      .sel      (col_sel[k]),
      .sel_start(sel_start[k])
    );
  end

  eval_gen #(.SLOT(SLOT), .N_CELLS(G * M), .INT_W(INT_W)) u_eval (
    .clk, .rst_n, .ce(tick),
    .trigger (slot_start && token[0] && round == '0),
    .int_clks(int_q),
    .eval, .idx(eval_idx), .busy(eval_busy), .done
  );

  xdec #(.G(G)) u_xdec (
    .clk, .rst_n, .ce(tick), .clear(accept), .adv(sel_start[0]),
    .grp_sel, .grp(xdec_grp)
  );

  // Pipeline rules: at most one evaluation window open, and a strobe only
  // inside one.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(col_sel));
  assert property (@(posedge clk) disable iff (!rst_n) eval |-> (col_sel != '0));
endmodule
