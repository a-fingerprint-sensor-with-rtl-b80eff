// XDEC: select decoder of the 2nd-stage XMUX.
// The columns are split into G = N/M groups of M adjacent columns; the
// 1st-stage XMUX of each group picks the column in evaluation, and XDEC chooses
// which group's output reaches the sensor output. It takes one signal from the
// pipeline, the evaluation-window start of column generator 1 ('adv'): every
// such event after the first of a capture moves the selection to the next
// group, because generator 1 evaluates the first column of each group.
// Timing: the selection is combinational on 'adv', so the new group is chosen
// in the very clock its first column is evaluated; the group register updates
// on edges with 'ce'. 'clear' (start of a capture) returns to group 0.
// Driving the 2nd stage from a decoder fed by the pipeline follows the
// document; using generator 1's evaluation start (rather than its reset) as the
// advancing signal is this design's choice, which keeps the group aligned with
// evaluation for every integration interval.
module xdec #(
  parameter int unsigned G = fps_pkg::N_COLS_DEF / fps_pkg::M_DEF  // groups (N/M)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         clear,   // start of a capture
  input  logic         adv,     // evaluation of generator 1 starts
  output logic [G-1:0] grp_sel, // one-hot select of the 2nd-stage XMUX
  output logic [$clog2(G+1)-1:0] grp  // selected group number
);
  localparam int unsigned GW = $clog2(G + 1);
  logic [GW-1:0] grp_q;
  logic          seen;   // generator 1 already evaluated in this capture

  always_comb begin
    grp = grp_q;
    if (adv && seen && grp_q != GW'(G - 1)) grp = grp_q + 1'b1;
    grp_sel = '0;
    for (int g = 0; g < G; g++) grp_sel[g] = (grp == GW'(g));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grp_q <= '0;
      seen  <= 1'b0;
    end else if (clear) begin
      grp_q <= '0;
      seen  <= 1'b0;
    end else if (ce) begin
      grp_q <= grp;
      if (adv) seen <= 1'b1;
    end
  end
endmodule
