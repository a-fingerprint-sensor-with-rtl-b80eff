// m-shift ring counter of the pipelined scan driver.
// A single token circulates through M positions; it moves one position every
// SLOT integration clocks, so column signal generator k+1 is started a fixed
// SLOT clocks after generator k, and generator 1 follows generator M again.
// A capture starts on 'start' and lasts ROUNDS full turns of the token (one turn
// per group of M columns, N/M turns for the whole array); then 'active' drops.
// Timing: all state advances on clock edges with 'ce' high (one integration
// clock). 'slot_start' is high during the first clock of each slot, i.e. in the
// clock whose end edge the column signal generators use to issue their reset.
// 'start' is accepted on any clock edge while idle.
// Rotation of a one-hot token follows the document; the SLOT-clock hold counter
// and the finite number of turns per capture are this design's choices.
module ring_counter #(
  parameter int unsigned M      = fps_pkg::M_DEF,     // positions (pipeline depth)
  parameter int unsigned SLOT   = fps_pkg::SLOT_DEF,  // clocks per position
  parameter int unsigned ROUNDS = fps_pkg::N_COLS_DEF / fps_pkg::M_DEF  // turns per capture
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,          // integration-clock enable
  input  logic         start,       // begin a capture (ignored while active)
  output logic [M-1:0] token,       // one-hot: generator currently chosen
  output logic         slot_start,  // first clock of the current slot
  output logic         active,      // capture in progress
  output logic [$clog2(ROUNDS+1)-1:0] round  // current turn (column group being reset)
);
  localparam int unsigned SW = (SLOT > 1) ? $clog2(SLOT) : 1;
  logic [SW-1:0] sc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      token  <= '0;
      sc     <= '0;
      active <= 1'b0;
      round  <= '0;
    end else if (start && !active) begin
      token    <= '0;
      token[0] <= 1'b1;
      sc       <= '0;
      active   <= 1'b1;
      round    <= '0;
    end else if (ce && active) begin
      if (sc == SW'(SLOT - 1)) begin
        sc    <= '0;
        token <= {token[M-2:0], token[M-1]};
        if (token[M-1]) begin
          if (round == $bits(round)'(ROUNDS - 1)) begin
            active <= 1'b0;
            token  <= '0;
          end
          round <= round + 1'b1;
        end
      end else begin
        sc <= sc + 1'b1;
      end
    end
  end

  assign slot_start = active && (sc == '0);

  assert property (@(posedge clk) disable iff (!rst_n) active |-> $onehot(token));
endmodule
