// Evaluation-signal generator of the pipelined scan driver.
// The evaluation strobe is produced independently of the column generators:
// the first strobe comes 'int_clks' integration clocks after the first reset of
// a capture, and then one strobe every SLOT clocks, N_CELLS strobes in all, one
// per column in scan order. So only the start of evaluation depends on the
// integration interval; the evaluation rate is fixed at one column per SLOT
// clocks. 'idx' numbers the column being evaluated and 'done' pulses with the
// last strobe.
// Timing: 'trigger' is seen in the clock of the first reset (T0); strobes are
// high in clocks T0+int_clks+s*SLOT, s = 0 .. N_CELLS-1, the first clock of each
// column's evaluation window.
// The independent evaluation signal with a fixed 16-clock period follows the
// document; the strobe being one clock wide and the column index are this
// design's choices.
module eval_gen #(
  parameter int unsigned SLOT    = fps_pkg::SLOT_DEF,
  parameter int unsigned N_CELLS = fps_pkg::N_COLS_DEF,
  parameter int unsigned INT_W   = fps_pkg::INT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             trigger,   // first reset of a capture
  input  logic [INT_W-1:0] int_clks,
  output logic             eval,      // evaluation strobe
  output logic [$clog2(N_CELLS)-1:0] idx,  // column evaluated with this strobe
  output logic             busy,      // waiting for or issuing strobes
  output logic             done       // pulses with the last strobe
);
  typedef enum logic [1:0] {IDLE, WAIT, RUN} state_t;
  state_t state;
  localparam int unsigned CW = (INT_W > $clog2(SLOT)) ? INT_W : $clog2(SLOT) + 1;
  logic [CW-1:0] cnt;

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      eval  <= 1'b0;
      idx   <= '0;
      done  <= 1'b0;
    end else if (ce) begin
      eval <= 1'b0;
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          if (trigger) begin
            state <= WAIT;
            cnt   <= CW'(int_clks) - 1'b1;
          end
        end
        WAIT: begin
          if (cnt == '0) begin
            eval  <= 1'b1;
            idx   <= '0;
            cnt   <= CW'(SLOT - 1);
            state <= (N_CELLS == 1) ? IDLE : RUN;
            done  <= (N_CELLS == 1);
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        RUN: begin
          if (cnt == '0) begin
            eval <= 1'b1;
            idx  <= idx + 1'b1;
            cnt  <= CW'(SLOT - 1);
            if (idx == $bits(idx)'(N_CELLS - 2)) begin
              done  <= 1'b1;
              state <= IDLE;
            end
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
