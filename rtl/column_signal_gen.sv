// Column signal generator V_CKk of the pipelined scan driver.
// When the ring counter's token reaches this generator at the start of a slot,
// it issues a one-clock reset to every sensor column it controls (columns k,
// k+M, k+2M, ...), which starts their integration. After 'int_clks' integration
// clocks, counting the reset clock itself, it raises 'sel' for SLOT clocks: the
// evaluation window, during which the controlled cells stop integrating, drive
// their column lines and are picked by the 1st-stage XMUX. 'sel_start' marks the
// first clock of that window.
// Timing (integration clocks, updates on edges with 'ce'): reset in clock T0,
// cells integrate in T0 .. T0+int_clks-1, 'sel' high in T0+int_clks ..
// T0+int_clks+SLOT-1. The window ends before the next reset of the same generator
// (M*SLOT clocks later) as long as int_clks <= (M-1)*SLOT, 112 for the default
// sizes, the longest interval the prototype was run with. A reset always wins
// over a window still open.
// Reset and evaluation with a variable interval follow the document; the counter
// structure, one-clock reset width and window length of SLOT are this design's.
module column_signal_gen #(
  parameter int unsigned SLOT  = fps_pkg::SLOT_DEF,
  parameter int unsigned INT_W = fps_pkg::INT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,         // integration-clock enable
  input  logic             trigger,    // token here at the start of a slot
  input  logic [INT_W-1:0] int_clks,   // integration interval (>= 1)
  output logic             cell_rst,   // reset to the controlled sensor cells
  output logic             sel,        // evaluation window / 1st-stage XMUX select
  output logic             sel_start   // first clock of the evaluation window
);
  typedef enum logic [1:0] {IDLE, INTEG, EVAL} state_t;
  state_t state;
  localparam int unsigned CW = (INT_W > $clog2(SLOT)) ? INT_W : $clog2(SLOT) + 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      cnt       <= '0;
      cell_rst  <= 1'b0;
      sel       <= 1'b0;
      sel_start <= 1'b0;
    end else if (ce) begin
      cell_rst  <= 1'b0;
      sel_start <= 1'b0;
      if (trigger) begin
        cell_rst <= 1'b1;
        sel      <= 1'b0;
        state    <= INTEG;
        cnt      <= CW'(int_clks) - 1'b1;
      end else begin
        unique case (state)
          IDLE: ;
          INTEG: begin
            if (cnt == '0) begin
              sel       <= 1'b1;
              sel_start <= 1'b1;
              state     <= EVAL;
              cnt       <= CW'(SLOT - 1);
            end else begin
              cnt <= cnt - 1'b1;
            end
          end
          EVAL: begin
            if (cnt == '0) begin
              sel   <= 1'b0;
              state <= IDLE;
            end else begin
              cnt <= cnt - 1'b1;
            end
          end
          default: state <= IDLE;
        endcase
      end
    end
  end
endmodule
