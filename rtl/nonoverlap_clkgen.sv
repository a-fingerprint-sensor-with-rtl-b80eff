// Non-overlapping two-phase clock generator for the AOVF integrator switches.
// One integration clock takes four cycles of the fast input clock:
//   phase 0: phi1 high   phase 1: both low   phase 2: phi2 high   phase 3: both low
// so phi1 and phi2 are never high together and are separated by a full fast-clock
// cycle on each side. During phase 2 the generator also pulses 'tick' for one
// fast cycle; the scan driver's registers update only at the end of that cycle,
// so its outputs change on entering phase 3, while both phases are low, and are
// stable through the following phi1 and phi2 pulses. One integration clock of
// the driver therefore spans phases 3, 0, 1, 2. All outputs are registered (glitch-free).
// The two-phase, non-overlapping scheme follows the integrator's switch timing;
// deriving it from a 4x clock with a phase counter is this design's choice.
// 'en' low parks both phases low (the counter keeps running).
module nonoverlap_clkgen (
  input  logic clk,     // fast clock, 4x the integration clock
  input  logic rst_n,   // asynchronous active-low reset
  input  logic en,      // enable phase outputs
  output logic phi1,    // integrator phase 1 (charge sampling / reset)
  output logic phi2,    // integrator phase 2 (charge transfer / integrate)
  output logic tick     // one-cycle strobe in phase 2: integration-clock enable
);
  logic [1:0] ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph   <= 2'd0;
      phi1 <= 1'b0;
      phi2 <= 1'b0;
      tick <= 1'b0;
    end else begin
      ph   <= ph + 2'd1;
      // registered outputs reflect the phase being entered
      phi1 <= en && (ph == 2'd3);
      phi2 <= en && (ph == 2'd1);
      tick <= (ph == 2'd1);
    end
  end

  // The two phases may never overlap.
  assert property (@(posedge clk) disable iff (!rst_n) !(phi1 && phi2));
endmodule
