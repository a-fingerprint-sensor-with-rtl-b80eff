// Behavioural model (not synthesizable analog): one AOVF-integrator sensor cell.
// The real cell is a switched-capacitor integrator under a sensor plate; the
// finger, excited through an external bezel, couples charge into the plate
// through the ridge or valley capacitance C. Each integration clock adds a
// charge packet to the integrator output, so the signal grows with the number
// of clocks n while uncorrelated noise does not (signal-to-noise ratio up by
// about 20*log10(n) dB).
// Model: a leaky integrator. The output starts at 0 V on reset and each
// integration clock does
//     V <- V - V/25 + s(C),   s(C) = 97 uV/aF * C - 8.33 mV (never negative)
// clipped at the 1.8 V rail. The coefficients are this design's fit to the
// prototype's simulated outputs: after 16 clocks 0.60 V for 0.6 fF, 0.77 V for
// 0.75 fF, 0.42 V for 0.45 fF and 0.25 V for a 0.3 fF valley (reported: 0.6,
// 0.8, 0.4, 0.25 V); after 32 clocks both grow; after 112 clocks the 0.6 fF
// cell passes 1.1 V and leads the valley by more than 0.7 V, as reported.
// Noise and the finger contact's series resistance are not modelled.
// Timing (fast clock 'clk'): on the clock edge that ends a phi1 pulse, a high
// 'cell_rst' clears the output; on the edge that ends a phi2 pulse the cell
// integrates one step unless 'eval' is high. While 'eval' is high the cell
// holds its output and drives it onto its column line 'col'; otherwise the
// column line is released (reads 0 mV).
module sensor_cell (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          phi1,
  input  logic          phi2,
  input  logic          cell_rst,  // reset from the column signal generator
  input  logic          eval,      // evaluation window from the column signal generator
  input  fps_pkg::cap_t cap,       // finger-to-plate capacitance, aF
  output fps_pkg::volt_t vout,     // integrator output, mV
  output fps_pkg::volt_t col       // contribution to the column line, mV
);
  localparam int UV_PER_AF = 97;
  localparam int OFFS_UV   = 8333;
  localparam int LEAK_DIV  = 25;
  localparam int VMAX_UV   = fps_pkg::VDD_MV * 1000;

  int acc_uv;   // integrator output in microvolts
  int step_uv;

  always_comb begin
    step_uv = int'(cap) * UV_PER_AF - OFFS_UV;
    if (step_uv < 0) step_uv = 0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      acc_uv <= 0;
    else if (phi1 && cell_rst)
      acc_uv <= 0;
    else if (phi2 && !eval)
      acc_uv <= (acc_uv - acc_uv / LEAK_DIV + step_uv > VMAX_UV) ? VMAX_UV
              : acc_uv - acc_uv / LEAK_DIV + step_uv;
  end

  assign vout = fps_pkg::volt_t'(acc_uv / 1000);
  assign col  = eval ? vout : '0;
endmodule
