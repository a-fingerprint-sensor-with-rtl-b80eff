// Behavioural model (not synthesizable analog): 2nd-stage XMUX. It picks one of
// the G = N/M 1st-stage outputs, under the one-hot select from XDEC, and passes
// it to the sensor output. Ideal switches on mV codes; no switch on reads 0 mV.
// At most one select may be high.
module xmux_stage2 #(
  parameter int unsigned G = fps_pkg::N_COLS_DEF / fps_pkg::M_DEF
) (
  input  fps_pkg::volt_t in  [G],
  input  logic [G-1:0]   sel,     // one-hot from XDEC
  output fps_pkg::volt_t out
);
  always_comb begin
    out = '0;
    for (int i = 0; i < G; i++)
      if (sel[i]) out = out | in[i];
  end

  always_comb assert ($onehot0(sel));
endmodule
