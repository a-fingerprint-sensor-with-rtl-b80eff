// Behavioural model (not synthesizable analog): 1st-stage XMUX, an M-input
// analog multiplexer built from transmission gates. Each input passes to the
// shared output node while its select, the evaluation window of the matching
// column signal generator, is high. Voltages are mV codes; gates are ideal
// (no resistance or charge sharing). With no gate on, the output reads 0 mV.
// At most one select may be high.
module xmux_stage1 #(
  parameter int unsigned M = fps_pkg::M_DEF
) (
  input  fps_pkg::volt_t in  [M],
  input  logic [M-1:0]   sel,     // one-hot transmission-gate enables
  output fps_pkg::volt_t out
);
  always_comb begin
    out = '0;
    for (int i = 0; i < M; i++)
      if (sel[i]) out = out | in[i];
  end

  always_comb assert ($onehot0(sel));
endmodule
