# Pipelined scan driver for an integrating capacitive fingerprint sensor

A capacitive fingerprint cell built around a switched-capacitor integrator
gets a usable ridge/valley signal only after many integration clocks: each
clock adds one small charge packet. The signal grows with the number of clocks
n. Uncorrelated noise does not, so the signal-to-noise ratio improves by about
20·log10(n) dB. If the columns were scanned one at a time, a frame would take
*columns × integration interval* clocks.

This design overlaps the integrations instead. Eight **column signal
generators** (V_CK1 … V_CK8) are started one after another, 16 clocks apart, by
an 8-position **ring counter**. Each generator resets its columns, lets them
integrate for the programmed interval, and then opens their **evaluation
window**. Up to eight columns are therefore integrating at the same time, and
one column is read every 16 clocks, whatever the interval. A longer interval
(more gain, better SNR) only delays the *first* reading:

    capture time = 16 · (N_COLS − 1) + I   integration clocks to the last reading
                 = 1408 / 1424 / 1504 clocks for I = 16 / 32 / 112 on 88 columns

A sequential scan would take 88 · I clocks, i.e. 9856 clocks at I = 112.

The default configuration is the 88 × 2-cell prototype: 88 columns, 2 rows, an
8-deep pipeline and a 16-clock stagger.

## Block structure

```
fingerprint_sensor                      top: array + driver + one XMUX per row
├── pipelined_scan_driver               synthesizable sequencing logic
│   ├── nonoverlap_clkgen               phi1/phi2 and the integration-clock enable
│   ├── ring_counter                    one-hot token, 16 clocks per position
│   ├── column_signal_gen ×8            V_CKk: reset, integrate, evaluation window
│   ├── eval_gen                        independent evaluation strobe + column index
│   └── xdec                            2nd-stage XMUX group select
├── sensor_array   (behavioural)        ROWS × N_COLS sensor_cell models
│   └── sensor_cell (behavioural)       leaky-integrator model of the AOVF cell
└── xmux ×ROWS     (behavioural)        two-stage column multiplexer
    ├── xmux_stage1 ×11                 8:1 transmission-gate mux per column group
    └── xmux_stage2                     11:1 group mux
```

`fps_pkg` holds the default sizes and the two analog "types":

- `volt_t` is a voltage in mV, 12 bits.
- `cap_t` is a capacitance in aF, 11 bits.

The analog parts (cells, multiplexers) are behavioural models that work on
these codes. This lets the driver be simulated together with a finger pattern.
Only `pipelined_scan_driver` and its sub-blocks are meant for synthesis.

## How the columns share the pipeline

Column *c* is controlled by generator *c mod 8*: V_CK1 drives columns 0, 8,
16, …, V_CK2 drives 1, 9, 17, …, and so on. The 88 columns form 11 **groups**
of 8 adjacent columns. Each group has a 1st-stage 8:1 XMUX whose gates are
switched by the generators' evaluation windows. A 2nd-stage 11:1 XMUX, switched
by XDEC, passes one group to the row output.

Each turn of the ring counter (8 × 16 = 128 clocks) serves one group, and 11
turns cover the array. Every turn resets all columns of a generator, in every
group. Only the column of the group that XDEC currently selects reaches the
output; the others integrate unread.

XDEC moves to the next group at the moment generator 1 opens its evaluation
window, except for the first window of a capture. This keeps the group select
aligned with *evaluation* rather than with reset. The two are a whole number of
slots apart, and that number depends on the interval.

## Timing of one column

All times are in integration clocks (one integration clock = 4 `clk` cycles).
*T0* is the clock in which the column's generator issues its reset, and
*I* = `int_clks`.

| clocks                | generator output   | cell                                   |
|-----------------------|--------------------|----------------------------------------|
| T0                    | `cell_rst` = 1     | cleared on phi1, first integration on phi2 |
| T0+1 … T0+I−1         | —                  | integrates once per clock (I steps in all) |
| T0+I … T0+I+15        | `col_sel[k]` = 1   | holds its output and drives the column line |
| T0+I                  | `eval` strobe (from `eval_gen`), `eval_idx` = column | output valid at the sensor output |

Column *c* is reset at clock 16·c and read at clock 16·c + I. Its generator
resets it again at 16·c + 128. The evaluation window must close before then,
which gives I ≤ (8 − 1) · 16 = **112**. That is the longest interval the
prototype was run with. The driver clamps `int_clks` to 1 … 112. The
assertions in `pipelined_scan_driver` check two rules: at most one evaluation
window is open, and every strobe falls inside one.

The evaluation strobe comes from its own counter (`eval_gen`), not from the
generators. It starts I clocks after the first reset and then fires every 16
clocks, 88 times.

### Clocking

`clk` is a fast clock at 4× the integration rate. `nonoverlap_clkgen` divides
it into four phases:

| phase | signal |
|-------|--------|
| 0 | phi1 |
| 1 | gap |
| 2 | phi2 and `tick` |
| 3 | gap |

The driver's registers use `tick` as a clock enable, so they update on entering
phase 3, while both phases are low. Reset and select are then stable through
the next phi1 and phi2. One integration clock of the driver spans phases 3, 0,
1 and 2.

## Using the top level

```
fingerprint_sensor #(N_COLS=88, ROWS=2, M=8, SLOT=16, INT_W=8)
  in : clk, rst_n (async, active low), start, int_clks[7:0], cap[ROWS][N_COLS] (aF)
  out: vout[ROWS] (mV), eval, eval_idx, busy, done,
       phi1, phi2, tick, cell_rst[M], col_sel[M], grp_sel[N_COLS/M]
```

To run a capture:

1. Pulse `start` while `busy` is low, with the interval on `int_clks`. The
   interval is sampled at that moment.
2. Read `vout[r]` whenever `eval` is high in a `tick` cycle. It is the value of
   row *r*, column `eval_idx`.
3. `done` pulses with the 88th strobe. `busy` then drops, and a new capture can
   start. For intervals under 16 clocks, `busy` stays up a few clocks longer,
   until the ring counter finishes its last slot. A `start` pulse while `busy`
   is high is ignored.

Both rows are read in parallel: they share the column control signals, and
each row has its own column lines and XMUX.

`pipelined_scan_driver` can be used on its own, with the same ports minus the
analog ones.

## The sensor-cell model

`sensor_cell` is a behavioural stand-in for the AOVF integrator, not a circuit.
The capacitance C is in aF. Per integration clock it does:

    V ← V − V/25 + (97 µV/aF · C − 8.33 mV)      (step never negative, V ≤ 1.8 V)

The coefficients were fitted to the prototype's circuit-simulation results:

| interval | cell | model | reported |
|----------|------|-------|----------|
| 16 clocks | 0.6 fF ridge | 0.60 V | about 0.6 V |
| 16 clocks | 0.75 fF | 0.77 V | 0.8 V |
| 16 clocks | 0.45 fF | 0.42 V | 0.4 V |
| 16 clocks | 0.3 fF valley | 0.25 V | 0.25 V |
| 112 clocks | 0.6 fF ridge | 1.23 V | above 1.1 V |
| 112 clocks | 0.3 fF valley | 0.51 V | more than 0.7 V below the ridge |

The leak term is what makes the 112-clock numbers fit. A purely linear
integrator would push every cell to the rail. The model has no noise, and its
leak and offset are a fit, not extracted device behaviour. Use it to exercise
the driver, not to predict analog performance.

The multiplexers are ideal switches on mV codes. A node with no gate on reads
0 mV.

## What follows the source architecture and what is this design's own

These parts follow the published architecture:

- the 8-deep ring-counter pipeline with a 16-clock stagger
- column generators with a programmable interval, shared by every 8th column
- the evaluation strobe, generated independently at a fixed 16-clock rate
- the two-stage XMUX (8:1 transmission-gate stage switched by the generators,
  11:1 stage switched by XDEC)
- the 88 × 2 array
- the 16, 32 and 112-clock intervals

These are choices of this design:

- the 4×-clock two-phase generator and the `tick` enable
- a one-clock reset pulse
- a 16-clock evaluation window
- counting the reset clock as the first integration clock
- the clamp at 112
- XDEC advancing on generator 1's evaluation start
- one-shot captures with a `start`/`busy`/`done` handshake (the published
  scheme simply repeats)
- rows read in parallel
- mV/aF integer codes
- the fitted cell model

The source text is contradictory in two places:

- **Evaluation period.** One statement says the evaluation period depends on
  the interval. Elsewhere the reading rate is a fixed 16 clocks and only the
  first reading moves. This design uses the fixed rate.
- **Array name.** The array is called "n × m" in one place, but the 2nd-stage
  mux has n/m inputs. This design reads n as columns and m as the pipeline
  depth.

The external bezel that drives the finger has no model of its own. Its effect
is part of the cell's per-clock charge step.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Build one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/fps_pkg.sv tb/tb_fingerprint_sensor.sv \
          --top-module tb_fingerprint_sensor -o sim && obj_dir/sim
```

`tb_fingerprint_sensor` is the end-to-end test at the full default size (88 × 2,
no parameter overrides). Row 0 holds the prototype's finger pattern: ridges on
the first four cells, valleys elsewhere. Row 1 holds a random pattern. The test
runs captures at I = 16, 32 and 112, and a request of 200 that must be clamped.
It checks three things:

- every output value against the cell model
- every strobe time (16·c + I integration clocks, and the same in `clk` cycles)
- that the ridge/valley difference grows with the interval

It also counts each pipeline mechanism, and fails if one never occurs:

- resets from all eight generators
- the V_CK8 → V_CK1 wrap
- XDEC group changes
- overlapping integrations
- the interval clamp
- capture completion

A full run takes well under a second.

`tb_pipelined_scan_driver` compares every integration clock of the driver with
the schedule above. It covers intervals of 16, 32 and 112, a request of 200
(clamped to 112) and a request of 0 (raised to 1). It also sends a `start` in
the middle of a capture, which must be ignored.

The smaller testbenches cover each block on its own.
