# 4D-8PSK trellis codec with a serial Viterbi decoder

This design is a complete encoder/decoder pair for a bandwidth-efficient
trellis code. The code is a 16-state, rate 5/6 code over pairs of 8PSK
symbols, carrying 2.5 bits per 2D symbol. It was built for a high-rate
telemetry link in which extra bandwidth for coding is not available.

- Every 5-bit user word becomes one point of a four-dimensional signal set:
  two consecutive 8PSK phases.
- Two of the five bits pass through a 16-state convolutional encoder.
- The other three ride along uncoded. They select one of eight "parallel"
  branches inside the subset that the coded bits choose.

The decoder is a Viterbi decoder built to be cheap rather than fast:

- It has a single add-compare-select (ACS) unit, which visits the 16 trellis
  states one after another.
- One received 4D point therefore takes an iteration of 23 clock cycles.
- At a 10 MHz clock this gives about 434,800 4D points/s, which is
  2.17 Mbit/s of user data.
- Any lower rate, down to zero, is followed automatically: the decoder simply
  waits for the next symbol.

The top module is `hst_codec`. It holds the encoder and the decoder side by
side, plus a loop-back path from the encoder output into the decoder input.
Everything runs on one system clock `clk`. All data clocks (`tx_clk`,
`rx_sym_clk`) are treated as asynchronous inputs and are synchronised and
edge-detected inside.

## Encoder (`tx_encoder`)

Chain per 5-bit word `w5..w1`:

1. **Differential precoder** (`diff_encoder`). A mod-8 adder accumulates
   `(w5,w3,w1)` into `(x5,x3,x1)`: `x = w + x_prev mod 8`. `w4` and `w2` pass
   through unchanged. It can be switched off with `tx_diff_en`.
2. **Convolutional encoder** (`conv_encoder`). The two checked bits `x2, x1`
   drive a non-systematic feedback-free encoder with two delay elements on
   each input:

       z2 = x2 ^ x1 ^ D2(x1)
       z1 = D2(x2) ^ x1 ^ D1(x1) ^ D2(x1)
       z0 = D1(x2)

   Here `Dk(.)` is the input k words ago. `z5..z3 = x5..x3` are uncoded.
3. **Mapper** (`signal_mapper`). The two 8PSK phases, in units of 45°, are
   `y1 = (z5,z3,z1)` and `y2 = y1 + (z4,z2,z0) mod 8`. The subset label
   `(z2,z1,z0)` picks one of 8 subsets of the 64 4D points. The uncoded bits
   pick one of the 8 points in that subset.

Data enter either as 5-bit parallel words, one per `tx_clk` period, or
serially, `w1` first, one bit per `tx_clk` period (`tx_serial_mode`).
Inputs are sampled on the falling edge of `tx_clk`. The two phases leave on
`tx_sym` at twice the word rate, with the clock `tx_sym_clk`.

### Clock multiplication (`rate_mult`)

The original hardware uses analog phase-locked loops to multiply data clocks
(×2 for the symbol clock, ×5 for the serial bit clock). In this design they
are replaced by a digital rate multiplier, `rate_mult`:

- It measures the input clock period in system clock cycles.
- It emits N evenly spaced pulses per period, each with a duty cycle of about
  50%.
- It needs a steady input rate. After reset, the first period is assumed to
  be 2·N system cycles, so the very first output pulses are closely spaced.

## Trellis conventions used throughout the decoder

- The encoder state is `s = {x2[n-1], x2[n-2], x1[n-1], x1[n-2]}`.
- From state `s` with inputs `(x2,x1)`, the next state is
  `{x2, s[3], x1, s[1]}`.
- Each state has four predecessors. The one chosen by the 2-bit path
  decision `k` is `{ns[2], k[1], ns[0], k[0]}`.
  - The decision therefore equals the two oldest bits of the predecessor.
  - The decoded bits of a state are `{x2,x1} = {s[3], s[1]}`.
- The subset label of a branch follows from the equations above
  (`hst_pkg::branch_subset`).
- These functions live in the package `hst_pkg` and are shared by the
  encoder, the ACS unit, the traceback and the re-encoder.

## Decoder data path (`viterbi_decoder`)

```
rx_in ─► rx_formatter ─► rx_symbol_sync ─► BMC ─► SMC ─► MSMS ─► SSM ─► BPS ─► post_decoder ─► outputs
           (7-bit phase)   (pairs 2D→4D)            (ACS)  (min)  (traceback)       (diff. decode,
                                  ▲                          │                     parallel/serial)
                                  └──────── SSS ◄────────────┘ (min state metric)
```

### Input formatting (`rx_formatter`)

Each 2D symbol is reduced to a 7-bit phase, 128 sectors per turn, in one of
four modes selected by `operation`:

| mode | input | conversion |
|---|---|---|
| `OP_HARD` | 3-bit phase in `rx_in[2:0]` | ×16 |
| `OP_SOFT` | 7-bit phase in `rx_in[6:0]` | none |
| `OP_IQ` | 5-bit I, 5-bit Q in `rx_in[9:5]`, `rx_in[4:0]` | nearest of 128 angular sectors |
| `OP_LOOPBACK` | the encoder's own `tx_sym` | ×16 |

How I/Q samples are handled:

- The number format is chosen by `iq_type`:
  - two's complement;
  - sign-magnitude;
  - "reverse binary", read as inverted offset binary;
  - straight (offset) binary.
- Angular quantisation works without a divider:
  1. The point is folded into the first octant.
  2. Its sector is found by comparing `|Q|·256` against `|I|·T[k]`, with
     `T[k] = round(256·tan((k+½)·π/64))` for k = 0..15.
  3. The octant is then unfolded.

### Pairing 2D symbols into 4D points (`rx_symbol_sync`)

The receiver cannot tell which two consecutive 2D symbols form a 4D point.

- The received symbol clock is synchronised and the phase is captured on its
  falling edge.
- A toggle flop makes the half-rate clock that marks 4D boundaries.
- At each such boundary the stage passes one of two pairs to the decoder,
  and starts a decoder iteration:
  - the last two symbols (`delay_sel = 0`), or
  - the two before the latest one (`delay_sel = 1`).
- Flipping `delay_sel` shifts the framing by one 2D symbol.

### Branch metrics (`bmc`)

For each of the 8 subsets, the branch metric calculator finds the closest of
its 8 parallel branches. It outputs that branch point `(z5,z4,z3)` and a
4-bit metric.

- The metric is the squared phase error in 1/128-turn units, summed over
  both 2D symbols, shifted right by 5 and saturated at 15. Ties keep the
  lowest branch point.
- The original unit is a ROM addressed by the 14 phase bits. Here the same
  function is computed by combinational logic.
- The table contents (this metric) are this design's choice.

### The 23-cycle iteration (`decoder_ctrl`, `smc`, `msms`)

`decoder_ctrl` counts `cyc = 0..22` once per received 4D point:

| cycles | action |
|---|---|
| 0 | start; the BMC outputs for the new point are registered |
| 1–16 | read one old state metric per cycle, in four groups of four |
| 5–20 | ACS stage 1: four additions, two comparisons |
| 6–21 | ACS stage 2: final comparison, new metric and 2-bit decision |
| 7–22 | write the new metric; pass it to MSMS and its decision to SSM |

How the schedule works:

- The four new states `{x2, a, x1, b}` that share `(a, b)` also share the
  same four predecessors. Reading one group of four old metrics is therefore
  enough for four ACS results in a row.
- State metrics are 8 bits wide and never normalised. Comparisons take the
  sign of the two's complement difference. This is correct while all
  metrics stay within 127 of each other.
  - With 4-bit branch metrics, and every state reachable from every other in
    two steps, the spread is at most 30.
- Old and new metrics live in two 16-entry banks that swap roles every
  iteration.
- A start pulse that arrives while an iteration is still running is dropped
  and flagged on `overrun`. This happens when the symbol rate exceeds
  `clk`/23.
- `sm_reset` clears every metric to zero.
- `msms` tracks the smallest new metric and its state as they are written.
  - The state seeds the traceback.
  - The value feeds the synchroniser.

### Survivor memory and traceback (`ssm`)

This is the least obvious part of the design. Path decisions (2 bits per
state, 32 bits per iteration) are stored in four 64×4 memories:

- One 4-bit word holds the decisions of two states, so one iteration fills
  8 words.
- The decision set of iteration `t` goes to memory `(t/8) mod 4`, slot
  `t mod 8`. The words are written on the even cycles 8–22.
- Four tracebacks run at the same time, one per memory. Each does 7 steps
  per iteration, on the odd cycles 9–21.
  - Traceback `j` covers the decision sets 8j+1 … 8j+7 iterations old. Its
    reads therefore never collide with those of another traceback or with
    the write.
- At the start of each iteration the tracebacks shift by one place:
  - traceback 0 starts from the best state found in the previous iteration;
  - the state that traceback 3 reaches gives the decoded `(x2,x1)`.
- The total traceback depth is 28 iterations. The decoded bits of the point
  received in iteration `m` come out in iteration `m+33`.

### Branch point selection and output (`bps`, `post_decoder`)

The branch point selector (`bps`) recovers the uncoded bits:

- It re-encodes the decoded `(x2,x1)` with a copy of the convolutional
  encoder to get the subset label.
- It uses the label to choose, among the 8 branch points that the BMC stored
  for that point, the uncoded bits `(x5,x4,x3)`.
- The branch points wait in a 64-entry circular buffer.

Total latency is **34 4D symbol periods** from the received point to the
decoded word.

`post_decoder` then undoes the precoder: `(w5,w3,w1) = (x5,x3,x1) − previous
mod 8`, switchable with `diff_dec_en`. It offers the word two ways:

- in parallel with `rx_clk_parallel`;
- serially, `w1` first, with `rx_clk_serial` at five times the word rate,
  made by `rate_mult`.

### Signal set synchronisation (`sss`)

When the 2D symbols are paired wrongly, no path fits well and the minimum
state metric climbs quickly.

- The synchroniser measures the "rate" as the growth of the minimum metric
  over the last 8 iterations.
- It compares that rate with `synch_threshold` and works as a small state
  machine:

  | state | condition | next state |
  |---|---|---|
  | MONITOR | threshold exceeded | ARMED |
  | ARMED | exceeded again within `synch_span` (V) iterations | toggle `delay_sel`, then HOLD |
  | ARMED | V iterations pass without that | MONITOR |
  | HOLD | 128+V iterations have passed, letting the decoder settle | MONITOR |

- With `auto_synch` low, the delay follows `manual_synch` instead.
- `synch_state` shows the selected delay as two lamp outputs.
- `rx_error` pulses whenever the rate is above the threshold.

## Interface summary (`hst_codec`)

| port | dir | meaning |
|---|---|---|
| `tx_data_parallel[4:0]`, `tx_data_serial`, `tx_clk`, `tx_serial_mode`, `tx_diff_en` | in | encoder input and switches |
| `tx_sym[2:0]`, `tx_sym_clk` | out | 8PSK phase (units of 45°) and symbol clock |
| `rx_in[9:0]`, `rx_sym_clk` | in | received 2D symbol in the selected format, and its clock |
| `operation`, `iq_type` | in | input mode and I/Q number format |
| `auto_synch`, `manual_synch`, `synch_threshold[6:0]`, `synch_span[6:0]` | in | synchroniser control |
| `sm_reset`, `diff_dec_en` | in | clear state metrics; postdecoder on/off |
| `rx_data_parallel[4:0]`, `rx_clk_parallel`, `rx_data_serial`, `rx_clk_serial` | out | decoded data |
| `rx_error`, `synch_state[1:0]`, `overrun` | out | status |

Output data change on the rising edge of their clock. Input data are
expected to change on the rising edge of their clock; they are sampled on
the falling edge.

## Known departures and limits

- **Rotational invariance.** The code is meant to be transparent to 45°
  carrier phase rotations once differential coding is on. A rotation adds
  one to both phases, which flips `z1` and so `x1`, as intended for the
  checked bits. The mod-8 carry into `(z3,z5)`, however,
  depends on `z1`, which is not `x1` in this non-systematic encoder.
  - A simulation with every received phase rotated by 45° gave errors in 169
    of 266 decoded words.
  - With this reading of the precoder and mapper wiring, full transparency
    is not reached. The receiver must therefore lock to the true phase.
  - The wiring itself was kept as designed.
- **Branch metric table** contents are this design's own (squared phase
  error); the original table values are not known.
- **PLLs** are replaced by `rate_mult`, which assumes a steady clock rate.
  After reset or a rate change it takes one input period to adapt.
- **`rx_error`** is driven by the synchroniser's threshold flag. This meaning
  is a choice.
- **`synch_span`** is 7 bits wide, so V may go up to 127.
- **The synchroniser's rate window** of 8 iterations is a choice.
- **Overrun handling** (drop the point and flag it) is a choice.
- **Speed.** 2.17 Mbit/s at 10 MHz follows from the 23-cycle schedule. The
  7.5 Mbit/s of the intended link would need about 34.5 MHz; no timing
  analysis has been done.

## Simulation

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one
prints `TB_RESULT checks=… failures=…` and stops itself through a watchdog.

- `tb_hst_codec` runs the whole codec end to end at default parameters:
  1. parallel loop-back;
  2. serial loop-back;
  3. I/Q input with a one-symbol pairing slip that the synchroniser must find;
  4. hard-decision input with a state metric reset;
  5. an overrun.

  It counts each of these events and fails if any never happened.
- `tb_max_rate` streams 1000 words with a 4D point every 24 clock cycles,
  just below the limit of 23, and checks for error-free decoding with no
  overrun.
- `tb_slow_rate` does the same with a 4D point every 4000 cycles
  (12.5 kbit/s at 10 MHz). It checks that the decoder waits between
  iterations, keeps the 34-period latency and that the output clocks follow
  the slow rate.

Example with plain Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/hst_pkg.sv tb/tb_hst_codec.sv --top-module tb_hst_codec
./obj_dir/Vtb_hst_codec
```

Verilator has only two signal states. The testbenches therefore ignore
outputs until reset has been released.
