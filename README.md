# A 4-state Viterbi decoder built from reversible gates

This is a hard-decision Viterbi decoder for the rate-1/2, constraint-length-3
convolutional code with generators (7,5) octal. Each clock it takes one
received 2-bit symbol and gives one decoded bit. Every arithmetic and
selection element is built from three reversible logic gates:

- the Feynman gate (controlled NOT);
- the Peres gate;
- the HNG gate, which works as a full adder when its fourth input is 0.

No plain adders or multiplexers are written in behavioural form. The flip-flops are ordinary
registers with an asynchronous, active-low clear.

The datapath follows a classic split. A branch metric unit scores the
received symbol against each codeword. An add-compare-select loop keeps one
path metric per encoder state and picks a survivor path into every state. A
survivor memory stores the survivor decisions and traces back through them to
recover the bits.

## The code and the trellis

The encoder is a two-bit shift register `{s1, s0}` whose newest bit is `s1`.
For an input bit `u` it emits the symbol `{g0, g1} = {u^s1^s0, u^s0}` and moves to
state `{u, s1}`. This gives the hardware three simple rules:

- next state `ns` has exactly two predecessors, `{ns[0], 0}` and `{ns[0], 1}`;
- the survivor decision for `ns` is one bit, the low bit of the chosen
  predecessor;
- `ns[1]` is the input bit that led into `ns`.

`viterbi_pkg::branch_code` holds the encoder output function. It is the only
place that knows the polynomials, and `compute_metric` uses it to wire each
path metric to its branch metric.

## Datapath, unit by unit

```
 rx[1:0] ─► bmu ─► bm[4] ─► compute_metric ─► compare_select ─► reduce ─┐
                               ▲   (8 sums)    (4 metrics,     (subtract │
                               │                4 decisions)    minimum) │
                               └──────────── metric (4 x 3-bit regs) ◄───┘
                        compare_select.dec, reduce.min_state ─► path_memory ─► decode_out, bit_out
                        acs_enable ─► compare_select.en
```

| Unit | Module | What it does |
|---|---|---|
| Branch metrics | `bmu` | Gives `bm[c]`, the Hamming distance (0..2) from `rx` to codeword `c`. It uses two Feynman XORs and a Peres half adder per codeword. |
| Add | `compute_metric`, `compute_block` | Eight adders, each 3-bit metric + 2-bit branch metric → 4 bits. Each adder is a ripple chain of three HNG full adders. |
| Compare / select | `compare_select` | For each state, a 4-bit less-than comparison (an HNG subtractor whose final carry gives the result). A Feynman+Peres multiplexer then picks the smaller sum. |
| Path metric memory | `metric`, `metric_reg` | Four 3-bit registers. These are the only storage inside the loop. |
| Normalisation | `reduce`, `subtract_unit` | Finds the minimum of the four new metrics and its state with a comparator tree, then subtracts it from all four. |
| Start-up | `acs_enable` | A chain of three flip-flops that shifts in a constant 1. It holds the loop idle for three clocks after reset. |
| Survivor memory | `path_memory`, `buffer_unit`, `mux4` | A 12-deep shift register of 4-bit decision vectors, plus a chain of 12 trace-back steps. |
| Gates | `feynman_gate`, `peres_gate`, `hn_gate` | The three reversible primitives. |
| Helpers | `rev_mux2`, `rev_less_than` | A 2:1 multiplexer (Feynman + Peres) and a comparator (Feynman inverters + HNG adders), used by several units. |

Top levels:

- `viterbi` is the core. Its inputs are four 2-bit branch metrics, a clock and
  a reset.
- `viterbi_top` puts the `bmu` in front of the core. It is the complete
  decoder.

## Why three bits are enough for the path metrics

This is the least obvious part of the design. Without normalisation the
path metrics would grow without bound. `reduce` subtracts the smallest of the
four new metrics every clock, so the stored values are differences from the
best path.

With Hamming branch metrics of at most 2, the spread between the best and
worst state of this 4-state code is bounded. An exhaustive search over every
reachable set of normalised metrics and every received symbol shows two
bounds:

- the normalised metrics never exceed 3;
- the selected sum, before the minimum is subtracted, also never exceeds 3.

That is why `compare_select` can drop the top bit of its 4-bit sums and pass
3-bit metrics to `reduce`. An assertion in `compare_select` stops a
simulation if that bit is ever set. Suppose you change the branch metric (soft
decision, or a different code). You must then widen `PM_W` and the reduce
path, or the assertion will fire.

Ties use these rules:

- `compare_select` keeps predecessor `{ns[0], 0}` when the two sums are
  equal;
- `reduce` gives the lowest-numbered state when several states share the
  minimum.

## Trace-back and timing

Each clock the survivor memory does three things:

1. The four survivor decisions enter stage 0 of the buffer chain. Older
   vectors move one stage on.
2. The minimum-metric state from `reduce` is registered beside them as the
   starting point.
3. A purely combinational chain of `mux4` steps walks back from that state.
   Each step turns a state `s` into its predecessor `{s[0], decision[s]}`.

After `TB_DEPTH` steps it reaches the state `{u[t-L], u[t-L-1]}`, where `t` is
the last symbol clocked in and `L = TB_DEPTH`. That state is `decode_out`, and
its high bit is `bit_out`.

Timing, as seen from the ports:

- `rx` is sampled on the rising edge.
- After the edge that samples symbol `t`, `bit_out` holds the bit that was
  encoded into symbol `t - 12`. That assumes the survivor paths have merged,
  which 12 steps (four times the constraint length) almost always gives for
  sparse errors.
- Throughput is one bit per clock.
- After reset is released, `acs_en` rises on the third rising edge. Symbols
  sampled while it is low are ignored: compare-select outputs zero metrics and
  zero decisions.
- All metrics start at 0. The decoder therefore does not assume the encoder
  starts in state 0.

The trace-back is a combinational path through all 12 multiplexer steps.
That path is long, but the design never has to stall.

## Parameters

| Parameter | Where | Default | Meaning |
|---|---|---|---|
| `TB_DEPTH` | `viterbi_top`, `viterbi`, `path_memory` | 12 | Trace-back depth in trellis steps. |
| `ENABLE_DELAY` | `viterbi_top`, `viterbi`, `acs_enable` | 3 | Clocks the ACS loop stays idle after reset. It must be at least 2. |
| `PM_W`, `BM_W`, `SUM_W` | `viterbi_pkg` | 3, 2, 4 | Metric widths. See the bound above before you change them. |

The widths (3-bit metrics, 3+2→4-bit adders, 4-bit decision vectors, 2-bit
state) and the three-flip-flop enable chain come from the original unit
schematics. The 12-step depth was chosen to match the roughly dozen stages the
survivor-memory schematic draws; no number is given for it.

## What is this design's own choice

The structure comes from the source design:

- the unit split;
- the widths;
- the gate set;
- the full-adder use of the HNG gate;
- the subtractor built from inverted operand and constant carry-in;
- the 4:1 trace-back multiplexer;
- trace-back from the minimum metric.

The following were not specified there and were chosen here:

- **Code.** The (7,5) polynomials and the shift-register state convention.
- **Branch metric.** Hamming distance (hard decision). The core's 2-bit
  branch metric inputs fit it.
- **Reset.** Asynchronous and active low, because the register cells are
  clear-low flip-flops. All metrics and decisions reset to 0.
- **ACS enable.** The constant at the head of the enable chain is taken as 1.
  While the enable is low, compare-select outputs are forced to zero.
- **Trace-back output.** `mux4` returns the whole predecessor state
  `{state[0], decision}` as its 2-bit output, and `decode_out` is the traced
  state.
- **Gate mapping of selection logic.** The multiplexer is a Feynman gate plus
  a Peres gate. The comparator's borrow comes from an HNG chain.
- **Tie rules and trace-back depth.** As given above.

The source design reports power, cell count, area and delay per unit for a
standard-cell implementation. Those figures are not reproduced here.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module against values computed independently, and ends with a `TB_RESULT`
line.

- **Gates, adders, subtractor, `mux4`, `bmu`, `reduce`.** Checked exhaustively.
  `reduce` is tested with all 4096 input combinations.
- **`compute_metric`.** Checked against a model encoder stepped from every
  state.
- **`compare_select`.** Random candidate pairs, with the enable both on and off.
- **Registers.** Random data and asynchronous clear between edges.
- **`acs_enable`.** The exact number of edges to the rising enable, over
  several resets.
- **`path_memory`.** Against a software trace-back. Inputs change right after
  each edge, so a missing register would show.
- **`tb_viterbi`** (the core, `TB_DEPTH` = 8). It uses random branch metrics and
  compares `decode_out` each clock with a behavioural Viterbi model.
  `tb/viterbi_ref_pkg.sv` has unbounded integer metrics and the same tie rules.
- **`tb_viterbi_top`** (complete decoder, default parameters). It does the
  following:
  - drives the model encoder through a clean channel, one flipped code bit
    every 16 or 20 symbols, and dense random errors;
  - compares with the behavioural model every clock, including the size of
    each normalisation step;
  - on the correctable phases, checks that `bit_out` equals the bit sent 12
    symbols earlier;
  - counts start-up holds, survivor decisions of 1, normalisations, trace-backs
    from a non-zero state, corrected channel errors and a restart after reset.
    It fails if any count is zero.

Each testbench was also run against a deliberately broken copy of its module,
and it caught the fault every time.

Not verified:

- the decoder's bit-error rate over long noisy runs beyond the model
  comparison;
- any gate-level timing or power.

## Simulating

All files are SystemVerilog-2017. `rtl/viterbi_pkg.sv` must come first, and
testbenches that use the reference model also need `tb/viterbi_ref_pkg.sv`
before the testbench:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/viterbi_pkg.sv tb/viterbi_ref_pkg.sv tb/tb_viterbi_top.sv \
  --top-module tb_viterbi_top
./obj_dir/Vtb_viterbi_top
```

For any unit test, swap in `tb/tb_<module>.sv` and `--top-module
tb_<module>`. Each test prints `TB_RESULT checks=N failures=M` and stops;
`tb_viterbi_top` also prints a `COUNT` line with the mechanism counts. Every
test finishes in a few seconds.
