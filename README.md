# Dynamic strobe masking for DDR read DQS

On a DDR read, the strobe DQS is driven by the SDRAM only for the duration of
the burst. Before and after the burst the line is high-Z. The transitions
high-Z→0 at the start of the preamble and 0→high-Z at the end of the postamble
often produce reflections and glitches. A PHY that clocks read data with the
raw strobe would take those glitches for real edges. The strobe therefore has
to be *qualified*: gated by a mask that is high only while real strobe pulses
are arriving.

This design, a dynamic strobe masking system (DSMS), builds that mask from
the standard DFI signal `dfi_rddata_en` alone. It needs no calibration reads
and no controller-specific timing signals. The idea in one sentence:

> Count how many strobe pulses the controller expects, count how many arrive,
> and close the mask the moment the two counts match.

The controller holds `dfi_rddata_en` high for one `dfi_clk` cycle per
single-data-rate word, and every such word arrives with one DQS pulse. So the
length of `dfi_rddata_en` is the number of DQS falling edges to expect. The
only per-board setting is a static delay-line tap count, `cnf_dsms_taps`. It
places the mask's opening edge inside the strobe preamble and so absorbs the
SDRAM-to-PHY time of flight. The mask closes by itself right after the last
expected falling edge, well before the postamble glitch.

## Structure

```
 dfi_rddata_en ──►[D-FF @dfi_clk]──► en_reg
                                     │
          ┌──────────────────────────┼─────────────────────────┐
          ▼                          ▼                         ▼
  [Counter-A @dfi_clk, EN]   [PDL: taps x 80 ps]       [2 buffers]
          │ expected                 │ pdl_out                 │ sel
          ▼                          ▼                         ▼
  [expected != actual] ─ not_equal ─► I0   [MUX]  I1 ◄── pdl_out
          ▲                               S ◄── sel
          │ actual                        │
  [Counter-B @negedge masked_dqs, EN = mask]
          ▲                               ▼ mask
          │                   read_dqs ──►[AND]──► masked_dqs
          └───────────────────────────────────────┘

  internal_reset_n = reset_n & (en_reg | mask)   -> async clear of both counters
```

| Module | Role |
|---|---|
| `dsms` | Top level; wires the blocks below. |
| `dsms_cnt_a_dff` | `dfi_clk`-domain group: the input flop and Counter-A, on one clock tree. |
| `dsms_cnt_b_ineq` | Strobe-domain group: Counter-B and the inequality monitor. |
| `dsms_rddata_en_ff` | Registers `dfi_rddata_en` on `dfi_clk` (async reset by `reset_n`). |
| `dsms_counter_a` | 3-bit up-counter on `dfi_clk`, enabled by `dfi_rddata_en_reg`: the **expected** falling-edge count. |
| `dsms_counter_b` | 3-bit up-counter on the **falling** edge of `masked_dqs`: the **actual** count. |
| `dsms_ineq_mon` | `not_equal = expected != actual`. |
| `dsms_pdl` | 64-tap programmable delay line; behavioural model (a physical delay). |
| `dsms_sel_delay` | Two series buffers in front of the mux select; behavioural model. |
| `dsms_mask_mux` | `mask = sel ? pdl_out : not_equal`. |
| `dsms_reset_logic` | `internal_reset_n = reset_n & (dfi_rddata_en_reg \| mask)`. |
| `dsms_mask_gate` | `masked_dqs = read_dqs & mask`, written as NAND + NAND-as-inverter. |
| `dsms_pkg` | Shared widths and delay constants. |

The counters sit in two unrelated clock domains. Counter-A runs on `dfi_clk`
and shares it with the input flop. Counter-B is clocked by the strobe itself.
Neither domain is synchronised to the other. The circuit relies on *when* the
mux looks at the comparison, not on synchronisers.

## One READ, step by step

1. **Idle.** `dfi_rddata_en_reg` = 0 and `mask` = 0, so `internal_reset_n` = 0.
   Both counters are held at 0, and `not_equal` = 0 keeps the mask low.
2. **Enable registered.** At the first `dfi_clk` rising edge that samples
   `dfi_rddata_en` high, `dfi_rddata_en_reg` rises. The counter reset is
   released at once through the OR gate. Two buffer delays later, the mux
   switches to the delay-line output.
3. **Mask opens.** `taps × 80 ps` after `dfi_rddata_en_reg` rose, `pdl_out`
   rises and so does `mask`. A glitch at the start of the preamble that comes
   before this point is blocked.
4. **Counting.** Counter-A adds one on every `dfi_clk` edge while
   `dfi_rddata_en_reg` is high. Counter-B adds one on every falling edge of
   `masked_dqs`. The two counts race each other and are often equal for a
   moment, typically right after each strobe falling edge. That does no harm:
   while the select is high, the mask follows `pdl_out`, not the comparison.
5. **Select hand-over.** `dfi_rddata_en_reg` falls, and Counter-A takes its
   last increment on that same clock edge, which makes it hold n (mod 8).
   Just before that edge the counts are usually *equal* (n−1 = n−1). If the
   mux switched to the comparison at that instant, a momentary match could
   pull the mask low and reset the counters in the middle of the burst. The
   two buffers in the select path hold the select high until the comparison
   has settled. From then on the mask equals `not_equal`, which is high
   because at least one falling edge is still to come.
6. **Mask closes.** The last strobe falling edge brings Counter-B level with
   Counter-A, so `not_equal` falls and the mask falls. With `dfi_rddata_en_reg`
   already low, the falling mask also drives `internal_reset_n` low. Both
   counters clear, `not_equal` stays 0 and the mask stays closed. The circuit
   is back in step 1, ready for the next READ. The postamble glitch, half a
   clock later, finds the mask closed.

The mask must close within half a clock period (tCK/2) of the last falling
edge, because the SDRAM releases the line at the end of the half-period
postamble. That is 938 ps at 533 MHz and 2500 ps at 200 MHz. In this RTL the
mask falls in zero time. In silicon the delay is that of the Counter-B flop,
the comparator, the mux and the reset path.

## Configuring `cnf_dsms_taps`

The delay from `dfi_rddata_en_reg` rising to the mask opening is
`max(taps, 1) × TAP_DELAY_PS`. The select buffers add a floor of
`2 × BUF_DELAY_PS` = 80 ps. Choose `taps` so that the mask opens inside the
preamble: after the preamble glitch and before the first strobe rising edge.
The example setting of 8 taps gives 640 ps at 533 MHz (tCK 1876 ps), about a
third of the way into a one-clock preamble. The 64 taps span 5.04 ns, a full
period at 200 MHz.

## Operating conditions

- `tRDDATA_EN` must equal the SDRAM read latency. More generally, the first
  strobe falling edge must arrive while `dfi_rddata_en_reg` is high;
  otherwise delay `dfi_rddata_en` further before the DSMS.
- The mask must open while `dfi_rddata_en_reg` is still high, that is
  `taps × 80 ps` < burst length × tCK. In practice, keep it below one tCK.
- **Counter range.** The counters are 3 bits wide and wrap modulo 8. Both wrap
  the same way, so bursts longer than 7 pulses work (10-pulse bursts are
  tested). The condition is that fewer than 8 falling edges are still
  outstanding when `dfi_rddata_en_reg` falls. With the latency rule above, at
  most two are.
- **Back-to-back READs.** These work as long as the mask of one READ has closed
  before `dfi_rddata_en_reg` rises for the next. A gap of two `dfi_clk`
  cycles with `dfi_rddata_en` low is tested.
- `cnf_dsms_taps` is a static setting; do not change it during a READ.
- `dfi_clk` runs at the memory clock frequency (a 1:1 DFI frequency ratio), so
  one `dfi_clk` cycle of `dfi_rddata_en` corresponds to one strobe pulse.

## Timing model and what is not modelled

Only two elements carry delay in the RTL: the delay line (80 ps per tap) and
the select buffers (40 ps each). Both are behavioural models with transport
delays, because their delay is physical. Both values are estimates, since
only the 64-tap count is specified. Everything else is zero-delay.
Consequently:

- The mask shut-off delay simulates as 0 ps. Published layout-level
  results for this circuit are roughly 350 ps (best corner), 500 ps (typical) and 820 ps (worst) in a
  90 nm process. Those depend on cells and parasitics, not on the RTL.
- The hand-over hazard of step 5 needs real gate delays. In zero-delay
  simulation it does not appear even without the select buffers. The
  testbench counts how often the condition behind it arises (counts equal
  on the clock edge where the select falls). But it cannot show the glitch.
- The masking AND is built from balanced NAND cells in silicon to limit
  duty-cycle distortion. That is a sizing matter and invisible here.
- The layout's decoupling-capacitor fill has no logic function and is not
  represented.

For a netlist, replace `dsms_pdl` and `dsms_sel_delay` with the real delay
cells. The other modules are synthesizable as written.

## Choices made in this implementation

- **Counter-B enable.** Counter-B's enable is driven by the mask. The original
  schematic shows an enable pin whose source cannot be resolved. Because
  `masked_dqs` only has edges while the mask is high, this choice does not
  change behaviour. A side effect: Counter-B would also ignore glitches if it
  were clocked by the raw strobe.
- **Reset-logic inputs.** The OR takes `dfi_rddata_en_reg` and `mask`, and the
  AND combines the result with `reset_n`. This reading is what makes
  `internal_reset_n` rise with the registered enable and fall with the mask.
- **Resets and tap 0.** Both counters and the input flop have active-low
  asynchronous resets. The input flop has no set input. Tap 0 means zero
  delay.
- **Observation ports.** `mask`, `expected` and `actual` are extra outputs of
  the top, for observation.
- **Not included.** A controller whose `tRDDATA_EN` is shorter than the read
  latency would need an extra delay of `dfi_rddata_en` in front of the DSMS.
  That stage is only mentioned as an option in the original design and is
  not built here.

Expect these tool warnings:

- **Logic loop.** Synthesis reports the loop mask → reset → counters →
  comparator → mask. It is the self-clearing mechanism of step 6.
- **Delay line.** Lint notes that the delay line's delay may be zero, which is
  the case at tap 0.

## Simulating

Every file carries `` `timescale 1ps/1ps ``. With Verilator 5, for the
end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dsms_pkg.sv tb/tb_dsms.sv \
          --top-module tb_dsms -o sim
./obj_dir/sim
```

Each unit test works the same way (`tb/tb_dsms_<unit>.sv`, top module
`tb_dsms_<unit>`). Each testbench prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog if it
hangs.

`tb_dsms` runs the top at its default parameters. It acts as controller and
SDRAM. For each READ it drives `dfi_rddata_en` for n cycles and generates a
strobe: a preamble glitch, a one-clock preamble, n half-period pulses, a
half-period postamble and a postamble glitch. It runs:

- the 4-pulse example at 533 MHz with 8 taps;
- 10-pulse bursts at 533 MHz and at 200 MHz, also with a preamble shorter
  than one clock;
- bursts of 1 to 12 pulses;
- READs two cycles apart;
- 40 random READs, with random length (1–16), time of flight and tap setting.

For every READ, it checks against its own timing arithmetic:

- exactly n full-width pulses reach `masked_dqs`, and neither glitch gets through;
- the mask rises at the predicted instant and inside the preamble;
- the mask falls no earlier than the last falling edge and within tCK/2 of it;
- Counter-A holds n mod 8 when the enable falls;
- both counters are back at 0 afterwards.

It also counts each mechanism (blocked preamble and postamble glitches,
transient count matches, the hand-over condition, counter wrap, back-to-back
READs, both frequencies, single-pulse READs, short preambles). Any mechanism
that never occurred counts as a failure.
