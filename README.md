# Terror: a pipelined on-chip link that corrects its own timing errors

Long global wires on a chip are pipelined with flip-flop buffers every few
millimetres. Crosstalk and other noise make the wire delay vary: a bit whose
two neighbours switch the other way (101 -> 010) can be 50% slower than
nominal. A conservative link spaces its buffers for that worst case, which
costs buffers and latency on every word.

This link is designed for the nominal delay instead, and repairs the rare
late transition in place. Every buffer bit samples its wire twice: a main
flip-flop at the clock edge `ck`, and a delayed flip-flop at `ckd`, half a
cycle later. If the two samples differ, the word the buffer just sent was
wrong. The buffer then switches to a **delayed state** and resends the word
from its delayed flip-flops one cycle later. A **correction flag** travels
with the wrong word so that it is thrown away further down the link. The
design is called *Terror* (timing-error tolerant). Its cost is at most one
cycle per buffer for a whole stream, however high the error rate. A
retransmission scheme instead pays again for every error.

The default configuration is a 32-bit bus on a 12 mm link at 1 GHz. The
link has 4 Terror buffers (3 mm apart) where a conservative design needs 6
(2 mm apart).

```
 tx_data ──wire 0──▶ [buffer 0] ──wire 1──▶ [buffer 1] ── ... ──▶ [buffer B-1] ──▶ [look-ahead receiver] ──▶ rec_data, rec_valid
 tx_corr ──────────▶  corr ───────────────▶   corr ──── ... ──▶    corr ────────▶
                      ▲ ck,ckd,ckdd           ▲ ck,ckd,ckdd          ▲
                  [delay chain]           [delay chain]          [delay chain]
```

## One buffer bit (`terror_element`)

```
          ┌──────────────────────────────┐
 d ───────┤0                             │
          │ mux ──▶ main FF (ck) ──┬─────┼──▶ q
       ┌──┤1   sel                 │     │
       │  └────────────────────────┼─────┘
       └── delayed FF (ckd) ◀── d  │
                 │                 │
                 └──── XOR ◀───────┘──▶ errq
```

* **Normal state** (`sel = 0`). The main flip-flop takes the wire at `ck`
  and sends it. The delayed flip-flop takes the same word again at `ckd`.
  If a transition arrived between `ck` and `ckd`, the two differ and `errq`
  rises.
* **Delayed state** (`sel = 1`). The delayed flip-flop takes the word at
  `ckd`, and the main flip-flop sends it at the next `ck`. The buffer now
  adds one cycle, but it tolerates transitions up to `ckd` late. `errq` has
  no meaning in this state and is ignored.

## One buffer (`terror_stage`, `terror_control`)

All W bits of a buffer share one error control circuit, so the whole buffer
changes state at once:

* `err` = OR of the W `errq` lines.
* The state latch (`sel`) is set by `err & ~prev_corr` and cleared by
  `prev_corr`. Clear wins.
* The correction flip-flop captures `~sel & (err | prev_corr)` and drives
  `corr_out`.

`prev_corr` is the `corr_out` of the buffer upstream. For the first buffer
it is `tx_corr`, driven by the sender. Both the state latch and the
correction flip-flop are updated at `ckdd`. `corr_out` is high during the
cycle in which the buffer outputs a wrong word, and it means "the word I am
sending now is wrong".

There are four cases:

| buffer state | own `err` | `prev_corr` | what happens |
|---|---|---|---|
| normal | 1 | 0 | enters delayed state, raises `corr_out`, resends the word next cycle |
| normal | any | 1 | stays normal and passes the flag on with the wrong word (`corr_out` = 1) |
| delayed | any | 1 | returns to normal; drops the wrong word in its delayed flip-flops; `corr_out` = 0 |
| delayed | any | 0 | stays delayed; no flag |

The third row is the key to the latency bound. When a delayed buffer
receives a flag, it drops the flagged word by taking its input directly at
the next `ck`. That skips the cycle of delay it had been adding, so the
bubble the upstream buffer created is absorbed.

### Walk-through

Buffer `i` misses a late transition of word `w5`. Buffer `i+1` is already
in delayed state from an earlier error.

| cycle | buffer i output | corr_out i | buffer i state | buffer i+1 output | corr_out i+1 | buffer i+1 state |
|---|---|---|---|---|---|---|
| 5 | **X** (wrong copy of w5) | 1 | normal -> delayed | w3 | 0 | delayed |
| 6 | w5 (resent) | 0 | delayed | w4 | 0 | delayed -> normal (drops X) |
| 7 | w6 | 0 | delayed | w5 | 0 | normal |

Buffer `i` now lags by one cycle and buffer `i+1` no longer does, so the
total delay of the link is unchanged. Suppose instead that buffer `i+1` had
been in normal state. It would have sent X on in cycle 6 with `corr_out`
high, and the flag would travel on until a delayed buffer or the receiver
drops the word.

Each buffer adds at most one cycle, and only a flag brings it back to
normal. So a stream of any length and error rate arrives at most **B cycles
late**.

## Receiver (`lookahead_receiver`)

A wrong word leaves the last buffer half a cycle before its flag. The
receiver therefore registers each word together with its flag and delivers
it one cycle later:

* `rec_valid = 0` marks a word to discard.
* The corrected copy follows in a later cycle, so the valid words are
  complete and in order.

This costs one cycle per stream. With no errors, a word takes **B + 1
cycles** from `tx_data` to `rec_data`.

## Clocking and the timing budget

The two clocks `ckd` and `ckdd` are made locally from `ck` by a delay chain
(`terror_clkgen`, a behavioural model). The defaults are in `terror_pkg`:

| quantity | value | why |
|---|---|---|
| clock period | 1000 ps | 1 GHz |
| `ckd` delay | 500 ps | half a cycle: the usable window once hold time and the two state-change paths are subtracted |
| `ckdd` delay | 750 ps | after `ckd` plus the XOR/OR path, before the next `ck` (own choice) |
| nominal wire delay | 700 ps | must lie between `ckd` and the next `ck` (own choice) |
| crosstalk wire delay | 1050 ps | nominal + 50% |
| noise wire delay | 1300 ps | after the next `ck`, before the next `ckd` (own choice) |

`link_wire` is a behavioural model of a wire segment. It delays each
transition by one of the three wire delays above:

* the crosstalk delay when both neighbours of the bit switch the opposite
  way in the same word;
* the noise delay when the bit's `noise` input is high as the bit switches.

A transition must arrive before the next `ckd`. One that arrives later is a
static error: Terror does not correct it, and this model does not produce
it.

The `ckd` delay is the hold constraint of the link. The next word must not
reach a buffer before that buffer's `ckd`, or the delayed flip-flop takes
the wrong word. The nominal wire delay therefore has to stay above the `ckd`
delay. If you change `CKD_DELAY_PS`, move the wire delays with it.

## Files

| file | contents | kind |
|---|---|---|
| `rtl/terror_pkg.sv` | widths, timing constants, state enum | package |
| `rtl/terror_element.sv` | one bit: mux, main and delayed flip-flops, XOR | synthesizable |
| `rtl/terror_control.sv` | OR, state latch, correction flip-flop | synthesizable |
| `rtl/terror_stage.sv` | one buffer: W elements + one control | synthesizable |
| `rtl/lookahead_receiver.sv` | end receiver | synthesizable |
| `rtl/terror_clkgen.sv` | delay chain producing `ckd`, `ckdd` | behavioural |
| `rtl/link_wire.sv` | wire segment with crosstalk and noise delays | behavioural |
| `rtl/terror_link.sv` | top: B × (wire, clock chain, buffer) + receiver | top |

Top-level parameters are `W` (bus width, default 32) and `B` (buffers,
default 4). The ports of `terror_link`:

* `ck`, `rst_n` (asynchronous, active low);
* `tx_data[W]`, a word launched at each rising edge of `ck`;
* `tx_corr`, which the sender raises from about `ckdd` of the cycle in
  which it launched a word it wants dropped, for one cycle;
* `noise[B][W]`, which makes the next transition of a bit on a segment
  late;
* `rec_data[W]` and `rec_valid`;
* `stage_state`, `stage_err` and `stage_corr` per buffer, for observation.

The link has no idle signal: it carries a word every cycle, and an idle
sender just holds its last word.

## Simulating

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`.
They need Verilator 5 with timing support:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_terror_link rtl/terror_pkg.sv tb/tb_terror_link.sv
./obj_dir/Vtb_terror_link
```

| testbench | what it shows |
|---|---|
| `tb_terror_element` | random early and late inputs against a reference model of one bit |
| `tb_terror_control` | the state and flag rules against a reference model; every transition kind occurs |
| `tb_terror_stage` | one buffer with late words and flags; the unflagged output stream equals the input stream |
| `tb_terror_clkgen` | every `ckd`/`ckdd` edge at +500/+750 ps |
| `tb_link_wire` | 700, 1050 (crosstalk both ways) and 1300 ps (noise) arrival times |
| `tb_lookahead_receiver` | one-cycle register and flag-to-valid mapping |
| `tb_terror_link` | the whole link at its default size, 2300 words |
| `tb_terror_workloads` | receiver latency over stream size and error rate |

`terror_control` also carries three assertions, checked in every simulation
run with `--assert`:

* a received flag always returns the buffer to normal state;
* a delayed buffer never raises a flag;
* an error in normal state is always flagged.

`tb_terror_link` runs three phases:

* Gray-coded words with 3% noise;
* random words, whose 101 -> 010 patterns cause crosstalk errors, plus 1%
  noise;
* words with sender-side corrections.

It checks that every word arrives once and in order, that the error-free
latency is exactly B + 1 cycles, and that no word is more than B cycles
later than that. It also counts every mechanism (late transition by noise
and by crosstalk, entering delayed state, forwarding, absorption, drop at
the receiver, sender correction) and fails if one never occurred.

`tb_terror_workloads` measures the latency of Gray-coded streams. In it, an
error rate of p means that each buffer sees a late word in each cycle with
probability p. Measured at the defaults:

| stream | error rate | receiver latency (cycles) |
|---|---|---|
| 1000 words | 0% | 1004 |
| 1000 words | 1%, 3%, 5% | 1008 |
| 50–600 words | 0.5%–4% | N + 4 + penalty, penalty 0–4, rising with N and rate |
| 5000 / 10000 words | 1%, 5% | N + 8 |

The penalty never exceeds 4 cycles, the number of buffers.

## How far to trust it, and where it departs from the original circuit

The state machine, the gate-level rules of the control circuit and the
structure of a buffer are those of the published Terror design. The
following are this implementation's own choices:

* **State latch timing.** The original uses an SR latch enabled by a
  locally generated clock whose phase is not specified. Here the latch is a
  flip-flop updated at `ckdd`, the same edge as the correction flip-flop,
  with clear taking priority.
* **Transistor-level optimisations are not modelled.** The original merges
  the mux into the main flip-flop, uses a domino OR for the errq lines,
  merges the AND-OR into the correction flip-flop and uses a minimal SR
  latch. These change timing and area, not function.
* **Delays are not process data.** The `ckdd` delay, the wire delays and
  the noise delay are placeholders chosen to satisfy the timing rules
  above, not values extracted from a layout.
* **Reset** (asynchronous, active low, to normal state with no flag
  pending), the receiver's `rec_valid` output and the `tx_corr` input are
  additions.
* **Not included:**
  * the sender;
  * the end-to-end retransmission that would recover from static errors
    (transitions later than `ckd`, logic faults, soft errors);
  * the ideal 3-buffer variant, where `ckd` is delayed by a whole cycle;
  * any ckd-delay sweep. Changing `CKD_DELAY_PS` is possible but needs
    consistent wire delays.

The synthesizable part is `terror_stage` and `lookahead_receiver`, plus the
wiring in `terror_link`. A real implementation would replace `terror_clkgen`
and `link_wire` with the physical delay chain and repeated wires, and would
have to close the hold constraint (wire delay > `ckd` delay) in layout.
