# Dual-reference PRBS bit error tester

A bit error tester sends a pseudorandom bit sequence (PRBS) over a link. The
receiver rebuilds the same sequence locally and counts every received bit
that differs from it. To rebuild the sequence, the receiver's reference
generator has to be brought into step with the incoming data. The usual way
is to fill its shift register with received bits. The receiver then has to
notice when the reference has fallen out of step, for example after the
clock recovery has slipped a bit, and fill it again.

On links with bursty errors, such as free-space optical links with fading,
this standard scheme gives up too early. A short burst looks just like a lost
reference, so the receiver resynchronizes. While it does, it measures
nothing, so the measurement is blind exactly when the error rate is
interesting.

This design keeps **two** reference generators:

* **AUX** uses the usual rules. It resynchronizes as soon as its error window
  reaches a threshold T_a. It recovers quickly, but it is sensitive to bursts.
* **MAIN** has a slightly higher threshold T_m. Its resynchronization
  request is **only accepted while AUX is synchronized**.

During a burst, AUX drops out first and MAIN keeps measuring, so the burst's
errors are counted. When the burst ends, AUX resynchronizes. If MAIN's
window has drained by then, MAIN never resynchronizes. If MAIN really lost
step (a bit slip), its error rate stays high after the burst. Its request is
still pending when AUX comes back, so it is accepted at once. AUX acts as
the reference while MAIN reloads, and then MAIN takes over again.

## Building blocks

```
            tx_clk_i domain                         rx_clk_i domain (recovered clock)
  +--------------------------+        rx_bit_i  +--------------------------------------+
  | prbs_lfsr (generator)    |--tx_bit_o ... -->| prbs_ref_channel  MAIN (T_m = 8/64)  |--+
  +--------------------------+    (link, CDR)   |   prbs_lfsr + XOR + err_window       |  |
                                                |   + sync_ctrl   <-- resync_en = AUX  |  |
                                                |                       synchronized   |  |
                                                | prbs_ref_channel  AUX  (T_a = 6/64)  |--+
                                                +--------------------------------------+  |
                                                        dual_ref_ctrl (select, gate) <----+
                                                        ber_counter   (result counters)
```

| file | what it is |
|---|---|
| `rtl/prbs_pkg.sv` | state and reference-select enums, default sizes |
| `rtl/prbs_lfsr.sv` | Fibonacci LFSR with two XOR taps and a load mode |
| `rtl/err_window.sv` | sliding count of errors among the last SPAN bits |
| `rtl/sync_ctrl.sv` | Resynchronize / Verify / Synchronized controller |
| `rtl/prbs_ref_channel.sv` | one reference: LFSR, comparator, window, controller |
| `rtl/dual_ref_ctrl.sv` | MAIN request gating, reference selection, suspect flag |
| `rtl/ber_counter.sv` | bit, error and suspect counters |
| `rtl/prbs_bert_top.sv` | transmitter generator plus dual-reference receiver |

### The LFSR and how a reference is loaded

`prbs_lfsr` is a many-to-one shift register. The XOR of stages TAP1 and TAP2
is the next bit. That bit is both the output and the value shifted into
stage 1. With N = 23 and taps 18 and 23 (x^23 + x^18 + 1) the output is the
2^23-1 maximum-length sequence. With N = 7 and taps 6 and 7 it is the 2^7-1
sequence.

In the receiver, the same register's output is the **predicted** value of
the current received bit. In load mode, the received bit is shifted in
instead of the feedback. After N received bits the register holds the
transmitter's last N output bits, which is the transmitter's state, and from
then on it predicts every bit. This only works if all N loaded bits were
received correctly. A single bad bit leaves the reference on a different
phase of the sequence, and about half of all bits then read as errors. That
is why a verify phase follows the load.

Reset loads all ones, because an XOR register stuck at all zeros never
leaves that state. In load mode the register can still be filled with zeros
by an all-zero input, for example a dead link. Verify then passes on
all-zero data. Nothing in this design guards against that.

### The synchronization controller

`sync_ctrl` has three states. Every move needs a received bit (`en_i`),
except the one out of SYNCED.

| state | what happens | leaves when |
|---|---|---|
| RESYNC | the LFSR is loaded with received bits | N bits loaded → VERIFY |
| VERIFY | prediction compared with data | an error → RESYNC; 32 consecutive clean bits → SYNCED |
| SYNCED | errors evaluated and fed to the window | window ≥ threshold **and** `resync_en_i` → RESYNC |

From a clean link, a reference is synchronized after exactly N + 32 bits
(55 for 2^23-1, 39 for 2^7-1). `rq_o` is the request: SYNCED and the window
at its threshold. The request is combinational and falls as soon as old
errors leave the window. An accepted request moves to RESYNC on the next
clock edge. No received bit is used for that move, so a MAIN
resynchronization takes N + 32 bits after the edge on which it was accepted.

### The error window

`err_window` keeps one flag per evaluated bit in a SPAN-bit shift register
(64 by default). An up/down counter holds the number of ones in it. The
count only includes bits evaluated in SYNCED: outside SYNCED the window is
held empty, so every synchronized period starts with a clean history. "6 out
of 64" means the count has reached 6 (`count >= THRESH`).

The span and the threshold must be scaled together. A receiver that is off by
one bit sees errors only where the data changes. On data with few
transitions that can be a low error rate, and a long span with a
proportionally low threshold would miss it. Handling longer bursts in a
single-reference receiver therefore needs a proportionally longer shift
register: 320 bits for bursts of 30 errors. The dual reference avoids that
cost.

### Dual reference control, in detail

`dual_ref_ctrl` is combinational:

* `main_resync_en_o = aux_synced`. This is the whole gating rule.
* Reference selection: MAIN if MAIN is in SYNCED, else AUX if AUX is in
  SYNCED, else NONE. There is one exception: when MAIN is requesting and AUX
  is synchronized, the request is being accepted, so AUX is selected in that
  same cycle. `err_o` is the error against the selected reference (0 for
  NONE).
* `suspect_o` is high while MAIN is the selected reference and its request
  is pending. The hardware cannot tell a burst from a bit slip while the
  request is pending. A slip may have happened at any time since the request
  rose, so every bit counted in that state is marked.

The three situations this is built for:

1. **Burst above T_a only.** AUX resynchronizes. MAIN stays below T_m and
   remains the reference, and every error of the burst is counted.
2. **Burst above T_m.** MAIN requests, but AUX is already out of
   synchronization, so the request is refused and MAIN keeps measuring. AUX
   needs N + 32 consecutive clean bits to come back. By then MAIN's 64-bit
   window has usually drained below T_m, and MAIN never resynchronizes.
   Errors in the last 64 − (N + 32) bits before AUX recovers (9 bits for
   2^23-1, 25 for 2^7-1) still count in MAIN's window. A burst that ends very
   densely can therefore still cause one unneeded MAIN resynchronization,
   during which AUX is the reference.
3. **Bit slip during a burst.** Both references are out of step. AUX
   reloads and recovers once the link is clean. MAIN's window stays full
   (about 50 % errors), so its request is still up. From the cycle AUX reaches SYNCED, AUX is the
   reference, and MAIN enters RESYNC on the next clock edge. AUX stays the
   reference for the N + 32 bits MAIN needs, and then MAIN is again. Results counted while `suspect_o` was
   high should be discarded; `suspect_bits_o` and `suspect_errs_o` say how
   many there were.

At start-up both references load together, and the reference is NONE for
the first N + 32 bits.

### Result counters

`ber_counter` counts, per received bit:

* `bits_o`: bits evaluated against a valid reference;
* `errs_o`: errors among those bits;
* `suspect_bits_o` and `suspect_errs_o`: the part of both counts taken while
  suspect;
* `nosync_bits_o`: bits received with no valid reference.

The counters are 48 bits wide, saturate, and are zeroed by `cnt_clr_i`. The
measured bit error rate is `errs_o / bits_o`. A cleaner figure is
`(errs_o − suspect_errs_o) / (bits_o − suspect_bits_o)`.

## Top-level interface and timing

`prbs_bert_top` has two independent clock domains that share no signal:

* The transmitter (`tx_clk_i`, `tx_rst_ni`, `tx_en_i`) gives one bit on
  `tx_bit_o` per enabled cycle.
* The receiver runs on the recovered clock `rx_clk_i`. `rx_en_i` and
  `rx_bit_i` come from the clock and data recovery unit, which is outside
  this design.

Both resets are asynchronous and active low.

Per received bit, `err_o`, `ref_sel_o` and `suspect_o` are valid in the same
cycle, combinationally from registered state. The counters show the bit one
cycle later. The state outputs (`main_state_o`, `aux_state_o`) and the flags
`main_rq_o`, `main_resyn_o` and `aux_resyn_o` are there for monitoring. The
last three correspond to the signals usually drawn in timing diagrams of
this scheme. The window counts are brought out as well.

| parameter | default | meaning |
|---|---|---|
| `N`, `TAP1`, `TAP2` | 23, 18, 23 | LFSR length and taps (7, 6, 7 for 2^7-1) |
| `SPAN` | 64 | error window length, bits |
| `AUX_THRESH` | 6 | T_a, errors in SPAN |
| `MAIN_THRESH` | 8 | T_m, errors in SPAN |
| `VERIFY_LEN` | 32 | clean bits needed in VERIFY |
| `CNT_W` | 48 | result counter width |

The area is small. At the defaults it is about 470 flip-flops, most of them
in the two 64-bit windows and the five counters.

## What is fixed and what was chosen here

These come from the method the design implements: the Fibonacci LFSR with
two XOR taps, and the 2^23-1 and 2^7-1 polynomials. So do loading by
received bits, the three-state controller with a 32-bit verify and 6 errors
in 64 bits, and the MAIN/AUX structure with its higher MAIN threshold. The
same holds for the request gating by AUX, the order MAIN → AUX → MAIN when
MAIN reloads, and the rule that results are suspect while MAIN's request is
pending.

These are this design's own choices:

* T_m = 8 (the method only asks for "slightly higher than T_a") and the same
  64-bit span for MAIN;
* load for exactly N bits;
* a sliding window (a shift register of flags) rather than fixed blocks;
* clearing the window outside SYNCED;
* all-ones reset;
* the counters, their width and saturation;
* the suspect outputs;
* two separate clock domains.

Timing diagrams of this scheme show a period with no valid reference while
the clock recovery is slipping. Hardware cannot see that directly. Here it
shows up as `suspect_o`.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

* `prbs_lfsr_tb` compares the 2^23-1 output with the recurrence
  b[k] = b[k−18] ⊕ b[k−23]. It checks that the 2^7-1 register repeats after
  exactly 127 bits with 64 ones, and that a loaded register predicts the
  generator.
* `err_window_tb` checks random error streams against a queue model.
* `sync_ctrl_tb` checks random stimulus against a reference model, counting
  every transition, and the 55-bit start-up.
* `prbs_ref_channel_tb` covers clean start-up, scattered errors, a held-off
  request, an error in VERIFY and a one-bit slip.
* `dual_ref_ctrl_tb` tries all 32 input combinations.
* `ber_counter_tb` checks against integer models, including saturation.
* `prbs_bert_top_tb` runs the top at its defaults through start-up and the
  three cases above, using the shared driver `bert_scenario`. It counts AUX
  resynchronizations, refused MAIN requests, MAIN resynchronizations, each
  reference selection, suspect bits and slips, and fails if any never
  happened. It checks the cycle counts (N + 32) and that the counters match
  the injected errors exactly in cases 1 and 2.
  `prbs_bert_top_prbs7_tb` runs the same scenarios with the 2^7-1
  configuration.

To run one with Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal --top-module prbs_bert_top_tb \
    -y rtl -y tb +libext+.sv rtl/prbs_pkg.sv tb/prbs_bert_top_tb.sv
./obj_dir/Vprbs_bert_top_tb
```

Each testbench finishes in well under a second.

## Limits

* The clock and data recovery unit is not part of the design. Its slips are
  imitated in the testbenches by dropping one received bit.
* The polynomial is a build-time parameter, not a run-time selection.
* A MAIN resynchronization accepted while the link is still noisy can load a
  wrong phase. It is then caught in VERIFY like any other bad load.
