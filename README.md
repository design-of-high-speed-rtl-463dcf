# Low-power Viterbi decoder with T-algorithm pruning and two-step precomputation

A Viterbi decoder spends most of its power in the add-compare-select (ACS)
recursion: every trellis step, every state adds branch metrics to its
predecessors' path metrics, compares, selects and writes back. The
T-algorithm cuts that work by discarding, after each step, every state whose
path metric is more than a threshold T above the best one. Discarded states
are not updated and do not feed the next step. The catch is that the best
metric of a step is only known after a minimum search over all new metrics,
and that search would sit inside the ACS feedback loop, the one loop in a
Viterbi decoder that cannot be pipelined. This design removes it from the
loop by **precomputing** the optimal metric of step *n* from the stored
metrics of step *n-2* and the branch metrics of steps *n-1* and *n*. Those
inputs are all available a full cycle early, so the pruning compare becomes
one subtraction against a register.

The RTL implements this for a rate-1/2, four-state (constraint length 3)
convolutional code with hard-decision (default) or soft-decision inputs, together with the
encoder, as a streaming encoder/decoder pair (`trellis_codec`).

## The code and the trellis

The encoder is a two-flip-flop shift register. The state `{s1, s0}` holds the
last two message bits, with the newest in the MSB. On input `u` it emits the
code word `{c1, c0}` and moves to state `{u, s1}`:

```
c1 = u ^ s1 ^ s0        (generator 7 octal)
c0 = u ^ s0             (generator 5 octal)
```

The taps are the standard (7,5) pair with free distance 5. They are a choice
of this implementation, and changing `vd_pkg::G1/G0` changes encoder and decoder together.

Seen from the decoder, state `{a, b}` has two predecessors: `{b, 0}` is the
*upper* one, with decision bit 0, and `{b, 1}` is the *lower* one, with decision bit 1. The
message bit that leads into `{a, b}` is `a`. Trace-back therefore steps
`s -> {s[0], dec[s]}`, and the decoded bit is the MSB of the state reached.
`vd_pkg` holds these rules as functions (`codeword`, `next_state`,
`prev_state`), and every module derives its wiring from them.

## Decoder datapath

```
 rx ──► bmu ──► bm_in ──► [bm_q] ──► pmu (4 × acs + pruning) ──► pm_new/ok_new ──► pm_memory ─┐
               │                       ▲        ▲                    │  dec, best        │
               │                       │   [pm_opt_q]                ▼                   │
               └──────► precompute ────┴────────┘                   smu ──► out_bit      │
                          ▲  (pm, ok of step n-2)                                        │
                          └──────────────────────────────────────────────────────────────┘
```

| unit | job |
|---|---|
| `bmu` | Look-up table from the received symbol to the four branch metrics. The entry is the squared distance `Σ(X−Y)²`, where a code bit 1 is expected as sample `2^Q−1`. For `Q = 1` this is the Hamming distance. |
| `acs` | One state: two additions, a modulo subtraction whose MSB picks the smaller candidate, and a decision bit. A pruned predecessor is ignored. A tie goes to the upper branch. |
| `pmu` | Four `acs` elements, then the T-algorithm. A state survives if `pm_new − pm_opt ≤ T`. The unit also gives the best surviving state, the lowest index on a tie, which is where trace-back starts. |
| `pm_memory` | One metric and one survivor flag per state. A metric is written only when its state survives, so pruned states cost no register activity. |
| `precompute` | Gives the optimal metric of the next step (see below). |
| `smu` | Circular buffer of decision words and a trace-back of `TB_DEPTH` steps each step. |

### The one-symbol look-ahead

`precompute` needs the branch metrics of step *n+1* while the ACS is still
working on step *n*. The decoder provides them by registering each symbol's
branch metrics (`bm_q`) and running the ACS step for symbol *n* only when
symbol *n+1* arrives. On that cycle:

* `pmu` uses `pm_memory` (metrics of step *n-1*), `bm_q` (step *n*) and
  `pm_opt_q`, the optimal metric of step *n*, which is a register;
* `precompute` uses the same `pm_memory` contents, which are now two steps
  behind step *n+1*, plus `bm_q` and the combinational `bm_in`. It produces
  the optimal metric of step *n+1*, which is registered into `pm_opt_q`.

So the ACS loop is: metric register, then add, compare, select, compare
against `pm_opt_q + T`, then back to the metric register. No minimum tree is
in it. The very first step after reset or `clear` is not pruned, because no
metrics from two steps back exist yet. A consequence of the look-ahead:
the last symbol of a stream is only processed when a further symbol arrives,
so a stream is ended with flush symbols (zero message bits).

### Two-step precomputation

```
m2[i]      = min over u2  bm_{n}(codeword(i, u2))                  for each state i
c[j]       = pm_{n-2}[j] + min over u1 ( bm_{n-1}(codeword(j, u1)) + m2[next(j, u1)] )
pm_opt(n)  = min over surviving j of c[j]
```

This is the smallest metric any path from a step *n-2* survivor can have at
step *n*. Paths through a state pruned at step *n-1* are included in it, so
`pm_opt` is always a lower bound on the true minimum. Such a path can never
be the best one when T is at least the largest branch metric (2 for hard
decisions, `2·(2^Q−1)²` in general). For those thresholds `pm_opt` is the exact minimum, and the
decoder behaves exactly like a T-algorithm decoder that searches the minimum after every step. With a
smaller T it prunes somewhat less than that ideal, never more. Two
assertions in `viterbi_decoder` check the lower-bound property and that at least one
state always survives.

### Metric arithmetic: modulo normalisation

Path metrics only grow, so they are never renormalised. They are
`PM_W`-bit numbers that wrap around, and two metrics are compared through
the sign (MSB) of their modulo difference. That is valid while all live
metrics lie within `2^(PM_W−1)` of each other. Pruning keeps the spread below
`T + max branch metric`, and for a four-state code the spread stays small
even without pruning. The default widths are 7 bits of metric range plus the
one extra bit that modulo arithmetic needs (`PM_W = 8`), and `BM_W = 5` for branch metrics. With 8-bit metrics the
threshold input is 7 bits wide. Its maximum, 127, turns pruning off in
practice, and the decoder then behaves as a full-trellis decoder.

### Survivor path unit (trace-back)

Each step's four decision bits go into a circular buffer of `TB_DEPTH−1`
words. The current step's word is used directly from the input. Starting
from the best state, the unit follows the decision bits back `TB_DEPTH` steps,
and the MSB of the state it reaches is the decoded bit of step *n − TB_DEPTH*.
The whole trace runs combinationally every step, so there is one decoded bit
per step, and no word is ever shifted. With `TB_DEPTH = 64` this is a
64-deep chain of 4:1 multiplexers. That is short in logic but is the longest path in the
design. A multi-pointer trace-back would shorten it at the cost of more
memory and latency.

## Interfaces and timing

`trellis_codec` (the top):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (trellis starts in S0) |
| `clear` | in | 1 | restart the decoder trellis in S0 (flush the encoder to S0 first with two zero bits) |
| `msg_valid`, `msg_bit` | in | 1 | at most one message bit per cycle; gaps are allowed |
| `chan_err` | in | 2 | XORed onto the code word shown on `cw` in the same cycle (channel model for testing) |
| `thresh` | in | `PM_W−1` | T-algorithm threshold T |
| `cw_valid`, `cw`, `enc_state` | out | 1, 2, 2 | encoder output (one cycle after the message bit) and state |
| `dec_valid`, `dec_bit` | out | 1 | decoded stream, in order |
| `active_states`, `pruned_states` | out | 3 | states that survived and that were pruned in the last step: the power-saving measure |

The decoded bit of message bit *k* appears once `TB_DEPTH + 1` further
message bits have been given. At one bit per cycle that is `TB_DEPTH + 3 = 67` cycles after
`msg_valid`. For `viterbi_decoder` alone it is `TB_DEPTH + 2` cycles after the
symbol. There is no back-pressure: `in_valid` is a strobe, and each strobe
advances the trellis by one step.

Parameters, the same on `trellis_codec` and `viterbi_decoder`:

| parameter | default | meaning |
|---|---|---|
| `Q` | 1 | bits per received sample; 1 = hard decision |
| `PM_W` | 8 | path metric width (7 bits + 1 for modulo normalisation) |
| `BM_W` | 5 | branch metric width; must hold `2·(2^Q−1)²` (asserted) |
| `TB_DEPTH` | 64 | survivor path length (trace-back depth) |

## How this relates to the original design

The original design describes the decoder structure (BMU, ACS-based path metric unit, path
metric memory in a feedback loop, trace-back survivor unit), these parts of
the implementation:

* a rate-1/2 four-state encoder;
* a look-up-table BMU with Hamming metrics, and `(X−Y)²` for soft decisions;
* 7-bit state metrics plus one bit for modulo normalisation, and 5-bit branch metrics;
* compare by the MSB of the difference, with decision 0 meaning the upper state;
* a pre-computation architecture with the T-algorithm, where two-step precomputation is the chosen depth;
* a design "for 64 bits", taken here as the survivor path length.

This implementation's own choices:

* the (7,5) generator taps;
* the precomputation formula for this trellis, and the one-symbol look-ahead pipeline that feeds it;
* survivor flags in the metric memory;
* the threshold as a run-time input;
* tie rules;
* the combinational sliding-window trace-back;
* reset to S0;
* the valid-strobe interface;
* the `chan_err` test input.

The original headline numbers come from a rate-3/4 code of a TCM system,
decoded with the same precomputation/T-algorithm scheme. That code's encoder
is not specified there, so neither it nor its larger trellis is built here. The
same holds for the TCM symbol mapping. Its reported clock rates (468 MHz for
the decoder, 1449 MHz for the encoder, on an FPGA) and its power saving of up
to 70 % are not verified by this RTL. `active_states` and
`pruned_states` show how much ACS work is skipped. With hard decisions, T = 2 and
one channel error every 10 to 20 symbols, the decoder writes about 40 % fewer
path metrics than in full-trellis mode (`tb_activity_compare`). That figure measures activity, not power.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_conv_encoder` | code words from the written-out (7,5) equations, state, 1-cycle latency, idle cycles, reset |
| `tb_bmu` | every table entry, hard (Q=1) and soft (Q=2) |
| `tb_acs` | random wrapped metrics, ties, invalid predecessors |
| `tb_pmu` | all four states against an unwrapped integer model, pruning, best state, survivor count |
| `tb_pm_memory` | reset contents, gated writes, clear |
| `tb_precompute` | brute force over all two-step paths from surviving states |
| `tb_smu` | software trace-back over random decisions and start states, fill, clear |
| `tb_viterbi_decoder` | bit-exact against a software Viterbi/T-algorithm decoder on noisy hard and soft channels, with decoding errors present, pruned and full-trellis modes, stalls, latency |
| `tb_activity_compare` | the same noisy stream through a pruned (T = 2) and a full-trellis codec: both decode correctly, and the pruned one performs about 40 % fewer path-metric register writes |
| `tb_trellis_codec` | end to end at default parameters: error-free stream, isolated channel errors (all corrected), metric wrap-around, stalls, clear, full-trellis mode; decoded stream equal to the message stream, latency 67 cycles |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/vd_pkg.sv tb/tb_trellis_codec.sv \
          --top-module tb_trellis_codec -o sim
./obj_dir/sim
```

Each testbench runs in well under a second.

## Limitations

* Only the four-state rate-1/2 trellis is supported. The package generalises the
  wiring rules, but `prev_state`/`next_state` and the 2-bit code word assume one input bit and two output bits.
* Streams are not terminated by the decoder. Append `TB_DEPTH + 1` flush bits (zero
  bits also return the encoder to S0) to get the tail of a message out.
* The trace-back depth sets the length of the longest combinational path (see above).
