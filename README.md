# Terror: timing-error tolerant pipelined links for networks on chip

Long on-chip wires are pipelined with flip-flops every few tenths of a
millimetre. The wire delay changes from cycle to cycle: crosstalk from
neighbouring lines that switch the other way, supply noise, process and
temperature variation. If every segment is sized for the worst case, the link
needs many buffers and has a long latency, and most of that margin is never
used. The designs here size each segment for the *normal* delay and catch the
rare late arrival in hardware. Each buffer samples the wire twice:

* a **main flop** on the clock `ck`, which is aggressive and may catch a bit that is still moving;
* a **delayed flop** on `ckd`, a copy of `ck` shifted by part of a cycle, which is taken to be always right.

If the two samples differ, a timing error happened. The buffer then sends the
delayed copy one cycle later instead of asking the sender to retransmit. The
latency cost of errors is bounded by the number of buffers on the link, not by
the number of errors.

Two link families are provided, both at 32-bit words and 4 buffers by default:

1. **The Terror link** (`terror_stage`, `terror_link`, `terror_receiver`). It is a
   point-to-point pipelined bus without flow control. Corrections run
   forward along the link on a `corr` line.
2. **Robust NoC links** (`link_stage_s1/s2/s3`, `robust_link`, `link_sender`,
   `link_receiver`). Each buffer is also a small FIFO, so the link itself stores
   flits under back-pressure (stall) and replaces most of the switch input
   buffer. There are three schemes with the same interface.

`terror_top` holds one Terror link and one robust link of each scheme side by side.

## The Terror buffer (`terror_stage`)

```
 d ─┬──────────────►|0\        main (ck)
    │               |  |──► D  Q ──┬──────────────► q (next wire segment)
    │   ┌──────────►|1/            │
    │   │ delayed (ckd)            │
    └──►D  Q ───────┴──────► XOR ◄─┘  per bit, then OR over all bits
                                    │
                       errq ────────┘──► error control (ckdd) ──► sel, corr_out
```

One word is `W+1` bits: `W` data bits plus a valid line in bit `W`. The valid
line goes through the same flops as the data.

### Clock timing

With a 1 ns cycle:

| clock  | edge at   | drives |
|--------|-----------|--------|
| `ck`   | 0         | main flops |
| `ckd`  | ck + 0.50 | delayed flops |
| `ckdd` | ck + 0.77 | `sel` and `corr_out` |

These are the offsets used in the testbenches. In practice a delay of half a
cycle between `ck` and `ckd` is the most that the flop and mux overheads allow.
So a word has up to 1.5 cycles to cross a segment. A 1.2 mm bus at 1 GHz needs
6 worst-case buffers, 3 in the ideal case and 4 in practice: hence `B = 4`.

The window between `ckd` and the next `ck` is where the error is found and
acted on:

* `ckd` captures the safe sample;
* the XOR and OR tree settle;
* at `ckdd` the control register sets `sel`;
* `sel` must reach the mux before the next `ck`.

The three clocks come from outside. Physically they are made locally with a
chain of inverters.

### Modes and the correction line

* **Normal mode** (`sel = 0`). The main flop takes the wire. When `err` rises:
  * `sel` is set at `ckdd`. From the next `ck` edge the main flop loads the
    delayed flop, so the correct word leaves one cycle late.
  * `corr_out` pulses for one cycle. It tells the next buffer that the word it
    received at the last edge is wrong and the next word is its correct copy.
* **Delayed mode** (`sel = 1`). Every word now comes through the delayed flop
  and has half a cycle more to settle. So no further errors occur while data
  keeps flowing, and the error check is masked.
* **`prev_corr` in normal mode.** A buffer in normal mode that gets `prev_corr`
  has already passed the bad word on. It *forwards* the correction.
* **`prev_corr` in delayed mode.** The bad word is still in the buffer's delayed
  flop. The buffer drops it, clears `sel` and takes the correct copy straight
  from the wire. The correction is *absorbed*: this buffer loses the cycle the
  previous one gained, and the correction goes no further.
* **Return to normal mode.** At the end of a transfer a buffer also returns to
  normal mode: when the word waiting in its delayed flop is not valid, that idle
  word is dropped and `sel` is cleared.

`terror_receiver` registers the last buffer's word. It delivers the word only
if `prev_corr` does not mark it wrong (`discarded` pulses when it drops one).

**Penalty.** Each buffer that turns delayed adds at most one cycle. A transfer
therefore arrives 0 cycles late without errors and at most `B` cycles late
with errors, whatever the error rate. Usually the delay is 1 to `B` cycles. It
is 0 when the only error hit the idle word after the transfer: that correction
just removes a duplicate of the last word. `terror_link_tb` and
`terror_top_tb` check this bound for every burst.

## Robust NoC links (`link_stage_s1/s2/s3`)

In a NoC the switch needs input buffers to absorb back-pressure. Here each link
buffer is a small FIFO, so the link stores flits itself. A link of `b` stages
needs `2b + 2` words of storage: `2b` on the link and 2 in `link_receiver`. A
plain pipelined link with a 2-deep switch buffer per stage needs `3b`. The
delayed flop is the FIFO's second entry, clocked by `ckd`.

### Flow-control protocol

The protocol is identical for all schemes, so they can be swapped.

* **`stall`** runs backwards and is a register output. A buffer takes the word
  offered in a cycle exactly when its `stall_out` was 0 in that cycle. Whoever
  offered a word while `stall_in = 1` offers it again. A stall therefore moves
  back one buffer per cycle.
* **`valid`** runs forwards **one cycle late**. `v_out` in cycle *n* says
  whether the word on `q` in cycle *n-1* was a good flit. This late valid lets
  a buffer that detects a timing error *retract* the word it just sent. It
  drives `v_out = 0`, and the next buffer drops the word.
* A buffer therefore keeps its newest entry pending for one cycle until that
  word's valid arrives. Invalid entries are dropped, which also takes the
  buffer back towards normal mode.

### Entries and modes

Entries are kept in the order main (ck), delayed (ckd), auxiliary (ckd, scheme 2
only). The `mode` output is the number of entries in use:

* `MODE_NORMAL`: one entry, flits pass through the main flop;
* `MODE_DELAYED`: two entries, flits enter the delayed flop and move to the main flop a cycle later;
* `MODE_AUX`: three entries, all three flops in series.

In normal mode the delayed flop is free. It takes a second, later sample of the
word the main flop just took, and an XOR/OR compares the two. That is the
timing-error check.

| | scheme 1 | scheme 2 | scheme 3 |
|---|---|---|---|
| entries per buffer | 2 | 3 | 2 |
| timing error in normal mode | detected only (`err_out`), flit passes on unchanged | corrected | corrected |
| after an error | no change | main reloads the delayed copy, `v_out = 0`; the buffer stays delayed while flits flow, so later errors are avoided | main reloads the delayed copy, `v_out = 0`; the previous buffer is stalled for one cycle, then normal mode again |
| error penalty | left to retransmission (not built) | at most one cycle per buffer, at the first error of a stream | one cycle for every error |
| data flops per buffer | 2W | 3W | 2W |

No buffer sees timing errors in delayed or auxiliary mode, because words there
are captured by `ckd`. For this reason, under congestion scheme 1 avoids most
errors on its own.

`err_out` of every scheme pulses when an error is seen. For scheme 1 it is the
hook for a retransmission mechanism, which sits in the switches and is not
part of this code.

### Ends of a robust link

* `link_sender` sits on the switch output (or network-interface) side. It turns
  a `valid/ready` flit stream into link words with the late valid, and holds its
  word while stalled.
* `link_receiver` is the 2-entry switch input buffer. It drops words whose late
  valid is 0, raises `stall` when full and offers flits on a `valid/ready` port.

## Top level (`terror_top`)

Parameters: `W = 32` (data bits), `B = 4` (buffers per link). Robust link
`s = 0, 1, 2` uses scheme `s + 1`.

The wires between buffers are not logic. Their two ends are top-level ports,
and the wire (or a testbench model of it) connects them:

```
t_seg_launch[i]  ──(wire segment i)──►  t_seg_arrive[i]      i = 0 .. B-1
r_seg_launch[s][i] ──(wire segment)──►  r_seg_arrive[s][i]
```

* `*_launch[0]` is the sender register and `*_launch[i]` is buffer `i-1`'s output.
* `*_arrive[i]` feeds buffer `i`.
* The last buffer drives the receiver directly; that short hop is not a segment.

Other ports:

* **Terror link:** `t_src_valid/t_src_data` in, `t_out_valid/t_out_data` out.
  `t_sel`, `t_err` and `t_discarded` are status outputs.
* **Robust links:**
  * `r_src_valid/r_src_data/r_src_ready` is the switch output side.
  * `r_out_valid/r_out_data/r_out_ready` is the switch input side.
  * Status outputs: `r_err` per link, and `r_stage_err` and `r_mode` per buffer.
* **Clocks and reset:** `ck`, `ckd`, `ckdd` and `rst_n`. The reset is
  asynchronous and active low; it clears every buffer to empty and normal mode.

## Files

| file | content |
|---|---|
| `rtl/terror_pkg.sv` | default sizes, `link_mode_e` |
| `rtl/terror_stage.sv`, `rtl/terror_link.sv`, `rtl/terror_receiver.sv` | Terror link |
| `rtl/link_stage_s1.sv`, `_s2`, `_s3`, `rtl/robust_link.sv` | robust link buffers, `SCHEME` parameter selects one |
| `rtl/link_sender.sv`, `rtl/link_receiver.sv` | ends of a robust link |
| `rtl/terror_top.sv` | top |
| `tb/wire_segment_var.sv` | wire model with five delay classes (700 ps normal, 1150 to 1450 ps late), for the `ckd` sweep |
| `tb/delay_chain.sv` | makes `ckd`/`ckdd` from `ck` (delays both edges) |
| `tb/wire_segment.sv` | wire model: each launched word arrives at 0.7 cycle (normal) or 1.2 cycles (late); late at random, or with `XTALK=1` also when a line switches against both neighbours (101→010 or 010→101), the worst crosstalk pattern |
| `tb/*_tb.sv` | one self-checking testbench per module; `stage_bench.sv` and `robust_link_bench.sv` are shared helpers; `terror_top_tb` is the end-to-end test, `terror_workload_tb` measures latency and `terror_ckd_sweep_tb` sweeps the `ckd` delay |

## Simulation

Time is in picoseconds: no `timescale` is given, so the 1 ps default holds, and
`ck` has a 1000 ps period. With Verilator 5:

```
verilator --binary --timing --assert --top-module terror_top_tb \
    rtl/*.sv tb/delay_chain.sv tb/wire_segment.sv tb/terror_top_tb.sv
./obj_dir/Vterror_top_tb
```

* **Other testbenches:** use the same command with that testbench as top. Add
  `tb/stage_bench.sv` for the `link_stage_*` tests, `tb/robust_link_bench.sv`
  for `robust_link_tb`, and `tb/wire_segment_var.sv` for `terror_ckd_sweep_tb`.
* **Output:** every testbench prints `TB_RESULT checks=N failures=M` and stops
  itself, with a watchdog.
* **Random seed:** the testbenches use `$urandom`. Pass `+verilator+seed+N` to
  the binary to change the random stream.

### What the tests check

* **`terror_stage_tb`:**
  * normal transfer, one late word, the exact mode changes;
  * forwarding and absorbing of `prev_corr`;
  * return to normal mode when idle;
  * 40 random bursts with random late words. Each burst is checked for
    exactly one error and one `corr_out` pulse when a word is late, and a
    penalty of 1 cycle (0 when only the idle word after the burst was late).
* **`terror_link_tb` and the Terror part of `terror_top_tb`:**
  * bursts with random late arrivals, at rates from 0 to 30%;
  * in `terror_top_tb`, also data-dependent late words from the crosstalk
    pattern. Word-to-word bit-flip rates are set per burst, so 0 to about 30%
    of the words are late;
  * every word delivered once, in order;
  * penalty 0 without errors and at most `B` with errors. It can be 0 when the
    only error hit the idle word after a burst.
  * Both also count the errors, forwarded and absorbed corrections, and returns to normal mode.
* **`link_stage_s*_tb`:** a 20-flit burst with three late flits. The exact results are checked:
  * scheme 1: 3 errors flagged, those 3 flits wrong, no delay;
  * scheme 2: 1 error (the later two are avoided), 1 cycle delay;
  * scheme 3: 3 errors, 3 cycles delay.
  * Also checked: a burst under a receiver stall, and the return to normal mode afterwards.
  * Then 40 random bursts with random late flits and stalls. For bursts without
    a stall, the exact error and penalty counts above must hold: scheme 1 flags
    every late flit, scheme 2 pays once per burst, scheme 3 once per error.
* **`robust_link_tb`** (all schemes, at 32-bit and 64-bit flits) and the robust part of `terror_top_tb`:
  * random load and random back-pressure, with late arrivals;
  * schemes 2 and 3 must deliver every flit unchanged and in order;
  * scheme 1 must deliver every flit in order and corrupt one only when it flags an error.
* **Coverage:** `terror_top_tb` fails if any of these never happened:
  * a Terror error, a forwarded correction, an absorbed correction, a return to normal mode or a receiver drop;
  * a word made late by crosstalk;
  * a stall, delayed mode or a timing error on any robust link;
  * auxiliary mode on scheme 2.

### Measured latency (`terror_workload_tb`)

This testbench runs the top at its default size. Every segment is late with a
fixed probability per cycle, and the testbench prints a table.

**Terror link, 1000-bit transfers** (32 words of 32 bits), 40 per rate. The
error-free latency is 37 cycles, from the first word launched to the last
word delivered.

| late rate | mean penalty | max penalty |
|---|---|---|
| 1% | 0.9 cycles | 3 cycles |
| 5% | 2.5 cycles | 4 cycles = `B` |

**Robust links, 1000 flits at 5% late rate.** The switch side is always ready.

* **Continuous traffic** (a flit every cycle):
  * scheme 2 finishes 4 cycles late: once a buffer has seen an error, it stays delayed;
  * scheme 3 finishes 157 cycles late: one cycle per error;
  * scheme 1 finishes on time but passes the bad flits on, flagged for retransmission.
* **Uniform random traffic** (60% load): the mean flit latency rises by 7% with
  scheme 2 and by 10% with scheme 3. The gaps between flits let buffers
  return to normal mode, so scheme 2 meets more errors.

With one seed the exact figures vary a little; the bounds are checked as
failures. The testbench checks that:

* the Terror penalty is at most `B`;
* the penalty of schemes 2 and 3 is at most their error count;
* scheme 2's penalty under continuous traffic is at most `B`;
* delivery is ordered and correct.

### How late `ckd` must be (`terror_ckd_sweep_tb`)

This testbench runs five Terror links on the same words and the same wire
delays, with `ckd` at 10%, 20%, 30%, 40% and 50% of the cycle after `ck`.
Each segment is late 5% of the time, by 150 to 450 ps past the next `ck`
edge. A late word that still beats `ckd` is corrected. A later one is lost:
the flops keep the previous word and pass it on as a stale copy, and the
1000-bit transfer would have to be resent.

Result over 80 transfers:

| `ckd` delay | corrected errors | lost words (of 2560) |
|---|---|---|
| 10% | 0 | about 420 |
| 50% | about 320 | 0 |

The mean penalty of the complete transfers rises to about 2.5 cycles. The
testbench checks that:

* no word is lost with `ckd` at 50%;
* losses never grow as `ckd` moves later;
* the penalty bound holds.

Why this matters: below the wire's worst-case lateness, the delayed flop
cannot cover every late word, and the remaining errors need a retransmission
layer.

The tests are cycle-level with ideal delays. They do not prove the electrical
timing: that `ckd` is late enough for the slowest wire, and that
`err → sel → mux` fits before the next `ck`. These have to be checked with
static timing on a real layout.

## Design choices and departures

The following are not fixed by the underlying description and were chosen here:

* **Latch as a register.** The set/reset latch that holds `sel` is modelled as a
  register clocked by `ckdd`. It changes in the same window after `ckd` and
  before the next `ck`.
* **Precedence.** When `prev_corr` and a local error coincide, `prev_corr` wins.
* **Error mask.** The error check is masked in delayed mode and when neither
  sample of the valid line is 1.
* **End of a transfer.** It is marked by the valid line. A Terror buffer leaves
  delayed mode when its delayed flop holds an invalid word.
* **Corrections.** The `corr` line between buffers is assumed error-free and one
  cycle long.
* **Robust-link FSMs.** The control FSMs are written as an entry counter over
  ordered flops rather than as the original state diagrams. The modes and the
  flop each word passes through are the same. The number of separate control
  wires differs: here every scheme uses `stall`, `valid`, an error output and
  the internal write and select enables.
* **Scheme 3's one-cycle stall.** It comes from the same "FIFO full" rule as
  back-pressure: after a correction both entries are in use.
* **Scheme 1 check.** Scheme 1 also compares the main and delayed samples when
  the delayed flop is idle. Only in this way can it detect errors for a
  retransmission layer.
* **End handshakes.** The core-side handshakes of `link_sender` and
  `link_receiver` are plain `valid/ready`.
* **Area.** Relative area between the schemes is not reproduced. The data flop
  count is 2W, 3W and 2W per buffer for schemes 1, 2 and 3.

Not included:

* the transistor-level Terror flop with embedded mux and domino OR;
* the inverter delay chains and wires themselves (testbench models only);
* the NoC switches, network interfaces and retransmission protocol that the links plug into.

The published network-level benchmarks need those parts and cannot be run on
this code alone.
