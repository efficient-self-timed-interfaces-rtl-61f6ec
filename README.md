# A single-stage self-timed interface between clock domains

Two synchronous blocks with different clocks have to exchange data. The usual
answers are a chain of synchronizer flip-flops, which adds several cycles of
latency to every word, or a multi-entry asynchronous FIFO. This design uses the
STARI idea instead. A self-timed FIFO absorbs the unknown phase between the
clocks, and because clocks are very stable, nothing on the data path ever needs
a synchronizer. The FIFO here is cut down to **one stage**: a single register,
latch-X, placed between the transmitter's register (latch-T) and the
receiver's register (latch-R). Latch-X is clocked by a pulse, Phi_X, that a
tiny self-timed *latch controller* makes from the two clocks.

At equal frequencies this single stage tolerates almost two clock periods of
skew. Words arrive in under two receiver periods, and in under one once the
link is started for minimum latency. Three extensions build on the same stage:

* **rational ratios**: a *rate multiplier* lets the faster side, receiver or
  transmitter, present only some of its clock edges to the controller;
* **plesiochronous clocks** (independent, matched to a few ppm): a *near-miss
  detector* sees the phase creep towards the edge of the safe region, and one
  side skips a single clock event;
* **arbitrary clocks**: both sides measure the ratio of the clocks. The
  faster side runs its rate multiplier at that ratio and trims it on
  near-misses.

A small receive FIFO also lets the receiver pull words when it wants them,
instead of being told when each one arrives.

All of this is in `rtl/`, selected at run time by the `mode` input of the top
module `stari_link`.

```
              latch-T            latch-X             latch-R
 tx_data ---->[D  Q]------------>[D  Q]------------->[D  Q]----> rx_data
               ^ gphi_t            ^ Phi_X              ^ phi_r
 phi_t --[gate]+---------> +------------------+ <-- gphi_u --[gate]-- phi_r
           ^               | latch controller |                ^
   start-up, stuff,        +------------------+         rate multiplier,
   rate multiplier          | Phi_T' Phi_U' Phi_X         receiver skip
                       miss detector --> synchronizers
```

## The latch controller and its two operating modes

The controller is an edge-triggered C-element that resets itself. It waits
until it has seen a rising edge from the transmitter side (Phi_T) **and** one
from the receiver side (Phi_R, or Phi_U when rate-multiplied), in either order.
It then raises Phi_X. After the self-reset time eta, Phi_X falls and the
controller accepts edges again. Each input first passes through a small delay
(delta_T, delta_R). This places Phi_X late enough after Phi_T for latch-X's
set-up time, and late enough after Phi_R for latch-R's hold time.

Because the controller only pairs edges, it never has to decide which edge
came first, so there is nothing to synchronize. Each Phi_X pulse falls into
one of two windows:

* **transmitter-last**: Phi_X follows a Phi_T edge and comes before the next
  Phi_R edge. The word reaches latch-R at the very next receiver edge.
* **receiver-last**: Phi_X follows a Phi_R edge. The word waits one more
  receiver period.

Suppose the skew drifts so that the transmitter moves earlier. The link then
passes smoothly from transmitter-last to receiver-last operation, with no word
lost. Starting from transmitter-last with a time delta_TR0 from the Phi_T edge
to the next Phi_R edge, it tolerates two things:

* the transmitter can be delayed by up to delta_TR0 - 2(t_setup + t_prop);
* the transmitter can be advanced by up to 2P - delta_TR0 - 2(t_hold - t_prop).

That is a total window of 2(P - t_setup - t_hold). The controller itself also
needs time to reset. The gap between the edge that fires Phi_X and the next
edge on the other input must exceed eta. At least one mode satisfies this
whenever P > 2 eta.

An edge that arrives while Phi_X is still high is **lost**. This is the
failure the miss detector reports. It is also the mechanism by which the
controller falls into a feasible mode, which `tb_latch_controller`
demonstrates: with equal clocks and the receiver 800 or 900 ps behind, one
transmitter edge is lost and the controller then stays in transmitter-last
operation.

`latch_controller.sv` is a **behavioural model with delays**. On silicon this
is a handful of transistors with keepers and inverter chains. The default
numbers (delta_T 60 ps, delta_R 40 ps, eta 250 ps) are illustrative choices.
They are not the figures of any real process.

## Starting the link

During start-up, words may be lost or duplicated. `init_done` marks the point
after which they must not be.

* **Maximum robustness** (`reset_delay_ramp`). The self-reset delay starts
  large: 63 steps of 25 ps on top of eta. At that size neither mode works. The
  ramp then shortens it by one step every 32 transmitter cycles. The first mode
  to become feasible is the one with the larger margin, and the controller
  stays in it. On silicon this delay is analog. Here it is a 6-bit code that
  the controller model turns into time.
* **Minimum latency** (`min_latency_init`, enabled by `min_latency`). After
  the ramp, the link runs for 64 cycles. Then exactly one Phi_T edge is
  removed (`tx_ready` is low for that cycle, so the transmitter holds its
  word), followed by another 64-cycle wait. A controller in receiver-last mode
  now sees a single receiver edge before the next transmitter edge, so it
  switches to transmitter-last. One already in transmitter-last stays there.
  This works when the transmitter-to-receiver gap is larger than eta.
  Otherwise the controller falls back to receiver-last.

  This start-up does not need the ramp. Running the ramp first is a choice
  of this design that keeps one start-up path, and it costs only time.
  Transmitter-last operation forced this way can sit close to its limit.
  After start-up, a near-miss on the receiver side therefore makes the
  receiver skip one Phi_R event. That returns the controller to
  receiver-last, at one extra period of latency. The test
  `meso-minlat-near` shows it with the receiver only 300 ps behind.

## Unequal clocks: the rate multiplier

Suppose the clock frequencies are in the ratio N_T : N_R with N_R > N_T. Then
the receiver has cycles in which no new word can exist. `rate_multiplier`
runs in the receiver domain and keeps an accumulator, `sum`. On every Phi_R
cycle:

* if `sum >= 0`, that edge is passed on as a Phi_U edge and `sum` grows by
  N_T - N_R;
* otherwise the edge is withheld and `sum` grows by N_T.

A glitch-free clock gate (`clock_gate`) turns the pulse flag into Phi_U. The
same flag, delayed by two receiver edges, becomes `rx_valid`. For 3/5, starting
from 0, `sum` runs 0, -2, 1, -1, 2, 0, ...

Phi_U is an uneven clock: its edges jitter by up to (1 - 1/N_T) P_R around an
even spacing. If the worst of the N_R possible sequences happens to fall badly
against Phi_T, the controller needs P_T - (1 - 1/N_T) P_R > 2 eta. Every
starting value of `sum` gives one of the N_R equivalent sequences, and the best
one only needs P_T - max(1/2, (N_R mod N_T)/N_T) P_R > eta.

A faster transmitter is the mirror case. If the link is built with NT > NR,
the same module runs in the transmitter domain with the ratio terms swapped,
so NR of every NT Phi_T edges reach latch-T and the controller. Its flag
drives `tx_ready`, which makes the transmitter hold its word on the cycles
that are removed. The receiver then takes a word in every cycle. Misses are
synchronized into the transmitter domain and appear on `miss_t`.

To find a good sequence, start-up uses the same slow ramp of eta. Whenever
the controller *misses* an edge, the miss detector reports it. The rate
multiplier then adds one extra to `sum`, moving to the next sequence. As eta
shrinks, the search stops at the first sequence that works, which is the most
robust one. The search is switched off once start-up is over, so in normal
operation the slow miss synchronizer is never on any path that matters.

`tb_stari_ratio_5_6` shows that the search matters. It runs P_R = 1 ns,
P_T = 1.2 ns and eta = 450 ps. With the search, all six phase offsets deliver
every word. With the shift input tied off, two of the six lose every sixth
word. `tb_stari_ratio_6_5` is the mirror case (P_T = 1 ns, P_R = 1.2 ns).
It passes at six phases, and with the shift tied off one phase loses words.

## The miss detector

`miss_detector_cell` is a behavioural model of the asynchronous front end,
which on silicon is a few transistor stacks. It raises three flags:

* `y_miss`: a Phi_T' or Phi_U' edge arrived while Phi_X was high;
* `y_near_t` and `y_near_u`: the same, or the edge came less than `NEAR_PS`
  (100 ps, a tenth of a 1 ns period) after Phi_X fell.

`miss_sync` brings a flag into a clock domain through three flip-flops and
turns its rising edge into a one-cycle pulse. The synchronized level goes back
to the cell as an acknowledge that clears the flag. The synchronizer is never
on the data path, so it can afford to be slow and very reliable.

## Drift: plesiochronous and arbitrary clocks

**Plesiochronous** (`MODE_PLESIO`). Ratio 1/1. Suppose the transmitter is
slightly fast: its edges creep towards the end of the controller's self-reset.
At 0.1 P of margin the `y_near_t` flag fires and is synchronized into the
transmitter domain. `slip_control` then removes one Phi_T edge. That cycle is
a stuff cycle: `tx_ready` is low and no word is sent. The controller moves to
the other mode, far from the margin. A slightly fast receiver is handled the
mirror way: one Phi_R edge is withheld from the controller, and `rx_valid`
stays low for that cycle. A 16-cycle hold-off makes sure each report causes
exactly one slip.

**Arbitrary** (`MODE_ARBITRARY`). Each side forwards its clock to the other.
On each side, a `freq_estimator` opens a window of 1024 local cycles. A
counter clocked by the forwarded clock counts cycles while the synchronized
window is open. The count C gives the ratio estimate C/1024.

The receiver's count decides which side is faster: above 1024 means the
transmitter is faster. The decision reaches the transmitter as a
synchronized level. Only the faster side uses its count. That side starts
its rate multiplier at C/1024 and receives both near-miss flags, while the
other side passes every edge. The delay ramp waits for this decision, so
start-up happens at the working ratio. On the faster side, `drift_tracker`
keeps the ratio with four extra fraction bits. It handles every near-miss in
two ways, described here for a faster receiver (the transmitter case is the
mirror image):

* **Offset.** It adds half a Phi_T period to `sum`, which re-centres Phi_U in
  the safe region. The offset is negative after a Phi_U report, because Phi_U
  had crept early. It is positive after a Phi_T report, because Phi_U had
  crept late. The published description of the method gives the opposite sign.
  With the sign convention of `sum` used here, that rule drives the phase
  the wrong way and loses words in simulation, so this design reverses it.
* **Ratio step.** When two reports of the same kind come within 65,536 cycles
  of each other, the drift has a steady direction. The ratio then moves by
  one fractional step against it.

The update law is this design's own. A first version that stepped whole counts
(1/1024) was far coarser than the measurement error. It oscillated and lost
words at every correction, so the law should be treated as a working example,
not a tuned loop. Near-misses are rare, but the offset correction can still
drop or repeat one word. The test accepts up to 1% of such errors. It sees
none at P_T = 2.73 ns with P_R = 1 ns, or at the reverse.

## Pulling instead of being told: the receive FIFO

As described so far, the link is active. It raises `rx_valid`, and the
receiver must take `rx_data` in that cycle. `rx_fifo` turns this into a
passive interface that the receiver pulls from. The FIFO runs entirely in
the receiver domain:

* `rx_avail` says a word is on offer in `rx_word`;
* raising `rx_take` in that cycle removes the word at the next edge.

The FIFO stores up to 4 words that have not been taken. When it is empty, an
arriving word goes straight through a multiplexer, so pulling costs no
extra cycle. Nothing pushes back to the transmitter. The receiver has to
take words at least as fast as they arrive on average. A word that arrives
into a full FIFO is dropped, and `rx_overflow` is set until reset. The
depth, the bypass and the overflow rule are this design's choices.

## Modules

| file | kind | role |
|---|---|---|
| `stari_pkg.sv` | package | `link_mode_e`, ratio and delay-code widths |
| `stari_link.sv` | RTL (instantiates models) | top: the whole link |
| `stage_reg.sv` | RTL | latch-T / latch-X / latch-R |
| `latch_controller.sv` | behavioural model | self-resetting C-element making Phi_X |
| `miss_detector_cell.sv` | behavioural model | miss / near-miss flags |
| `miss_sync.sv` | RTL | synchronizer and edge pulse for a flag |
| `rate_multiplier.sv` | RTL | N_T of N_R edges, sequence shift, offset |
| `clock_gate.sv` | RTL | latch-based gate that removes single edges |
| `reset_delay_ramp.sv` | RTL | maximum-robustness start-up |
| `min_latency_init.sv` | RTL | minimum-latency start-up |
| `slip_control.sv` | RTL | one skipped event per near-miss |
| `freq_estimator.sv` | RTL | clock ratio measurement |
| `drift_tracker.sv` | RTL | ratio and phase trimming for arbitrary clocks |
| `rx_fifo.sv` | RTL | receive FIFO with bypass for a pulling receiver |

### Top-level interface (`stari_link`)

* **Transmitter side** (`phi_t`, `rst_t_n`). `tx_data` is taken on a rising
  `phi_t` edge if `tx_ready` was high during the cycle before it. Otherwise
  the transmitter holds its word. `init_done` and `slip_t` are status
  outputs. So are `miss_t` (used when NT > NR) and `correction_t` (used when
  the transmitter is the faster side with arbitrary clocks).
* **Receiver side** (`phi_r`, `rst_r_n`). `rx_data` holds a new word in every
  cycle where `rx_valid` is high. Or pull instead: take `rx_word` by
  raising `rx_take` while `rx_avail` is high. `rx_overflow` reports a word
  dropped by the FIFO. `miss`, `slip_r`, `correction` and `est_valid` are
  one-cycle or level status outputs.
* **Configuration**. `mode` is static while the link runs; reset both sides
  when changing it. `min_latency` selects the start-up. `t_last` shows the
  controller's current mode.
* **Main parameters**. `WIDTH` is 8. `NT`/`NR` default to 3/5 and are used in
  `MODE_RATIONAL` only. Building the link with NT > NR puts the rate
  multiplier on the transmitter side. The controller delays are `*_PS`. The counter lengths
  are `RAMP_STEP_CYCLES`, `INIT_SETTLE`/`INIT_RESOLVE`, `SLIP_HOLDOFF`,
  `EST_WINDOW`, `TRACK_LONG` and `TRACK_FRAC`. `RX_FIFO_DEPTH` is 4.

## How far to trust it

What has been simulated (all tests self-checking):

* every module on its own;
* the whole link at its default parameters, in eight scenarios (`tb_stari_link`):
  1. equal clocks;
  2. equal clocks with minimum-latency start-up;
  3. the same with too little margin, which falls back to receiver-last;
  4. ratio 3/5;
  5. plesiochronous, transmitter 1% fast;
  6. plesiochronous, receiver 1% fast;
  7. arbitrary clocks, transmitter at 2.73 ns against receiver at 1 ns;
  8. arbitrary clocks, the reverse;
* ratio 5/6 at six phase offsets (`tb_stari_ratio_5_6`), and its mirror 6/5
  with a faster transmitter (`tb_stari_ratio_6_5`).

What the end-to-end checks cover:

* words arrive in order, with none lost or repeated (allowing 1% at the
  arbitrary ratio);
* latency stays under 2P, and under P with minimum-latency start-up;
* delivered rates match the ratio;
* each mechanism happens at least once: both controller modes, the suppressed
  edge, the sequence search, both kinds of slip, the ratio measurement, the
  drift correction, and both the FIFO's bypass and its storage;
* a pulling receiver keeps up with no FIFO overflow. With a 90% take rate at
  ratio 3/5, the pulled words stay in sequence.

Limits:

* The controller and the miss detector are timing models, and their delays
  are invented. Real set-up and hold margins, metastability of the
  controller near delta_T'R' = delta_R'T' = P/2, and the analog delay control
  are not modelled. The data registers have no set-up or hold checks, so a
  late Phi_X would not be flagged by the simulation itself. Only the data
  checks would catch it.
* Rational clocks work in both directions, and which side is faster is fixed
  when the link is built. With arbitrary clocks it is measured at start-up.
* The arbiter is not built. It would move a plesiochronous link from
  receiver-last to transmitter-last operation whenever that is safe, cutting
  the worst-case latency from about 2P to about P. How it decides, and how
  it forces the switch without dropping or repeating a word, would be
  guesswork.
* The latch controller and miss detector models are not synthesizable (they
  use delays and `fork`). Everything else is plain synthesizable
  SystemVerilog. `miss_sync`'s acknowledge is used asynchronously by the
  detector model, which is why lint reports it as flopped both synchronously
  and asynchronously. That is intended.

## Simulating

Verilator 5 with timing support runs every test. `-Wno-fatal` is needed
because the models use delays whose values come from parameters and signals:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/stari_pkg.sv tb/tb_stari_link.sv --top-module tb_stari_link
./obj_dir/Vtb_stari_link
```

Swap in any `tb/tb_<module>.sv` to test one block. Each test prints one line,
`TB_RESULT checks=N failures=M`. The full link test takes well under a second.
To try another clock situation, edit the `scenario(...)` calls in
`tb_stari_link.sv`. Their arguments are mode, minimum-latency flag, Phi_T
period, Phi_R period, the two start phases and the number of receiver cycles
observed, with times in ps.
