# IB-AS-AER: impulse-based asynchronous serial AER link

Neuromorphic sensors and processors exchange *address events*: a short
message that carries only the identity (address) of the source that fired,
whose meaning lies in *when* it is sent. The common parallel form of the
Address-Event Representation (AER) needs one wire per address bit. This RTL
sends the events over a single line instead, as short pulses whose spacing
carries the data. It was designed for an optical fibre link (laser driver,
VCSEL, fibre, photodiode). The line has no clock and no DC balance, and the
receiver recovers no clock. It only measures the time between pulses against
its own free-running clock. So transmitter and receiver may run from
unrelated oscillators, a few percent apart.

The design follows the Impulse-Based Asynchronous Serial AER (IB-AS-AER)
protocol and its reference transmitter and receiver as published for an
event-driven skin sensor of a humanoid robot. The block structure, the clock
scheme, the 2-bit symbols and the reported rates come from that description.
The exact interval code, the handshakes and most of the insides of the
blocks are not published. They are this implementation's own and are marked
as such below and in each file's header.

## The line code

Time on the line is counted in **units** U of one transmitter pulse-clock
period: 5 ns at the nominal 200 MHz pulse clock, half of the 100 MHz
transmitter clock. Each pulse is half a unit wide (2.5 ns). An event of
`AE_W` bits (16 by default) is one frame:

| Interval between two pulses | Meaning                                                      |
|-----------------------------|--------------------------------------------------------------|
| ≥ 8 U (line quiet)          | the pulse that ends it is the **reference pulse** of a frame |
| 2, 3, 4, 5 U                | one **data symbol** of 2 bits: 0, 1, 2, 3                    |
| 6 or 7 U                    | **closing** interval: 6 + even parity of the payload         |

Symbols go most significant pair first. A 16-bit event is therefore a
reference pulse, 8 data intervals and one closing interval: 10 pulses.

**Back to back.** If the next event is ready when the closing pulse goes
out, that pulse also serves as the reference of the next frame, and no
quiet gap is spent. A stream of random 16-bit events then costs
8 × 3.5 + 6.5 = 34.5 U = 172.5 ns per event (5.8 Meps). The worst case, all
symbols 3 with odd parity, costs 47 U = 235 ns (4.26 Meps). For 32-bit
events the figures are 312.5 ns (3.2 Meps) and 435 ns (2.3 Meps). The
published prototype reached 5.5 Meps (16-bit) and 2.9 Meps (32-bit) at the
same raw rate.

**Why it tolerates clock differences.** The receiver samples the line at
600 MS/s: a 300 MHz clock, sampled on both edges. One transmitter unit is
therefore 3 samples. An interval is rounded to the nearest unit, so each unit
value owns a window of ±1 sample. Sampling itself costs up to one sample of
that margin. The longest interval that must be read exactly, 7 U = 21
samples, stays in its window while the clocks differ by less than about
0.5/21 ≈ 2.4 %. Longer intervals only need to be ≥ 8. The loop-back test
decodes without error at −2 %, 0 and +2 % (and at +5 %, where rounding
happens to favour it). It fails at −5 % and ±7 %. The published link was
measured error-free within ±2 %.

## Transmitter (`as_aer_tx`)

```
ae/src_rdy/dst_rdy -> spaer_tx_if -> nrzm_sequencer -> delayed_nrzm_modulator -> ddr_pulse_gen -> pulse_out
                       (clk)          (clk)             (pulse_clk)               (pulse_clk, both edges)
```

* `spaer_tx_if` takes one event on a `src_rdy`/`dst_rdy` handshake. An event
  moves on a rising edge where both are high. It hands the event on as 2-bit
  chunks; the sequencer pulses `take` to consume one. `dst_rdy` is low while
  an event is being serialised, which is how the transmitter holds off a
  source that is faster than the line.
* `nrzm_sequencer` does all the timing, at half the resolution it needs. It
  keeps `t_next`, the number of units from the start of the current clock
  cycle to the next pulse. In the cycle that holds that pulse it issues a
  command: it flips `pulse_tog` and sets `delay` (0 or 1) to tell which half
  of the cycle the pulse falls in. It then adds the next interval to
  `t_next`. Every interval is at least 2 U, so there is at most one pulse
  per cycle. Before a fresh reference pulse it waits until the line has been
  quiet for 8 U.
* `delayed_nrzm_modulator` runs on `pulse_clk`, which must be exactly twice
  `clk` with rising edges aligned. It sees every command at the same
  pulse-clock edge and postpones the transition by `delay` pulse-clock
  periods. A 4-bit schedule register holds transitions that are still
  pending, so a new command may arrive before an earlier delayed one has
  played out. The result is `tx_data`, a line with one transition per pulse.
* `ddr_pulse_gen` turns each transition into a pulse that lasts from a rising
  to the next falling edge of `pulse_clk`. It is built from a rising-edge
  flop, a falling-edge flop and an XOR, in place of a vendor DDR output cell.

## Receiver (`as_aer_rx`)

The receiver spans three timing regions. The fast ones handle pulses as
they come; the slow one does the decoding.

```
pulse_in -> toggle_ff -> ddr_sampler -> iei_lfsr_counter -> lfsr_fifo -> ptp_synchronizer
 (async)     (pulses)    (hsclk_p/n)    (hsclk)              (hsclk)      (hsclk | lsclk)
         -> iei_binary_converter -> iei_resampler -> as_aer_decoder_fsm -> spaer_rx_if -> ae/src_rdy/dst_rdy
             (lsclk)                 (lsclk)          (lsclk)               (lsclk)
```

* **Toggle flip-flop.** Its clock is the received pulse stream, so every
  pulse flips its output, however short the pulse is. This turns the pulse
  code back into an edge code that can be sampled at leisure. It is the only
  flop with an asynchronous reset.
* **DDR sampler.** It samples the edge line on the rising edges of `hsclk_p`
  and of `hsclk_n`, which is `hsclk_p` inverted. Each path has two
  synchronising flops. Every `hsclk_p` cycle it delivers a pair of
  consecutive samples.
* **Interval counter.** It counts samples between edges in a 6-bit
  maximal-length LFSR (x⁶ + x⁵ + 1). An LFSR has no carry chain, which suits
  the fast clock. Each cycle it advances by one or two states. An edge ends
  an interval, which is passed on in LFSR code. The count saturates at 62
  samples, so after a quiet line the first pulse reports a long interval and
  opens a frame. Two edges in one cycle mean a spike far shorter than any
  legal spacing, and raise an error.
* **LFSR FIFO.** It holds 14 interval words (4-bit LFSR pointers, one entry
  kept free). It absorbs the bursts inside a frame. A write into a full FIFO
  is dropped and reported as an error.
* **Pulse-to-toggle-to-pulse synchroniser.** This is the clock crossing. The
  fast side pops a word into one of four holding slots and flips that slot's
  request toggle. The slow side passes each toggle through two flops, visits
  the slots in order, and reads a slot whose toggle has moved. It then flips
  the slot's acknowledge toggle, which travels back to free the slot. One
  round trip takes about three slow cycles. With four slots the crossing
  still moves one word per slow cycle, faster than the line can produce
  them. Error pulses cross on a toggle of their own.
* **Binary converter and resampler.** The converter maps the LFSR code back
  to a sample count. The table is generated from the LFSR itself at
  elaboration. Counts above 31 are clamped to 31, since they only mean
  "long". The resampler rounds the count to transmitter units:
  `units = (count + 1) / 3`.
* **Decoder FSM.** `IDLE` waits for an interval of ≥ 8 U. `DATA` collects
  the 2-bit symbols. `CLOSE` checks the closing interval and its parity and
  emits the event with `data_ok`. After a frame the FSM stays ready in
  `DATA`, because the closing pulse may open a back-to-back frame. It falls
  back to `IDLE` after `TIMEOUT` quiet low-speed cycles.

  A closing interval (6 or 7 U) is also a realignment point, because no
  other part of a frame can produce it. In `IDLE`, a closing interval
  moves the FSM to `DATA` without waiting for a pause. In `DATA`, a
  closing interval that comes too early drops the short frame and starts
  over from that pulse. Without this rule, a receiver that lost one pulse
  on a saturated line would wait for a gap that never comes. With it, a
  lost pulse costs about one event.

  Status outputs:
  * `alive` pulses once for each accepted interval.
  * `idle` is high while the FSM waits for a frame.
  * `error` pulses for an illegal interval, a parity mismatch, a frame cut by
    a long gap, or an error from the counter or the FIFO.
  * `timeout` pulses when a frame stops halfway.
* **SPAER output.** It offers each event with good parity on
  `src_rdy`/`dst_rdy` and holds it until it is taken. The serial line cannot
  be paused. An event that arrives while the previous one is still waiting
  is therefore dropped and reported on `overflow`.

Latency from the last pulse of a frame to `src_rdy` is 70–90 ns, or 7–9
low-speed cycles. That is 2–3 high-speed cycles in the sampler and counter,
about 3 low-speed cycles in the synchroniser, then 4 low-speed register
stages.

## One link end and its clocks (`ib_as_aer_node`)

One link end: transmitter and receiver side by side, sharing only `rst`
(active high). It runs full duplex over two fibres. This is the module to
put into a system; `ib_as_aer_link_test` (next section) only adds a test
source and a checker around it.

| Signal                                    | Use                                                                 |
|-------------------------------------------|---------------------------------------------------------------------|
| `tx_clk`, `tx_pulse_clk`                  | 100 MHz and 200 MHz, rising edges aligned (scale both by N for N× the rate) |
| `tx_ae`, `tx_src_rdy`, `tx_dst_rdy`       | SPAER event input                                                   |
| `tx_pulse`                                | pulse train to the laser driver                                     |
| `tx_busy`, `tx_frame_start`, `tx_frame_end` | transmitter status                                                |
| `rx_pulse`                                | pulse train from the photodiode conditioning circuit                |
| `rx_lsclk`, `rx_hsclk_p`, `rx_hsclk_n`    | 100 MHz, 300 MHz and its inverse; the 3:1 ratio is required         |
| `rx_ae`, `rx_src_rdy`, `rx_dst_rdy`       | SPAER event output                                                  |
| `rx_alive`, `rx_idle`, `rx_error`, `rx_timeout`, `rx_overflow` | receiver status                                |

Hold `rst` for several cycles of every clock. Take it from low to high so
that the toggle flip-flop sees a reset edge.

Parameters: `AE_W` (event width, even, default 16), `PTR_W` (FIFO pointer
bits, 4), `SLOTS` (synchroniser slots, 4), `TIMEOUT` (decoder quiet limit in
low-speed cycles, 16). The interval code is in `ib_as_aer_pkg`.

## Link-test system (`ib_as_aer_link_test`)

This is the top of the RTL. It wraps one node in the test set-up that
measures the link: a pseudo-random event source on the transmitter side and
a comparator on the receiver side. Loop `tx_pulse` back to `rx_pulse`,
directly or through the optical path, and read the counters.

* **Generator (`aer_event_gen`, `tx_clk` domain).** Payloads come from a
  maximal-length Galois LFSR as wide as the event. A run of 2^AE_W − 1
  events therefore uses every non-zero address once. A trigger counter
  fires every `gen_period + 1 + (r & gen_jitter)` cycles, where `r` comes
  from a second, 16-bit LFSR. Both values can change at run time.
  `gen_period = 0` saturates the link. A trigger that finds the previous
  event not yet taken is dropped and counted in `gen_missed`. Polynomials
  are included for widths 8, 12, 16, 20, 24 and 32.
* **Checker (`aer_event_checker`, `rx_lsclk` domain).** It runs the same
  LFSR and compares each arriving event with the expected value and the
  three after it:
  * a match k places ahead counts one good and k lost events;
  * no match counts one corrupted event;
  * two misses in a row mean the sequence was lost. The checker then
    restarts from the received payload, since the payload is the LFSR
    state, and counts a resynchronisation.
* **Result.** Events not received correctly = `gen_sent − chk_good`, read
  once the line is idle. Counters are 33 bits wide, so a run of 2^32
  events fits.

Parameters: `AE_W` (16) and `CNT_W` (33). The node inside uses its own
defaults.

## Departures and gaps

* The numeric interval code, the parity convention, the back-to-back rule
  and the quiet gap are this design's choices. The published protocol
  states only that data are coded in pulse spacings, with start, end and
  parity overhead.
* The sequencer-to-modulator interface has `delay`, `data`, `start` and
  `end`, as in the published block diagram. A per-command toggle flag is
  added. Only `delay` and the flag steer the modulator; the other three are
  status.
* The published block diagram's `begin` handshake signal is called `take`
  here.
* The inverted low-speed clock of the published diagram is not used.
* The FIFO's `full` output is not used by the synchroniser. The FIFO reports
  an overflow directly.
* The protocol is described as having explicit flow control, but no way of
  signalling back over the link is given. None is built. The receiver
  reports dropped events instead.
* The optical link (laser driver, VCSEL, fibre, photodiode, conditioning
  amplifier) is analog and not modelled. The testbenches wire `tx_pulse`
  straight to `rx_pulse`; `tb_ib_as_aer_link_test` can also drop pulses.
  The measured optical error rates depend on laser current and photodiode
  bias and cannot be reproduced in logic simulation.
* The generator's LFSRs, the trigger formula, the drop-when-busy rule and
  the checker's look-ahead are this design's choices. Only the function
  of the test set-up is published: random events, a trigger with
  configurable rate and jitter, and a comparison of sent and received
  events.
* The DDR output stage and the toggle flip-flop are written as ordinary
  flops, with no vendor primitives. On an FPGA, place the toggle flip-flop
  and the first sampler flops close to the input pin.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl rtl/ib_as_aer_pkg.sv tb/tb_ib_as_aer_link_test.sv \
  --top-module tb_ib_as_aer_link_test
./obj_dir/Vtb_ib_as_aer_link_test
```

| Testbench                   | What it shows                                                              |
|-----------------------------|----------------------------------------------------------------------------|
| `tb_ib_as_aer_link_test`    | The whole test system at default size: saturated run (≥ 5.5 Meps, 5.81 measured, with dropped triggers); jittered trigger; TX clock ±1.5 % off with 0 errors; −7 % with errors counted; one pulse in 157 lost on the line (about one event lost per pulse). |
| `tb_ib_as_aer_node`         | End to end at default size. Random traffic with idle starts, back-to-back frames and source stalls. The 16-bit rate (≥ 5.5 Meps, 5.75 measured). A clock-difference sweep over −7…+7 % (error-free within ±2 %). Injected parity, illegal-interval, cut-frame, FIFO-overflow and output-overflow faults. |
| `tb_workload_32bit`         | 32-bit configuration looped back, rate ≥ 2.9 Meps (3.22 measured)           |
| `tb_as_aer_tx`, `tb_as_aer_rx` | each half against an independent model of the line code                   |
| `tb_aer_event_gen`, `tb_aer_event_checker` | the generator against a cycle model, its spacing and its full address space; the checker against injected drops, corruptions and long gaps |
| `tb_<block>`                | each leaf block                                                            |

All of them finish in seconds.
