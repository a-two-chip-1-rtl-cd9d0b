# CIMT serial link: a transmitter/receiver pair for a 1.5 GBd "virtual ribbon cable"

This design moves 16- or 20-bit parallel words (plus one extra FLAG bit)
across a single serial line at up to 1.5 GBd, in both directions at once.
Each end of the link is a transmitter and a receiver. The receiver recovers
both the bit clock and the word boundaries from the line itself, with no
reference oscillator and no frame-sync words. That works because of the
line code, the *conditional-invert master transition* (CIMT) code:

* Every frame carries one transition at a fixed place. The receiver's PLL
  locks onto that transition, which gives it bit timing and frame
  alignment together.
* Frames are sent either true or complemented, whichever keeps the line
  DC-balanced.

A start-up handshake between the two ends brings up the link:

1. Each end trains its receiver on simple fill patterns.
2. When both receivers are locked, the controllers let user data flow.
3. After a line fault, the two ends restart the handshake on their own.

The synthesizable logic of both chips is written in SystemVerilog. Two parts
are behavioural models for simulation: the transmitter's clock multiplier and
the receiver's analog loop filter/VCO. With those two models, two
`glink_node` instances wired back to back make a complete link that can be
simulated.

## The line code

A line frame is an N-bit **D-field** followed by a 4-bit **C-field**
C0..C3, so a frame is 20 bits (16-bit mode) or 24 bits (20-bit mode,
`mode20`). D0 goes on the line first and C3 last. In the RTL, bit *k* of a
frame vector is the *k*-th bit on the line.

**Master transition.** C1 and C2 are always complementary. The edge between
them is the *master transition*, the receiver's timing and framing
reference. In data frames, its direction carries the FLAG bit.

**The C-field table.** C0 and C3 tell the frame classes apart. C-fields are
listed in line order C0,C1,C2,C3.

| frame                | C-field  | D-field                                       |
|----------------------|----------|-----------------------------------------------|
| data, true, FLAG=0   | 1,1,0,1  | the word                                      |
| data, true, FLAG=1   | 1,0,1,1  | the word                                      |
| data, inverted       | complement of the whole true frame | complemented word   |
| control, true        | 0,0,1,1  | payload, with bits N/2-1 and N/2 forced to 0,1 |
| control, inverted    | 1,1,0,0  | complement (middle bits 1,0)                  |
| FF0 (fill)           | 0,0,1,1  | N_frame/2 - 2 ones from D0 (8 or 10), then zeros; frame balanced |
| FF1H / FF1L (fill)   | 0,0,1,1  | one more / one fewer one than FF0 (frame 2 bits heavy / light) |

* **Control payload.** A control word has N-2 payload bits: 14 in 16-bit
  mode, 18 in 20-bit mode. `cimt_pkg::ctrl_dfield` and `ctrl_payload` insert
  and remove the two marker bits.
* **Fill shape.** A fill frame is ones from D0, then zeros, then the C-field
  0,0,1,1. So the line rises exactly once per frame, at the master
  transition, and falls once in the middle of the D-field. FF0 is a 50% duty
  square wave at the frame rate. These
  frames train the receiver.
* **Which frame is sent.** The transmitter sends fill whenever RFD (ready
  for data) is low, or when the user offers nothing. Otherwise it sends
  control if CAV is high, else data if DAV is high.
* **FF1 alternation.** FF1H and FF1L are sent in turn, so they are
  balanced in pairs.

**The conditional-invert rule.** The transmitter keeps a running disparity:
the ones sent minus the zeros sent. For each data or control frame, it
computes whether the true frame is *heavy*, meaning it has more ones than
zeros. It sends the frame complemented when heavy and "running disparity
> 0" have the same truth value.

* The running disparity is bounded by about one frame length. The
  end-to-end test checks that it stays within ±24.
* Fill frames are never inverted: inverting one would move its single
  rising edge.
* Inverting a data frame also swaps C0 and C3 and reverses the master
  transition. The receiver undoes both, so FLAG survives.

**FLAG.** The FLAG bit either carries user data (`flagsel=1`, giving 17- or
21-bit words) or is toggled by the transmitter on every data frame
(`flagsel=0`). In toggle mode, the receiver checks that FLAG alternates and
reports a frame error if it does not. This catches frame slips that would
otherwise decode as valid data.

## Transmitter (`cimt_tx`)

The user supplies a word, DAV, CAV and FLAG with each edge of a frame-rate
strobe. The strobe can also run at half the frame rate (`half_rate`), in
which case both of its edges mark frames.

* **Bit clock.** `tx_clock_gen` multiplies the strobe up to the bit clock.
  It is a behavioural PLL: it measures the strobe period and runs an ideal
  clock at 20x or 24x that rate (twice that at half rate), phase-aligned to
  each strobe edge.
* **Serializer.** `tx_serializer` brings the strobe into the bit-clock
  domain with a two-flop synchronizer and issues one `load` per frame. It
  shifts the frame out D0 first. If the next strobe edge comes late, the
  line stays low.
* **Encoder.** `tx_frame_encoder` captures the new word at each `load`. It
  chooses the frame type and builds the true frame. `tx_majority` (a
  population count standing in for the chip's current-summing DAC and
  comparator) gives the frame's polarity and disparity.
  `tx_disparity_counter` adds each sent frame's disparity to the running
  total.
* **Latency.** A word presented at strobe edge *k* is on the line starting
  about three bit clocks after strobe edge *k+1*.

RFD and the FF0/FF1 choice come from the start-up controller of the
receiver in the same node.

## Receiver and clock recovery (`cimt_rx` + `rx_loop_vco`)

The receiver logic runs entirely on the recovered clock `rclk`, which comes
from the loop filter/VCO model. Its data path:

* **Input selector** (`rx_input_select`): picks the line, the loopback
  input or the equalized input (the analog equalizer itself is not modelled).
* **Sampling** (`rx_phase_detector`): a rising-edge flop retimes the data.
  A falling-edge flop samples the boundary between bits.
* **Frame counter and demultiplexer** (`rx_demux`): a counter that divides
  by the frame length, plus the frame buffer.
* **Decoders** (`rx_cfield_decoder`, `rx_dfield_decoder`).
* **Lock detector and start-up controller.**

**Phase detector.** Once per frame, the receiver looks at the boundary
sample taken between C1 and C2, where the master transition should be. It
XORs that sample with the retimed C1 bit to remove the transition's
polarity. A 1 means the boundary sample already saw the new value, so the
clock is late. A 0 means it is early. This one-bit (bang-bang) decision per
frame is the only phase information used in phase mode. It only makes sense
once the frame counter is aligned to the frames.

**Frame alignment comes from the loop, not from a search.** The frame
counter free-runs. Nothing in the receiver looks for word boundaries.
Instead, during start-up the far end sends fill frames. Their only rising
edge is the master transition. The frequency detector compares two events,
both in the `rclk` domain:

* the rising edge of the retimed data (the reference);
* the cycle in which the frame counter expects C2 (the "VCO" event).

**The frequency detector.** It is a classic three-state
(idle / up / down) sequential detector:

* If the reference comes first, the VCO is slow: *up*.
* If the frame counter comes first, the VCO is fast: *down*.
* The second event returns the detector to idle.

This pulls the VCO until the counter's C2 position coincides with the
line's rising edge. At that point the VCO is on frequency and the frames
are aligned, in one mechanism.

**Gating.** The phase detector works only within a fraction of a bit, and
the frequency detector only from one bit upward. So the two take turns:

* A comparison that finds the two events in different bit periods sets a
  gate flag.
* While the flag is set, the frequency detector drives the loop and the
  phase detector's decisions are withheld.
* A comparison that finds the events in the same cycle clears the flag and
  hands the loop back to the phase detector.

Outside frequency-detect mode, which the start-up controller selects, the
frequency detector is off and the phase detector has the loop alone.

**Loop filter and VCO model** (`rx_loop_vco`, real-valued):

* *Bang-bang branch.* The VCO runs at `f_int·(1 ± BB_STEP)` according to
  the latest decision, with BB_STEP = 0.1%.
* *Integral branch.* `f_int` moves by `KI` (relative) per phase decision,
  and by `KF` per bit period while the frequency detector has the loop.
* *Range.* `f_int` is clamped to 700–1800 MHz.
* *Stability.* For the loop to be stable, one frame of bang-bang phase
  walk-off must dominate what the integral branch adds over the same
  frame (the figure of merit 2βτ/t_update > 1). The defaults
  (BB_STEP/KI = 5) satisfy it.
* *Steady state.* The recovered clock hunts around the bit centre. The
  phase decision alternates almost every frame, so the phase walks by
  BB_STEP·M bit periods per frame, up then down. That gives a hunting
  jitter of about 2·BB_STEP·M/F peak to peak, or 2·BB_STEP·M/(F·√12) rms:
  7.7 ps rms at M = 20 and 1.5 GBd. The measured value is 7.1 ps rms.
  The integral branch only sees the average of the decisions. Its job is
  to keep the two bang-bang frequencies bracketing the incoming rate.

In the end-to-end test:

* A receiver starting 0.67% off frequency acquires and reaches data-ready
  in about 14 µs.
* Its recovered clock then averages the sender's bit rate to within 10 ppm.
* Across the range, `tb_glink_rates` brings the link up at 1500, 960 and
  700 MBd, in that order. Each run starts with the VCO where the previous
  run left it. The pulls from 1500 to 960 MHz and from 960 to 700 MHz each
  take about 60 µs.

**Lock detector.** `rx_lock_detector` declares lock after `LOCK_FRAMES`
(32) frames in a row with a valid C-field. A single bad frame drops lock.
While unlocked, every frame is reported to the controller as a frame error.
Once locked, each frame is reported by its class: DATA (data or control),
FF0 or FF1.

## Start-up handshake (`rx_smc`)

Each node runs the same controller. It steers:

* its own receiver's loop mode: FDET (frequency detector enabled) or PHASE;
* its own transmitter's fill frame: FF0 or FF1;
* its own transmitter's RFD.

It moves on each status the local receiver reports.

| state | loop  | TX fill | RFD | on FE | on DATA | on FF0 | on FF1 |
|-------|-------|---------|-----|-------|---------|--------|--------|
| ACQ   | FDET  | FF0     | 0   | ACQ   | ACQ     | LCK    | LCK    |
| LCK   | FDET  | FF1     | 0   | ACQ   | PHS     | LCK    | PHS    |
| PHS   | PHASE | FF1     | 0   | ACQ   | RDY     | ACQ    | RDY    |
| RDY   | PHASE | FF1     | 1   | ACQ   | RDY     | ACQ    | RDY    |

How the handshake reads:

* Sending FF0 means "I am not locked".
* Sending FF1 means "I am locked to you".
* A node leaves frequency-detect mode only once it sees FF1 from the far
  end (or data), which means both receivers are locked.
* Any frame error sends the node back to ACQ. There it transmits FF0, and
  the far end, seeing FF0 while in phase mode, restarts as well.
* Before data may flow, the far end must already be sending FF1. Data is
  held off (RFD low) until then, because the frequency detector can only
  train on fill frames.

## Files

| file | what it is |
|------|------------|
| `rtl/cimt_pkg.sv` | code constants, frame-type enums, C-field / fill / control helper functions |
| `rtl/tx_majority.sv`, `tx_disparity_counter.sv`, `tx_frame_encoder.sv`, `tx_serializer.sv` | transmitter logic |
| `rtl/cimt_tx.sv` | transmitter chip logic (encoder + serializer) |
| `rtl/tx_clock_gen.sv` | behavioural transmitter clock multiplier |
| `rtl/rx_input_select.sv`, `rx_phase_detector.sv`, `rx_frequency_detector.sv`, `rx_demux.sv`, `rx_cfield_decoder.sv`, `rx_dfield_decoder.sv`, `rx_lock_detector.sv`, `rx_smc.sv` | receiver logic |
| `rtl/cimt_rx.sv` | receiver chip logic |
| `rtl/rx_loop_vco.sv` | behavioural loop filter and VCO |
| `rtl/glink_node.sv` | top: one node (TX + RX + both models), the controller wired to the transmitter |
| `tb/cimt_ref_pkg.sv` | testbench reference encoder, written independently of `cimt_pkg` |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_glink_link.sv` | end-to-end test of a two-node link |
| `tb/tb_glink_rates.sv` | the link at 1500, 960 and 700 MBd, with hunting-jitter measurement |

`cimt_tx` and `cimt_rx` are synthesizable. `glink_node` includes the two
behavioural models, so it is a simulation top. To put it in silicon, swap
the two models for a real PLL and VCO.

The receiver's loop-filter drive signals are the module's ports:
`pd_valid`/`pd_late` (one phase decision per frame) and `fd_up`/`fd_dn`
(levels while the frequency detector has the loop).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. Each
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cimt_pkg.sv tb/cimt_ref_pkg.sv tb/tb_glink_link.sv \
    --top-module tb_glink_link -Mdir obj_link -o sim
./obj_link/sim +verilator+rand+reset+2
```

Replace `tb_glink_link` with any other `tb_*` module to run its unit test.
The other files are found through `-Irtl -Itb`. All files use
`` `timescale 1ps/1fs``.

**The end-to-end test.** `tb_glink_link` runs the top at its default
parameters. It builds a link from node A (exactly 1.5 GBd) and node B
(0.67% slower) in three phases:

1. 16-bit mode:
   * start-up from reset;
   * 2000 random data and control words each way, checked in order;
   * a cut of the A→B line, which must cause frame errors, a handshake
     restart on both ends and a return to data.
2. 20-bit mode:
   * FLAG toggled and checked;
   * node A strobed at half rate;
   * node B receiving through the equalized-input path.
3. Node A alone in loopback.

It counts about twenty mechanisms and fails if any of them never happens:

* each SMC state;
* FF0/FF1H/FF1L;
* true and inverted data and control;
* frequency-detector cycles;
* frame errors;
* restart;
* half rate;
* loopback;
* the equalized path;
* toggled FLAG.

It also checks the running disparity and the recovered frequency. It runs
in under a second.

**The range test.** `tb_glink_rates` runs the same two-node link at
default parameters at three rates:

* 1500 MBd with 16-bit words;
* 960 MBd with 20-bit words (40 M frames/s, i.e. 800 Mb/s of payload);
* 700 MBd, the low end of the range.

Each run must:

* bring the link up;
* deliver a 20 µs counting sequence without a gap;
* recover the sender's rate within 0.01%.

It also prints the recovered clock's rms phase jitter against the sender's
bit clock, which must be below 18 ps at 1.5 GBd.

**The unit tests.** These drive each module with random stimulus and compare
the outputs with the reference package or with a hand-written model:

* `tb_cimt_tx` decodes the serial output frame by frame in three
  configurations.
* `tb_cimt_rx` plays the far-end transmitter on an ideal clock, walks the
  controller through the handshake, checks the decoded words and a
  frame-error restart.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `LOCK_FRAMES` | 32 | `cimt_rx`, `glink_node`, `rx_lock_detector` | good frames in a row for lock |
| `F_INIT_MHZ` | 1500 | `glink_node`, `rx_loop_vco` | VCO frequency at power-up |
| `F_MIN_MHZ`, `F_MAX_MHZ` | 700, 1800 | `rx_loop_vco` | main tuning range |
| `BB_STEP` | 0.001 | `rx_loop_vco` | bang-bang frequency step (±0.1%) |
| `KI` | 2e-4 | `rx_loop_vco` | integral step per phase decision |
| `KF` | 2e-5 | `rx_loop_vco` | integral step per bit while the frequency detector drives |
| `N` | 24 | `tx_majority` | widest frame |

The link is specified for 700–1500 MHz bit clocks. The model covers that
range, and the link has been simulated at 1500, 960 and 700 MBd. The
frequency detector's pull rate is set by `KF`: at 2e-5 per bit, going from
1500 to 700 MHz takes about 40 000 bit periods.

## What is this design's own choice

The code rules are from the original chip set: complementary centre pair,
FLAG in the transition's direction, a single rising edge in fill frames,
FF0 balanced, FF1H/FF1L two bits heavy/light and sent in turn, whole-frame
inversion by majority versus running disparity. So are the block structure
of both chips and the handshake's roles (FDET/PHASE, FF0/FF1, RFD).

The following are choices made here, and the places to look first if this
design has to interoperate with the original:

* **C-field and D-field bit values.** The exact C-field values, the control
  marker bits and the fill patterns are this design's.
* **Controller arcs.** The exact state table of the start-up controller is
  this design's reading of the handshake.
* **Lock criterion.** 32 good frames for lock, and loss of lock on a single
  bad frame.
* **One-bit phase resolution for gating.** The frequency-detector gating
  measures the phase error at one-bit resolution. The original gates at a
  phase error of ±22.5°, which the logic here cannot resolve.
* **Digital majority gate.** It is a population count over the true frame,
  C-field included. A balanced frame counts as not heavy.
* **Frame-type priority.** Control goes before data when both are offered.
* **Where inversion happens.** The complement is formed in the encoder,
  before the serializer, rather than in the output multiplexer. The line
  output is the same.
* **Frame-at-a-time disparity.** The disparity counter adds a whole frame
  at a time instead of counting bit by bit. The value is the same at every
  frame boundary, where it is used.
* **Edge-triggered samplers.** The two input samplers are edge-triggered
  flops, not latches.
* **Behavioural models.** The transmitter PLL model is ideal: no loop
  dynamics and no jitter. The VCO model has no noise, so it does not
  reproduce the measured jitter of the real loop, only the bang-bang
  dithering.
* **Not modelled.** Neither the cable equalizer nor the external
  laser-eye-safety timer for fiber links is modelled. The equalizer's
  output enters as a port (`ein`), and the controller state is a port
  (`smc_state`).
