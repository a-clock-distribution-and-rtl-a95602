# Picosecond clock synchronization over a single optical fibre

Large physics experiments need the main clocks of many distributed boards to line up to
about 10 ps. A transceiver link can carry the clock, but the fibre and the transceivers add
a delay of microseconds, and after every restart part of that delay is unknown. This RTL
measures the delay and removes it, using four ideas:

* **A symmetric link.** Both directions use the same wavelength on one fibre: an optical
  circulator at each end separates the outgoing light from the incoming light. So the
  delay from master to slave equals the delay back, and the one-way delay is half the
  round trip.
* **Round-trip measurement.** The slave recovers the master's clock, cleans it and uses it
  as its own main clock. It sends that clock back. On the master, a TDC (time-to-digital
  converter) measures the phase of the returned clock against the master's main clock.
  That phase is the round trip modulo one clock period.
* **Coarse counters.** Every board counts main-clock periods. An exchange of SYNC packets
  measures the round trip in whole periods and the offset between the two counters. That
  supplies the whole periods the TDC cannot see. Its parity decides which half-period
  the one-way phase falls in.
* **Phase correction in the transmitter.** The phase interpolator (PI) in the master
  transceiver's transmitter shifts the transmitted clock in 1.25 ps steps. This moves
  the slave's main clock until it lines up with the master's.

Clock frequencies: 156.25 MHz main clock (6.4 ns period), 3.125 Gb/s line rate, 20-bit
parallel words.

## Clock path

```
 master board                                                 slave board
 main clock --+--> [Tx PI] --tx clock--> serialiser ==fibre==> CDR --> recovered clock
   |          |                                                            |
   |       [TDC: main vs tx] --> phase lock                  jitter cleaner (outside FPGA)
   |                                                                       |
 [TDC: main vs recovered] = Tm                                slave main clock
   ^                                                              |
 recovered clock <-- CDR <==fibre== serialiser <--tx clock-- [Tx PI] <--+
                                                 [TDC: recovered vs main] = Ts
```

Let p_m and p_s be the two PI phases and D the one-way link delay (transceivers plus
fibre). Let Ts be the delay the slave's jitter-cleaner path adds. Then:

* the slave main clock lags the master main clock by p_m + D + Ts;
* the master TDC reads Tm = (p_m + 2D + Ts + p_s) mod T;
* the slave TDC reads Ts.

The aim is p_m + D + Ts ≡ 0 (mod T).

## Keeping the transmitter phase fixed: the phase lock module

After initialisation, the phase between the main clock and the PI output is random. Moving
the PI of one transceiver channel can also disturb the other channels. Each board therefore
has a second TDC module, which measures the transmitted clock against the main clock. The
phase lock module (`phase_lock`) compares each averaged reading with its setpoint, preset
plus adj:

* The preset is 1.6 ns, this design's choice.
* adj is the correction from phase synchronization; it is 0 on the slave.

The module turns the error into a rounded number of PI steps and issues them one every
4 cycles. It then skips one reading that was partly taken before the move, and compares
again. It never stops, so it also catches later disturbances. As a result, p_m and p_s
are known: preset + adj on the master and the preset on the slave.

## Measuring phase: TDC and averaging

A TDC channel is a clock counter plus a tapped delay line:

* **`tdl_delay_line`** is a behavioural model of an FPGA carry chain and its capture
  registers. It is not synthesizable. It has 660 taps of 10 ps behind a 200 ps input delay.
  At each clock edge it yields the pattern of the hit's recent history.
* **`tdc_channel`** registers that pattern twice. It finds the most recent rising edge
  (the lowest index with a 1 followed by a 0) and pairs that fine value with the coarse
  count.
* **`tdc_module`** has two channels sampled by the same clock. Their fine values differ by
  the phase between the two hit clocks. It outputs that phase in [0, T), once per cycle.
* **`phase_averager`** averages 20 000 readings. Readings near the 0/T boundary would break
  a plain average, so each window is unwrapped around its first sample.

All phases are signed fixed point: picoseconds with 4 fractional bits (1/16 ps). One PI
step is 20 units. A 10 ps bin is coarse, but clock jitter dithers the readings, so the
20 000-sample mean resolves far below one bin.

Channel order: the master TDC reads the recovered clock behind the main clock (Tm). The
slave TDC reads the main clock behind the recovered clock (Ts).

## Coarse alignment: the SYNC exchange

`sync_master` and `sync_slave` talk over the parallel transceiver interface. The framing
here is this design's own:

* Each 20-bit word has a type in bits [19:16] and 16 payload bits.
* A 32-bit value follows its header as two payload words, high half first.
* `link_tx` and `link_rx` build and parse the packets.

| packet    | direction       | payload                         |
|-----------|-----------------|---------------------------------|
| SYNC      | master → slave  | none                            |
| SYNC_RET  | slave → master  | N2, N3                          |
| OFFSET    | master → slave  | offset                          |
| TS_REPORT | slave → master  | averaged slave TDC reading (Ts) |

The exchange records four counts:

* N1: the master's count when the SYNC header leaves.
* N2: the slave's count when that header arrives.
* N3: the slave's count when the returned header leaves.
* N4: the master's count when the returned header arrives.

The master then computes:

```
K      = (N4 - N1) - (N3 - N2)        round trip in periods
offset = N2 - N1 - floor(K/2)         slave count minus master count
```

It sends the offset, and the slave subtracts it from its running counter. K is the
integer part of the round trip plus a constant pipeline latency. The simulations show the
counters agreeing to within one count afterwards.

## Phase synchronization and the reference calibration

This is the part that needs the most care. The transceiver delays O (both transmitters,
both receivers and the PI phases at their default) are unknown. They are removed by a
one-time calibration with a very short fibre (3 m). `phase_sync_ctrl` on the master
board holds the calibration values and runs the procedure.

1. **Raw capture (`cal_raw`).** With the 3 m fibre and the PI at its default phase (adj = 0),
   the controller stores Tm_3m and Ts_3m, plus the parity of that link's K.
2. **Operator trim (`trim_en`, `trim_dir`).** An operator watches both main clocks on an
   oscilloscope. Each trim pulse moves the master PI setpoint by one 1.25 ps step, and the
   operator trims until the skew is zero.
3. **Aligned capture (`cal_aligned`).** The controller stores the master reading in the
   aligned state, Tm'_3m.
4. **Operation (`phase_start`).** With the real fibre in place, run a SYNC exchange first
   (`sync_start`). Then `phase_start` returns adj to 0, waits for fresh Tm_x and Ts_x, and
   computes the target reading:

   ```
   target = Tm'_3m + (Tm_x - Ts_x)/2 - (Tm_3m - Ts_3m)/2      (mod T)
   ```

   O cancels in the difference of the two halves. What remains is the change in fibre
   delay, added to the aligned reading. The controller then sets adj += (target − Tm)
   and repeats until the master TDC reads the target to within 0.625 ps.

**Why K parity matters.** Halving a value known only modulo T leaves a T/2 ambiguity. When
K is odd, the round trip spans an odd number of periods, so the controller adds T to the
master reading before halving. It does this for both master readings, each with the K
parity of its own link. A constant odd pipeline latency in K then cancels. Applying the
parity to the calibration reading as well is this design's choice.

**Restarts.** Reset does not clear the calibration registers. After a restart (a power
cycle or a reset of both boards), a SYNC exchange followed by `phase_start` realigns the
clocks with the stored values. A new 3 m calibration is needed only when the transceiver
delays O themselves change. From power-up until the first calibration the
registers hold arbitrary values.

**Which readings are used.** A reading counts only if all of these hold:

* the phase lock has evaluated at least once since adj last changed;
* the phase lock reports lock;
* no PI step fell inside the reading's averaging window.

## Module map

| module            | role                                                                 |
|-------------------|----------------------------------------------------------------------|
| `clksync_top`     | master board + slave board; external parts' signals are ports        |
| `clock_board`     | one board; `IS_MASTER` selects the role                              |
| `coarse_counter`  | coarse timestamp counter with offset correction                      |
| `sync_master`     | SYNC exchange, K, offset; receives the slave's TDC reports            |
| `sync_slave`      | returns SYNC with N2/N3, applies OFFSET, sends TDC reports            |
| `link_tx`, `link_rx` | packet sender and parser                                          |
| `tdl_delay_line`  | behavioural model of the carry-chain delay line and its capture flops |
| `tdc_channel`     | fine encoder and coarse count                                          |
| `tdc_module`      | two channels and their phase difference                                |
| `phase_averager`  | 20 000-sample circular mean                                            |
| `phase_lock`      | holds the transmitted clock phase with the PI                          |
| `tx_pi_model`     | behavioural model of the transceiver Tx PI (stepping mode)             |
| `phase_sync_ctrl` | calibration registers and automatic phase synchronization              |
| `clksync_pkg`     | constants, word types, phase wrap functions                            |

These parts are not in the RTL:

* the serialiser, clock recovery and receive word alignment of the transceiver;
* the SFP modules, circulators and fibre;
* the oscillator, PLLs and jitter cleaner.

At the top they appear as ports: each board's transmitted clock and words go out, and its
recovered clock and received words come in. The slave's main clock enters from the jitter
cleaner. All command and status signals are synchronous to the master main clock.

## Simulating

Every file sets `timescale 1ps/1fs`. The behavioural models and testbenches need timing
support:

```
verilator --binary --timing --assert --top-module tb_clksync_top \
    -y rtl -y tb +libext+.sv rtl/clksync_pkg.sv tb/tb_clksync_top.sv
./obj_dir/Vtb_clksync_top
```

Each testbench prints `TB_RESULT checks=N failures=M`. Replace the top module with any
`tb_<module>` to test one block.

* **`tb_clksync_top`** runs the whole procedure in about 5 s. It uses 400-sample averages
  and non-zero initial PI phases:
  1. both boards lock;
  2. 3 m calibration, with the testbench acting as the operator and its oscilloscope;
  3. the link is switched to 5 km (24.55 µs one way; K = 7673 is odd) and phase
     synchronization runs;
  4. the two main clocks end up aligned (−0.5 ps seen; the check allows ±4 ps);
  5. a second SYNC exchange rechecks the counters;
  6. both boards are reset, then lock, SYNC and phase synchronization run again with the
     kept calibration (−0.5 ps seen).

  It counts every mechanism: PI steps on both boards, four SYNC exchanges, four offset
  loads, an odd K, slave TDC reports and operator trims. The scope model pairs each slave
  edge with the nearest master edge. Pairing it with the last master edge before it would
  bias the mean by about a quarter of the jitter span.
* **`tb_clksync_full`** runs the same procedure with the top at its default parameters
  (20 000-sample averages). It takes under a minute.
* **`tb_clksync_cascade`** builds the three-level chain: board 1 → board 2 → board 3, with
  two 5 km links. Each level is a `tb_cascade_stage` (one `clksync_top` with its links,
  jitter cleaner and operator). The level-1 slave main clock drives the level-2 master.
  The levels are synchronized top-down. Then the scope compares all three main clocks: about
  0.8 ps per level and 1.7 ps from board 3 to board 1. One level has an odd K and the other
  an even K.
* **`tb_clksync_two_slaves`** has one master oscillator driving two channels at once, each
  with its own PI, phase lock, fibre and slave. After synchronization it samples all the
  skews five times over 20 000 cycles.
* **`tb_link_model`** models one direction of the transceiver-plus-fibre path. Words
  travel with the transmitted clock and are taken into the receiver's main clock domain at
  the first edge after they arrive. This makes the coarse count and the TDC phase roll
  over at the same round-trip delay, as they do in hardware.

## How far to trust it, and where it departs

* Only the digital control is RTL. The delay line and the PI are behavioural models, and
  the 10 ps uniform bins are idealised. Real carry chains need bin-width calibration,
  which is not included.
* The simulated accuracy (below 1 ps) reflects an ideal symmetric link. On hardware,
  temperature differences between boards, TDC non-linearity and asymmetry of the
  electronics dominate. Results of about 15 ps peak-to-peak across restarts have been
  reported for this scheme.
* These choices are this design's own:
  * the word format and packet contents;
  * carrying the slave's TDC reading to the master in a packet;
  * applying the offset inside the slave's counter;
  * the phase lock's control law and its 1.6 ns preset;
  * the convergence tolerance and the rule for usable readings.
* The formula for the offset uses floor(K/2). The target formula halves both the operating
  term and the calibration term.
* The top is one master and one slave. The chain and the multi-channel master exist only
  in the testbenches, built from several tops. A middle board in the chain is therefore
  two `clock_board` instances sharing one main clock, each with its own coarse counter,
  where real hardware has one board. A board with several link ports is not built, and
  nothing models one PI channel disturbing another.
* The coarse counter is 32 bits and wraps every 27.5 s. Differences stay valid, but
  absolute timestamps over longer runs need a wider counter (change `CNT_W` in
  `clksync_pkg`).
