# Self-corrected green coding with self-calibrated voltage scaling: one NoC link

On-chip network links burn much of their energy in long wires. Lowering the
signal swing on those wires saves energy roughly with the square of the
swing, but a lower swing makes the wires slower and more exposed to
crosstalk and noise. This design lets a link run at the lowest swing that
still delivers correct data. It does that in three layers:

1. **Coding that makes errors rare and correctable.** A green bus code
   removes the worst crosstalk patterns, and every coded bit is sent on
   three wires and recovered by a majority vote.
2. **A timing check on every wire at every cycle.** A second sample taken a
   little after the clock edge catches bits that arrive late and replaces
   them with the late, correct value.
3. **A controller that picks the swing.** At start-up it tests the link with
   worst-case crosstalk patterns, from the lowest swing up, and settles on
   the lowest one that passes. At run time it adjusts the swing from the
   rate of late bits seen by the timing check.

The swing has three levels: LV 0.7 V, MV 0.85 V and HV 1.0 V. The RTL covers
all the digital parts of one link, from the 32-bit packet interface of the
sending switch to the 32-bit packet interface of the receiving switch. The
analog parts are outside the RTL: the low-swing supply, the drivers, the
wires and the level converters. They connect through ports.

The scheme is the one of W.-L. Fang, "Low Power and Reliable Interconnection
with Self-Corrected Green Coding Scheme and Self-Calibrated Voltage Scaling
Technique for Network-on-Chip" (NCTU master's thesis, 2008). This RTL is an
independent implementation of it. Where the scheme leaves details open,
the choices made here are listed below.

## The data path

```
 sending switch                                                   receiving switch
 32-bit packet                                                     32-bit packet
     |                                                                   ^
 serializer 4:1 --8--> green encoder --10--+                        deserializer 1:4
                                           |                             ^ 8
 MAF test pattern generator ------10----> mux                      green decoder
                                           |                             ^ 10
                                triplication encoder               DFF4 (router phit)
                                           | 30                          ^ 10
                                         DFF1                       majority decoder
                                           | 30                          ^ 30
                        ---- low-swing drivers, wires, level converters ----
                                                                         |
                              adaptive delay line --clk_dly--> run-time error detector
                                                               (DFF2 / DFF3 / mux)
```

| Stage | Width | Module |
|---|---|---|
| packet | 32 | `serializer` / `deserializer` |
| phit before coding | 8 | |
| green-coded phit (what the switch stores) | 10 | `green_encoder` / `green_decoder` |
| wires | 30 | `triplication_encoder` / `majority_decoder` |

The phit inside the switch is only 10 bits wide because the packet is
serialized before it is coded. Triplication is undone right at the receiver,
so the switch's buffers never see the 30-bit form.

Timing from the point where the serializer presents a phit:
- DFF1 launches it onto the wires at the next edge.
- DFF2 samples the wires one edge later.
- DFF4 holds the corrected, majority-decoded 10-bit phit one edge after that.

So a phit appears at `router_phit` three clock edges after it left the
serializer. The deserializer flags a whole packet one cycle after its fourth
phit. A continuous stream moves one phit per cycle, so one packet takes four
cycles.

### Green code (4 bits to 5 bits)

The worst crosstalk on a bus happens when two neighbouring wires switch in
opposite directions. It is most likely when a word holds alternating 0/1
patterns. The green code splits the 8-bit phit into two 4-bit groups. For
five of the sixteen values of a group (`0101`, `1001`, `1010`, `1011`, `1101`)
it sets a fifth bit `c4` and inverts bits 0 and 2:

```
c4 = x2·x1'·x0 + x3·x2'·x0 + x3·x2'·x1
c0 = x0 ^ c4    c1 = x1    c2 = x2 ^ c4    c3 = x3
```

Decoding is two XORs per group, `x0 = c0 ^ c4` and `x2 = c2 ^ c4`. That is
cheap enough to sit in the switch's pipeline, which is why the code stays in
coded form inside the switch. The functions live in `scgc_pkg`.
`green_encoder` also exports a per-group `converted` flag.

### Triplication and majority

Each of the 10 coded bits drives three adjacent wires (bit `i` on wires
`3i..3i+2`). The receiver takes the 2-of-3 majority, `ab + bc + ca`, so any
single wire error per bit is corrected with no retransmission and no extra
latency. `majority_decoder` also reports, per bit, whether the three copies
disagreed (`maj_corrected`).

## Catching late bits: the double-sampling stage

This is the least obvious part of the design. It is also where the swing and
the timing meet.

A lower swing makes the wires slower. Crosstalk and process variation add
hundreds of picoseconds of spread on top. `runtime_error_detector` watches
every wire, every cycle, with three flops:

- **DFF2** samples the wire on the link clock `clk`: the normal sample.
- **DFF3** is clocked by `clk_dly`, the same clock delayed by `delta t`. It
  stores `wire XOR DFF2`. If the wire still changed after the main edge, the
  two differ and DFF3 raises the wire's error flag.
- **A late-sample flop**, also on `clk_dly`, stores the wire value itself. A
  multiplexer passes that late sample instead of DFF2's whenever the flag is
  set. A bit that arrived up to `delta t` late is thus corrected in place.

The corrected word goes through the majority decoder into DFF4 on the next
`clk` edge. The flags are registered alongside it and are counted by the
voltage controller.

The window `delta t` must be long enough to cover real late arrivals. It must
also be short enough that the late sample plus the mux and the decoder still
meet DFF4's setup. With `t_d` the wire delay (driver, wire and converter):

```
t_DFF1 + t_d + t_XOR + t_setup3 < t_clk + delta t
t_DFF2 + t_XOR + t_setup3 < delta t < t_DFF2 + t_d + t_XOR + t_setup3
delta t + t_DFF3 + t_MUX + t_decoder + t_setup4 < t_clk
```

The wire delay depends on the swing, so `delta t` does too.
`adaptive_delay_line` selects it from the current level:

| level | swing | delta t |
|---|---|---|
| LV | 0.7 V | 650 ps |
| MV | 0.85 V | 500 ps |
| HV | 1.0 V | 200 ps |

These values assume a 1 GHz link clock. In silicon this would be a digitally
controlled delay line. Here it is a **behavioural model** with delays and is
not synthesizable. A real implementation needs a delay line cell that meets
the constraints above.

The majority vote and the double sampling complement each other. A single
slow wire is fixed by either one. When all three copies of a bit are late,
only the late sample saves the word. The end-to-end testbench makes every
wire slow for a whole window and still checks every packet.

## Finding the lowest swing: the voltage scaling controller

`voltage_scaling_ctrl` drives the one-hot swing select `swing_s` (`S0` = HV,
`S1` = MV, `S2` = LV). It also drives the 2-bit `swing_level` that steers the
delay line. It works in two phases.

### Test phase (on `cal_start`)

1. The swing is set to LV.
2. The transmitter switches from packets to test vectors. The serializer
   stalls: `pkt_in_ready` stays low, and no packet is lost.
3. `maf_tpg` sends a full maximal-aggressor-fault pass. Each of the 10 coded
   lines takes its turn as the victim, while all the others act as
   aggressors that switch together. Eight vectors per victim cover
   positive/negative glitches, rising/falling speed-up and rising/falling
   delay. A pass takes 8 × 10 = 80 cycles.

   | state | S1 | S2 | S3 | S4 | S5 | S6 | S7 | S8 |
   |---|---|---|---|---|---|---|---|---|
   | aggressors | 0 | 1 | 0 | 1 | 0 | 1 | 1 | 0 |
   | victim | 0 | 1 | 0 | 0 | 1 | 0 | 1 | 1 |

4. `test_error_detector` compares each vector, after majority correction,
   with the one that was sent three cycles earlier.
5. If any vector was wrong even after correction, the pass is repeated one
   level higher.
6. The first clean pass, or a pass at HV, ends the test. `t_finish` goes
   high, and the level reached becomes the **floor** for run time.

### Run-time phase

Every `WINDOW` cycles (default 256), `v_scale` pulses and the window's error
rate is evaluated. The rate is the number of flagged wire-bits divided by
30 × the number of valid phits.

| window error rate | action |
|---|---|
| below 5 % | drop one level, but not below the floor |
| 5 % to 15 % inclusive | hold |
| above 15 % | raise one level, up to HV |
| no valid data in the window | hold |

The rate comes only from the double-sampling flags, so these are bits that
were late but were corrected. A rising rate is an early warning before real
errors appear. Before the first calibration the link runs at HV.

## What is outside the RTL

The low-swing supply, the low-swing drivers, the link wires and the level
converters are analog. The top brings their connections out as ports:

- `wire_tx[29:0]`: DFF1 outputs, to the drivers.
- `wire_rx[29:0]`: wire values after the level converters.
- `swing_s[2:0]` / `swing_level`: supply select.

A 1-bit valid sideband, `wire_tx_valid` → `wire_rx_valid`, travels with the
wires. It lets the receiver and the error-rate window ignore idle cycles. The
sideband is this design's addition.

`tb/link_model.sv` is a behavioural stand-in for the analog path, used only
in simulation. Each wire gets a delay that depends on the swing level at
launch:

| level | nominal | "slow" | "broken" |
|---|---|---|---|
| LV | 700 ps | 1600 ps | 1800 ps |
| MV | 550 ps | 1450 ps | — |
| HV | 300 ps | 1150 ps | — |

- **Nominal:** no flag.
- **Slow:** past the next edge but inside `delta t`, so it is flagged and
  corrected.
- **Broken:** beyond `delta t` (LV only), so it is a real error.

A single wire can also be inverted at the receiver.

## Choices made in this implementation

The scheme fixes:
- the block structure;
- the three levels;
- the `delta t` values;
- the MAF state sequence;
- the green code;
- the 5 % / 15 % thresholds.

The following are this design's own choices:

- `WINDOW` = 256 cycles. The scheme only speaks of an N-cycle window.
- `S0..S2` are one-hot with S0 = HV, S1 = MV, S2 = LV.
- The test vectors replace the green-coded phit at the input of the
  triplication encoder, so they test the 10 coded lines.
- The test error detector compares at DFF4, three cycles after the vector
  was sent.
- A pass that fails at HV ends the test at HV. The link has no higher level
  to try.
- An empty window holds the level. A window at exactly 15 % holds.
- The serializer sends the least significant byte first. The deserializer
  rebuilds the word in the same order.
- The correction multiplexer takes its late value from an extra flop on the
  delayed clock. The scheme shows only a multiplexer steered by the flag.
- The serializer stalls during the test phase, and a valid sideband goes with
  the wires.
- In S0 the test pattern generator drives all lines to 0.
- All flops use an asynchronous active-low reset. The swing resets to HV, and
  the floor resets to LV until a test sets it.

Neither the scheme nor this design defines what happens to data in flight
when the swing changes. The end-to-end testbench offers packets only away
from window boundaries, so the level never changes under live data. A real
link would need a drain or a guard band there.

## Files

| file | contents |
|---|---|
| `rtl/scgc_pkg.sv` | sizes, `level_e` (LV/MV/HV), green encode/decode functions |
| `rtl/serializer.sv`, `rtl/deserializer.sv` | 32 ↔ 4 × 8 conversion |
| `rtl/green_encoder.sv`, `rtl/green_decoder.sv` | 8 ↔ 10 green code |
| `rtl/triplication_encoder.sv`, `rtl/majority_decoder.sv` | 10 ↔ 30 triplication, majority with correction flags |
| `rtl/runtime_error_detector.sv` | double sampling with in-place correction, per wire |
| `rtl/adaptive_delay_line.sv` | behavioural level-dependent clock delay (not synthesizable) |
| `rtl/maf_tpg.sv` | MAF test pattern generator (S0..S8, victim counter, select decoder, muxes) |
| `rtl/test_error_detector.sv` | expected-vector delay line and error counter |
| `rtl/voltage_scaling_ctrl.sv` | test phase and run-time swing control |
| `rtl/scgc_link_top.sv` | the link, all of the above wired together |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/link_model.sv` | behavioural wires for the end-to-end test |

Each file opens with a comment on its function, interface and timing, and on
what follows the published scheme versus what was chosen here.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Each
one has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/scgc_pkg.sv tb/tb_scgc_link_top.sv --top-module tb_scgc_link_top \
    -Mdir obj_top -o sim
./obj_top/sim
```

Replace the testbench name to run any other. All files use
`` `timescale 1ps/1ps ``, and the clock period in the testbenches is
1000 ps.

`tb_scgc_link_top` runs the whole link at its default parameters. It takes a
fraction of a second and goes through these steps:

1. **Traffic at HV before calibration**, with 10 % of wires randomly slow:
   double-sampling corrections occur, and green conversions are counted.
2. **Calibration**, with two copies of code bit 0 broken at LV. The LV pass
   fails and the retry at MV passes. Packets offered during the test are
   stalled.
3. **Window A**, every wire slow: the rate is about 47 % and the level rises
   from MV to HV.
4. **Window B**, a quarter of the wires slow: the rate is about 12 % and the
   level holds.
5. **Window C**, clean, with wire 4 inverted: the majority corrects it every
   cycle, and the level drops from HV to MV.
6. **Window D**, clean: the level stays at the MV floor.
7. **Recalibration from run time**, with two copies of code bit 0 broken at
   every level. LV, MV and HV all fail, and the test ends at HV, which
   becomes the new floor.
8. **Window E**, clean: the level stays at HV.

Every packet is compared with what was sent. Each mechanism is counted, and
a mechanism that never happens fails the test: packets, green conversions,
double-sampling corrections, majority corrections, stalls, test failure and
retry, `t_finish`, raise, hold, drop, stop at the floor, recalibration,
and a test that ends at HV.

Unit testbenches check against independent references:
- The green code is checked exhaustively against the published code table.
- The MAF sequence is checked against the state table, including the
  8N-cycle length.
- The double-sampling stage is checked with normal, late, glitching,
  too-late and held inputs. A too-late input must be missed.
- The delay line's measured delays are checked at each level.
- The controller is checked with windows of known error rate, including
  exactly 5 % and exactly 15 %.

## How far to trust it

- All digital blocks are simulated. Apart from the delay-line model, they
  are synthesizable.
- The analog behaviour (swing versus delay) is only as good as the simple
  delay table in `link_model`. The thresholds, `delta t` values and window
  length have not been tuned against real wire data.
- `delta t` must stay below one clock period for the delay-line model to keep
  its edges in order. That holds for the given values at 1 GHz.
