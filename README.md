# Time-domain binary-weight CNN engine with bidirectional memory delay lines

This engine computes the convolution layers of a small CNN (LeNet-5 class) without
multi-bit adders in the datapath. Each 8-bit pixel becomes a pulse whose width
is the pixel value. The pulse is gated by a one-bit weight. The gated pulses are
added up as the *phase* of a ring of delay cells. The ring turns clockwise for a
+1 weight and anticlockwise for a -1 weight. It stops and keeps its phase
between pulses. A small up/down counter counts whole turns of the ring, and
that count is the result.

The RTL follows the engine described in *All-Digital Time-Domain CNN engine using
Bi-directional Memory Delay Lines for Energy Efficient Edge Computing*
(Sayal, Fathima, Nibhanupudi, Kulkarni, UT Austin; 40 nm test chip). That source
gives the block structure, the switch equations of the delay cell, the speed
modes and the sizes. It leaves open the exact pulse shapes, the host handshake,
the pooling function and the calibration circuit; this RTL fills those in, and
the section *Where this RTL departs from or adds to the source* lists each choice.
The silicon is a mixed analog-timing circuit. This is a **clocked digital model**
of it: one delay-cell step equals one clock cycle. It is synthesizable and
behaves exactly as the arithmetic below says, but it does not reproduce delay
mismatch, metastability or voltage scaling.

## The arithmetic in one line

For one MAC block, after a convolution of `n_chan` channels of 25 taps:

```
V     = sum over taps of  (X >> s) * w          w in {+1, -1, 0}
count = floor((V + 2L - len) / 2L)              wrapped to 12 bits, signed
```

* `X` is the 8-bit pixel.
* `s` is 0, 2, 3 or 4 for the 1x, 4x, 8x or 16x speed mode.
* `len` is the number of active delay units (1..16).
* `L = len + c`, where `c` is the number of calibration stages switched into the ring (0..7).
* `2L` is the number of clock steps in one full turn of the ring.

So `count` is the signed dot product divided by `2L`. This is the "average" in the
multiply-accumulate-average (MAV) operation. The ring length sets the divisor.
The rest of the dot product (`V mod 2L`) stays in the ring as a residue and is
not part of the result. It can be read on `mac_block.state`.

Each filter has four MAC blocks, one for each pixel of a 2x2 pooling window.
Its pooled output is `floor((count0 + count1 + count2 + count3) / 4)`.

## Time base and speed modes

Everything runs on one clock, `clk`. One `clk` cycle is one **time quantum**:
the smallest step in pulse width. A quantum is half an input-clock period, so
`clk` runs at twice the input clock. In the source's operating point the input
clock is 24 MHz, so `clk` is 48 MHz. Pulses there are made on both edges of the
input clock; here they are made on one edge of a clock at twice the rate.

One MAC clock period is always 256 t0, where t0 is the time of one pixel LSB.
The speed modes trade pixel resolution for throughput:

| mode (`speed_mode_e`) | quantum | MAC period (clk) | input clocks / MAC | pixel bits used | MAC clock @24 MHz input |
|---|---|---|---|---|---|
| `SPEED_1X`  | 1 t0  | 256 | 128 | 8 (X)      | 0.1875 MHz |
| `SPEED_4X`  | 4 t0  | 64  | 32  | 6 (X >> 2) | 0.75 MHz |
| `SPEED_8X`  | 8 t0  | 32  | 16  | 5 (X >> 3) | 1.5 MHz |
| `SPEED_16X` | 16 t0 | 16  | 8   | 4 (X >> 4) | 3 MHz |

The pixel is truncated, so the error is 0 to -(quantum-1) t0. The source gives
the error as ±2, ±4 and ±8, which is half a quantum on either side.

## Pulse generation: pulse_generator and dtc

`pulse_generator` is free-running. It makes 16 reference waveforms T0..T15 and
a window signal `msb_en`. Their period is one MAC period. That period is split
into two windows:

* For the first 240 t0, `msb_en` = 1 and Tk is high for the first k·16 t0.
* For the last 16 t0, `msb_en` = 0 and Tk is high for the first k t0.

Both widths are rounded down to whole quanta.

`dtc`, the digital-to-time converter, is two levels of multiplexers. Four 2:1
muxes, steered by `msb_en`, pass the upper nibble X[7:4] in the first window
and the lower nibble X[3:0] in the second. The selected nibble picks one of
T0..T15 through a 16:1 mux. Summed over the period, the output is high for
`X[7:4]·16 + X[3:0] = X` t0, truncated to whole quanta. In 16x mode the second
window is one quantum long and every Tk there is 0 quanta wide, so only the
upper nibble counts.

The pulse generator also gives `mac_tick` in the last quantum of each period.
The engine changes pixels, weights and controller state only on that tick. A
mode change waits for the end of the running period.

## The bidirectional memory delay line (mdl, mdl_unit, calibration_unit)

The memory delay line (MDL) is the core of the design.

**The cell.** Each `mdl_unit` stands for two inverters and four switches. Their
control comes from the weight's enable `EN` and sign `SIGN`:

```
S1 = EN·SIGN    S2 = EN    S3 = EN' + EN·SIGN'    S4 = EN·SIGN'
```

The RTL computes these four terms and reads three modes from them:

* `EN=1, SIGN=1`: the cell is a delay stage from its clockwise neighbour.
* `EN=1, SIGN=0`: the cell is a delay stage from its anticlockwise neighbour.
* `EN=0`: the cell latches its value. This is the memory phase. There are no
  tri-state nodes, so the phase reached is kept for as long as needed.

`rst` clears the cell.

**The ring.** `len` cells, then the `calibration_unit`, then one inverting
return stage form a closed loop. Node A is the input of the first cell. Node E
is the output of the last active cell. The loop has one inversion, so the
model is a twisted-ring (Johnson) register of L stages with 2L states. From
reset (all zeros), clockwise steps fill the cells with ones from cell 0 up to
cell L-1. Further steps fill them with zeros in the same order. Anticlockwise
steps undo this exactly. The phase of the ring is therefore the signed count of
EN-high cycles, modulo 2L.

**Counting turns.** The `updown_counter` gets two pulses from the MDL:

* `up` when a clockwise step makes E rise;
* `dn` when an anticlockwise step makes E fall.

Both mark the same ring boundary, crossed in opposite directions. So the count
goes back exactly when the phase goes back, and the count formula above holds
for any mix of signs. The counter is 12 bits, two's complement, and wraps on
overflow.

**Length and calibration.** `len` (1..16, 0 means 16) sets how many cells are
in the ring, and so the averaging divisor. On silicon, the calibration unit
trims delay mismatch between the four MDLs of a filter. Its setting is
`cal_enable` plus a 3-bit `cal_bit[0:2]`. In this model it puts
`cal_enable ? cal_bit : 0` extra bidirectional stages after node E, which
lengthens the loop period by whole stages. `cal_bit[0]` is the most significant
bit. Change `len` and the calibration setting only while the MDL is reset.

## MAC block, filter and pooling

* **`mac_block`:** an AND gate (`EN = pulse & w.en`), one MDL and one counter.
  The weight type `weight_t` is `{en, sign}`:
  * +1 is `{1,1}`;
  * -1 is `{1,0}`;
  * 0 is `{0,x}`.

  Both the ±1 ("signed") and the 0/+1 ("unsigned") weight sets work.
* **`filter_unit`:** four MAC blocks that share the filter's weight and `len`.
  Each block has its own calibration setting, and each sees a different pixel
  of the 2x2 window. A `pooling_unit` averages the four counts (sum, then
  arithmetic shift right by 2).
* **`tdcnn_engine`:** one pulse generator, four DTCs (one per window pixel),
  16 filters, a `conv_controller`, input registers and result registers.

## One convolution: conv_controller and the host interface

The controller works in whole MAC periods (slots):

```
RST | ch0: TAP0 .. TAP24, GAP | ch1: TAP0 .. TAP24, GAP | ... | READ
```

That is `2 + 26·n_chan` MAC periods:

* 28 for a one-channel layer such as LeNet-5 C1;
* 158 for six channels such as C3.

At the source's clock rates this gives its reported convolution times:
149.3 µs and 842.7 µs at 1x, and 9.33 µs and 52.7 µs at 16x. Per convolution,
16 filters × 4 blocks produce 16 pooled outputs.

Host protocol, on `tdcnn_engine`:

1. Hold `mode`, `mdl_len`, `cal_bit` and `cal_enable` steady. Pulse `start`
   while `busy` is low, with `n_chan` (1..15; 0 is read as 1).
2. While `req_valid` is high, drive `pixel_in[0..3]` and `weight_in[0..15]` for
   tap `req_tap` (0..24, row-major over the 5x5 kernel) of channel `req_chan`.
   The request comes one MAC period ahead. The engine latches the data at the
   period boundary and holds it for the tap's period.
   * `pixel_in[b]` is the pixel under kernel tap `req_tap` for convolution
     output `(2py + b/2, 2px + b%2)`.
3. `out_valid` pulses for one cycle. After it, `out_pooled[f]` and
   `out_count[f][b]` hold the results until the next convolution ends.

The MDLs are cleared in the RST slot, so nothing carries over between
convolutions.

## Sizes

| parameter | default | meaning |
|---|---|---|
| `N_FILT` | 16 | filters |
| `N_MAC` | 4 | MAC blocks per filter (2x2 pooling window) |
| `N_UNITS` | 16 | delay units per MDL |
| `CAL_STAGES` | 7 | calibration stages per MDL (3-bit setting) |
| `CNT_W` | 12 | counter and output width |
| `KTAPS` | 25 | taps per channel (5x5 kernel) |
| `CH_W` | 4 | width of `n_chan` |

Everything except `CAL_STAGES` and `CH_W` is a size given by the source. At
these defaults the engine has about 3,200 flip-flops.

Fit of the LeNet-5 layers at the defaults:

* **C1** (6 filters of 5x5x1): worst case |V| = 25·255, giving a count of at most
  199 with a 32-step ring.
* **C3** (16 filters of 5x5x6): worst case |V| = 150·255, giving a count of at most
  1195 with a 32-step ring.

Both fit in the 12-bit counter. Shorter rings divide by less and can wrap on C3
at full scale. The end-to-end test exercises that case on purpose.

## Where this RTL departs from or adds to the source

* **Clocked delay model.** One cell delay is one clock cycle. On silicon the
  cell delay is an analog quantity that varies with voltage and mismatch.
* **Turn counting at E only.** The source's diagram puts node E on the counter's
  Up input and node A on its Down input, with a positive-edge counter. Here both
  directions are detected at E (up on a rising E going clockwise, down on a
  falling E going anticlockwise), so up and down counts cancel exactly. With no
  calibration stages, the down moment is exactly when A (the inverse of E) rises.
* **Pulse shapes.** The two-window T0..T15 waveforms are inferred from the 16:1
  nibble selection and the 256 t0 MAC period. The source does not draw them.
* **Calibration** is modelled as 0..7 whole extra stages. The source gives only
  its control signals.
* **Pooling** is a digital average of the four counts. The source states on-chip
  pooling but not its kind or circuit.
* **The slot sequence** (RST, taps, one gap per channel, READ) is chosen to
  reproduce the source's convolution times. The source does not show the
  sequence itself.
* **Host handshake, input/result registers and counter wrap-around** are this
  design's choices.
* **Not built:**
  * the fully connected layers, which run in software in 16-bit floating point;
  * multi-bit weights, which the source mentions as an extension and used only
    in an AlexNet simulation;
  * metastability behaviour of the delay line.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line. The shared reference arithmetic is in
`tb/tdcnn_ref_pkg.sv`.

| testbench | what it checks |
|---|---|
| `tb_pulse_generator` | period length, `mac_tick`, `msb_en` width and the width of every Tk in all four modes; a mode change waits for the end of the period |
| `tb_dtc` | mux selection on random inputs; pulse width = X >> s per MAC period in every mode (including pixel 214) |
| `tb_mdl_unit` | the S1..S4 behaviour: clockwise, anticlockwise, hold, reset |
| `tb_calibration_unit` | delay of n = 0..7 stages in both directions, and hold |
| `tb_mdl` | every cycle, over 60 random lengths and calibration settings: the state vector against the ring pattern, and the net turns against the formula |
| `tb_updown_counter` | counting and wrap in both directions |
| `tb_mac_block` | 25- and 9-tap dot products, signed and unsigned weights, final count and residue |
| `tb_pooling_unit` | average with floor rounding, including the extreme values |
| `tb_filter_unit` | four blocks with separate calibration, and the pooled output |
| `tb_conv_controller` | slot counts for 1..7 channels (28 and 158 MAC periods for one and six channels), tap order, reset and load timing |
| `tb_tdcnn_engine` | the full default-size engine in all four modes, one and six channels, both weight sets, calibration, and counter wrap; checks every output and the latency, and fails if any of these never happened |
| `tb_lenet_layers` | complete LeNet-5 C1 (32x32 image, 196 convolutions, 1x mode) and C3 (14x14x6, 25 convolutions, 16x mode) on random data; checks every count and pooled value against a convolution of the image |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/tdcnn_pkg.sv tb/tdcnn_ref_pkg.sv tb/tb_tdcnn_engine.sv \
    --top-module tb_tdcnn_engine -Mdir obj_tb
./obj_tb/Vtb_tdcnn_engine
```

Replace the testbench name to run another one. The default-size engine test
takes about 60k clock cycles. The LeNet-5 layer test takes about 1.5M cycles
(a few tens of seconds including the build). Variables that a testbench does
not set start at random values, so the design resets everything it reads.
