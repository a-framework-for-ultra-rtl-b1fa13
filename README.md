# Ultra low-power ECG atrial-fibrillation classifier

This is the RTL of a small always-on chip that classifies an ECG as normal or
atrial fibrillation (AFib). A compact ternary neural network does the work. The
design saves energy by splitting the chip into two power domains:

* The **Data Control Core** is always powered and does very little. It
  quantizes and filters the incoming 512 Hz samples, collects one 12.65 s window
  (6479 samples) in an SRAM double buffer, and sequences everything else.
* The **Processing Core** holds the network and its parameters. It is
  switched on only once per window, for about 1 700 clock cycles. That is
  roughly 0.2 % of the time at a 70 kHz processing clock. Its parameters live in
  non-volatile ternary RRAM cells, so nothing has to be reloaded from off-chip
  after a power-up. A short read puts them into latches next to the arithmetic.

The network itself is hard-wired and dataflow-driven. There is no processor, no
instruction memory and no buffer between layers. Samples stream through a
fixed pipeline of convolution filters. Each filter sits next to the latched
weights it uses.

```
                 always on                                 power gated (pc_pwr_en)
 sample ──► preprocessing ──► double_buffer ══════════════► nn_core ──► result
 (12 bit)   quantize, CIC     2 x 1614 x 7 bit                ▲ 1490 trits
            bandpass, /4            ▲                         │
                               central_ctrl ── power, load ──┐│
                                                             ││
 host ───► rram_manager ═══ shift chain / commands ═══► 47 x rram_block
 (io_*)                                                  (controller, latches,
                                                          32 ternary RRAM cells)
```

## Module map

| module | role |
|---|---|
| `afib_top` | whole chip: both cores, result register, power-switch enable output |
| `preprocessing` | 12→8 bit quantization, grouping by four, CIC filter, scaling to 7 bit; bypass mode |
| `cic_filter` | polyphase CIC bandpass/decimation filter (R=4, N_H=4, N_L=3) |
| `double_buffer` | two SRAM banks of 1614 x 7 bit; one is written while the other is read |
| `central_ctrl` | window counter, bank swap, power-up, load, streaming, result capture, overrun |
| `rram_manager` | host access to the RRAM chain; loads the parameters after each power-up |
| `rram_block` | one memory block: `rram_block_ctrl` plus `rram_array` |
| `rram_block_ctrl` | 64-bit chain segment, 32 parameter latches, read/program sequencer |
| `rram_array` | behavioural model of the 32 analog ternary RRAM cells and comparators |
| `nn_core` | the six-layer network |
| `nn_stage` | one layer with its normalization, optional pooling and activation; picks its parameters out of the latch vector |
| `nn_layer` | C_OUT multi-channel filters plus skew delay lines |
| `mc_filter` | one output channel: C_IN single-channel filters and a registered adder chain |
| `sc_filter` | one input channel of one filter: K processing elements and a stride counter |
| `pe` | processing element: multiply by a ternary weight (add, subtract or nothing) |
| `sbbn` | shift-based batch normalization: `x·2^e + b` with saturation |
| `relu_n` | ReLU clipped to 0..15 (4 bit), dropping 8 fraction bits |
| `maxpool` | global max pooling over a channel |
| `afib_pkg` | types, trit encoding, network sizes, parameter layout |

## The streaming network

### Shape

| layer | channels | kernel / stride | output length | accumulator | after normalization |
|---|---|---|---|---|---|
| Conv1 | 1 → 2 | 15 / 3 | 534 | 11 bit | 19 bit |
| Conv2 | 2 → 4 | 15 / 3 | 174 | 10 bit | 18 bit |
| Conv3 | 4 → 6 | 15 / 3 | 54 | 11 bit | 19 bit |
| Conv4 | 6 → 8 | 15 / 3 | 14 → max pool → 1 | 12 bit | 20 bit |
| FC1 | 8 → 8 | 1 / 1 | 1 | 8 bit | 16 bit |
| FC2 | 8 → 2 | 1 / 1 | 1 | 8 bit | 16 bit |

The input has 1614 samples. Every layer is followed by normalization and
ReLU N with N = 15, so activations are 4 bits. In Conv4, max pooling sits
between the normalization and the ReLU. The two FC2 activations on `result`
are the class scores. The design does not fix which index means AFib; that
comes from the trained parameters. Weights are ternary (−1, 0, +1), so a
multiplication is an add, a subtract or nothing.

### How a convolution streams

A `sc_filter` is a chain of K `pe`s. Each new sample enters at the end that
holds the last weight and moves one PE per input. A counter knows when a
window is complete: after K samples, and then every STRIDE samples. Only for
those inputs are the PE products enabled and summed, so no unused partial sums
are computed. The output is valid in the cycle after the completing input.

A `mc_filter` adds the SC filters of all its input channels. The channels do
not arrive together: **channels 0 and 1 arrive in the same cycle, and every
further channel one cycle later than the one before.** The adder chain is
registered: (SC0+SC1), then +SC2, and so on. Each stage therefore meets its SC
output exactly when that output appears, and nothing has to wait in a FIFO.
The result of output channel o appears `max(2, C_IN)` cycles after the input.

`nn_layer` puts `max(0, o−1)` registers behind output channel o. This recreates
the same skew for the next layer, so layers connect directly. FC layers use
the same hardware with K = 1 and stride 1.

At one input sample per clock, the result appears **49 cycles after the last
sample**. Every filter also works at lower input rates, because each stage is
gated by its own valid signal.

### Normalization and activation

Batch normalization uses only shifts and adds: `z = (acc << e) + b`, saturated
to the accumulator width + 8 bits.

* The exponent `e` (0..8) comes from two parameter trits.
* The bias `b` (−40..40) comes from four parameter trits.

ReLU N drops 8 fraction bits and clamps the result to 0..15.

## Parameters in ternary RRAM

### Encoding and layout

The network needs 1490 trits:

* 1310 weights;
* 2 exponent trits for each of the 30 outputs;
* 4 bias trits for each of the 30 outputs.

47 blocks of 32 cells give 1504 cells, so 14 are spare.

* A trit is carried as two bits `{neg, nz}`: `00` = 0, `01` = +1, `11` = −1.
* Multi-trit values are balanced ternary, least significant trit first.
  * Exponent: `e = t0 + 3·t1 + 4`.
  * Bias: `b = t0 + 3·t1 + 9·t2 + 27·t3`.
* Cell `i` of block `b` holds trit `32·b + i` of the vector.

Layer l starts at `layer_base(l)`, which is the sum of the trits of all earlier
layers. Within a layer the order is:

1. weights, at index `(o·C_IN + c)·K + k`;
2. then 2 exponent trits per output;
3. then 4 bias trits per output.

### Cells and block controller

`rram_array` is a behavioural model of the analog block. Each cell is in HRS,
LRS1 or LRS2, and keeps that state when the block is off. There is one
comparator output per cell, with two selectable thresholds:

* `READ_A` separates HRS from both LRS states. It gives the `nz` bits.
* `READ_B` separates LRS1 from LRS2. It gives the `neg` bits.

State mapping: HRS = 0, LRS1 = +1, LRS2 = −1.

`rram_block_ctrl` powers the block only while an operation runs. It has three
sequences:

* **load**: power-up, `READ_A`, `READ_B`, then update the latches. This takes
  3·PULSE_CYC+1 cycles, 7 at the default.
* **program**: write every cell to HRS, then the +1 cells to LRS1, then the −1
  cells to LRS2. This takes 4·PULSE_CYC+1 cycles.
* **capture**: copy the latches into the shift chain for read-back.

Cell physics (forming, pulse shapes, verify loops) is not modelled.

### Host protocol (`io_*` ports)

1. Raise `io_sess`. This powers the Processing Core and the loading logic.
2. Wait for `io_busy` to go low.
3. Shift 47 × 64 bits in on `io_sdi`, one bit per `io_shift` cycle, most
   significant first. The first bit ends in bit 63 of block 46. Bits `[2i+1:2i]`
   of block b hold trit `32b+i`.
4. Send `io_cmd = 1` (program) with `io_cmd_valid`.
5. To read back, send `io_cmd = 0` (load), then `io_cmd = 2` (capture). Then
   read `io_sdo` before each shift.
6. Drop `io_sess`. Programmed data survives power-down.

Parameter loads requested by `central_ctrl` take priority over host commands.

## Preprocessing

1. Samples are signed 12 bit and are quantized to 8 bit by dropping 4 LSBs.
2. Four samples form one step of the `cic_filter`. It is a polyphase CIC with
   a chained first integrator, a second integrator, a comb over N_H = 4 steps
   with an R·N_H-weighted term, and a second comb over N_L = 3 steps.
3. The result equals a 28-tap FIR: coefficients 15..4, then four times −12,
   then −11..0. This has zero DC gain, so it acts as a bandpass, and it
   decimates 512 Hz to 128 Hz.
4. The filter output is shifted right by 8 and saturated to the 7-bit
   network input.

With `pre_bypass` high, each quantized sample goes straight through, halved
and saturated. There is then no decimation.

## One window, cycle by cycle

`central_ctrl` counts raw samples.

**Writing a window.** The first 1614 preprocessed samples of a window go to
addresses 0..1613 of the write bank. A 6479-sample window gives 1619
decimated samples, and the last five are not stored.

**At the last sample of a window:**

1. The banks swap.
2. `pc_pwr_en` rises.
3. After 2 cycles the Processing Core leaves reset.
4. `load_req` makes every block read its cells. This takes about 10 cycles,
   because all blocks work in parallel.
5. The network is cleared and the read bank is streamed into it, one sample
   per cycle. The SRAM has one cycle of read latency.
6. 49 cycles after the last sample, the two class activations are captured in
   the always-on `result` register and `result_valid` pulses.
7. The core powers down.

A whole run takes about 1 681 cycles.

**Overrun.** If a window ends while a run is still busy, that window is
dropped and `overrun` pulses. At the default sizes this cannot happen,
because a window lasts at least 6479 cycles.

Power-down is modelled by holding the Processing Core in reset. Its latches and
pipeline therefore really lose their contents. The power switch itself sits
outside the RTL and is driven by `pc_pwr_en`.

## Design choices and departures

The overall architecture comes from the original design, and so do these
details:

* the split into two power domains;
* the power-down between windows;
* 47 RRAM blocks of 32 cells;
* the two-threshold ternary read;
* the dataflow network with SC/MC filters and channel skew;
* the layer sizes and result widths;
* the shift-based normalization with 3² and 3⁴ states;
* ReLU N;
* the CIC structure;
* the 6479-sample window and double buffering.

The following are this implementation's own choices:

* **Clocking.** There is one clock. The original runs the always-on part at
  512 Hz and the Processing Core at 70 kHz. Here sampling is a `sample_valid`
  strobe.
* **Number formats:**
  * 7-bit signed network input, chosen so that Conv1's 11-bit result holds 15
    taps;
  * quantization by truncation;
  * the CIC output shift;
  * bypass scaling;
  * activations as 4-bit unsigned values, fed to the next layer with a zero
    sign bit;
  * ReLU N taking bits 8 and up.
* **Normalization width.** It is the accumulator width plus 8 for every layer.
  For FC1 this gives 16 bits. The original's table gives a different, smaller
  figure for that row, which cannot hold the normalized 8-bit result.
* **Parameter coding.** This covers the trit encoding, the balanced-ternary
  reading of exponent and bias, the exponent offset of 4 and the parameter
  order.
* **RRAM sequences.** This covers the operation codes, the state mapping and
  the pulse lengths. The analog block is a behavioural model.
* **Control.** This covers the host shift-chain protocol, the `overrun` flag,
  and the way the skew is recreated with delay lines.

These parts are not built:

* the pads and I/O interface;
* the power switch;
* the RRAM analog circuits themselves;
* training and network search. The network is fixed at synthesis. Its
  parameters can be reprogrammed at any time, but its shape cannot.

## Simulation

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. To build and run one
with Verilator 5:

```
verilator --binary --timing --assert --top-module afib_top_tb -y rtl -y tb \
    rtl/afib_pkg.sv tb/nn_ref_pkg.sv tb/afib_top_tb.sv
./obj_dir/Vafib_top_tb
```

`tb/nn_ref_pkg.sv` is an integer reference model of the network. It is written
as plain loops over whole sequences, independently of the streaming hardware.

The main testbenches:

* **`afib_top_tb`** runs the chip at its default sizes. It programs random
  parameters through the chain, with high exponents so the activations do not
  vanish. It then streams five windows of a synthetic ECG; the last window
  uses bypass. It checks all 1614 network inputs and both outputs of every
  window against the models, and reads all 1504 trits back mid-run. It counts
  and requires each of these:
  * programming;
  * power-up and power-down of the Processing Core;
  * parameter load;
  * use of both buffer banks;
  * a filtered window and a bypassed window;
  * read-back.

  It also requires the Processing Core on-time per window to stay at or below
  1771 cycles, which is 0.2 % of 12.65 s at 70 kHz. It runs in about a minute.
* **`afib_top_overrun_tb`** shortens windows to 1000 samples so that every
  second window overruns.
* **`nn_core_tb`** compares the network with the reference for six windows. It
  uses different input gaps and checks that the result arrives exactly 49
  cycles after the last input.

Every other module has its own `<module>_tb`.

In all these testbenches, registers start at random values. Any check that
looks at an output is therefore enabled only after reset.
