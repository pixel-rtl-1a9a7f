# PIXEL: a photonic multiply-accumulate array for neural-network inference

The core of a convolutional or fully connected layer is a long dot product between
input neurons and synapse weights. This design does it with light. Each input neuron
travels as a train of optical pulses on its own wavelength, one bit per bit period.
A weight bit switches a microring resonator that either passes that light on to a
detector (the bit is 1) or lets it go by (the bit is 0). The result is a bit-level
AND of neuron and weight done in the optical domain. What remains is to weight each
AND by its bit position and add everything up. Two optical MAC units (OMACs) are
provided for that step:

* **Hybrid OMAC (OE).** The AND is optical. Photodiodes turn each wavelength back into
  a word, and an electrical processor adds, shifts and accumulates with carry-lookahead
  adders. This is bit-serial in the weight: one frame per weight bit.
* **All-optical OMAC (OO).** All bits of a weight act at once on separate rings. A
  cascade of Mach-Zehnder interferometers (MZIs) with one-bit-period delay lines adds
  the shifted partial products as light intensity. An amplitude decoder then reads the
  multi-level light back into a number.

Many OMACs sit in a two-dimensional grid. Each column holds one filter. Each row
receives one window of input neurons, broadcast on wavelengths that every OMAC in the
row sees. A global buffer, a front end that loads and fires, and a back end that
collects results complete the accelerator. Every OMAC ends with a piecewise-linear tanh
activation.

The optical parts (rings, MZIs, detectors, lasers) are modelled at the bit level: one
clock is one optical bit period, and light is a bit or a small integer intensity. All
arithmetic is exact and synthesizable.

## Sizes

| Parameter | Default | Meaning |
|---|---|---|
| `LANES` | 4 | Input neuron lanes per window, and filters (columns) in the grid |
| `BITS` | 4 | Bits per neuron and per weight (bits per wavelength) |
| `ROWS` | 4 | Rows of the grid, i.e. windows computed at once |
| `OPTICAL_ACCUM` | 0 | 0 = hybrid OMACs, 1 = all-optical OMACs |
| `ACT_W`, `ACT_FRAC` | 8, 6 | tanh output: signed, 6 fraction bits (1.0 = 64) |
| `ACC_W` | 20 | Partial-sum width: `2*BITS + log2(LANES^2) + 8` headroom bits |

One window is `LANES x LANES` = 16 neurons of 4 bits, so each row uses 16 wavelengths.
Wavelength `l*LANES+e` carries element `e` of lane `l`. Each hybrid OMAC has 16
double-ring filters, so a row of four OMACs has 64 filters (128 rings).

Each OMAC computes

    psum = P + sum over l,e of I[l][e] * S[l][e]        act = tanh(psum / 2^(2*BITS))

Here `I` is the neuron window, `S` the filter, and `P` is zero or a partial sum
carried over from an earlier operation (see *Partial sums* below). The tanh reads the
sum with `2*BITS` fraction bits, which treats neurons and weights as fractions of one.

Worked example, used by the testbenches:
* neuron lanes (2,4,6,9), (0,1,3,4), (3,5,1,2), (8,2,8,6);
* synapse lanes (6,9,13,11), (1,2,1,2), (2,3,4,5), (3,1,3,1).

The lane dot products are 42, 55, 109 and 123, so `psum` = 329.

## The hybrid OMAC (`omac_oe`)

* **Firing.** The neurons are fired `BITS` times. Each firing is a *frame* of `BITS`
  bit periods, and every wavelength sends its word least significant bit first.
* **AND.** In frame `c`, the register file (`synapse_rf`) drives the ring of
  wavelength `(l,e)` with bit `c` of weight `S[l][e]`. The ring's drop port
  (`mrr_and_bank`, output `o1`) then carries the neuron word when that bit is 1, and
  nothing otherwise.
* **O/E.** One photodiode and shift register per wavelength (`oe_deserializer`)
  rebuilds the word at the end of the frame.
* **Electrical processor.** `electrical_processor` adds the 16 words with a chain of
  carry-lookahead adders (`cla_adder`), shifts the total left by `c`, and adds it to the
  running sum. After frame `BITS-1` it registers `psum` and `tanh(psum)`, then pulses
  `out_valid`.
* **Timing.** `BITS*BITS` = 16 bit periods of light per window. The result follows two
  clocks after the last bit period.

## The all-optical OMAC (`omac_oo`)

Here the roles are turned around:
* **Frames.** There are `LANES` frames. In frame `e`, wavelength `l` carries element
  `e` of lane `l`.
* **Synapse lanes.** There are `BITS` synapse lanes. Lane `b` drives the ring on
  wavelength `l` with bit `b` of weight `S[l][e]`. All weight bits act at the same
  time.
* **MZI cascade.** For each wavelength, the `BITS` drop-port outputs enter a cascade of
  `BITS` MZIs (`mzi_cascade`). The link between neighbouring MZIs is one bit period
  long, so the contribution of weight bit `b` arrives `b` periods late. The light level
  in period `t` is then column `t` of the partial-product grid, `sum_j n[t-j]*s[j]`.
  - Example: neuron 0110 × weight 1101 gives levels 0,1,1,1,2,1,0 over seven periods.
  - Weighting level `t` by `2^t` gives 78 = 6 × 13.
* **Amplitude decoder.** `oe_amplitude_decoder` has a comparator bank (`amp > k`) that
  turns intensity into a level. It accumulates `level << t` and gives the product at the
  end of the frame.
* **Frame length.** A frame has `BITS` pulses followed by `BITS-1` dark periods, which
  lets the delayed pulses drain before the next frame: `2*BITS-1` = 7 periods.
* **Summing.** The `LANES` per-wavelength products are added in the same electrical
  processor (with shift 0) and accumulated over the frames.
* **Timing.** `LANES*(2*BITS-1)` = 28 bit periods of light per window, plus two clocks.

Both OMAC kinds give identical `psum` and `act` for identical inputs. The top-level
testbench runs one of each side by side and checks both against the same reference.

## Grid, buffer, front end and back end (`pixel_top`)

* **`global_buffer`.** It holds two arrays.
  - The *input array*, `BITS`-bit words: filters at `k*LANES^2 + l*LANES + e` (addresses
    0-63), then neurons of row `r` at `LANES^3 + r*LANES^2 + l*LANES + e` (64-127).
  - The *partial-sum array*: one `{act, psum}` word per OMAC at `r*LANES + k`.
* **`front_end`.** On `start` it:
  1. streams the 64 filter words into the register files of column `k` (y-dimension);
  2. stages the 64 neuron words per row;
  3. if `accum` was high, reads the 16 partial sums back;
  4. fires the staged neurons frame by frame, driving `fire`, `slot`, `cyc`,
     `frame_last`, `cyc_first` and `cyc_last` to all OMACs (x-dimension, through
     `neuron_firing`).
* **`back_end`.** It waits for every OMAC's result, writes them to the partial-sum
  array one per clock, and then signals the front end, which pulses `done`.

Using it:

1. Write words with `in_we`/`in_waddr`/`in_wdata` (one per clock).
2. Pulse `start` (with `accum` 0 or 1).
3. Wait for `done`.
4. Read with `ps_raddr`. `ps_psum` and `ps_act` are valid one clock later.

`busy` is high from `start` to `done`. At the defaults one operation takes about 128
load clocks (144 with `accum`), then 16 (hybrid) or 28 (all-optical) firing clocks, a
few pipeline clocks, and 16 write-back clocks.

## Partial sums

A real layer has windows far longer than 16 terms; VGG16's first layer alone needs 27.
Such windows are split into 16-term slices that run one after another. An operation
started with `accum` = 1 makes every OMAC start from the `psum` the previous operation
left in the partial-sum array rather than from zero. Its `act` is then the activation
of the running total, and only the last slice's `act` matters.

The 8 headroom bits in `ACC_W` allow 256 full-scale slices (4096 terms of 4 bits).
Neurons and weights are unsigned integers. Signed weights are not supported.
The host is responsible for the split into slices (filter and image decomposition) and
for off-chip memory. Neither is part of this RTL.

## Activation (`tanh_act`)

The tanh is odd, so the unit works on |x| and restores the sign afterwards.
* **Segments.** It is linear between exact tanh values at x = 0, 0.5, 1, 1.5, 2 and 3,
  and saturates at 1.0 above 3.
* **Tables.** Breakpoint values are held with 16 fraction bits and slopes with 16
  fraction bits. Both are computed at elaboration from six constants.
* **Error.** The error against the true tanh stays within 3/64.

## How closely it follows the original design

Taken from the original design:
* the optical AND in a microring (voltage on = drop port);
* the hybrid OMAC's bit-serial shift-accumulate with CLAs and a left shifter;
* the all-optical OMAC's MZI cascade with one-bit-period links, and the
  comparator-based amplitude decoding;
* 4 lanes × 4 bits per wavelength, 16 wavelengths and 64 double-ring filters;
* pre-loaded synapses, repeated neuron firing, and the x/y grid with a global buffer
  and front- and back-end processing;
* tanh as the activation.

This design's own choices:
* **Timing.** One clock per optical bit period for everything, including the electrical
  adders. The original runs the optics at 10 GHz and the CMOS logic at 1 GHz without
  saying how they meet.
* **Bit order.** Pulses go LSB first.
* **Grid and firing.** The grid has four rows. All OMACs of a row share one broadcast
  of the neurons.
* **Memory and control.** The buffer sizes and address map, the front-end sequence and
  the back-end write-back order.
* **Number formats and limits.** The tanh segments and number formats, the partial-sum
  headroom, and the dark padding periods of the all-optical frame.
* **Feedback.** Partial sums are fed back from the buffer into the OMACs.
* **MZI chain.** The original numbers its MZI chain the other way round from the delay
  arithmetic. This design follows the arithmetic: weight bit `b` is delayed by `b`
  periods.
* **Worked example.** The original's worked example quotes a final sum of 368. Its
  lane sums (42, 55, 109, 123) add to 329, which is what this design produces.

Not modelled:
* the photonic interconnect, lasers and modulators beyond a gated bit per period;
* optical loss, crosstalk, the physical delay-line lengths and power;
* the host-side splitting of layers into slices;
* off-chip DRAM.

`mrr_and_bank` and `mzi_cascade` are behavioural models of optical parts. They are
still written as synthesizable logic, so the whole top synthesizes.

## Files

| `rtl/` | |
|---|---|
| `pixel_pkg.sv` | shared default sizes and the partial-sum width function |
| `pixel_top.sv` | the accelerator: buffer, front end, OMAC grid, back end |
| `omac_oe.sv`, `omac_oo.sv` | the two OMAC kinds |
| `synapse_rf.sv` | synapse register file of one OMAC |
| `mrr_and_bank.sv` | microring AND gates, one per wavelength |
| `mzi_cascade.sv` | delay-and-add MZI chain of one wavelength |
| `oe_deserializer.sv` | photodiode + shift register |
| `oe_amplitude_decoder.sv` | comparator bank + level-to-number conversion |
| `electrical_processor.sv` | CLA adder tree, shifter, accumulator, tanh |
| `cla_adder.sv` | carry-lookahead adder |
| `tanh_act.sv` | piecewise-linear tanh |
| `neuron_firing.sv` | E/O firing of the staged neuron words |
| `front_end.sv`, `back_end.sv`, `global_buffer.sv` | control and storage |

Every module has a testbench `tb/<module>_tb.sv`. Each testbench:
* checks against values it computes itself;
* has a watchdog;
* ends with a `TB_RESULT checks=N failures=M` line.

Four testbenches go beyond single modules:
* `pixel_top_tb` runs a hybrid and an all-optical instance side by side over five
  operations, including one partial-sum continuation and saturated and unsaturated
  activations. It counts each mechanism (pre-load, frames, through-port light, shifted
  accumulation, multi-level light, write-back, partial-sum feedback) and fails if any
  never occurs.
* `pixel_full_tb` runs the top with every parameter at its default through one complete
  operation. It loads the worked example into row 0 / column 0, checks 329, and checks
  every other OMAC against a reference.
* `omac_sizes_tb` (with the helper `omac_size_check`) runs both OMAC kinds at seven
  sizes, from 2 lanes × 2 bits up to 8 lanes × 8 bits and 4 lanes × 16 bits.
* `pixel_vgg_tb` runs a slice of the first VGG16 convolution layer: 27-term windows
  (3×3 kernel, 3 channels), four filters and four output positions, as two operations
  joined by partial-sum feedback. It runs once with each OMAC kind.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wall -Wno-fatal \
        --top-module pixel_full_tb \
        -Irtl rtl/pixel_pkg.sv rtl/*.sv tb/pixel_full_tb.sv -o sim
    ./obj_dir/sim

Replace `pixel_full_tb` with any other testbench name. For `omac_sizes_tb`, also add
`tb/omac_size_check.sv`. The package must come first on the command line. Every testbench finishes in well under a minute.

To change the array size, override `LANES`, `BITS` or `ROWS` on `pixel_top`. `ACC_W`
and the buffer sizes follow automatically. The whole accelerator has been simulated only at the default
sizes, with both OMAC kinds. The OMACs alone have been simulated at up to 8 lanes × 8 bits and
4 lanes × 16 bits. One bit per lane is not supported: the all-optical frame needs at
least two bit periods. The tanh works in 64-bit integers, which limits it to
about 24 bits per lane; wider configurations stop at elaboration.
