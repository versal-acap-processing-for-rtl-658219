# Streaming perceptron for TileCal pulse reconstruction

In a calorimeter read out every 25 ns, pulses from successive collisions
overlap: a new deposit arrives before the previous pulse has decayed. This is
signal pile-up, and it makes the energy of each deposit hard to read off the
raw samples. This design reconstructs one energy value per sample with a
single neuron (a perceptron). The neuron takes a sliding window of nine
consecutive ADC samples, forms a weighted sum with a bias and passes it through
a hyperbolic tangent. The tangent is not computed: it is read from a table of
5000 precomputed values.

The RTL is the programmable-logic part of a larger system built on an AMD
Versal VC1902 (VCK190 board). In that system the neuron unit is replicated
into several cores. Each core sits behind its own AXI DMA engine, which streams
samples from DDR memory into the core and writes the results back. An ARM
processor programs the DMA engines through an AXI interconnect. A host PC
sends events and collects results over PCIe (XDMA) and the device's network on
chip. Only the cores are given here. The DMA engines, interconnect, network on
chip, memory, processors and PCIe block are vendor or hard IP. The top level
brings out, for every core, the two AXI4-Stream ports where its DMA engine
connects.

## Files

| file | contents |
|---|---|
| `rtl/tilecal_pkg.sv` | widths, number formats, table constants, default coefficients |
| `rtl/tanh_rom.sv` | 5000-entry tanh table, computed at elaboration |
| `rtl/tanh_index.sv` | neuron sum to table address, with clamping |
| `rtl/neuron_mac.sv` | nine multipliers and an adder tree: `sum x_i*w_i + b` |
| `rtl/axis_perceptron.sv` | one core: AXI4-Stream in, ten-stage pipeline, AXI4-Stream out |
| `rtl/tilecal_nn_system.sv` | top: `NUM_CORES` cores side by side (default 10) |
| `tb/tb_ref_pkg.sv` | integer and floating-point reference models, pulse-train generator |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Number formats

| quantity | format |
|---|---|
| ADC sample in, energy out | 16-bit signed integer, ADC counts |
| normalised sample, weights, bias, neuron sum, tanh value | signed Q2.14: 16 bits, 14 fraction bits, range [-2, 2) |
| products | Q4.28 (32 bits) |
| sum of nine products plus bias | 36-bit accumulator, kept exact |

The source design says only that the hardware uses fixed point with a limited
number of integer and fraction bits. The formats above are this
implementation's choice. With the default coefficients the fixed-point output
stays within 1.3 ADC counts of a floating-point model of the same neuron. The
original system reports at most 5 counts, typically 3.

## The pipeline of one core

`axis_perceptron` has ten register stages. All of them advance together.

```
 s_axis ─► S0 input reg ─► S1 normalise ─► window ─► S2 9 products ─► S3 3 group sums
        ─► S4 +bias, >>14, saturate ─► S5 table address ─► S6 tanh ROM
        ─► S7 × OUT_SCALE ─► S8 >>14 + OUT_OFFSET, saturate ─► S9 output reg ─► m_axis
```

* **Normalise (S1).** `x_n = sat(((x - IN_OFFSET) * IN_SCALE) >>> IN_SHIFT)`.
  By default 2048 counts become 1.0.
* **Window.** A shift register keeps the eight normalised samples that came
  before the current one. The multipliers see those eight and the current
  sample: `win[0]` is the oldest, `win[8]` the newest. The register shifts
  only when a valid sample moves on, so input gaps do not disturb it. Reset
  clears it. The first eight results after reset therefore see zeros for
  samples that were never sent.
* **Weighted sum (S2-S4, `neuron_mac`).** Nine products go into three sums of
  three. These are added with the bias shifted to Q4.28. The result is shifted
  back to Q2.14, rounding toward minus infinity, and saturated.
* **Table address (S5, `tanh_index`).** The table covers z in [-0.7, 0.8] with
  5000 equal bins. The address is `floor((z + 0.7·2^14) · 5000 / 24576)`,
  computed as a multiply by `ceil(5000/24576 · 2^32)` and a shift by 32. This
  gives the exact floor division for every in-range input. Below the interval
  the address is 0; at or above its top it is 4999. A z that falls outside
  therefore yields tanh(-0.7) or tanh(0.8). There is no saturation towards ±1.
* **tanh ROM (S6, `tanh_rom`).** Entry i holds
  `round(tanh((-11469 + (i + 0.5) · 24576/5000) / 2^14) · 2^14)`, that is tanh
  at the bin centre. An `initial` loop fills it at elaboration, so no data file
  is needed. Synthesis infers a ROM.
* **Output (S7, S8).** `e = sat(((y · OUT_SCALE) >>> 14) + OUT_OFFSET)`. By
  default 1.0 becomes 2048 counts.

Reading the 5000-value interval as the tanh *input* is an interpretation. The
source says only "5000 values in the range -0.7 to 0.8". As a result the
output lies between tanh(-0.7)·2048 ≈ -1237 and tanh(0.8)·2048 ≈ 1361 counts
with the default scaling. Change `OUT_SCALE` if a different full scale is
needed.

### Flow control and timing

Both ports are AXI4-Stream (`tvalid`, `tready`, `tdata`, `tlast`), one
16-bit sample per beat. Every accepted sample produces exactly one result, in
order. `tlast` travels with its sample, so a DMA transfer of N samples returns
N results, and the last one is marked.

* Throughput: one sample per clock.
* Latency: a sample taken on clock edge k is offered on `m_axis` from edge
  k + 9 (`PIPE_LATENCY` = 10 register stages).
* Backpressure: `s_axis_tready = !m_axis_tvalid || m_axis_tready`. When the
  output register holds a word that is not being taken, the whole pipeline
  freezes, the window included. Upstream `tready` then depends on
  downstream `tready` through one gate. Nothing is lost or reordered. An
  immediate assertion checks that a stalled output word stays unchanged.
* Reset: synchronous, active low (`rst_n`). It clears the valid bits and the
  window.

### Status outputs

`ev_clamp_lo`, `ev_clamp_hi` and `ev_sum_sat` pulse once per sample as it
leaves stage S5. They flag a neuron sum below or above the table interval, or
one that saturated at ±2. They are for monitoring only and are not part of the
original design.

## Coefficients

The network is trained offline, and no trained weights are published with the
design. The package supplies placeholders. The centre sample has weight 1.5,
its neighbours -0.5 and the next ones -0.25, so the neuron subtracts a
neighbouring pulse's tail. The bias is 0, the input scaling is 2048 counts =
1.0 and the output scaling is its inverse. Every one of these is a parameter
of `axis_perceptron` and `tilecal_nn_system`: load trained values there. The
weights are in Q2.14, so they must lie in [-2, 2).

## The core array

`tilecal_nn_system` instantiates `NUM_CORES` identical cores. All share clock,
reset and coefficients. Each has its own streams, indexed by core, and its own
status pulses. The default of 10 is the configuration that was measured to be
fastest. Going from 1 to 10 cores shortened transfers of 10^6-10^7 events.
Going to 100 cores gave nothing more. The VC1902 has 14 programmable-logic
ports into the DDR network on chip, and cores beyond that must share them.
That sharing (multiplexing) is not implemented here. For more than 14 cores,
add an arbiter in front of the memory ports.

What the array does *not* contain:

- AXI SmartConnect, the MM-to-Lite bridge for the DMA registers;
- AXI DMA, whose MM2S and S2MM streams are the `s_axis` and `m_axis` ports here;
- the network on chip, DDR, the ARM processor, XDMA/PCIe and the host.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Run it with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/tilecal_pkg.sv tb/tb_ref_pkg.sv tb/tb_tilecal_nn_system.sv \
  --top-module tb_tilecal_nn_system
./obj_dir/Vtb_tilecal_nn_system
```

| testbench | what it checks |
|---|---|
| `tb_tanh_rom` | all 5000 entries against tanh of the bin centre, monotonicity, end values, read latency, hold |
| `tb_tanh_index` | every input around and inside the interval against an exact division, clamp flags, hold |
| `tb_neuron_mac` | random and extreme windows with non-default weights and bias, saturation, latency, stalls |
| `tb_axis_perceptron` | latency of 9 edges, one result per clock, 3000 piled-up samples with gaps and backpressure, bit-exact and within 5 counts of floating point, TLAST, status pulses |
| `tb_tilecal_nn_system` | default top (10 cores), 1000 samples per core at once, every mechanism exercised, histogram of the fixed-vs-float error, all cores finishing in parallel |
| `tb_workload_events` | 10^4, 10^5, 10^6 and 10^7 events on one core and on ten cores, back to back: exact cycle count (events / cores + 9) and every result bit-exact (about 20 s) |

The stimulus is a synthetic pulse train. A pulse starts in 15-25 % of bunch
crossings, with amplitude 20-1800 counts, a pulse shape of roughly
0.03/0.43/1/0.56/0.15/0.04 per 25 ns and ±2 counts of noise. About 1 % of
samples are replaced by out-of-range values, so that table clamping and
sum saturation also occur.

## Limits and departures

- The number formats, rounding, normalisation and output-scaling stages,
  one-result-per-sample framing and coefficients are this implementation's
  choices. The source gives the structure: register, DSP, shift register with
  a 3×3 DSP array, LUT, ROM, two DSPs, register. It also gives the nine-input
  neuron and the 5000-entry tanh table over [-0.7, 0.8]. It gives no bit-level
  details.
- The first DSP stage is taken to be input normalisation, and the two after
  the ROM output scaling and offset. The source labels them only "DSP".
- tanh saturates at the table's end values, not at ±1.
- No DMA, interconnect or interrupt logic is included; see "The core array".
