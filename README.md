# FPAAC: a fully parallel floating-point neural classifier for heartbeats

This is synthesizable SystemVerilog for a small neural network that sorts ECG
heartbeats into three classes: normal (N), premature ventricular contraction
(V) and fusion (F). The idea is to shrink the input before it reaches the
hardware. A host computer turns each beat (181 samples of the ECG) into
8 principal components. The FPGA then evaluates an 8-2-1 multilayer
perceptron on those 8 numbers. The network is small enough to build fully in
parallel: every multiply, add and activation of the network has its own
hardware unit. All arithmetic is IEEE-754 single precision. The sigmoid is
computed directly as 1/(1+e^-x), with no lookup table or piecewise
approximation.

The RTL follows the FPGA classifier published by A. T. Özdemir and
K. Danışman ("Fully parallel ANN-based arrhythmia classifier on a single-chip
FPGA: FPAAC"). That article gives the block diagram, the network and its
trained weights. It does not give the insides of the floating-point units or
the control handshakes, so those are this design's own; the sections below
say which parts are which.

## The network

```
 I0..I7 ──┬─► hidden neuron 0:  net0 = B0 + Σ W[i]·I[i]      (i = 0..7)   → I8 = sigmoid(net0)
          └─► hidden neuron 1:  net1 = B1 + Σ W[8+i]·I[i]                 → I9 = sigmoid(net1)
              output neuron:    OUT  = B2 + W16·I8 + W17·I9   (linear activation)
              class:            OUT ≤ 1.5 → F,  1.5 < OUT ≤ 2.5 → V,  OUT > 2.5 → N
```

The trained weights are the power-up contents of the weight memory
(`TRAINED_WEIGHTS` in `rtl/fp_pkg.sv`). Each is the single-precision value
nearest to these decimals:

| word | value | word | value | word | value |
|---|---|---|---|---|---|
| W0 | -0.62579995 | W7 | -53.1894 | W14 | 70.565895 |
| W1 | 23.4966 | W8 | 147.17809 | W15 | 117.5449 |
| W2 | 43.9367 | W9 | 84.519394 | W16 | -0.9535 |
| W3 | -6.6568 | W10 | 111.925095 | W17 | -1.0071 |
| W4 | -56.1103 | W11 | 55.6788 | B0 | -47.872597 |
| W5 | 10.6938 | W12 | -54.927998 | B1 | 36.3476 |
| W6 | -24.547798 | W13 | -54.037098 | B2 | 0.9869 |

Memory addresses 0..17 hold W0..W17 and 18..20 hold B0..B2. A reference
operating point of the trained network has net0 = -178.19 and net1 = 851.52,
which gives OUT = -0.0202. The full-size testbench builds an input beat that
lands on that point. It checks both net inputs (on `hid_net`) and the
output.

Two properties of these weights are worth knowing. First, the hidden
neurons' net inputs reach the hundreds, so the sigmoids are nearly always
saturated at 0 or 1. Second, OUT is B2 plus a negative weighted sum of two
numbers in [0, 1], so it can never exceed 0.9869. Every beat is therefore
classed F under the 1.5 / 2.5 thresholds. The thresholds and the weights are
built exactly as published. A trained network whose output targets are 1, 2
and 3 would use all three classes; to load one, override `WEIGHTS`.

## Datapath

**Hidden neuron (`neuron_8x1`).** This is the 8-input neuron. Eight
multipliers (`fp_mul`) feed a balanced tree of adders (`fp_add`): 4, then 2,
then 1. One more adder adds the bias. The sum then goes to the sigmoid. Each
tree level ends in a register that loads on its own enable, so every
combinational floating-point unit gets a full 20 ns period of the 50 MHz
clock. The input registers may be rewritten once the products are captured.

**Output neuron (`neuron_2x1`).** Two multipliers, an adder and a bias adder,
also staged. The linear ("purelin") activation is the identity, so the bias
adder's register is the output.

**Class rule (`class_decide`).** This block is combinational. It maps each
single-precision value to an unsigned key that sorts like the real numbers,
then compares that key with the keys of 1.5 and 2.5. A NaN fails both "≤"
tests and is therefore classed N.

## The sigmoid

The sigmoid is the costly part of the design. It is built from three
multi-cycle or combinational units, sequenced by a small controller
(`sig_clk_en`):

```
x ─► input register ─► flip sign ─► fp_exp ─► fp_add(1.0, ·) ─► register ─► fp_div(1.0, ·) ─► y
                          enable[0] starts ──┘     enable[1] loads ─┘   enable[2] starts ──┘
```

**Exponential (`fp_exp`, 35 clocks).** It uses e^a = 2^(a·log2 e):

1. Convert |a| to fixed point with 32 fraction bits. For |a| ≥ 128 the
   result saturates: +inf for positive a, 0 for negative a.
2. Multiply by log2 e, held as a 33-bit constant. Negate if a < 0.
3. Split the product t into k = floor(t) and a fraction f in [0, 1).
4. Form 2^f with one multiply per clock. Start from 1.0. For i = 1..32,
   multiply by the constant C_i = 2^(2^-i) if fraction bit i (weight 2^-i) of
   f is set. The 32 constants are round(2^(2^-i) · 2^32) and are listed in
   the file.
5. Round the accumulator to a 24-bit significand and use k + 127 as the
   exponent.

Because each product is truncated, the result is within 2 units in the last
place (ulp) of the correctly rounded e^a, rather than exact.

**Add and divide.** `fp_add` forms 1 + e^-x. `fp_div` (28 clocks) performs
restoring division, one quotient bit per clock, with round-to-nearest-even.

**Saturation.** For x < about -88.7, e^-x overflows to +inf and y becomes
exactly 0. For x > about 17, 1 + e^-x rounds to 1.0 and y becomes exactly 1.

**Accuracy and latency.** The sigmoid is within 4 ulp of the correctly
rounded result, and far below 1e-5 absolute. That 1e-5 bound is the
agreement reported between the original hardware and its software model.
From the clock in which `start` is sampled to `done`, the sigmoid takes 66
clocks.

The published sigmoid diagram labels the adder's output "1 - e^-Input".
Taken literally, that would compute 1/(1 - e^-x), which is not a sigmoid.
This design adds, as the sigmoid equation 1/(1+e^-net) requires.

## Clocks, control and timing

The published design uses two clocks:

| Clock | Frequency | Source | Blocks |
|---|---|---|---|
| `clk_50` | 50 MHz | board input | neurons, sigmoids, `clock_manager`, class rule |
| `clk_100` | 100 MHz | PLL (`pll_2x`) | `input_buffer`, `mem_init`, `weight_mem` |

Both come from one PLL and are phase-aligned. Signals therefore cross
between them without synchronisers: the 50 MHz side samples the 100 MHz
registers directly, and the reverse. If your PLL does not guarantee that
alignment, this handover must be redesigned.

**Loading a beat.** The host drives `data32` (one component) together with
`en8`, the one-hot select of the register I0..I7 to load, for one `clk_100`
cycle. The registers may be written in any order, and one may be rewritten
before the others. A beat is complete in the clock where the last register
not yet written since the previous beat is loaded. `input_buffer` then does
three things in that clock:

- It copies the whole beat from a shadow bank into the registers that feed
  the multipliers.
- It increments an 8-bit completed-beat counter, `beat_cnt`.
- It pulses `beat_done`.

The shadow bank is this design's addition. Without it, the first words of
the next beat would overwrite I0..I7 before the 50 MHz side had captured
the products. With it, the host may start writing the next beat at once.

**Handing a beat over.** The clock manager keeps the count of the last beat
it took. In IDLE, a counter value different from that count means a new
beat is waiting. The manager then goes to MUL. In the clock edge that ends
MUL, three things happen together:

- the multipliers' products are captured;
- `beat_cnt` is recorded as taken;
- `beat_lost` pulses if the counter moved by more than one since the
  previous capture.

Because the products and the count are sampled in the same edge, the
recorded count always belongs to the beat that was actually classified. A
counter is used rather than a toggle or a pulse for two reasons. It cannot be
missed between two slow clock edges. And it tells the manager how many beats
went by, which is what makes loss detection exact.

The held-beat rule that follows:

- A beat that completes during a classification waits in I0..I7 and starts
  as soon as the manager is idle.
- Each newer beat that completes before then replaces it, and `beat_lost`
  reports the loss.
- For a loss-free stream, a host completes a beat only when no completed
  beat is still waiting to start. A start shows as a rising edge of `busy`.

**Sequencing.** `clock_manager` runs the network through this sequence:

| State | Length | Action |
|---|---|---|
| MUL, ADD1, ADD2, ADD3, BIAS | 1 clock each | load the product, sum and net registers of both hidden neurons |
| SIG | 1 clock | start both sigmoids |
| WAIT_SIG | until both report done | wait for the sigmoids |
| OMUL, OADD, OBIAS | 1 clock each | load the output neuron's registers |
| VALID | 1 clock | `out_valid` |

All of these are clock enables; no clock is gated. Timing:

- From the counter change to `out_valid` takes 75 `clk_50` cycles.
- From the host's completing write it takes 77 to 78 cycles, depending on
  the `clk_100` phase. That is about 1.55 µs.
- Back to back, a new classification starts every 77 cycles (75 plus VALID
  and one IDLE clock). That is 50 MHz / 77, about 649,000 beats per second.

**Power-up.** Reset is held while `rst_n` is low or the PLL is unlocked, and
for 4 more `clk_50` cycles after both are good (`reset_sync`). This lets the
100 MHz blocks see clock edges during reset. `mem_init` then walks the 5-bit
address bus through 0..20. `weight_mem` reads each word from its ROM and,
one clock later, copies it into a bank of 21 registers that drive every
multiplier and bias adder in parallel. `ready` rises 23 `clk_100` cycles
after reset is released. Beats that complete before `ready` wait for it.

## Top-level interface (`fpaac_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk_50` | in | 1 | 50 MHz clock |
| `rst_n` | in | 1 | reset, active low |
| `data32` | in | 32 | principal component, IEEE-754 single |
| `en8` | in | 8 | one-hot input-register select, sampled on `clk_100` |
| `clk_100` | out | 1 | 100 MHz clock from the PLL, to time the host writes |
| `ready` | out | 1 | weights loaded |
| `out_val` | out | 32 | network output OUT |
| `out_class` | out | 2 | `beat_class_e`: 0 F, 1 V, 2 N |
| `out_valid` | out | 1 | one `clk_50` pulse per result; `out_val` and `out_class` hold until the next result |
| `hid_out[2]` | out | 2×32 | the two sigmoid outputs (I8, I9) |
| `hid_net[2]` | out | 2×32 | the two hidden neurons' net inputs |
| `beat_done` | out | 1 | one `clk_100` pulse per completed beat |
| `busy` | out | 1 | a classification is running |
| `beat_lost` | out | 1 | a held beat was replaced by a newer one before it started |

Parameter `WEIGHTS` (type `weight_set_t`, 21 words) is the weight memory
content. Its default is the trained network.

## Floating-point conventions

These apply to every unit:

- Rounding is to nearest, ties to even.
- Subnormal inputs are read as zero, and results below the normal range
  become zero.
- Overflow gives a signed infinity.
- Invalid operations give the quiet NaN 0x7FC00000.

`fp_mul` and `fp_add` are combinational and bit-exact against correctly
rounded IEEE results. `fp_exp` and `fp_div` use a start/done handshake and
hold their result until the next start.

## How this design relates to the published one

Taken from the published design:

- the 8-2-1 network, the single-precision arithmetic and the trained weights;
- the adder-tree shape (eight adders per hidden neuron);
- the sigmoid built as exponentiator, adder and divider under its own
  three-bit enable controller;
- the 100 MHz buffering and 50 MHz arithmetic clocks from a PLL;
- DATA 32 and EN 8, the 5-bit memory address, and a memory initialiser that
  loads the weights at power-up;
- the class thresholds.

This design's own choices:

- all floating-point algorithms, latencies and special-case rules;
- the stage registers and the enable sequence;
- the beat-completion rule, the completed-beat counter and the held-beat rule;
- the shadow input bank;
- the reset scheme, the address map and the class encoding;
- the observation outputs `hid_net` and `beat_done`.

Differences:

- The original used vendor floating-point cores. The units here are written
  out, and `fp_exp` is accurate to 2 ulp rather than exact.
- The published design is called fault-tolerant, but no fault-tolerance
  mechanism is described for it, so none is built here.
- The PLL is a behavioural model (`pll_2x`, built from delays). Replace it
  with the FPGA's PLL primitive for synthesis. Everything else is
  synthesizable. If you synthesize the top as it is, the tool ignores the
  delays and sees `clk_100` as a constant. The whole 100 MHz side and the
  outputs that depend on it then fold away.
- The PCA feature extraction runs on the host and is not part of this RTL.

## Files

| File | Contents |
|---|---|
| `rtl/fp_pkg.sv` | types, network sizes, trained weights, class enum, enable bundles |
| `rtl/fp_mul.sv`, `rtl/fp_add.sv` | combinational multiplier, adder/subtractor |
| `rtl/fp_exp.sv`, `rtl/fp_div.sv` | sequential exponential and divider |
| `rtl/sig_clk_en.sv`, `rtl/sigmoid.sv` | sigmoid enable sequencer and sigmoid |
| `rtl/neuron_8x1.sv`, `rtl/neuron_2x1.sv` | hidden and output neurons |
| `rtl/class_decide.sv` | F/V/N rule |
| `rtl/input_buffer.sv`, `rtl/weight_mem.sv`, `rtl/mem_init.sv` | input registers, weight memory, memory initialiser |
| `rtl/clock_manager.sv`, `rtl/reset_sync.sv`, `rtl/pll_2x.sv` | sequencer, reset release, PLL model |
| `rtl/fpaac_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fpaac_top.sv` | end-to-end test with modified output weights, so all three classes occur |
| `tb/tb_fpaac_full.sv` | end-to-end test at the default configuration with the trained weights |
| `tb/tb_fpaac_dataset.sv` | 4015 beats streamed at full rate through the default configuration |
| `tb/fp_ref_pkg.sv`, `tb/fpaac_ref_pkg.sv` | reference conversions and the reference model of the network |

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb -Irtl rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/fpaac_ref_pkg.sv \
  tb/tb_fpaac_full.sv --top-module tb_fpaac_full -o sim
./obj_dir/sim
```

Replace `tb_fpaac_full` with any other testbench name; packages it does not
use can stay on the command line. Every testbench prints
`TB_RESULT checks=N failures=M` and stops on its own, with a watchdog.

What the testbenches check:

- The arithmetic units are compared with a double-precision reference that
  is rounded once to single precision: bit-exact for the multiplier, the
  adder and the divider, and within 2 ulp for the exponential. Their
  latencies are checked too.
- The sigmoid and the neurons are checked within a few ulp of the same kind
  of reference.
- The end-to-end tests compare both net inputs with the reference model bit
  for bit, and OUT and both hidden outputs to within 1e-5. They also check
  the class, the latency and one `beat_done` per beat.
- `tb_fpaac_top` also counts, and requires at least once, each mechanism:
  all three classes, saturated and unsaturated sigmoids, a beat held while
  busy, and a lost beat.
- `tb_fpaac_dataset` runs 4015 beats, the size of the labelled set the
  network was trained and tested on. The real beats are not included, so
  the beats are generated. The host streams them as fast as the design
  accepts them. The test checks every result, that no beat is lost, and the
  77-cycle spacing of results.

Each simulation finishes within about 15 seconds.
