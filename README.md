# A 32-tap low-pass FIR filter without multipliers (distributed arithmetic)

This is a 31st-order (32-tap) linear-phase low-pass FIR filter in
SystemVerilog. It computes

    y[n] = sum_{k=0}^{31} h[k] * x[n-k]

without a single multiplier. It uses **distributed arithmetic (DA)**. The
input samples are read one bit position at a time. Each group of four taps
turns the four bits it sees into a ready-made sum of coefficients, taken from
a small table or built from multiplexers. A shift-and-add accumulator then
weights those partial sums by powers of two. In FPGA terms the multiply-
accumulate units become small look-up tables, adders and registers.

The design exists in three interchangeable forms of the 4-tap unit: a full
16-word table, a half-size 8-word table plus one adder (the default), and a
form with no table at all. All three give bit-identical results.

## The filter being computed

The coefficients are those of a Kaiser-window low-pass design (β = 3.39,
normalised cut-off 0.18). They are quantised to 12-bit signed integers with a
scale of 2^11, so the output is 2048 times the real-valued filter output. The
filter is symmetric, h[k] = h[31-k]:

| k      | 0 | 1 | 2  | 3  | 4 | 5   | 6   | 7   | 8   | 9   | 10 | 11 | 12  | 13  | 14  | 15  |
|--------|---|---|----|----|---|-----|-----|-----|-----|-----|----|----|-----|-----|-----|-----|
| h[k]   | 4 | 9 | 13 | 12 | 5 | -10 | -30 | -48 | -55 | -39 | 3  | 72 | 158 | 247 | 321 | 362 |

The coefficients sum to exactly 2048, so the DC gain is 1 (0 dB). The
simulated response is -0.08 dB at 0.05 × Nyquist and about -54 dB at
0.5 × Nyquist. The stop band starts at roughly 0.27 × Nyquist and stays below
about -44 dB. The values are the default of the `H` parameter of
`fir31_da_top` (`H_DEFAULT` in `rtl/fir_da_pkg.sv`); any other 32 coefficients
of 12 bits can be passed in.

## How one output is produced: bit slices

Write each B-bit two's-complement sample as bits x_b, where bit B-1 (the sign
bit) weighs -2^(B-1). Swapping the two sums gives

    y = -2^(B-1) * F(B-1) + sum_{b=0}^{B-2} 2^b * F(b),
    F(b) = sum_k h[k] * x_b[n-k]

F(b) is a sum of coefficients picked out by a 32-bit vector, the **bit slice**
made of bit b of every stored sample. The filter computes one F(b) per clock
and accumulates B of them:

1. **Delay line and serialiser** (`da_shift_register`). When a sample is
   accepted it enters a 32-word delay line, x[n] … x[n-31]. In the same cycle
   a serialiser is loaded in parallel with the shifted contents. The
   serialiser then shifts every word left once per clock, so in the c-th
   cycle after the load it shows bit B-1-c of every tap. The sign bit comes
   first.
2. **Eight 4-tap DA units**. The 32 slice bits split into eight 4-bit
   addresses, taps 4g … 4g+3 for unit g. Each unit outputs the sum of those of
   its four coefficients whose address bit is 1, as a 14-bit value.
3. **Pipelined adder tree** (`da_adder_tree`). The eight unit outputs are
   registered, then added in pairs over three registered levels:
   (0+1, 2+3, 4+5, 6+7), then (01+23, 45+67), then the total. This gives
   F(b) as a 17-bit value, 4 cycles after its slice was presented. A new
   slice can enter every cycle.
4. **Adder/subtractor and accumulator** (`da_accumulator`). The sign-bit
   slice is subtracted from zero, which starts a new sum. Each later slice
   does `acc = 2*acc + F`. After B slices the accumulator holds y[n] exactly,
   with no rounding anywhere.

Because the sign bit comes first, the accumulator doubles instead of halving.
No low-order bits are ever shifted out, so the full-precision result needs
only B + 17 bits.

`da_control` is the sequencer. It counts the B slices of the current sample
and tags each slice as *valid*, *sign slice* or *last slice*. It delays those
tags through the same 4 stages as the adder tree, so each tag reaches the
accumulator together with the sum of its own slice.

## The 4-tap DA unit in three forms

Every form maps the address {b3 b2 b1 b0} (bit k from tap k of the group) to
sum_{k: b_k=1} h[k]. All three are purely combinational:

| `LUT_STYLE`            | module            | structure                                                                                   |
|------------------------|-------------------|---------------------------------------------------------------------------------------------|
| `LUT_BASIC`            | `da_lut_basic`    | 16-word table: word 0 = 0, 0001 = h0, 0011 = h0+h1, … 1111 = h0+h1+h2+h3                    |
| `LUT_MODIFIED` (default) | `da_lut_modified` | 8-word table over b2 b1 b0, plus a 2:1 mux giving h3 or 0 by b3, plus one adder             |
| `LUT_LESS`             | `da_lut_less`     | four 2:1 muxes (h_k or 0 by b_k) and a two-level adder tree, no table                       |

The half-size form works because every table word with b3 = 1 equals the word
with b3 = 0 plus h3. Applying the same step again to b2, b1 and b0 removes the
table entirely, which gives the third form. The table words are not typed in.
They are computed at elaboration from the four coefficient parameters with
`word(a) = sum_{k: a[k]=1} h[k]`, so the tables follow any change of `H`.

## Interface and timing

`fir31_da_top` ports (defaults: `DATA_W = 8`, output 25 bits):

| port       | dir | width        | meaning                                                         |
|------------|-----|--------------|-----------------------------------------------------------------|
| `clk`      | in  | 1            | clock                                                           |
| `rst_n`    | in  | 1            | asynchronous active-low reset; clears the sample history        |
| `in_valid` | in  | 1            | `x_in` holds a sample                                           |
| `in_ready` | out | 1            | a sample offered in this cycle is taken at the next clock edge  |
| `x_in`     | in  | `DATA_W`     | two's-complement sample                                         |
| `y_out`    | out | `DATA_W+17`  | y[n], signed, full precision, scaled by 2048                    |
| `y_valid`  | out | 1            | one-cycle pulse marking `y_out`                                 |

* **Throughput:** one sample per `DATA_W` clocks. `in_ready` is high while
  the filter is idle and during the last slice of the current sample, so
  samples offered continuously are taken every `DATA_W` cycles with no gap.
* **Latency:** with 32 taps, `y_valid` rises at the `DATA_W + 4`-th rising edge after the
  edge that took the sample (12 cycles at the defaults). The last slice is
  presented `DATA_W - 1` edges after the accepting edge. It then takes 5 more
  edges: the unit-output register, three adder levels and the accumulator.
* `y_out` holds its value until the next result.

Cycle by cycle for `DATA_W = 8`, counting rising edges from the accepting
edge E0:

| after edge | serialiser shows | unit-output register | tree output | accumulator        |
|------------|------------------|----------------------|-------------|--------------------|
| E0         | bit 7 (sign)     |                      |             |                    |
| E1         | bit 6            | slice 7              |             |                    |
| E4         | bit 3            | slice 4              | F(7)        |                    |
| E5         | bit 2            | slice 3              | F(6)        | -F(7)              |
| E7         | bit 0            | slice 1              | F(4)        | …                  |
| E11        | (next sample)    |                      | F(0)        | …                  |
| E12        |                  |                      |             | y[n], `y_valid` = 1 |

## Files

| file                        | contents                                                            |
|-----------------------------|---------------------------------------------------------------------|
| `rtl/fir_da_pkg.sv`         | tap count, widths, coefficient type, default coefficients, style enum |
| `rtl/fir31_da_top.sv`       | top: controller, shift register, TAPS/4 DA units, tree, accumulator |
| `rtl/da_control.sv`         | handshake, slice counter, tag pipeline (with two assertions)         |
| `rtl/da_shift_register.sv`  | TAPS-word delay line and parallel-load serialiser                    |
| `rtl/da_lut_basic.sv`, `rtl/da_lut_modified.sv`, `rtl/da_lut_less.sv` | the three 4-tap DA units |
| `rtl/da_adder_tree.sv`      | registered inputs + three registered adder levels                    |
| `rtl/da_accumulator.sv`     | add/subtract, doubling accumulator, output register                   |
| `tb/tb_*.sv`                | one self-checking testbench per module, plus two for the top          |

## Simulating

Every testbench is self-contained and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_fir31_da_full rtl/fir_da_pkg.sv tb/tb_fir31_da_full.sv
./obj_dir/Vtb_fir31_da_full
```

Replace the top module name to run another testbench. What they check:

* `tb_fir31_da_full` runs the top with every parameter at its default. It
  checks the impulse response against h[0..31]. It measures a pass-band tone
  (must be within 1 dB of unity) and a stop-band tone (must be at least 35 dB
  down). Every output is compared with a direct-form reference and must
  arrive at exactly 12 cycles.
* `tb_fir31_da_top` runs all three DA-unit styles side by side on 600
  samples, together with a 16-tap build that uses full-scale test
  coefficients. The stream mixes back-to-back samples, idle gaps, negative
  samples, full-scale runs and the worst-case sign pattern. Every output is
  checked for value and arrival cycle. The test counts how often each of
  those cases occurred and fails if one never did.
* The per-module testbenches are exhaustive for the DA units (every address,
  including extreme coefficients). They are randomised and cycle-exact for
  the shift register, adder tree, accumulator and controller.

## Changing it

* `DATA_W`: the sample width. Any width ≥ 2 works. Throughput and latency
  scale with it, and the output (32 taps) is `DATA_W + 17` bits.
* `TAPS`: the filter length, 32 by default. It must be four times a power
  of two. `TAPS = 16` gives the 15th-order form: four DA units, two adder
  levels, and one cycle less latency (`DATA_W + 3`). Pass `H` with `TAPS`
  coefficients. The output is `DATA_W + 14 + log2(TAPS/4)` bits wide.
* `LUT_STYLE`: choose the DA unit. The results do not change; only the area
  does.
* `H`: any `TAPS` signed 12-bit coefficients. The tables recompute
  themselves. The group size (4) and the coefficient width (12) are package
  constants. The LUT-less unit and the top's grouping assume groups
  of four.

## Where this design makes its own choices

* **Sample width.** `DATA_W = 8` is a choice; the filter description does not
  fix the input width.
* **Coefficient signs.** h[5] … h[9] (and their mirrors h[22] … h[26]) are
  taken as negative and h[10] as positive. With these signs the coefficients
  sum to 2048 and the response has the expected ~-44 dB stop band; other sign
  readings give a poor stop band and a DC gain other than one.
* **Bit-serial, sign bit first.** One slice per clock keeps a single
  accumulator, as in the block diagram. A fully parallel DA (all slices at
  once, B copies of the units) is not built. Processing the sign bit first,
  with a doubling accumulator, is chosen over the equivalent LSB-first form
  with a halving accumulator, so that no precision is lost.
* **Serialiser.** A parallel-loaded copy of the delay line is shifted out,
  instead of each tap register rotating in place. The bit sequence is the
  same.
* **Input pretreatment.** The block diagram shows a stage ahead of the shift
  register without defining it. It is not included: samples enter directly as
  two's-complement words.
* **Handshake, reset and widths.** `in_valid`/`in_ready`, the asynchronous
  active-low reset, and full-precision arithmetic with no output rounding are
  all choices.
* **LUT-less unit.** It uses one mux per tap with that tap's coefficient h_k.
* **Not covered.** The FPGA slice and LUT counts that motivate the half-size
  unit (roughly half the area of the 16-word form on a Spartan-3E) cannot be
  reproduced in simulation. Synthesising the three `LUT_STYLE` settings
  compares them. Offset-binary-coded DA, which would halve the table again,
  is not part of this design.
