# Multiplier-free 4-tap adaptive FIR filter (distributed arithmetic, delayed LMS)

This is a 4-tap adaptive FIR filter. Its weights follow an LMS-style update,
and the datapath has no multiplier:

* **Filtering.** The inner product `y = Σ w_i·x(n-i)` uses *distributed
  arithmetic* (DA). The weights are read one bit at a time. Each bit slice
  selects a precomputed sum of input samples from a small table. A shift
  accumulator combines the slices.
* **Adaptation.** The weight update `w += μ·e·x` rounds `|μ·e|` down to a
  power of two, which turns the product into a barrel shift of `x`.

Three ideas from the original architecture are kept here:

* The DA table is *pipelined*. Only the four input samples are registered,
  and the eleven sums of two or more samples come from adders.
* The shift accumulator works in *carry-save* form, so no carry has to
  propagate inside the bit loop.
* A *ripple-carry* version of the accumulator can be chosen instead.

The RTL is written for L = 8-bit samples, desired signal and weights, and
N = 4 taps. It is synthesizable SystemVerilog (IEEE 1800-2017).

## Top-level behaviour

`da_lms_filter` runs on one fast *bit clock*. A sample period is **L = 8
clock cycles**, one cycle per weight bit.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | bit clock; asynchronous active-low reset (clears all state, weights = 0) |
| `x_in` | in | L | next input sample |
| `d_in` | in | L | desired sample with the same index as `x_in` |
| `sample_take` | out | 1 | `x_in` and `d_in` are taken at this clock edge, once every L cycles, first at cycle L-1 after reset |
| `y_out` | out | L+2 | filter output |
| `e_out` | out | L+2 | error `d - y` |
| `mu_e` | out | L | scaled error `e >>> 2` (μ = 1/4), registered |
| `w_out[4]` | out | 4×L | weights in use in the current period |

Number format: `x`, `d` and `w` are L-bit two's-complement integers. The
output is

    y = floor( Σ_i x(n-i)·w_i / 2^L )

so each weight acts as the fraction `w/2^L`, in [-1/2, 1/2). For L-bit
operands, |y| ≤ 2^(L-2) and |e| ≤ 3·2^(L-2). Nothing on the error path can
overflow.

**Latency.** Number the takes m = 0, 1, 2, … In the cycle of take m:

* `y_out` and `e_out` belong to the sample taken at take m-2;
* `mu_e` belongs to sample m-3;
* `w_out` already contains the update driven by sample m-4.

The weight update is therefore the *delayed* LMS

    w(k+1) = w(k) + sign(μe(k-2)) · ( X(k-2) >>> t(|μe(k-2)|) )

Here X(k) = [x(k), x(k-1), x(k-2), x(k-3)], and sample indices are counted
relative to the sample period in which the update happens.

## How the inner product is computed

Let bit j of weight `w_i` be `w_i[j]`, where bit L-1 is the sign bit. Then

    Σ_i w_i·x_i = Σ_{j<L-1} 2^j·T_j  −  2^(L-1)·T_{L-1},     T_j = Σ_i w_i[j]·x_i

`T_j` depends only on the 4-bit slice `A = {w_3[j], w_2[j], w_1[j], w_0[j]}`.
It is one of the 16 subset sums of the four samples.

**DA table (`da_table`).** The table holds a delay line x(n)…x(n-3), which
shifts once per sample. Combinational ripple-carry adders form the other
sums:

* six pairs (L+1 bits), from the samples;
* four triples (L+2 bits), each a pair plus one sample;
* the 4-sum (L+2 bits), as two pairs added.

That is four registers and eleven adders, instead of fifteen entry registers.
Address bit i selects x(n-i), and entry 0 is the constant 0. Every entry is
sign-extended to L+2 bits. The weights change every sample, so the table
stores sums of *samples*, not sums of weights.

**16:1 MUX (`da_mux16`).** In bit cycle j, the weight serialiser presents
slice A, and the MUX returns `T_j`.

**Shift accumulation, LSB first.** The accumulator computes

    A_0 = T_0,   A_j = floor(A_{j-1}/2) + T_j,   A_{L-1} = floor(A_{L-2}/2) − T_{L-1}

so A_{L-1} ≈ Σ w·x / 2^(L-1). The floors drop the low bits that a right
shift pushes out.

### Carry-save form (`csa_accumulator`, the default)

The running value is kept as two (L+2)-bit words, a sum word `s` and a carry
word `c`, with **A = s + 2c**. The carry word is stored one place to the left
of the sum word, unshifted. Two facts make the loop cheap:

1. Halving needs no adder: `floor(A/2) = (s >>> 1) + c`, exactly, because
   `2c` is even.
2. One 3:2 carry-save adder therefore does a whole bit cycle:
   `(s', c') = CSA(s >>> 1, c, ±T_j)`.

For 3:2 compression, `a + b + t = s + 2c` holds exactly when all five words
are read as signed two's-complement numbers of the same width. So the
redundant pair never needs an extra sign bit, although A itself may exceed
the L+2-bit range while the loop runs.

Subtraction in the sign cycle is an XOR of the operand (one's complement).
The missing +1 is added later, by the carry-propagate adder that forms the
output:

    y = (s >>> 1) + c + s[0]  =  floor((s + 2c + 1)/2)  =  floor(A_{L-1}/2)

`error_calc` does this with one (L+2)-bit ripple-carry adder and carry-in
`s[0]`. The `>>> 1` also keeps y inside L+2 bits.

### Ripple-carry form (`rca_accumulator`, `USE_CSA = 0`)

This version uses the same recurrence and the same XOR sign control. The
value is one (L+3)-bit register, and each bit cycle is one carry-propagate
addition. It presents the value in the same redundant form, c = A >>> 1 and
s = A[0], so the output path is shared. The two builds give identical
outputs: a shared testbench runs both against the same reference.

### Timing inside a sample period

`control_unit` is a modulo-L counter. It raises `first` in bit cycle 0 and
`last` in bit cycle L-1.

| event | when |
|---|---|
| weight slice j on the MUX select lines | bit cycle j |
| accumulator restarts from zero (`first`) | bit cycle 0 |
| sign cycle: XOR the operand | bit cycle L-1 (`last`) |
| new sample into the table; x(n-4), x(n-5) shift; d delays shift; `mu_e` registers; weights update and reload into the serialisers | edge ending bit cycle L-1 |
| `s_out`/`c_out` registers take the finished accumulation | edge ending bit cycle 0 of the next period |

## Error path and weight update

* **`error_calc`** forms y and `e = d - y` (in L+2 bits), then registers
  `mu_e = e >>> 2`, which is μ = 1/4. The desired sample passes two sample
  registers, so that it meets the output computed from the same sample.
* **`sign_mag_separator`** splits `mu_e` into a sign bit and an (L-1)-bit
  magnitude.
* **`control_word_gen`** finds the leading one p of the magnitude and outputs
  the shift `t = L-2-p`, 3 bits for L = 8. A zero magnitude gives `t = 3'b111`,
  which means "no update".
* **`weight_increment`** has four `barrel_shifter`s that compute
  `x(n-2-i) >>> t`. Four ripple-carry adders then add the result to `w_i`,
  or subtract it (as `~b + 1`) when μe is negative. The result saturates at
  the L-bit limits. The new weights load into four `ps_converter` shift
  registers, which serialise them LSB first for the next period.
* The inputs the update needs, x(n-2)…x(n-5), are the last two taps of the
  DA table plus two extra sample registers in the top level.

## Module map

    da_lms_filter                 top (USE_CSA selects the accumulator)
    ├── control_unit              bit-cycle counter: first / last
    ├── inner_product_4pt         DA inner product + s/c output registers
    │   ├── da_table              delay line + 11 rca_adder
    │   ├── da_mux16
    │   └── csa_accumulator       (csa_adder)   or   rca_accumulator (rca_adder)
    ├── error_calc                y, e, mu_e   (rca_adder ×2)
    ├── sign_mag_separator
    ├── control_word_gen
    └── weight_increment          barrel_shifter ×4, rca_adder ×4, ps_converter ×4
    da_pkg                        N_TAPS = 4, L_DEF = 8
    rca_adder / csa_adder         chain / row of full_adder

Every module has parameter `L` (default 8). The structure is written for four
taps, and `N_TAPS` is fixed at 4 because the DA table's adders are
hand-wired.

## Where this RTL follows the original architecture and where it chooses

These points follow the original architecture:

* four taps;
* a pipelined DA table with four delays;
* a 16:1 MUX addressed by the weight bit slices, LSB first;
* XOR sign control;
* a carry-save accumulator with sum and carry outputs;
* `(s>>1)+c` forms the output;
* a subtractor, then `>>2` down to L bits, a register, and sign/magnitude
  separation;
* a 3-bit control word driving four barrel shifters and four adder/subtractors;
* a bit-serial weight converter;
* x(n-2)…x(n-5) and μe(n-2) feed the update;
* the L, L+1, L+2 widths of the table entries;
* the optional ripple-carry accumulator.

These are this design's own choices:

* **Word length L = 8.** It comes from the 8/9/10-bit buses of the reference
  DA-table simulation. The weight width is taken equal to L.
* **Adder count.** The description counts ten adders in the pipelined table,
  but eleven is the minimum for the eleven multi-sample sums. Eleven are used.
  Which pair feeds which triple is also a choice here.
* **Order of the table entries.** The usual DA order is used: address bit i
  selects x(n-i).
* **Sign correction.** The +1 of the sign-cycle subtraction enters as the
  carry-in `s[0]` of the output adder. This makes y exact. The original shows
  only `(s>>1)+c`.
* **Power-of-two quantisation.** The encoding of the control word, t = L-2-p
  with all-ones meaning zero, is this design's. So is the choice of "leading
  one" (round down) as the power-of-two rule.
* **Weight saturation.** The add/subtract saturates the weights. The original
  does not say how overflow is handled.
* **Interface.** `x_in` and `d_in` carry the same sample index, so the desired
  signal is delayed by two sample registers, where the original drawing shows
  one D against an input port labelled x(n+1). The start/stop protocol is the
  free-running `sample_take` strobe.
* **Reset.** Asynchronous and active-low, clearing everything to zero.
* **Everything is ripple-carry.** Every carry-propagate addition uses the
  explicit `rca_adder` (a chain of full adders) rather than `+`. This includes
  the table adders, the output, error and weight adders, and the RCA
  accumulator.

These are not built:

* the earlier DA-table form with fifteen entry registers, which the design
  improves on;
* a reference LMS filter built with multipliers.

The FPGA area and delay numbers quoted for the original design come from
vendor synthesis and are not reproduced here.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_rca_adder` | exhaustive 8-bit a+b+cin |
| `tb_csa_adder` | random triples, signed identity a+b+c = s+2cy |
| `tb_da_table` | all 16 entries and taps against a model delay line, random shifts and extremes; constant input 10 gives 10/20/30/40 |
| `tb_da_mux16` | every select on random tables |
| `tb_csa_accumulator`, `tb_rca_accumulator` | L-cycle recurrence incl. the one's-complement sign cycle (shared body `tb_acc_body.svh`) |
| `tb_inner_product_4pt` | both accumulators against the integer recurrence and against Σx·w/2^L (within truncation); result appears exactly after the first edge of the next period |
| `tb_error_calc` | y from redundant pairs, e with the two-sample d delay, μe register timing |
| `tb_sign_mag_separator`, `tb_control_word_gen` | exhaustive |
| `tb_weight_increment` | update formula, saturation, skipped update, LSB-first bit slices |
| `tb_barrel_shifter` | exhaustive x >>> t |
| `tb_ps_converter` | LSB-first serialisation after each load |
| `tb_control_unit` | period and strobes |
| `tb_da_lms_filter` | end to end at default parameters, against a sample-level integer model |
| `tb_da_lms_rca` | the same, with `USE_CSA = 0` |

The end-to-end tests share `tb_lms_body.svh` and run three phases over 1600
samples:

1. The filter identifies an unknown 4-tap system (weights 40, -24, 12, 90).
2. A full-scale desired signal saturates the weights.
3. A zero input must leave the weights unchanged.

Every output, error, scaled error and weight is compared exactly with the
model in every sample. The test also checks:

* the L-cycle sample spacing;
* that add, subtract and skipped updates, weight saturation and negative
  weights each occur at least once;
* that the error energy falls.

In that run the weights reach 42, -25, 12, 92, and the error energy drops
from 10191 (first 200 samples) to 536 (samples 800–999).

`control_unit` and `weight_increment` also carry concurrent assertions:

* `last` is always followed by `first`, and the two never coincide;
* the shift code is valid whenever the weights update.

Run with `--assert` to check them.

To run one testbench with plain Verilator:

    verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_da_lms_filter \
        -y rtl -y tb +libext+.sv -Irtl -Itb rtl/da_pkg.sv tb/tb_da_lms_filter.sv
    ./obj_dir/Vtb_da_lms_filter

To change the word length, set `L` on `da_lms_filter`. `control_word_gen`
sizes the shift code as `$clog2(L)` bits, which always leaves the all-ones
code free. The testbenches are written for L = 8.
