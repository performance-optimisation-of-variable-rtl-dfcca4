# Variable-precision DSP engines: parallel FFT, packed complex matrix multiplier, pipelined PI controller

This is a collection of three DSP datapaths. Each one trades word length for clock rate and area in its own way:

- **A fully parallel FFT of any size and any mix of radices.** It takes N complex samples on every clock and delivers N bins a fixed number of clocks later. The transform is split recursively into constant-matrix products, and each product is written out as multiplier–adder trees. Multiplications by 0 or ±1 cost nothing.
- **A complex multiplier that needs only one wide multiplication.** Both complex operands are packed into single words with zero gaps between their parts. One product then holds re·re, im·im and the cross sum in separate bit fields, and one subtraction turns it into the complex result. A fully parallel 9×9 complex matrix multiplier is built from it.
- **A PI (optionally PID) controller in incremental form.** Registers are placed so that the only loop is a single accumulator register. The clock rate therefore does not depend on the word length, and extra pipeline stages can be added after the multipliers for very wide words.

The three engines are independent. `vp_dsp_top` places them side by side with their own ports, sharing only the clock and a synchronous active-high reset.

## The parallel FFT

### Factorisation

An N-point DFT, with N = R·M, is computed in decimation-in-frequency order:

1. **Butterflies.** Multiply the sample vector by the butterfly matrix T_R ⊗ I_M. Output k·M+m is Σ_i x[i·M+m]·W_R^(i·k).
2. **Twiddles.** Multiply by the diagonal matrix D, which scales element k·M+m by W_N^(k·m).
3. **Sub-transforms.** Run R independent M-point transforms, one for each block k of M consecutive elements. Each one is the same recursion applied again.
4. **Permutation.** Interleave the results: X[q·R+k] = c_k[q], where c_k is the output of sub-transform k. This is wiring only.

W_N = e^(−2πi/N) for the forward transform and e^(+2πi/N) for the inverse transform (`INVERSE=1`, unscaled).

A *stage list* chooses the recursion. For example, `64 32 16 8 4 2` means 64 = 2·32, 32 = 2·16, …, ending with a 2-point DFT. `36 12 4` means a radix-3 split, then another radix-3 split, then 4-point DFTs. The radix of a level is its size divided by the next size. At the last level (the leaf) the whole DFT matrix is multiplied directly. Any list whose sizes divide one another works, with up to 8 levels. Invalid lists are rejected when the design elaborates.

`fft_pkg::stage_list_t` is a packed array of eight 16-bit sizes:
- element 0 holds N;
- a zero ends the list;
- `fft_pkg::STAGES_64_R2` is the default list.

### Module hierarchy

```
fft_parallel            valid pipeline + one fft_stage
 └ fft_stage            one recursion level (instantiates itself R times)
    ├ const_cmat_mult   y = x · C, C a constant N×N complex matrix (butterfly or twiddle)
    │  └ const_cdot     one column: multipliers for the non-zero entries + adder tree
    │     └ const_cmult constant complex multiplier (4 real products)
    │        └ csd_mult only in the LUT-only build: shift-and-add by a recoded constant
    └ fft_stage         R sub-transforms of size N/R
```

The constants are computed during elaboration by functions in `fft_pkg`, using `$cos` and `$sin`. Each constant is rounded to the nearest value at `FRAC` fraction bits. No coefficient file is involved.

`const_cdot` instantiates a multiplier only where the quantised constant is non-zero. Its adder tree spans just those products. A 2-point leaf therefore contains only multiplications by ±1. Synthesis reduces these to wiring and negation.

### Number format and precision

- Samples and coefficients are signed fixed point: `W` bits per part, `FRAC` of them fraction bits. The default is 18 bits with 12 fraction bits.
- Each product is truncated back to W bits by dropping its `FRAC` low bits.
- Sums wrap at W bits. There is no scaling between levels.
- The transform gains up to N. The caller must therefore keep |x|·N inside the integer range, which is ±32 with the defaults.
- The coefficients can have a format of their own: `CW` bits with `CFRAC` fraction bits. By default this is the sample format. Products are then truncated by `CFRAC` bits, so the sample format is kept. A constant that does not fit in `CW` bits stops elaboration.

Simulation measures the following signal-to-noise ratios against a double-precision DFT (random complex inputs uniform in ±0.3, ±0.2 for 128 points):

| Configuration | SNR |
|---|---|
| 64-point radix 2 | ≈ 65 dB |
| 12/4 | 63 dB |
| 18/6/2 | 58 dB |
| 9/3 | 59 dB |
| 16/4 LUT-only | 70 dB |
| 8/4/2 inverse | 73 dB |
| 36/12/4 inverse | 59 dB |
| 32/8/2 | 68 dB |
| 48/12/3 | 68 dB |
| 15/3 | 57 dB |
| 27/9/3 | 60 dB |
| 128/32/8/2 | 64 dB |
| 16/8/4/2 LUT-only, 16 bits with 11 fraction bits | 61 dB |
| 32/8/2 LUT-only, 16-bit samples with 18-bit coefficients (16 fraction bits) | 62 dB |
| 36/12/4 inverse, 36 bits per part with 24 fraction bits (36-QAM frames) | 109 dB |

### LUT-only build

With `LUT_ONLY=1`, every constant multiplication is done by `csd_mult`, so no multiplier primitive is needed.

`csd_mult` recodes the constant C into non-adjacent form. It computes h = |C|>>1, t = |C|+h and c = h^t. The bits set in t&c are the positive digits and those in h&c the negative digits, so that |C| = (t&c) − (h&c). The product x·C is then a sum of shifted copies of x minus another such sum.

The LUT-only build is meant for narrower words. The reference point is 16-bit parts with 11 fraction bits: `W=16, FRAC=11`.

### Timing

| Build | Latency per constant-matrix product | Latency per split level |
|---|---|---|
| DSP (default) | 3 clocks: product, truncation, adder tree | 6 clocks (butterflies + twiddles) |
| LUT-only | 5 clocks: 3 in `csd_mult`, truncation, adder tree | 10 clocks |

A leaf level costs one matrix product. For L levels the total latency is MAT_LAT·(2L−1):
- the default 64-point radix-2 list gives 3·11 = 33 clocks;
- `16 8 4 2` in the LUT-only build gives 5·7 = 35 clocks.

`fft_parallel` accepts a new vector on every clock. Its `out_valid` output is `in_valid` delayed by exactly `LATENCY`, which is a localparam.

## The packed complex multiplier

`dsp_packed_cmult` multiplies two unsigned complex numbers (re_a + i·im_a)(re_b + i·im_b) with W-bit parts.

Each operand is packed into a 3W-bit word {re, W zeros, im}. The 6W-bit product of the two words is then

```
P = re_a·re_b · 2^(4W)  +  (re_a·im_b + im_a·re_b) · 2^(2W)  +  im_a·im_b
```

The three terms fall into separate 2W-bit fields. Subtracting the low field shifted up by 4W turns the top field into re_a·re_b − im_a·im_b. The result is:
- real part = P'[6W−1:4W], read as a 2W-bit two's-complement value;
- imaginary part = P'[4W−1:2W].

In an FPGA DSP slice this maps onto one multiplier followed by the post-adder. With W = 6 the operands are 18 bits wide, which is the narrow port of a common DSP slice, so a whole complex multiplication fits in one slice.

**Overflow, which is part of the arithmetic.** Both results are exact modulo 2^(2W). The cross sum can reach 2^(2W+1). When it overflows its field, the carry spills into the real field. Both results are exact when every operand part is below 2^(W−1). In all other cases the tests check the modular model above bit for bit.

**Timing.** Latency is 3 clocks: input registers, the product/subtraction register, and the output register. A new operand pair is accepted on every clock.

### The 9×9 complex matrix multiplier

`packed_cmat_mult` computes C = A·B, where A and B are 9×9 matrices of unsigned 9-bit complex numbers. It uses 729 packed multipliers, all working in parallel.

`packed_cdot` sums one row–column dot product:
- the real fields are sign-extended and the imaginary fields zero-extended;
- both are widened to OW = 2W + ⌈log2 N⌉ + 1 bits, which is 23 by default.

Latency is 4 clocks, with one matrix product per clock. `out_valid` follows `in_valid`.

## The pipelined PI controller

`pid_pipelined` evaluates the incremental PID law on every clock:

```
e[k] = SP[k] − y[k]
u[k] = u[k−1] + a0·e[k] − a1·e[k−1] + a2·e[k−2]
a0 = Kp(1 + Td/T),  a1 = Kp(1 − T/Ti + 2Td/T),  a2 = Kp·Td/T
```

The main configuration is PI (`DERIVATIVE=0`). In this configuration the e[k−2] tap and its multiplier are not built, and `a2` is ignored.

**Registers.** These ranks sit between the inputs and the output:
- y and SP, and the coefficients (which get a second register so that they stay aligned with the error; a coefficient change applies from the sample it arrives with);
- the error, with a delay line that holds e[k−1];
- the multiplier output;
- `PIPE` optional extra product registers;
- a second product register;
- the sum P − I (+ D);
- the accumulator, which is also the output u.

A change of y or SP therefore first shows in u after 6 + PIPE clocks. The only feedback path is the accumulator adder, so wider words need more `PIPE` stages but never a slower loop. For example, about +4 stages for 76 bits and +14 for 96 bits on a fast FPGA.

**Numbers.**
- Coefficients are signed with `FRAC` fraction bits (8 of 16 by default).
- Samples are integers.
- Each product is truncated to WIDTH bits after dropping FRAC bits.
- The error, the sum and the accumulator wrap on overflow.

Because the pipeline delays the controller's reaction, coefficients for a given plant must allow for that delay.

## Where this design departs from its source, or chooses on its own

- **Packed multiplier subtraction.** The reference listing subtracts the low field of the *previous* output register. That is correct only if each operand pair is held for two clocks. Here the low field is taken from the same product, so streaming operands work. The latency is therefore 3 clocks counted from the ports: input registers plus two stages. The source quotes two stages.
- **Sign of the integral tap.** The source's difference equation adds a1·e[k−1] with a1 negative, while its pipelined form computes P − I. This design follows the P − I form, with a1 positive as defined above.
- **FFT word length.** The default is 18 + 18 bits with 12 fraction bits, which is the source's DSP-based configuration. Some of its block diagrams show 32-bit samples.
- **Accumulator register.** The reference pipeline draws the accumulator delay and the output register as two registers loaded with the same value on the same edge. Here one register serves as both, with the same latency.
- **Rounding.** Coefficients are rounded to nearest. Products are truncated.
- **Valid signals.** The FFT and matrix multiplier have `in_valid`/`out_valid` signals, which the source does not have.
- **Reset.** All resets are synchronous and active high.
- **No clock enable.** Throughput is one operation per clock.
- **Plant model.** The source shows a closed-loop response without giving the plant. The top-level test uses its own first-order plant.

## Files

`rtl/`:
- `fft_pkg.sv`
- `fft_parallel.sv`, `fft_stage.sv`
- `const_cmat_mult.sv`, `const_cdot.sv`, `const_cmult.sv`, `csd_mult.sv`
- `dsp_packed_cmult.sv`, `packed_cdot.sv`, `packed_cmat_mult.sv`
- `pid_pipelined.sv`
- `vp_dsp_top.sv`

`tb/`:
- one self-checking testbench `tb_<module>.sv` per module (`fft_stage` is exercised through `tb_fft_parallel`);
- `tb_fft_workloads.sv`, which runs further stage lists: 36-point inverse, 16-point LUT-only at 16 bits with 11 fraction bits, 32, 48, 15, 27 and 128 points, and 32 points LUT-only with coefficients wider than the samples;
- `tb_qam36.sv`, which synthesises 36-QAM frames with the inverse 36-point transform at 36 bits per part and recovers every point with the forward transform;
- `tb_cmult_widths.sv`, which runs the packed multiplier at 4, 8, 9, 16 and 32 bits;
- `tb_pid_widths.sv`, which runs the PI controller at 8, 64, 76, 94 and 96 bits with 0, 0, 4, 12 and 14 extra stages;
- helper harnesses: `fft_check_harness.sv`, `cmat_check_harness.sv`, `cmult_check_harness.sv` and `pid_check_harness.sv`.

Each testbench:
- computes expected values independently (a double-precision DFT, bit-exact integer models of the fixed-point datapaths, and a closed-loop model);
- checks the latency in clocks;
- has a watchdog;
- ends by printing `TB_RESULT checks=<n> failures=<n>`.

`tb_vp_dsp_top` runs the top at its default sizes:
- 20 back-to-back 64-point FFTs: a tone, an impulse and random vectors;
- 8 matrix products, 4 of which overflow the packed cross field;
- a PI closed loop with set-point steps, which must settle and match the model on every clock.

It counts each of these and fails if any of them never happened.

## Simulating

With Verilator 5, from the directory that contains `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/fft_pkg.sv tb/tb_vp_dsp_top.sv --top-module tb_vp_dsp_top -o sim
./obj_dir/sim
```

Replace the top-module name to run any other testbench. The FFT testbenches and the top take around a minute to compile, because the 64-point transform elaborates into several thousand multipliers.

To build another FFT configuration, override `STAGES`. For example, for 36 points with stages 36 12 4:

```
fft_parallel #(.STAGES({16'd0,16'd0,16'd0,16'd0,16'd0,16'd4,16'd12,16'd36}), .INVERSE(1)) u (...);
```

For the LUT-only build, set `LUT_ONLY`, `W` and `FRAC` as needed.
