# RNS FIR filter with LUT multipliers and gate-level ripple adders

An FIR filter spends nearly all of its hardware on multipliers and adders
whose width grows with the word length. This design shrinks them by
computing the filter in a **residue number system (RNS)**. Each sample and
each coefficient is replaced by its remainders modulo three small, pairwise
coprime numbers: 2^n - 1, 2^n and 2^n + 1. By default n = 3, so the moduli
are 7, 8 and 9. Three independent copies of the filter then run side by
side, one per modulus, on words only n + 1 = 4 bits wide. A final converter
rebuilds the binary result from the three output remainders with the
Chinese remainder theorem (CRT).

Inside each channel the arithmetic is built from three small cells:

* a half adder that has no XOR gate,
* a full adder made of two of these half adders,
* a multiplier that looks products up in multiplexers instead of adding
  partial products.

```
            +-------------+     +--------------------+     +-------------+
 x_in ----->| rns_encoder |--+->| rns_fir_channel %7 |--+->|             |
            +-------------+  |  +--------------------+  |  |             |
                             +->| rns_fir_channel %8 |--+->| rns_decoder |--> y_out
 coef[k] -> rns_encoder (x TAPS)+--------------------+  |  |   (CRT)     |
                             +->| rns_fir_channel %9 |--+->|             |
                                +--------------------+     +-------------+
```

## What the filter computes

    y_out[n] = ( sum_{k=0}^{TAPS-1} coef[k] * x[n-k] )  mod  M,
    M = (2^n - 1) * 2^n * (2^n + 1)      (M = 504 for n = 3)

**This "mod M" is the main thing to understand before using the design.**
An RNS represents the integers 0 .. M-1 and nothing more. If the true FIR
output reaches M, the result wraps around. With the default moduli 7, 8 and
9, the output is exact only while the true output stays below 504. That is
enough for the small worked example in the testbench: coefficients 2, 4, 6, 8
and input 2 give 4, 12, 24, 40. It is far from enough for full-range 8-bit
data, where four taps can reach 4 * 255 * 255.

You have two ways to get exact results:

* **Make M large enough.** Raise `N`. Every residue becomes N + 1 bits wide,
  and M is about 2^(3N). As a rule, choose N with
  M > TAPS * max|x| * max|coef|.
* **Signed data.** Feed the filter values taken modulo M: a negative value v
  goes in as M + v, with `DATA_W`/`COEF_W` wide enough to hold M - 1. Read
  outputs at or above M/2 as y - M. Modular arithmetic makes this exact,
  as long as |true output| < M/2. The ECG testbench works this way, with
  N = 11 (M ≈ 8.6e9), signed 16-bit samples and Q15 coefficients.

The hardware itself treats every input as unsigned.

## The residue channels

### Forward converter (`rns_encoder`, `mod_op`)

Three remainder operators read the same input word. They produce
`r[0] = x mod (2^N-1)`, `r[1] = x mod 2^N` and `r[2] = x mod (2^N+1)`. All
three outputs are N + 1 bits wide, the width that 2^N + 1 needs, so the
channels share one datapath width. Example: 100 → (2, 4, 1).

`mod_op` is written as a remainder by a constant, and synthesis turns it
into fixed logic. The top instantiates one converter for the sample and one
for each coefficient. The coefficients are therefore converted continuously
and may be changed at run time. Hold them steady while a stream is being
filtered.

### Channel filter (`rns_fir_channel`)

This is a direct-form FIR: a delay line of TAPS-1 residue registers, one LUT
multiplier per tap and a chain of ripple-carry adders. The products are
summed in plain binary, in a word that is wide enough never to overflow
(2R + clog2(TAPS) + 1 bits). The sum is reduced modulo the channel's modulus
once, at the end. Reducing after every product would use narrower adders
but more remainder logic. This design reduces once.

### Reverse converter (`rns_decoder`)

With M_i = M / m_i and K_i the inverse of M_i modulo m_i:

    y = ( r0*W0 + r1*W1 + r2*W2 ) mod M,     W_i = (M_i * K_i) mod M

The weights are computed at elaboration by `rns_pkg::crt_weight`. For n = 3
they are W = (288, 441, 280), with M = 504. Each weight is a constant, so
each term is a multiplication by a constant, followed by one adder and one
remainder by M. The formula also holds for residues that have not been
reduced. For example, with n = 4 (moduli 15, 16, 17, M = 4080), the inputs
(200, 80, 300) decode to 2000, the same as their reduced residues (5, 0, 11).
`RIN_W` lets the inputs be wider than N + 1 bits for such use.

## The arithmetic cells

### Half adder without XOR (`prop_half_adder`)

    carry = a AND b
    sum   = (a OR b) AND NOT carry

The OR is 1 when at least one input is 1. Masking it with the inverted carry
removes the case where both are 1, which leaves exactly the XOR. Logically it
is an ordinary half adder; only the gate mix differs.

### Full adder and ripple adder (`prop_full_adder`, `prop_rca`)

The first half adder adds a and b. The second adds their sum and the carry
in. The carry out is the OR of the two half-adder carries, which can never
both be 1. `prop_rca` chains W of these full adders into a plain ripple-carry
adder. Every adder in the filter is one of these: in the multipliers, in the
tap sums, and in the filter's adder chain.

### LUT multiplier (`lut_mul_2x2`, `lut_mul`)

The 2x2 multiplier has no adder. It uses two multiplexers:

| a  | product                                      |
|----|----------------------------------------------|
| 0  | 0                                            |
| 1  | b (zero-extended, `00b`)                     |
| 2  | b shifted left by one (`0b0`)                |
| 3  | 3*b, picked by b from the constants 0, 3, 6, 9 |

`lut_mul` splits each W-bit operand into 2-bit digits. It multiplies every
pair of digits in a `lut_mul_2x2` and adds the products, each shifted by
2·(i+j), with ripple-carry adders. For the default W = 4 this uses four 2x2
multipliers. Other widths work too; an odd width is padded with one zero bit.
Inside a channel, W equals the residue width N + 1.

## Interface and timing (`rns_fir_top`)

| port      | dir | width          | meaning |
|-----------|-----|----------------|---------|
| `clk`     | in  | 1              | clock, rising edge |
| `rst_n`   | in  | 1              | synchronous, active-low reset; clears all delay lines (earlier samples count as 0) |
| `x_valid` | in  | 1              | `x_in` carries a sample this cycle |
| `x_in`    | in  | DATA_W         | sample (unsigned, or a value mod M) |
| `coef`    | in  | TAPS x COEF_W  | coefficients, `coef[0]` multiplies the newest sample |
| `y_valid` | out | 1              | one-cycle pulse: `y_out` has just been updated |
| `y_out`   | out | clog2(M)       | filter output mod M |
| `y_res`   | out | 3 x (N+1)      | the three channel output residues |

A sample presented with `x_valid` high is accepted at the rising edge. The
output that includes it appears right after that same edge, so `y_out` is
valid one clock after the sample is presented, together with `y_valid`. It
holds until the next accepted sample. Samples may arrive on every clock. When
`x_valid` is low, the delay lines and the output hold. The path from the
channel output registers through the CRT converter to `y_out` is
combinational. In the other direction, everything from `x_in` through the
multipliers and adders up to the channel registers is combinational. There
are no further pipeline stages.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 3       | moduli 2^N-1, 2^N, 2^N+1 (7, 8, 9) |
| `TAPS`    | 4       | filter length |
| `DATA_W`  | 8       | sample width |
| `COEF_W`  | 8       | coefficient width |
| `YW`      | clog2(M)| output width |

The defaults match the worked examples: a 4-tap filter, 8-bit input words,
and moduli 7/8/9. The structure is also meant for 4 to 64 taps and word
lengths of 4 to 32 bits. `tb_rns_fir_sizes` runs 8x8, 16x16, 32x16 and 64x32
(taps x bits). M is computed as a 64-bit constant, so N may go up to 21;
N = 11 is the largest size simulated.

## Verification

Each block has a self-checking testbench, `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|-----------|----------------|
| `tb_prop_half_adder`, `tb_prop_full_adder`, `tb_lut_mul_2x2` | exhaustive |
| `tb_prop_rca` | 8-bit exhaustive, 32-bit corner cases and random |
| `tb_lut_mul` | 4x4, 5x5, 8x8 exhaustive; 16x16 random |
| `tb_mod_op`, `tb_rns_encoder` | moduli 7/8/9 exhaustive on 8 bits; 15/16/17 and 504 random |
| `tb_rns_decoder` | all 504 values round-trip; the n = 4 example → 2000 |
| `tb_rns_fir_channel` | worked 4-tap example, random data with idle cycles, reset |
| `tb_rns_fir_top` | end to end at default parameters. Covers the worked example (4, 12, 24, 40), exact small-range outputs, wrapped full-range outputs, idle cycles and mid-stream reset, with the one-cycle latency checked on every output. It counts each of these events and fails if one never happened. |
| `tb_rns_fir_sizes` | 8/16/32/64-tap filters at 8/16/16/32-bit words |
| `tb_rns_fir_ecg` | 16- and 32-tap 50 Hz low-pass (fs = 1 kHz, Kaiser window) on a synthetic noisy ECG, using signed data mod M (N = 11). Every output must be exact, and the residual noise RMS must fall below half the input's, with 32 taps better than 16. |

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
        --top-module tb_rns_fir_top rtl/rns_pkg.sv tb/tb_rns_fir_top.sv
    ./obj_dir/Vtb_rns_fir_top

`tb_rns_fir_ecg` elaborates two filters with 12-bit residues. It takes
several minutes to compile.

## Where this design makes its own choices

* **Gate structure.** The gate structure of the half adder, the full adder
  and the 2x2 multiplexer multiplier follows the original schematics. The
  way `lut_mul` adds its partial products (a serial chain of ripple adders)
  and its extension beyond 4x4 are choices of this design.
* **Reduction point.** Each channel reduces modulo m once, after the binary
  tap sum.
* **Remainder logic.** `mod_op` and the CRT converter are written as
  remainders and products with constants. Their gate-level form is left to
  synthesis.
* **Handshake, reset and latency.** The `x_valid`/`y_valid` handshake, the
  synchronous reset and the one-cycle latency are choices of this design.
  The reference behaviour counts the current sample in the output of the
  same step, and this design registers that output at the edge that accepts
  the sample.
* **Coefficient conversion.** Coefficients are converted to residues in
  hardware, one converter per tap.
* **Range and signedness.** Only unsigned arithmetic and output mod M are
  provided. There is no overflow detection, and no scaling or rounding of
  the output.
* **Not included.** The alternative adders and multipliers that this
  architecture is usually compared against are not part of this RTL:
  carry-look-ahead, Kogge-Stone, Wallace, Dadda and Vedic.
