# RNS 8-point DCT processor with two multiplication stages

This is a pipelined 8-point one-dimensional discrete cosine transform (DCT). It works in a
residue number system (RNS). Each vector of eight 8-bit samples is split into four
independent 8-bit channels. The channels work modulo 256, 255, 253 and 251. Inside a channel
every multiplication is by a constant, and an 8-bit operand has only 256 values. So each
constant multiplier is a 256 x 8 table, the size of one embedded FPGA memory block. Each
addition is an 8-bit modular addition. The transform is a fast cosine transform (FCT)
arranged so that no output passes more than two multiplications. The processor accepts
one vector per clock and gives the result seven clocks later.

The architecture is that of P. G. Fernández, A. García, J. Ramírez, L. Parrilla and
A. Lloris, "Fast RNS-based DCT Computation with Fewer Multiplication Stages". The FCT
itself is due to Jeong, Lee, Kim and Park (Electronics Letters, 1998). This RTL is an
independent implementation. Where the original leaves details open, the choices made here
are listed under "Design choices and departures" below.

## Residue arithmetic in brief

An integer X is held as its four residues `X mod 256`, `X mod 255`, `X mod 253` and
`X mod 251`. The moduli are pairwise coprime, so the four residues identify X uniquely
modulo

    M = 256 * 255 * 253 * 251 = 4,145,475,840   (about 2^32)

Here residues are read as signed values in `[-M/2, M/2)`. Addition, subtraction and
multiplication act on each residue separately. There is no carry between channels, so the
four channels are four copies of the same circuit with a different modulus. Modulo 256 is
the cheap case: ordinary 8-bit adders and multipliers that drop their carries already
compute the residue. That channel needs no tables at all.

The processor gives its results in residue form. To get binary values back, use the Chinese
remainder theorem (CRT):

    X = | r256*275285505 + r255*520216576 + r253*344090880 + r251*3005882880 |_M
    if X >= M/2 then X = X - M

Each weight is `(M/m) * ((M/m)^-1 mod m)`. The end-to-end testbench does exactly this.

## The transform and its fixed-point form

The FCT computes the orthonormal DCT

    DCT(u) = 1/2 * e(u) * sum_i x(i) cos(u(2i+1)pi/16),   e(0) = 1/sqrt(2), else 1

It uses 28 additions and subtractions and twelve real constants k0..k11 (below,
`C(m,n) = cos(pi*n/m)`):

| constant | value | K = round(k*256) |
|---|---|---|
| k0 | 1/C(4,1) | 362 |
| k1 | sqrt(2)/4 | 91 |
| k2 | C(4,1)/2 | 91 |
| k3 | C(4,1)/(4 C(8,1)) | 49 |
| k4 | C(4,1)/(4 C(8,3)) | 118 |
| k5 | C(4,1)/C(8,1) | 196 |
| k6 | 1/C(8,1) | 277 |
| k7 | C(8,3)/C(8,1) | 106 |
| k8 | C(8,1)/(4 C(16,1)) | 60 |
| k9 | C(8,1)/(4 C(16,7)) | 303 |
| k10 | C(8,1)/(4 C(16,3)) | 71 |
| k11 | C(8,1)/(4 C(16,5)) | 106 |

RNS is integer arithmetic, so each constant is replaced by a 10-bit fixed-point integer
`K = round(k * 2^8)`. Scaling creates a problem wherever an unscaled term is added to a
product, as in `c5 = k7*b5 + b7`. Both terms must carry the same 2^8 factor. The unscaled
term therefore passes through one more table, multiplication by `E = 2^8`. These are the
e1, e2 and e3 tables in the channel.

So the integer outputs are scaled. X(0) and X(4) pass through one multiplication and leave
as `2^8 * DCT(u)`. The other six pass through two and leave as `2^16 * DCT(u)`:

    X(u) = 2^(8*s(u)) * DCT(u) + rounding error,   s = {1,2,2,2,1,2,2,2}

(`rns_dct_pkg::OUT_SCALE_STAGES`). The largest |X| is below 2^25, far inside the signed
range of about 2^31. The residues are therefore exact, and the only error is the rounding
of the constants. Over the test vectors, the rescaled output differs from the exact DCT by
at most 1.96 (samples are in [-128, 127]).

Modulo 256, `E = 256` is congruent to 0, so the terms multiplied by E are 0 in that channel.
This is correct residue arithmetic, not an error. A side effect is that a few low bits of
the modulo-256 outputs are always 0, because the coefficients that feed them are even.

## The channel pipeline

`rns_dct_channel` is the core. Every operator output is registered, giving six stages:

| stage | even half (X0, X2, X4, X6) | odd half (X1, X3, X5, X7) |
|---|---|---|
| 1 | a1..a4 = x(0)+x(7), x(1)+x(6), x(2)+x(5), x(3)+x(4) | a5..a8 = x(3)-x(4), x(2)-x(5), x(1)-x(6), x(0)-x(7) |
| 2 | b1=a1+a4, b2=a2+a3, b3=a2-a3, b4=a1-a4 | b5=a5+a6, s6=a6+a7, b7=a7+a8, a8 delayed |
| 3 | c4=K0*b4, c1=b1+b2, c2=b1-b2, c3=b3+b4 | K7*b5, E*b5, b6=K5*s6, E*b7, K7*b7, b8=K6*a8 |
| 4 | c4, c1, c2 delayed; E*c3 | c5=K7b5+Eb7, c6=b6+b8, c7=K7b7-Eb5, c8=b8-b6 |
| 5 | c4-Ec3, c1, c2 delayed, Ec3+c4 | c5+c6, c6-c5, c7+c8, c8-c7 |
| 6 | X6=K4(c4-Ec3), X0=K1c1, X4=K2c2, X2=K3(Ec3+c4) | X1=K8(c5+c6), X7=K9(c6-c5), X3=K10(c7+c8), X5=K11(c8-c7) |

The pipeline has 28 modular adders and subtractors and 16 constant multipliers (tables)
per channel. Stages 3 and 6 are the two multiplication stages. The table read is
synchronous, so a table is a pipeline stage like an adder.

Building blocks:

- `mod_add`: `|a+b|_m`. Adds, then subtracts m when the sum reaches m. Modulo 256 it is a
  plain adder.
- `mod_sub`: `|a-b|_m`. Subtracts, then adds m back on a borrow. Modulo 256 it is a plain
  subtractor.
- `lut_mul`: `|K*a|_m` from a 256 x 8 table. Entry r holds `(K*r) mod m` and is computed
  at elaboration. Modulo 256 it is an 8-bit constant multiplier instead.
- `bin2rns`: converts a signed sample to its residue. Every modulus is at least 128, so a
  negative sample just maps to `x + m`. Modulo 256 the sample's own bits are the residue.

## Top level: `rns_dct1d`

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst_n | in | 1 | asynchronous active-low reset, valid pipeline only |
| in_valid | in | 1 | `x` holds a vector |
| x | in | 8 x signed [7:0] | samples x(0)..x(7) |
| out_valid | out | 1 | `X` holds a result |
| X | out | [4][8] x [7:0] | `X[j][u]` = residue of X(u) modulo `MODS[j]` = 256, 255, 253, 251 |

Timing:

- One register of forward conversion, then six channel stages.
- A vector sampled with `in_valid` on clock edge n appears, with `out_valid`, just after
  edge n+6. That is seven register stages, seven clocks after the vector was presented.
- A new vector can enter on every clock. There is no back-pressure and no stall.
- Only the valid flags are reset. The data registers do not need a reset.

The `MODS` parameter defaults to {256, 255, 253, 251}. Any four pairwise coprime moduli
from 129 to 256 can be used. The coefficient values are in `rns_dct_pkg`.

Synthesised size, from a generic yosys flow:

- 917 word-level cells.
- 1416 flip-flop bits.
- 48 tables of 2^8 x 8 bits (16 in each of the three non-binary channels).
- The modulo-256 channel maps its 16 constant multipliers to logic.

## Design choices and departures

- **Coefficient format.** The original gives the coefficients 10-bit precision. The split
  used here is 2 integer bits and 8 fraction bits, K = round(k*2^8). The largest value is
  k0 = 1.414 → 362, which fits a 10-bit two's complement word.
- **The e1, e2, e3 tables.** They appear in the original channel diagram without a
  definition. Here they are read as multiplication by the fixed-point 1, which aligns
  scales as explained above.
- **Table count.** The original text counts 14 tables per channel. Its channel diagram
  shows 16, and that is what is built: 13 coefficient tables (k0..k11, with k7 used
  twice) and the three e-tables. Equal coefficients (k1 = k2, and k7 used twice) are not shared. The count of
  28 adders and subtractors matches.
- **Output scaling.** It is left to the residue-to-binary converter. The original proposes
  an auto-scaling converter taken from other work (the ε-CRT of Griffin, Sousa and
  Taylor). That converter is not included, so the outputs stay in residue form.
- **Pipelining, handshake and reset.** A register after every operator, a valid flag and
  a reset of the valid flags only. These follow the one-register-per-logic-element
  pipelining the architecture assumes, but the details are this design's own.
- **Not included.**
  - The 2D DCT by rows and columns: two 1D units around a transpose memory. A second RNS
    pass would need the first pass's 2^16-scaled results scaled back into range first.
    That needs the converter above.
  - The binary two's complement version of the same FCT. It serves only for comparison.
    Its integer arithmetic is the testbenches' reference model.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | checks |
|---|---|
| `tb_mod_add`, `tb_mod_sub` | all operand pairs, moduli 251 and 256 |
| `tb_lut_mul` | all residues, four modulus/constant pairs including the binary form |
| `tb_bin2rns` | all 256 samples, moduli 251, 255, 256 |
| `tb_rns_dct_channel` | 2000 streamed vectors through the 251 and 256 channels against the exact integer FCT reduced mod m; 6-clock latency; back-to-back input |
| `tb_rns_dct1d` | the top at default parameters: 3000 vectors (random, full-scale, impulses), CRT-reconstructed and compared exactly with the integer FCT and within 4.0 of the floating-point DCT; 7-clock latency; checks that negative samples, negative results, back-to-back vectors and idle clocks all occur |

The reference models are in `tb/dct_ref_pkg.sv`. They recompute the constants from their
cosine definitions rather than taking them from the RTL package.

To run a testbench with Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/rns_dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_rns_dct1d.sv --top-module tb_rns_dct1d
    ./obj_dir/Vtb_rns_dct1d

Replace the testbench name to run any of the others. Every testbench finishes in a few
seconds.
