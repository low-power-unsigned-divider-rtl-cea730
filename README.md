# Adaptively approximate unsigned divider and square-root circuits

Exact array dividers and square-root (SQR) circuits are slow and power
hungry: a 2n/n restoring array divider has n² subtractor cells and a
borrow-ripple critical path that grows as O(n²). For error-tolerant
workloads such as image processing, most of that work goes into low-order
bits that hardly change the result.

This RTL builds a divider and an SQR circuit that keep only the
**significant** bits of each operand, chosen at run time. Each operand is cut
down to a short window that starts at its leading one. A small exact divider
or SQR circuit works on the windows. A shifter then puts the result back at
the right scale. Because the window follows the leading one, small operands
lose as little relative precision as large ones. This is the difference from
static truncation of the LSBs.

Two families are provided, each in combinational and sequential form:

| unit | module | what it computes | default size |
|---|---|---|---|
| AAXD | `aaxd` | approximate 2n/n unsigned division | 16/8, exact 8/4 core (k = 3) |
| AASR_A / AASR_T | `aasr` (`USE_LUT` = 0 / 1) | approximate square root of a 2n-bit number | 16-bit, 6-bit core (k = 3) |
| AAXD_S | `aaxd_seq` | the divider with a sequential core | 16/8, 6 cycles |
| AASR_S | `aasr_seq` | the SQR circuit with a sequential core | 16-bit, 5 cycles |
| signed AAXD | `aaxd_signed` | signed division through the unsigned AAXD | 32/16, k = 10 |

`aa_top` places all of them side by side. It also includes a 32-bit SQR
circuit, used as the pair to the 32/16 signed divider for QR decomposition.
The units share only clock and reset.

## The approximate divider (AAXD)

Notation: the dividend A has 2n bits and the divisor B has n bits. The
leading one positions of A and B are `l_A` and `l_B`. The design parameter is
k < n.

```
 A ──► LOPD ──l_A──┬──────────────► shamt_sub: sh = l_A - l_B - k ──┐
 │                 ▼                                                 │
 └──────────► prune(2k) ──A_p──┐                                     ▼
                               ├─► array_div 2(k+1)/(k+1) ──Q_d──► q_shifter ──Q_s (n+1 b)──► err_corr ──► Q (n b)
 ┌──────────► prune(k)  ──B_p──┘                                     ▲
 B ──► LOPD ──l_B──┴─────────────────────────────────────────────────┘
```

1. **Leading-one detection** (`lopd`). A priority encoder finds the position
   of the most significant 1. An all-zero operand reports position 0, the same
   as the value 1.
2. **Pruning** (`prune`). The circuit keeps 2k bits of A and k bits of B,
   starting at the leading one, so that the leading one lands on the window's
   MSB. If the operand has more bits below the window, they are truncated. If
   it has fewer, zeros are appended at the LSBs. Either way,
   A ≈ A_p·2^(l_A−2k+1) and B ≈ B_p·2^(l_B−k+1).
3. **Reduced-width exact division** (`array_div`, built from `sub_cell`).
   A_p/B_p can be as large as (2^2k−1)/2^(k−1), which needs k+1 quotient
   bits. A plain 2k/k divider would therefore overflow. The circuit
   zero-extends A_p by two bits and B_p by one bit, and uses a 2(k+1)/(k+1)
   restoring array divider. That divider has (k+1)² cells instead of n².
4. **Shift amount** (`shamt_sub`). A subtractor that is ⌈log2 2n⌉+1 bits
   wide computes sh = l_A − l_B − k. It works in parallel with the divider.
5. **Rescaling** (`q_shifter`). The shifter moves the (k+1)-bit quotient left
   by sh bits when sh > 0, or right by −sh bits when sh < 0. The result is the
   (n+1)-bit Q_s. Together, steps 3 to 5 compute

       Q ≈ ⌊A_p / B_p⌋ · 2^(l_A − l_B − k)

6. **Error correction** (`err_corr`). Rounding in the two pruning steps can
   push Q_s past 2^n − 1. Then n OR gates, q_i = qs_i | qs_n, clamp the result
   to the largest n-bit quotient.

Worked example (16/8, k = 3): A = 1000, B = 13. Here l_A = 9 and l_B = 3.
The pruned operands are A_p = 1000 >> 4 = 62 and B_p = 13 >> 1 = 6. The core
gives ⌊62/6⌋ = 10, and sh = 9 − 3 − 3 = 3, so Q = 80. The exact quotient is
76.

### Operand range

The usual restoring-divider rule applies: the upper n bits of A must be less
than B. Under that rule the approximate quotient stays below 2^(n+1), and the
error correction brings it into n bits.

If the rule is broken, any bit that the shifter would push above position n
is ORed into qs_n, so the output saturates at 2^n − 1. This sticky top bit is
a choice made in this design.

Division by zero is not handled: B = 0 produces a large or saturated value.

### Accuracy

For valid inputs, the error distance |Q − ⌊A/B⌋| is bounded by

    ED ≤ ⌈(2^n − 1)(2^(n−k) − 1) / (2^(n−1) + 2^(n−k) − 1)⌉   (looser: 2^(n−k+1) − 2)

`tb_wl_div16` runs all 8,355,840 valid 16/8 operand pairs through three
core sizes:

| pruned dividend 2k | core | ER | NMED | MRED | ED_max | bound |
|---|---|---|---|---|---|---|
| 6 | 8/4 | 91.06 % | 2.97 % | 6.34 % | 49 | 50 |
| 8 | 10/5 | 84.49 % | 1.46 % | 3.12 % | 27 | 27 |
| 10 | 12/6 | 73.74 % | 0.72 % | 1.52 % | 14 | 14 |

The columns are defined as follows:

* **ER** is the share of inputs with a wrong result.
* **NMED** is the mean error distance divided by 255.
* **MRED** is the mean relative error distance, over inputs whose exact
  quotient is non-zero.

When both operands are small, the result is exact if l_A − l_B ≤ k. For
example, 31/3 with k = 3 gives exactly 10. If the leading positions are
further apart, the left shift drops low quotient bits: 17/1 with k = 3 gives
16.

## The approximate square root (AASR)

The same pruning keeps 2k bits of the radicand, and a 2k-bit exact SQR core
computes ⌊√A_p⌋. Scaling A by 2^e scales the root by 2^(e/2). So that this
stays a shift, e = l_A − 2k + 1 must be even. The circuit forces the LSB of
`l_A` to 1, which means l_A is always odd.

With `l_A` odd, the root shift (l_A − 2k + 1)/2 reduces to l_A[msb:1] − (k−1).
That is a constant offset, so no subtractor is needed in the datapath:

    √A ≈ ⌊√A_p⌋ · 2^((l_A − 2k + 1)/2)

When l_A was even, forcing it odd leaves the window's MSB at 0. The core
handles that case without any change.

Radicands below 2^2k are shifted left by an even amount before the core and
the root is shifted right afterwards, so their root is exact.

The result is never above the exact root, and its error distance is at most
2^(n−k) − 1.

Worked example (16-bit, k = 3): A = 50000. Here l_A = 15, A_p = 50000 >> 10
= 48, and ⌊√48⌋ = 6. The shift is (15 − 5)/2 = 5, so the result is 192. The
exact root is 223, so the error is 31, which is the worst case for this size.

Two cores are provided. They give identical results:

* **`array_sqrt`** (AASR_A) is a restoring array. Row i brings down two
  radicand bits and tries to subtract 4·Q_i + 1, where Q_i is the root found
  so far. The partial remainder never exceeds 2·Q_i, so row i needs only i+2
  subtractor cells.
* **`lut_sqrt`** (AASR_T) is a 2^2k-entry table of ⌊√i⌋. It is filled at
  elaboration by a constant function, so no data file is needed. The table
  grows as 4^k, which is cheap only because the core is small.

`tb_wl_sqr16` runs all 65,536 16-bit radicands. Its results match the
reference error figures for this design to the printed precision:

| 2k | ER | NMED | MRED | ED_max = 2^(8−k) − 1 |
|---|---|---|---|---|
| 6 | 95.71 % | 5.33 % | 7.98 % | 31 |
| 8 | 91.14 % | 2.53 % | 3.80 % | 15 |
| 10 | 82.30 % | 1.16 % | 1.71 % | 7 |
| 12 | 65.82 % | 0.48 % | 0.69 % | 3 |

## Sequential versions (AAXD_S, AASR_S)

Both sequential units replace the array core with a one-bit-per-clock
restoring core:

* `seq_div_core` uses one (W+1)-bit subtractor and a shared dividend/quotient
  shift register.
* `seq_sqrt_core` uses one (W+3)-bit subtractor.

The pruning and rescaling logic is the same as in the combinational units.
An operation takes one preparation cycle, one cycle per result bit of the
reduced core, and one output cycle:

| unit | cycles | 16/8, 16-bit exact equivalent |
|---|---|---|
| `aaxd_seq` | k + 3 (6 for k = 3, 13 for the 32/16 k = 10) | n + 2 = 10 |
| `aasr_seq` | k + 2 (5 for k = 3, for 16- and 32-bit) | n + 2 = 10 |

The handshake is as follows:

```
clk        _/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_
start      ‾‾‾‾\___________________________     sampled with a, b on edge 0
state      IDLE|PREP|ITER|ITER|ITER|ITER|OUTP|IDLE     (aaxd_seq, k = 3)
busy       ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____
done       __________________________________/‾‾‾\__   edge 6 = k+3
```

* `start` is accepted on a rising edge while `busy` is low. The operands are
  registered on that edge.
* `start` is ignored while `busy` is high.
* `done` is a one-cycle pulse on edge k+3 (divider) or k+2 (SQR) after the
  accepting edge.
* `q` holds its value until the next result arrives.
* Reset is asynchronous and active low.

An assertion in each unit checks that the core result is ready in the output
cycle.

## Signed division for QR decomposition

In Gram–Schmidt QR decomposition, vectors are normalised with signed
divisions and square roots of sums of squares. `aaxd_signed` handles the
signed divisions as follows:

1. Take the magnitudes of the two's complement operands.
2. Divide them with the unsigned AAXD.
3. Take the result's sign as the XOR of the operand signs.

The output has n+1 bits, so that every n-bit magnitude can be negated. The
default is 32/16 with a 20-bit pruned dividend (k = 10). In `aa_top` it is
paired with a 32-bit AASR_T with a 6-bit core.

`tb_wl_qrd32` checks both units on 300,000 random operands:

* The divider's maximum error is 96, against a bound of 126.
* The SQR circuit's maximum error is 8191, which equals its bound
  2^13 − 1.

## Files and parameters

`rtl/`:

* `aa_pkg.sv` holds the sequential state type and the constant `isqrt`
  function.
* `sub_cell`, `lopd`, `prune`, `array_div`, `array_sqrt`, `lut_sqrt`,
  `shamt_sub`, `q_shifter`, `err_corr` are the building blocks.
* `aaxd`, `aasr`, `seq_div_core`, `seq_sqrt_core`, `aaxd_seq`, `aasr_seq`,
  `aaxd_signed` are the units built from them.
* `aa_top` is the top level.

Every parameter defaults to the sizes above:

* `aaxd`, `aasr`, `aaxd_seq` and `aasr_seq` take N (n) and K (k).
* `aasr` also takes `USE_LUT`.
* The cores take W, the width of their result.
* `aa_top` takes N, K_DIV and K_SQR, plus Q_N, Q_K_DIV and Q_K_SQR for the
  QR pair.

Constraints on the parameters:

* K must be below N.
* The array divider needs W ≥ 2.
* The SQR cores need W ≥ 2.

`tb/` has one self-checking testbench per module (`tb_<module>.sv`) and
three workload benches (`tb_wl_*`). They share the arithmetic models in
`tb/aa_ref_pkg.sv`, which restate each approximation in plain integer
arithmetic.

`tb_aa_top` runs `aa_top` at its default parameters. It checks every unit
against the models, checks the sequential latencies, and counts each
mechanism, failing if any mechanism is never exercised. The mechanisms are:

* left and right quotient shifts
* saturation by the error correction
* zero-appending pruning of dividend and divisor
* LSB truncation
* a zero dividend
* an even leading position forced odd
* left and right root shifts
* negative signed quotients
* `start` ignored while busy

Each bench prints one `TB_RESULT checks=… failures=…` line.

To simulate, for example, the top-level bench:

```
verilator --binary --timing --assert --top-module tb_aa_top -y rtl -y tb +libext+.sv \
    rtl/aa_pkg.sv tb/aa_ref_pkg.sv tb/tb_aa_top.sv
./obj_dir/Vtb_aa_top
```

Every testbench finishes in a few seconds. The longest is `tb_wl_div16`, at
about 4 s.

## Design choices and limits

These points are choices made in this RTL, where the underlying method
leaves them open:

* The divider's shifter keeps a sticky top bit, so out-of-range inputs
  saturate rather than wrap.
* Division by zero is not handled.
* In the SQR array, row i has i+2 subtractor cells, the minimum that the
  remainder bound allows. A design with full-width rows would have n² + n
  cells for a 2n-bit circuit. The function is the same.
* The lookup-table contents are computed at elaboration rather than loaded
  from a file.
* The start/busy/done handshake and the asynchronous active-low reset are
  this design's. Only the cycle accounting (preparation, iterations, output)
  is prescribed by the method.
* Signed operands and results are two's complement, and the signed result is
  one bit wider than the unsigned quotient.
* The subtractor-cell gate equations are the standard full subtractor with a
  restore multiplexer.
* Combinational units have no pipeline registers; timing closure at a given
  clock is left to the integrator.

These parts of the surrounding systems are not included:

* the ultrasound B-mode imaging chain around the envelope-detector square
  root
* the QR-decomposition and reconstruction datapath itself
* the approximate-subtractor dividers and SQR circuits that this design is
  usually compared against
