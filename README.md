# Modulo 2^n+1 subtractor and multiplier on normal-representation residues

A residue number system (RNS) keeps an integer as its residues with respect
to a few co-prime moduli. Additions, subtractions and multiplications then
work on each residue on its own, with no carries between them. The set
{2^n-1, 2^n, 2^n+1} is the usual choice. Of its three channels, the
2^n+1 channel is the hard one: its residues run from 0 to 2^n, so they need
n+1 bits.

Most published 2^n+1 units use the *diminished-one* code (x-1). That code
fits the residues in n bits, but zero then needs special handling. This RTL
keeps residues in plain binary on n+1 bits. The modular correction is a
short fixed chain of logic, which is cheap for the small n used in
image-processing work. For example, 8-bit pixels fit the set {7, 8, 9},
whose 2^n+1 channel has n = 3.

There are two combinational units:

* `mod2n1_sub`: c = (a - b) mod (2^n+1);
* `mod2n1_mul`: r = (a * b) mod (2^n+1). It is built from a plain binary
  multiplier followed by `mod2n1_sub`.

`mod2n1_mul` is the top level and contains every other module.

## The subtractor and its MSB multiplexer

The inputs a and b lie in 0..2^n and are N+1 bits wide (N is the parameter n).
The subtractor has three parts:

1. `bin_sub` computes d = a - b on N+1 bits, plus a borrow that is 1 when a < b.
2. `bin_add` computes s = d + borrow, with carry out `cout`.
3. `msb_mux` picks the result's MSB (bit N). It takes `s[N]` when borrow = 0
   and `cout` when borrow = 1. The low N bits are always `s[N-1:0]`.

Why this works:

* **a >= b.** d = a - b is already the answer. Its range 0..2^n fits in
  N+1 bits. The adder adds 0 and `cout` is 0.
* **a < b.** The answer is a - b + 2^n + 1. In N+1 bits, d holds
  a - b + 2^(n+1), so d + 1 = a - b + 1 + 2^(n+1). That value lies in
  2^n+1 .. 2^(n+1), and the answer is 2^n less than it. There are two cases:
  * If d + 1 < 2^(n+1), bit N of s is 1. Subtracting 2^n just clears that
    bit, and `cout` is 0.
  * If a - b = -1, d is all ones. The adder wraps to zero with `cout` = 1,
    and the answer is 2^n = 1 followed by zeros. Taking the MSB from `cout`
    gives that.

Example with n = 4 (modulus 17):
* 0 - 1: d = 11111, s = 00000, cout = 1, result 10000 = 16.
* 0 - 2: d = 11110, s = 11111, cout = 0, result 01111 = 15.

Using the borrow as the multiplexer's select is this design's own reading of
the structure. The original description states the MSB rule only for the
wrapping case. The rule above covers every negative case, and the
exhaustive tests confirm it.

## The multiplier

Since 2^n = -1 (mod 2^n+1), a binary product P = X + 2^n * Y reduces to
X - Y:

* `bin_mult` forms P = a * b. It is at most 2^(2n), so it fits in 2n+1 bits.
* X = P[n-1:0] is widened to n+1 bits with a zero MSB. It is at most 2^n - 1.
* Y = P[2n:n] is at most 2^n.
* `mod2n1_sub` computes (X - Y) mod (2^n+1).

Both X and Y are valid residues, so the result is exact. Zero operands and
operands of 2^n need no special cases.

## Modules

| file | function |
|---|---|
| `rtl/mod2n1_pkg.sv` | `N_DEFAULT = 4`, the default of every unit's `N` |
| `rtl/bin_sub.sv` | (N+1)-bit subtractor with borrow |
| `rtl/bin_add.sv` | (N+1)-bit adder of a carry-in, with carry out |
| `rtl/msb_mux.sv` | 2-to-1 multiplexer (width `W`, default 1) |
| `rtl/mod2n1_sub.sv` | modulo 2^n+1 subtractor |
| `rtl/bin_mult.sv` | (N+1)x(N+1) binary multiplier, 2N+1-bit product |
| `rtl/mod2n1_mul.sv` | modulo 2^n+1 multiplier (top level) |

Ports of both modular units: `a`, `b` are inputs of `[N:0]`. The result is
`c` (subtractor) or `r` (multiplier), also `[N:0]`. There is no clock or
reset: the units are purely combinational. The delay is one subtractor plus
one incrementer for `mod2n1_sub`, and one multiplier more for `mod2n1_mul`.
Register the inputs and outputs, or pipeline the multiplier, in the design
that uses them.

The default N = 4 (modulus 17) is the size of the worked example. Any
N >= 2 elaborates. Inputs above 2^N are outside the residue range, and the
result for them is not defined.

## Departures and design choices

* The binary subtractor, adder and multiplier use the SystemVerilog `-`,
  `+` and `*` operators. Their internal structure (ripple, prefix or array)
  is left to synthesis. The timing of the original implementation depends
  on that choice. This RTL reproduces the function, not those delays.
* The original comparison reports delays from 15.2 ns at n = 3 to 43.7 ns at
  n = 14. Against a diminished-one multiplier, it claims an advantage up to
  n = 11. Those figures come from a specific implementation flow. Nothing
  here measures them.
* `bin_mult` drops bit 2N+1 of the full product, because it is always 0 for
  valid residues. Linters report that bit as unused.
* No input-range checking is done in hardware.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=… failures=…`.
Each compares results with integer arithmetic worked out in the testbench.
Each has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_bin_sub` | all 5-bit operand pairs |
| `tb_bin_add` | all 5-bit operands, both carry-ins |
| `tb_msb_mux` | 1-bit and 4-bit instances, all inputs |
| `tb_bin_mult` | all residue pairs at n = 4 |
| `tb_mod2n1_sub` | all residue pairs at n = 3, 4 and 8, including 0 - 1 = 16 at n = 4 |
| `tb_mod2n1_mul` | end to end at the default parameters: all 17 x 17 pairs |
| `tb_mul_table1` | the multiplier at n = 3, 4, 8, 10, 11, 12 and 14 (see below) |

`tb_mod2n1_mul` counts how often each mechanism occurs, and fails if one
never does:
* the inner difference X - Y is non-negative;
* it is negative;
* it is exactly -1, so the MSB comes from the carry out;
* an operand is zero;
* an operand is 2^n;
* the result is 2^n.

`tb_mul_table1` checks every pair for n <= 8. For larger n it checks the
corner pairs plus 100,000 random pairs per size.

`tb/mod_checker.sv` is a checking harness that the last two testbenches
share. It instantiates either unit at a given N.

To simulate with Verilator:

    verilator --binary --timing -Irtl -Itb rtl/mod2n1_pkg.sv tb/tb_mod2n1_mul.sv \
      --top-module tb_mod2n1_mul -o sim && ./obj_dir/sim

To run another testbench, replace both `tb_mod2n1_mul` names with its name.
Verilator finds the other modules by file name through `-I`. If your version
does not, add `-y rtl -y tb`.
