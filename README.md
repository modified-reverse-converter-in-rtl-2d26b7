# Four-moduli RNS reverse converter with hybrid parallel-prefix adders

A residue number system (RNS) represents an integer X by its remainders
modulo a set of pairwise coprime moduli. Arithmetic on the remainders is
carry-free and runs in independent narrow channels. Getting back to an
ordinary binary number is the expensive step. This RTL implements that step,
the *reverse converter*, for the four-moduli set

    { 2^N,  2^(2N+1) - 1,  2^N + 1,  2^N - 1 }      (default N = 4: 16, 511, 17, 15)

The dynamic range is M = 2^N (2^(2N) - 1)(2^(2N+1) - 1). That is 2,084,880
at N = 4, so the result is 5N+1 = 21 bits wide.

The converter is built from the New Chinese Remainder Theorem. Every
multiplicative constant it needs is a power of two modulo a number of the form
2^k - 1, so all "multiplications" are bit rotations and all negations are one's
complements. The only arithmetic left is a few modular additions and one wide
subtraction. Two special adders do that work:

* **HMPE**: a hybrid modular parallel-prefix excess-one adder, modulo 2^W - 1.
* **HRPX**: a hybrid regular parallel-prefix XOR/OR adder, for the final
  (4N+1)-bit subtraction.

The whole converter is combinational.

## The conversion, step by step

Inputs are the residues `x1 = X mod 2^N`, `x2 = X mod 2^(2N+1)-1`,
`x3 = X mod 2^N+1` and `x4 = X mod 2^N-1`.

The low N bits of X are `x1` itself. The converter rebuilds the rest,
`Y = (X - x1) / 2^N`, which lies in `[0, (2^(2N)-1)(2^(2N+1)-1))`. It does so
from two residues of Y:

| value | meaning | how |
|---|---|---|
| H | Y mod 2^(2N+1)-1 | `(x2 - x1) * 2^(N+1)`, since 2^(-N) = 2^(N+1) in this modulus |
| K | helper, mod 2^N-1 | `(x4 - x3) * 2^(N-1)`; combines x3 and x4 into X mod 2^(2N)-1 = x3 + (2^N+1) K |
| T | (Y - H) mod 2^(2N)-1 | `2^N x3 + (2^N+1) K - 2^N x1 - H` |
| S | Y | `H + T (2^(2N+1)-1)` |

The key simplification is that 2^(2N+1)-1 ≡ 1 (mod 2^(2N)-1). Its inverse is
therefore 1, and T is a plain modular sum with no multiplication. S is then
formed as `P - T` with `P = {T, H}`, the concatenation T·2^(2N+1) + H. The
output is `X = {S, x1}`.

Datapath (module names in brackets):

```
x1 x2 x3 x4
  -> operand preparation 1      [opu1]        v1, v2 (2N+1 b), v3, v4 (N b)
  -> H = v1 + v2 mod 2^(2N+1)-1 [hmpe_adder]
     K = v3 + v4 mod 2^N-1      [hmpe_adder]
  -> operand preparation 2      [opu2]        v5, v6, v81, v7 (2N b)
  -> CSA1, CSA2 with EAC        [csa_eac x2]  four operands -> two
  -> T = sum mod 2^(2N)-1       [hmpe_adder]
  -> operand preparation 3      [opu3]        P = {T, H}, ~T
  -> S = P - T                  [hrpx_adder]  4N+1 bits
  -> X = {S, x1}
```

### Operand preparation (pure wiring and inverters)

* `v1 = rot_left(x2, N+1)`. This is x2·2^(N+1) mod 2^(2N+1)-1.
* `v2 = {~x1, N+1 ones}`. This is -x1·2^(N+1).
* `v3 = rot_right(x4, 1)`. This is x4·2^(N-1) mod 2^N-1.
* `v4 = -x3·2^(N-1)`. For x3 < 2^N it is `rot_right(~x3[N-1:0], 1)`. For
  x3 = 2^N, which is 1 modulo 2^N-1, it is the constant `{0, N-1 ones}`. A
  2:1 mux on `x3[N]` picks between them.
* `v5 = {x3[N-1:0], N-1 zeros, x3[N]}`. This is 2^N·x3, because 2^(2N) ≡ 1.
* `v6 = {K, K}`. This is (2^N+1)·K.
* `v81 = ~H[2N-1:0]` and `v7 = {~x1, N-1 ones, ~H[2N]}`. Together they give
  -H - 2^N·x1.

## HMPE: modulo 2^W-1 addition with one zero

A modulo 2^W-1 adder is usually an adder whose carry-out is fed back in as the
carry-in (end-around carry). Its weak point is that a sum of exactly 2^W-1
comes out as all ones, a second encoding of zero. In this converter a second
zero is not harmless. H and T are concatenated and subtracted as ordinary
binary numbers, so an all-ones H or T would give a wrong X.

`hmpe_adder` avoids the second zero in a single pass through the carry network:

1. Pre-processing: `g = a & b`, `p = a ^ b`.
2. A Kogge-Stone prefix network (ceil(log2 W) levels) gives the group
   generate/propagate `G[i:0]`, `P[i:0]` for every bit.
3. The *excess-one unit* decides whether the sum reaches 2^W-1:
   `c* = G[W-1:0] | P[W-1:0]`. If it does, the adder adds one and drops 2^W,
   which is the same as subtracting 2^W-1. The carry into bit i is
   `G[i-1:0] | (P[i-1:0] & c*)`, the carry into bit 0 is `c*`, and
   `s = p ^ carry`.

The result is `a+b` if `a+b < 2^W-1`, and `a+b-(2^W-1)` otherwise. It is fully
reduced unless both inputs are all ones. In the converter that case never
occurs:

* H: v1 is a rotation of a valid x2, so it is never all ones.
* K: v3 and v4 cannot both be all ones.
* T: the carry-save stages cannot produce two all-ones vectors, because v5
  always holds zeros in its middle bits.

The exhaustive test confirms this.

The same module serves all three modular sums: W = 2N+1 (H), W = N (K) and
W = 2N (T).

## HRPX: the final subtraction

`S = P - T` is computed as `P + ~T + 1`, where T is only 2N bits wide. Above
bit 2N-1 the second operand is therefore the constant all-ones, and the adder
is split there:

* Bits 0 .. 2N-1 form a regular Brent-Kung parallel-prefix adder. The carry-in
  of 1 is folded into bit 0 (`g0 | p0`).
* Bits 2N .. 4N have a constant 1 as the second operand. A full adder then
  reduces to `carry_out = a | carry_in` and `sum = ~(a ^ carry_in)`, so this
  part is a ripple chain of OR gates with one XOR-type gate per bit. In effect
  it passes P's upper part through, minus a borrow when the prefix part
  produced no carry.

The final carry-out is dropped, because P ≥ T always holds.

The Brent-Kung network is written as the usual up-sweep/down-sweep for any
width, so N need not make 2N a power of two.

## Interface and timing

`reverse_converter #(parameter int N = 4)`

| port | dir | width | |
|---|---|---|---|
| x1 | in | N | X mod 2^N |
| x2 | in | 2N+1 | X mod 2^(2N+1)-1 |
| x3 | in | N+1 | X mod 2^N+1 |
| x4 | in | N | X mod 2^N-1 |
| x | out | 5N+1 | X |

* The converter has no clock, no reset and no handshake. The output is valid
  one combinational delay after the inputs settle.
* The critical path runs through the H adder, the two CSA stages, the T adder
  and the HRPX adder.
* The residues must be in range: x2 ≤ 2^(2N+1)-2, x3 ≤ 2^N and x4 ≤ 2^N-2.
  For out-of-range residues the output is not defined.
* N ≥ 2 is required.

To add registers for a pipelined version, the natural cut points are H/K, the
CSA outputs and T.

## Files

| file | contents |
|---|---|
| `rtl/reverse_converter.sv` | top level, wires the stages |
| `rtl/opu1.sv`, `rtl/opu2.sv`, `rtl/opu3.sv` | operand preparation units |
| `rtl/hmpe_adder.sv` | modulo 2^W-1 adder, Kogge-Stone + excess-one unit |
| `rtl/csa_eac.sv` | carry-save adder with end-around carry |
| `rtl/hrpx_adder.sv` | hybrid Brent-Kung / OR-chain subtractor |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_reverse_converter_sweep.sv`, `tb/rc_sweep_unit.sv` | converter at N = 2, 3, 5, 6, 8, 10 |

## Verification

Every testbench computes its expected values with integer arithmetic,
independently of the RTL. Each one prints
`TB_RESULT checks=<n> failures=<n>` at the end.

* `tb_reverse_converter` checks the converter at its default size (N = 4).
  * It walks every X in [0, 2,084,880), forms the residues with `%`, and
    requires the output to be X.
  * A directed vector (x1, x2, x3, x4) = (8, 9, 10, 10), which gives X = 520,
    runs first.
  * It counts each data-dependent mechanism and fails if any of them never
    occurs: the x3 = 2^N operand, the excess-one correction in each of the
    three HMPE adders, the end-around carry in both CSA stages, and both
    outcomes of the HRPX prefix-part carry.
  * It runs in under a second.
* `tb_reverse_converter_sweep` checks other sizes: N = 2 and 3 exhaustively,
  and N = 5, 6, 8 and 10 on the range ends plus 200,000 random values each.
* The block testbenches check:
  * `tb_hmpe_adder`: exhaustive at W = 4, 8 and 9.
  * `tb_csa_eac`: checks `s + cy ≡ a + b + c`.
  * `tb_opu1`, `tb_opu2`: check the modular congruence of every operand.
  * `tb_opu3`: checks the concatenation and the complement.
  * `tb_hrpx_adder`: checks `P - T` at N = 3, 4 and 5.

To run one with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_reverse_converter.sv \
          --top-module tb_reverse_converter -Mdir obj
./obj/Vtb_reverse_converter
```

The same command works for every testbench: substitute its name.

## Relation to the original design, and choices made here

Taken from the design description:

* The moduli set and the New CRT formulation.
* The stage structure: three operand preparation units, two modular adders,
  two CSA stages with end-around carry, a modular adder for T, and a
  (4N+1)-bit adder with carry-in 1.
* The operand bit layouts.
* HMPE with a Kogge-Stone prefix for the modular additions.
* HRPX with a Brent-Kung prefix part and an OR/XOR part where the operand is
  constant.
* N = 4 as the evaluated size.

Choices made in this implementation:

* Complement bars in the operand equations are implied by the minus signs of
  the derivation. The v4 mux is selected by `x3[N]`.
* T is a sum modulo 2^(2N)-1, with 2N-bit operands.
* The HMPE adder is also used for H (modulo 2^(2N+1)-1). The description
  prescribes HMPE for the 2^N-1 and 2^(2N)-1 sums.
* The carry equations inside the excess-one unit are this design's
  construction: only the block structure of the unit is given.
* The CSA rows are standard full-adder rows.
* The design is fully combinational. No clocking is specified.
* The HRPX split sits at bit 2N, which is what the (4N+1)-bit subtraction
  needs.

Not included:

* The forward converter (binary to residue) and the per-modulus arithmetic
  channels of a complete RNS processor. The testbenches use `%` in place of a
  forward converter.
* The conventional baseline converter, built from ripple adders with
  end-around carry.
* Any power or delay figures. The original design reports FPGA results only
  (about 62 mW and 60 ns at N = 4), and nothing here reproduces them.
