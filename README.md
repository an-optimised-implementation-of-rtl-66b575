# RNS arithmetic unit with New CRT II reverse conversion

In a residue number system (RNS) an integer X is held as its remainders
(residues) modulo a set of pairwise coprime moduli. Addition, subtraction and
multiplication then split into independent, short operations, one per modulus
(a *channel*), with no carries between channels. The price is paid at the
edges: numbers must be converted into residues (forward conversion) and back
into binary (reverse conversion), and the reverse direction is the hard part.

This RTL implements such a unit for the conjugate moduli set
{2^n-1, 2^n, 2^n+1}. With the default n = 4 that is {15, 16, 17}, a dynamic
range of M = 4080. The unit:

1. converts two 32-bit binary operands into residues with one sequential
   divider per modulus;
2. adds, subtracts or multiplies the residues channel by channel. The modular
   adders are built from a carry bypass adder and the modular multipliers from a
   radix-16 Booth multiplier;
3. converts the result back to binary with New CRT II stages, which need
   arithmetic only modulo the individual moduli, never modulo their product.

A second converter stands beside the unit with its own ports. It turns the
residues of an 8-element moduli set into binary with a three-level tree of the
same New CRT II stages.

All RTL is SystemVerilog 2017 and synthesizable. Testbenches are self-checking
and run under Verilator 5.

## Reverse conversion: the New CRT II stage

This is the least obvious part of the design. `newcrt2_stage` takes two
coprime moduli P1 and P2, with x1 = |X|_P1 and x2 = |X|_P2, and returns

    X = x2 + | k0 * (x1 - x2) |_P1 * P2 ,    where k0 * P2 = 1 (mod P1)

This is the unique X in 0 .. P1*P2-1 with both residues. Why it works: the
added term is a multiple of P2, so X = x2 (mod P2). Modulo P1 the product
k0*P2 is 1, so X = x2 + (x1 - x2) = x1. The only modular operations are modulo
P1. The modulus P1*P2 never appears, so no wide modular adder is needed.

In hardware the stage computes, with no registers:

| step | operation | unit |
|---|---|---|
| 1 | x2 mod P1 (only if P2 > P1) | constant remainder |
| 2 | d = \|x1 - x2\|_P1 | `mod_addsub` (carry bypass adders) |
| 3 | t = \|k0 * d\|_P1 | `mod_mul` (radix-16 Booth) |
| 4 | t * P2 | `booth16_mul` |
| 5 | x2 + t*P2 | `cska_adder` |

k0 is computed during elaboration by `rns_pkg::mod_inverse` (the extended
Euclidean algorithm), so a new moduli set needs only new parameter values.

The output of a stage is itself a residue, modulo P1*P2. Stages can therefore
be chained, and this is how larger sets are handled:

* **3-moduli unit** (`rns_top`). The residues modulo 15 and 16 give a number
  modulo 240. That number and the residue modulo 17 then give the result
  modulo 4080.
* **8-moduli converter** (`newcrt2_conv8`). Four stages turn the pairs
  (x1,x2), (x3,x4), (x5,x6), (x7,x8) into numbers modulo P1P2, P3P4, P5P6 and
  P7P8. Two more stages combine them into numbers modulo P1P2P3P4 and
  P5P6P7P8, and a last stage produces X. A stage combines a left value L
  (modulo PL) with a right value R (modulo PR) as
  L + PL * |k (R - L)|_PR. The left modulus (P1, P3, P5, P7, then P1P2 and
  P5P6, then P1P2P3P4) is the constant multiplier. In `newcrt2_stage` terms
  that means P1 = PR, P2 = PL, x1 = R and x2 = L.

Worked example, X = 2456, residues (11, 8, 8) modulo (15, 16, 17):

* Stage 1 has P1 = 16 and P2 = 15, so k0 = 15. It computes d = |8 - 11|_16 = 13
  and t = |15 * 13|_16 = 3, giving X = 11 + 3*15 = 56.
* Stage 2 has P1 = 17 and P2 = 240, so k0 = 9. The input 56 reduces to
  |56|_17 = 5. It computes d = 3 and t = |9 * 3|_17 = 10, giving
  X = 56 + 10*240 = 2456.

No 8-element moduli set is fixed by the method. The default here is
this design's own: conjugate pairs 32 ± k for k = 1, 3, 9, 15, i.e.
{31, 33, 29, 35, 23, 41, 17, 47}. These are pairwise coprime, with a product
of about 7.8·10^11 (40-bit output). Any pairwise coprime set works, as long as
its product fits in 63 bits.

## Radix-16 Booth multiplier

`booth16_mul` scans the multiplier in 5-bit windows
{x[i+3], x[i+2], x[i+1], x[i], x[i-1]}, four bits apart, with a 0 appended
below the LSB. Each window becomes one digit

    d = -8*x[i+3] + 4*x[i+2] + 2*x[i+1] + x[i] + x[i-1]   in -8 .. +8

so an n-bit multiplier gives about n/4 partial products (±0..8 times the
multiplicand). `booth16_encoder` performs the recoding. The full table:

| window | digit | window | digit |
|---|---|---|---|
| 00000 | 0 | 10000 | -8 |
| 00001, 00010 | +1 | 10001, 10010 | -7 |
| 00011, 00100 | +2 | 10011, 10100 | -6 |
| 00101, 00110 | +3 | 10101, 10110 | -5 |
| 00111, 01000 | +4 | 10111, 11000 | -4 |
| 01001, 01010 | +5 | 11001, 11010 | -3 |
| 01011, 01100 | +6 | 11011, 11100 | -2 |
| 01101, 01110 | +7 | 11101, 11110 | -1 |
| 01111 | +8 | 11111 | 0 |

Details of the multiplier:

* **Unsigned operands.** Operands are unsigned, as residues are. The
  multiplier is zero-extended so that the top window's sign bit is 0. That
  takes ceil((WB+1)/4) partial products.
* **Multiples.** The "hard" multiples 3A, 5A and 7A = 8A - A are formed once
  by carry bypass adders. The other multiples are shifts.
* **Summation.** Negative digits are applied as a two's complement of the
  shifted multiple. The partial products are summed modulo 2^(WA+WB) by a
  chain of carry bypass adders. The true product always fits that width, so
  the wrap-around is harmless. The chain, rather than a compressor tree, is
  this design's choice.

## Carry bypass adder (CI-CSKA)

`cska_adder` is a carry-skip adder of the concatenation-incrementation kind.
The operand is cut into stages whose sizes grow by one bit from the LSB
(1, 2, 3, ... bits, the last stage taking what is left). This square-root
sizing is this design's reading of "square" carry bypass. Each stage works as
follows:

* **Stage 1** is a ripple-carry adder (RCA) fed with the adder's carry input.
* **RCA block.** Every later stage has an RCA whose carry input is tied to 0.
  All these RCAs work at once and give an intermediate sum s and a block
  carry.
* **Skip logic.** The stage carry-out is c_rca | (&s & c_in). A carry that
  enters a stage whose intermediate sum bits are all 1 leaves it after one
  gate level. This test is exact because the RCA started from a zero carry.
* **Incrementation block.** A half-adder chain adds the incoming carry to s to
  give the final sum bits.

Only the skip gates lie on the adder-wide carry path. The full adders are the
plain S = A^B^C, C = AB + AC + BC cells. The source's drawing uses alternating
AOI/OAI gates for the skip logic. This RTL writes the same function as logic
and leaves gate choice to synthesis.

## Modular channel arithmetic

* **`mod_addsub`** handles one channel with residues a, b < M. It works on
  W+1 bits, where W = ceil(log2 M), with two carry bypass adders:
  * the first forms a + b, or a - b as a + ~b + 1;
  * the second applies the correction -M (addition) or +M (subtraction).

  The sign of the corrected or uncorrected sum selects the result. Both
  values are computed in parallel.
* **`mod_mul`** forms the 2W-bit Booth product and reduces it with a
  constant-modulus remainder. The reduction method is this design's choice;
  for M = 2^n it is just the low bits.
* **`rns_channel`** muxes the two units by `op`: 0 add, 1 subtract,
  2 multiply. Code 3 gives 0.

## Forward conversion

`seq_divider` is a restoring divider that produces one quotient bit per clock.
`fwd_converter` runs one divider per modulus in parallel on the same input.
The remainders are the residues, and the quotients are brought out as well.
Each divider has the port set start / dividend / divisor / busy / quotient /
remainder, and the 32-bit width. For the operand 2456 the residues are
(11, 8, 8) and the quotients (163, 153, 144).

A start while a division runs is ignored. With a divisor at least as wide as
the dividend, dividing by zero yields an all-ones quotient and the dividend as
remainder.

## Top level `rns_top`: interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| start | in | 1 | start an operation (taken only while idle) |
| op | in | 2 | `rns_pkg::rns_op_e`: ADD, SUB, MUL |
| a, b | in | DW | binary operands (any 32-bit value) |
| busy | out | 1 | operation in progress |
| done | out | 1 | one-cycle pulse: outputs valid |
| a_res, b_res | out | 3 × 5 | residues of a, b modulo 2^n-1, 2^n, 2^n+1 |
| a_quot, b_quot | out | 3 × DW | quotients of a, b by each modulus |
| y_res | out | 3 × 5 | residues of the result |
| result | out | 12 | \|a op b\|_4080 |
| c8_x | in | 8 × 6 | residues for the 8-moduli converter |
| c8_y | out | 40 | its binary output (combinational) |

**Timing.** Count the clock edge that samples `start` as edge 0.

* The dividers iterate on edges 1 … DW.
* On edge DW+1 the channel results are registered into `y_res`.
* On edge DW+2 `result` is registered and `done` goes high for one cycle.

That is 34 cycles at the default DW = 32. The outputs hold until the next
operation. An assertion checks that the two forward converters finish
together.

**Result range.** All arithmetic is modulo M = 4080:

* operands larger than M are reduced by forward conversion;
* sums and products beyond M wrap;
* a negative difference appears as M - |a - b|.

**Parameters.** `N` sets the moduli set (default 4). `DW` sets the operand
width (default 32). `P8` holds the 8 moduli of the side converter. Other
values of `N` elaborate cleanly, but the testbenches exercise only N = 4 and
DW = 32. The 8-moduli converter is one long combinational path (seven
stages, three deep); register its output if it must meet a fast clock.

## Verifying and simulating

Every module has a testbench `tb/tb_<module>.sv`. Each compares the outputs
with values the testbench computes itself, checks latencies where there are
clocks, has a watchdog, and ends with `TB_RESULT checks=N failures=F`.

* **Exhaustive tests** cover:
  * the Booth encoder (all 32 windows);
  * 5-bit multiplier and adder sizes;
  * the channel operations for moduli 15, 16 and 17;
  * New CRT II stages over the full range 0..4079.
* **Random tests** cover the 16- and 32-bit sizes, 20-bit moduli and the
  8-moduli converter.
* **`tb_rns_top`** runs the complete unit at its default parameters: 300+
  operations of all three kinds plus 500 conversions through the 8-moduli
  converter. It counts each behaviour and fails if any never happened:
  * addition, subtraction, multiplication;
  * an operand beyond the range;
  * a wrapped result;
  * a start ignored while busy;
  * a conversion through the 8-moduli converter.

To run one, for example the top level:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/rns_pkg.sv tb/tb_rns_top.sv --top-module tb_rns_top
    ./obj_dir/Vtb_rns_top

Every testbench finishes in well under a second.

## What is this design's own, and what is left out

Taken from the method:

* the moduli set {2^n-1, 2^n, 2^n+1} with n = 4;
* forward conversion by division, with 32-bit operands;
* the New CRT II equation and the 8-moduli tree;
* the radix-16 recoding;
* the concatenation-incrementation carry-skip structure;
* the use of the Booth multiplier and bypass adder inside the channels and
  converters.

This design's own choices:

* the divider algorithm and all sequencing, registers, latencies, handshakes
  and the reset;
* the op encoding;
* the bypass adder's stage sizes;
* the partial-product adder chain;
* the modulo reduction inside `mod_mul`;
* the default 8-element moduli set.

Not implemented:

* **Adaptive, power-aware choice of moduli.** It is named as a goal, but no
  mechanism is specified. The moduli are fixed by parameters.
* **New CRT I converter.** It is named only.
* **Division of two RNS numbers.** Only the binary division of forward
  conversion exists.
