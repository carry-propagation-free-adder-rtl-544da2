# AHSD(4): carry-propagation-free addition and array multiplication

A binary adder is slow because a carry may ripple across the whole word:
`11111111 + 00000001` changes every bit. This RTL avoids that by doing the
arithmetic in a redundant number system, the **asymmetric high-radix
signed-digit** system AHSD(r). In radix r = 2^m, each digit may take any
value from **-1 to r-1**. The radix-4 version, AHSD(4), with digits
{-1, 0, 1, 2, 3}, is the one built here. A single negative digit is enough
to make addition carry-propagation-free (CPF): every sum digit depends only
on its own position and the position just below it, so an adder of any width
has the delay of one digit slice.

Converting a binary number into AHSD is free, because every block of m bits
already is a digit in 0..r-1. Converting a result back to binary is the only
step with a carry chain. It is done once, at the end, with a
logarithmic-depth lookahead network.

Three datapaths are built from the same adder slice:

* a **two-operand adder**: binary in, AHSD(4) add, binary out;
* a **sequential multi-operand adder**: one binary operand per clock is added
  to a running sum kept in AHSD(4), so the clock period does not depend on
  the word width;
* an **8 x 8 array multiplier**: 7 rows of CPF adders, 32 digit slices in
  all, which sum the partial products with no carry chain; the product is
  converted to binary at the end.

## The number system

An n-bit unsigned number `X = (x[n-1] ... x[0])` with n divisible by m is
written as q = n/m digits:

    X = sum_j X_j * r^j,    X_j = sum_k x[m*j+k] * 2^k     (0 <= X_j <= r-1)

A number converted from binary therefore never has a -1 digit. A -1 digit
can only appear in a sum. In the RTL, a digit is an (m+1)-bit two's-complement
word. For radix 4 that is the 3-bit type `ahsd_pkg::digit_t`.

## Addition without carry propagation (the hard part)

Adding `X` (all digits >= 0) and `Y` (digits may be -1) takes three steps per
digit position j:

1. **Individual summation**: `Z_j = X_j + Y_j`, which lies in -1 .. 2(r-1).
2. **Self-adjustment**: write `Z_j = r*C_j + mu_j` with a carry `C_j` in {0,1}:

   | Z_j            | Z_{j-1}   | C_j | mu_j    |
   |----------------|-----------|-----|---------|
   | -1 .. r-2      | any       | 0   | Z_j     |
   | r-1            | < r-1     | 0   | r-1     |
   | r-1            | >= r-1    | 1   | -1      |
   | r .. 2(r-1)    | any       | 1   | Z_j - r |

3. **Adjacent modification**: `S_j = mu_j + C_{j-1}`, with `C_{-1} = 0`.

The sum is `(C_{q-1}, S_{q-1}, ..., S_0)`: q+1 digits, all in -1 .. r-1.

The only subtle row is `Z_j = r-1`. Keeping `mu_j = r-1` is safe only if no
carry arrives from below. A carry can arrive only if `Z_{j-1} >= r-1`, so the
slice looks at whether its lower neighbour's digit sum reached r-1. If it did,
the slice itself carries and leaves `mu_j = -1`, which can absorb the carry
coming in. This is where the asymmetric -1 digit is needed. Neither the
look-down nor the carry travels more than one position, so there is no chain.

Worked example, radix 4, the worst case for a ripple adder:

    X = 11 11 11 11 -> digits  3  3  3  3
    Y = 00 00 00 01 -> digits  0  0  0  1
    Z                          3  3  3  4
    C                       1  1  1  1        (Z=4 carries; each Z=3 sees Z>=3 below)
    mu                        -1 -1 -1  0
    S                       1  0  0  0  0  =  1 00 00 00 00 in binary

In hardware (`ahsd_cpf_cell`), the slice has two threshold detectors on `Z_j`.
`TD(r-1)` gives `A_j = (Z_j < r-1)`, which also goes up to the next slice as
that slice's `A_{j-1}`. `TD(r)` gives `Z_j < r`. The carry flag is

    F = C_j = (Z_j >= r)  or  (Z_j >= r-1 and not A_{j-1})

Then `mu_j = Z_j - r*F` and `S_j = mu_j + C_{j-1}`. The lowest slice of an adder
is fed `C_{-1} = 0` and `A_{-1} = 1`, i.e. it treats the missing sum below as
0.

**Operand rule.** The table is only closed if one operand has no -1 digit.
`ahsd_cpf_adder` therefore takes `x` with digits >= 0 and `y` with any digits.
Every user here follows that rule: a new binary operand goes into `x`, and a
running sum or earlier partial sum goes into `y`. An assertion checks `x`.

## Back to binary

`ahsd_to_bin` turns digits in -1 .. r-1 into plain radix-r digits 0 .. r-1.
Each -1 digit has to borrow from the positions above it, which is the one
real carry problem in the design. Each digit produces a borrow term:

* it **generates** one if `S_j = -1`;
* it **propagates** an incoming borrow if `S_j = 0`;
* it **absorbs** the borrow otherwise.

A Kogge-Stone parallel prefix computes all borrows in ceil(log2 q) levels. The
corrected digit is `(S_j - b_j) mod r`, and its m bits are the binary output:
for radix 4, this stage is the quaternary-to-binary decoder. `neg` reports a
borrow out of the top digit, i.e. a negative value. It never happens for the
unsigned results in this design, and assertions check that.

## Sequential multi-operand adder

`ahsd_seq_adder` accumulates a stream of N-bit operands:

    in_data --> [input latch] --> bin2ahsd --> CPF adder --> [accumulator] --+--> ahsd_to_bin --> sum
                                                   ^_________________________|

* An operand offered with `in_valid` in cycle t is latched at the end of t. It
  is converted and added during t+1, and it appears in `acc_digits`, `sum` and
  `count` from cycle t+2.
* An operand marked `in_first` starts a new sum instead of being added.
* One operand per clock is accepted with no stall, so a K-operand sum is ready
  two cycles after its last operand.
* The critical path is latch, then conversion (wiring), then one CPF slice. It
  does not depend on N.

The accumulator has `QA = (N + clog2(MAX_OPS) + 2) / 2` digits. A non-negative
AHSD(4) number whose top non-zero digit is at position p is worth at least
(2*4^p+1)/3, so with QA digits the adder's top carry stays 0 for any sum of
up to MAX_OPS operands. An assertion checks this. The defaults are 8-bit
operands and up to 16 per sum (QA = 7 digits, 14-bit sum).

## Array multiplier

`ahsd_pp_gen` forms the partial products `p_ij = x_i AND y_j`. It regroups
row j, shifted left by j bits, into radix-4 digits: digit k is bits 2k+1 and
2k of `P_j << j`. Row 0 starts the running sum. Rows 1..N-1 are added one
after another by CPF adders (`ahsd_array_mult`). Each row only spans the
digits where its partial product has bits, `floor(j/2) .. floor((j+N-1)/2)`:

    row j :  1  2  3  4  5  6  7
    digits: 0-4 1-4 1-5 2-5 2-6 3-6 3-7     slices: 5+4+5+4+5+4+5 = 32 = N^2/2

* Digits below a row's span are already final and leave the array there:
  digit 0 after row 1, digit 1 after row 3, digit 2 after row 5, and digits
  3..7 after row 7.
* In an odd row, the top digit sum is at most 2: one partial-product bit plus
  a 0/1 carry digit. Its carry out is therefore always 0, and an assertion
  checks that.
* The carry out of an even row becomes the running-sum digit one place higher.
  That digit is the top of the next row's span.
* The product `(S_7 ... S_0)` is ready after N-1 slice delays. `ahsd_top`
  converts it to a 16-bit binary product.

N must be even. The row layout is written for radix 4 only.

## Top level

`ahsd_top` places the three datapaths side by side. They share no signals.

| port group | signals |
|---|---|
| adder (combinational) | `add_x`, `add_y` -> `add_digits[ADD_N/ADD_M+1]`, `add_sum` |
| sequential adder (clocked) | `clk`, `rst_n` (synchronous, active low), `seq_in_valid`, `seq_in_first`, `seq_in_data` -> `seq_acc_digits`, `seq_sum`, `seq_count`, `seq_sum_valid` |
| multiplier (combinational) | `mul_x`, `mul_y` -> `mul_digits[MUL_N]`, `mul_product` |

| parameter | default | meaning |
|---|---|---|
| `ADD_N` | 8 | adder operand width |
| `ADD_M` | 2 | adder radix r = 2^ADD_M |
| `SEQ_N` | 8 | sequential adder operand width |
| `SEQ_MAX_OPS` | 16 | most operands in one sequential sum |
| `MUL_N` | 8 | multiplier operand width (even) |

## Files

| file | contents |
|---|---|
| `rtl/ahsd_pkg.sv` | digit type and range check |
| `rtl/ahsd_bin2ahsd.sv` | binary -> AHSD(r) digits |
| `rtl/ahsd_td.sv` | threshold detector `A = (Z < K)` |
| `rtl/ahsd_cpf_cell.sv` | one adder digit slice |
| `rtl/ahsd_cpf_adder.sv` | Q-digit CPF adder |
| `rtl/ahsd_to_bin.sv` | AHSD(r) -> binary with borrow lookahead |
| `rtl/ahsd_seq_adder.sv` | sequential multi-operand adder |
| `rtl/ahsd_pp_gen.sv` | partial products in AHSD(4) |
| `rtl/ahsd_array_mult.sv` | N x N array multiplier |
| `rtl/ahsd_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. For
example:

    verilator --binary --timing --assert -Irtl -y rtl rtl/ahsd_pkg.sv \
        tb/tb_ahsd_top.sv --top-module tb_ahsd_top -Mdir obj_top
    ./obj_top/Vtb_ahsd_top

Replace `top` with any other module name to run its testbench. Coverage:

* **Exhaustive:** the threshold detector; the radix-4 and radix-8 slices over
  all input combinations; the 4-digit radix-4 adder over every non-negative X
  against every Y with digits -1..3; the 5-digit converter over all 3125 digit
  vectors; the partial-product generator and the multiplier over all 65536
  operand pairs.
* **Random:** a radix-16 adder, a radix-8 converter, and streams of sums of up
  to 16 operands in the sequential adder, including the two-cycle latency.
* **End to end:** `tb_ahsd_top` runs the top at its default sizes. It uses its
  own model of the conversion rule and of the multiplier rows, and it fails if
  any of these never happens:
  * a carry from Z >= r;
  * a carry from Z = r-1 decided by the lower neighbour;
  * a digit kept at r-1;
  * a -1 result digit;
  * a borrow passing a 0 digit;
  * a carry between multiplier rows;
  * a -1 product digit;
  * a restarted sequential sum;
  * a -1 digit in the running sum.

All testbenches finish in well under a second.

## Where this RTL departs from the original circuit

* **Digits are binary words, not currents.** The original design uses
  multiple-valued current-mode circuits. In those, the digit sum is a wired
  current sum, the sign of a digit is found by a bidirectional current input
  circuit, and switched current sources add or subtract r. Here a digit is a
  two's-complement word. Polarity detection is the sign bit, and the current
  sources are the `- r*F` and `+ C_{j-1}` terms. Neither of those analog
  elements exists as a separate module.
* **Gate-level carry logic is rebuilt from the rule.** The slice's
  combination of the threshold detectors is written from the conversion table,
  not copied gate for gate.
* **Converter internals are this design's choice.** The original asks for a
  radix-4 carry-lookahead adder with depth proportional to log2(n/2). The
  Kogge-Stone borrow network, the `neg` flag and the general-radix converter
  are this design's own.
* **The sequential adder's structure is inferred.** Its pipeline (one input
  latch, one accumulator), handshake, reset, operand width and operand limit
  are inferred from the timing model "latch and convert, then one CPF addition
  per operand". The source gives no structure for this datapath.
* **Other radices are an extension.** The adder, its converters and the
  threshold detector take the radix as a parameter `M` (r = 2^M). Only radix 4
  is the original configuration. The multiplier and the sequential adder are
  radix-4 only.
* **Everything is combinational except the sequential adder.** No pipeline
  registers are placed in the adder or the multiplier.
