# Bit-serial constant multiplication and an 8-point DCT built from it

Multiplying by a constant does not need a multiplier.  If numbers move one
bit per clock, least significant bit first, then a chain of one-bit latches
turns the input into all its shifted copies at once: the output of latch k
is the input times 2^k.  A constant is then nothing but a choice of which
latch outputs are wired into a chain of bit-serial adders.  Each adder is one
full adder and one carry flip-flop, so a product of any width costs one small
cell per nonzero digit of the constant, and the product comes out bit by bit
in the same clocks as the input goes in.

Three refinements make this cheap enough for real transforms:

* **Subtractors for runs of ones.**  A run of three or more 1s in a constant
  is replaced by one +1 above the run and one -1 at its bottom
  (1001111 = 1010000 - 1), so one adder and one subtractor replace a whole
  run of adders.
* **One latch chain for many constants.**  Every constant that multiplies
  the same input reads the same chain.
* **Common parts built once.**  Constants that share digits share the
  adders for them: 1001111 and 1100111 both contain 1000000 - 1, which is
  built once and feeds both.

The RTL implements these cells and uses them for an 8-point one-dimensional
DCT (the Chen factorisation, rearranged so that all multiplications come
first), and eight such DCTs side by side as the 1-D DCT of an 8x8 block.
An inverse DCT built from the same cells stands beside it in the top
module, `dct_idct_top`.
It is written in synthesizable SystemVerilog (IEEE 1800-2017) and has been
checked with Verilator (lint and simulation) and with the slang front end of
Yosys.

## Number format and framing

Everything in the design follows one convention:

* Every signal is a single wire carrying a two's complement number,
  **LSB first**, one bit per clock.
* A word occupies a **frame** of a fixed number of clocks.  The sender sign
  extends it over the whole frame (an unsigned value is zero padded).
* A one-clock pulse `first` marks bit 0 of every frame.  It is the only
  control signal.  It restarts every carry latch (0 for an adder, 1 for a
  subtractor) and makes every latch chain act as if it were empty.  Frames
  may follow each other with no idle clock, or with any gap.
* All arithmetic is exact modulo 2^frame.  The frame must therefore be as
  long as the widest result: input width + constant width + growth.
* **Zero latency.**  The sum output of an adder is combinational and only
  the carry is registered, so bit i of every result leaves in the clock in
  which bit i of the inputs arrives.  A whole network of adders is one
  combinational ripple per clock, and a new word can start every frame.

For the DCT the samples are 8-bit signed and the frame is 20 clocks: one
8x8 block, or one row per single DCT, every 20 clocks.

## The cells

### `bs_addsub`: clocked adder and subtractor

A full adder whose carry output goes into a flip-flop and comes back as the
carry input of the next bit.  With `SUB = 1` operand `b` is inverted and the
carry starts at 1, so the cell computes a + ~b + 1 = a - b; otherwise the two
cells are identical.  In the clock where `first` is high the latch's
content is ignored and the start value (0 or 1) is used as the carry in.
The asynchronous reset loads the start value into the latch.

### `bs_latch_chain`: the shift chain

`DEPTH` flip-flops in a row.  `tap[0]` is the input and `tap[k]` is the input
k clocks ago.  Within a frame, `tap[k]` reads 0 during the first k clocks and
the latches behind the first are cleared by `first`.  This is what lets
sign-extended words follow each other directly: the tail of the previous
word (its sign bits) never reaches the next product.

### `bs_const_term`: one constant as wiring

Given the taps of a chain and two masks, `POS` (taps to add) and `NEG`
(taps to subtract), it builds one linear chain of `bs_addsub` cells.  The
chain starts with the lowest positive tap, or with a shared input `ref_in`
when `USE_REF = 1`, and then adds or subtracts the other taps from the
lowest position upwards.  `bs_pkg::recode_pos` and `bs_pkg::recode_neg`
produce the masks for a constant (plain binary, or with runs of three or
more 1s recoded).

Worked example: 1001 (9) times 1001111 (79) on a chain of six latches.  In
plain form the adders sum taps 0+1, +2, +3 and +6.  Their outputs h, i, j
and the product k, clock by clock from the first input bit:

| clock | input | h | i | j | k (product) |
|---|---|---|---|---|---|
| 1 | 1 | 1 | 1 | 1 | 1 |
| 2 | 0 | 1 | 1 | 1 | 1 |
| 3 | 0 | 0 | 1 | 1 | 1 |
| 4 | 1 | 1 | 1 | 0 | 0 |
| 5 | 0 | 1 | 1 | 0 | 0 |
| 6 | 0 | 0 | 1 | 0 | 0 |
| 7 | 0 | 0 | 0 | 0 | 1 |
| 8 | 0 | 0 | 0 | 1 | 1 |
| 9 | 0 | 0 | 0 | 0 | 0 |
| 10 | 0 | 0 | 0 | 0 | 1 |

Read from clock 10 down, k is 1011000111 = 711 = 9 x 79.  Recoded, the same
constant is 1010000 - 1: one subtractor (tap 4 minus tap 0) and one adder
(+ tap 6) give the same product bits with two cells instead of four.

Recoding rule: scanning from the LSB, every run of three or more 1s is
replaced by adding 2^(bottom of run) to the positive part (which clears the
run and sets the bit above it) and recording a -1 at the bottom of the run.
The new bit above may join a run higher up, which is then treated in turn.
Runs of two are left alone; 11 and 10-1 cost the same.

## Fields of constants and shared parts (`bs_mcm_field`)

This is the part that takes the most thought.  `bs_mcm_field` multiplies one
input by `NK` constants `K[i]`.  It has one latch chain, and its adder
network is planned at elaboration time by a constant function
(`make_plan`); nothing of the plan exists at run time.

1. Each constant is recoded into positive and negative digits.
2. **Iterative pairwise matching.**  A *term* is a set of digits plus,
   optionally, one shared term it starts from.  Repeatedly, among all terms
   (outputs and shared terms made so far) that start from the same shared
   term (or from none), the pair with the most equal digits is picked:
   same position and same sign, at least two of them (a single common tap
   saves nothing).  Ties go to the first pair in index order.  The common
   digits move into a new shared term.  Both members then start from it and
   keep only their remaining digits.  The loop stops when no pair shares
   two digits, or after `NS` shared terms.
3. Every term, shared or output, becomes one `bs_const_term`.  Shared terms
   feed the terms that start from them through `ref_in`.

Example with the default parameters, 1001111 and 1100111:

```
recoded      A = 1010000 - 1          B = 1101000 - 1
shared       S = 1000000 - 1          (tap6 - tap0, one subtractor)
A = S + 0010000                       (one adder)
B = S + 0001000 + 0100000             (two adders)
```

Four cells for two 7-bit constants, where plain binary needs 4 + 4 = 8.
`N_OPS`, a localparam of the field, reports the number of cells it built;
the testbench checks it.

For the DCT coefficients (8 fraction bits) the matching finds the part
shared by a = 181 and c = 237 (taps 0 and 2), and the part shared by
d = 213 and e = 142 (taps 4 and 7).  Each saves one cell: the a, c, f field
has 9 cells instead of 10, and the b, d, e, g field 10 instead of 11.

The matching is greedy, so it does not always find the smallest network.
A term can start from only one shared term, which keeps every term a single
chain.

## The 8-point DCT

### Dataflow

The Chen DCT is rearranged so that every multiplication comes first:

```
s_i = x_i + x_(7-i),  d_i = x_i - x_(7-i),   i = 0..3   (pairs A, B, C, D)

Y0 = (A.a + D.a) + (B.a + C.a)      Y4 = (A.a + D.a) - (B.a + C.a)
Y2 = (A.c + B.f) - (C.f + D.c)      Y6 = (A.f + C.c) - (B.c + D.f)
Y1 = (A.b + B.d) + (C.e + D.g)      Y3 = (A.d - B.g) - (C.b + D.e)
Y5 = (A.e - B.b) + (C.g + D.d)      Y7 = (A.g + C.d) - (B.e + D.b)
```

Here `A.c` is c * s_0, `A.d` is d * d_0 and so on.  Even outputs use the
sums and odd outputs the differences.  The coefficients are
a = cos(4pi/16), b = cos(pi/16), c = cos(2pi/16), d = cos(3pi/16),
e = cos(5pi/16), f = cos(6pi/16) and g = cos(7pi/16).  Each is quantised to
round(256 * cos), which gives 181, 251, 237, 213, 142, 98 and 50.

* `dct_pair_unit` (four of them): one bit-serial adder and one subtractor
  form s_i and d_i.  A field with a, c, f multiplies s_i and a field with
  b, d, e, g multiplies d_i.  The outputs are the structs
  `bs_pkg::even_prod_t` and `bs_pkg::odd_prod_t`.
* `dct_combine`: 14 first-level and 8 second-level add/subtract cells, as
  in the equations.  Y0 and Y4 share their first level.
* `dct8_bitserial`: four pair units and the combine network.  Ports `x[7:0]`
  and `y[7:0]` are the eight serial inputs and outputs.

### Output scaling

The network computes

    Y_k = sum_n x_n * round(256 * cos((2n+1) k pi / 16)),   Y_0 uses 181 for every n

This is 2 x 256 times the usual DCT coefficient (the factor 1/2 and the
scaling of the coefficients are left to the consumer).  For 8-bit signed
samples |Y_k| < 2^18, so the 20-clock frame holds every result exactly.  The
RTL is exact with respect to this formula; the only approximation is the
rounding of the coefficients to 8 fraction bits.

### `dct1d_bitserial`: the 1-D DCT of a block

`N_ROWS = 8` single DCTs run in lock step from one `first` pulse.
`x[r][n]` is sample n of row r and `y[r][k]` is output Y_k of row r.  One
8x8 block is transformed every 20 clocks, with 64 input and 64 output
wires.  A full 2-D DCT would need a second pass over the columns and a
transposition between the passes; those are not part of this design.

After generic synthesis the eight DCTs have 1360 flip-flops (170 per
single DCT).  These are carry latches and chain latches only; there is no
word register anywhere.

## The inverse DCT

The inverse transform uses the same cells and follows the same rule
(multiply first, then add).  It computes the transpose of the forward
matrix, x_n = sum_k Y_k * C(k,n).  The forward and inverse matrices
multiply to 2^18 times the identity, up to coefficient rounding.  So a
round trip returns 2^18 times the samples, and in the tests the rounded
quotient matches every sample exactly.

```
fields   a*Y0, a*Y4, {c,f}*Y2, {c,f}*Y6, {b,d,e,g}*Y1, Y3, Y5, Y7
even     t0 = aY0 + aY4    t1 = aY0 - aY4    u = cY2 + fY6    v = fY2 - cY6
         E0 = t0 + u   E3 = t0 - u   E1 = t1 + v   E2 = t1 - v
odd      O0 = (bY1 + dY3) + (eY5 + gY7)    O1 = (dY1 - gY3) - (bY5 + eY7)
         O2 = (eY1 - bY3) + (gY5 + dY7)    O3 = (gY1 - eY3) + (dY5 - bY7)
output   x_n = E_n + O_n,   x_(7-n) = E_n - O_n
```

The inputs are up to 19 bits wide (the range of the forward results) and
the outputs up to 31 bits, so the inverse needs frames of at least 31
clocks; 32 are used in the tests.  `idct8_bitserial` is one inverse
transform and `idct1d_bitserial` holds eight of them.

## Top: `dct_idct_top`

The top holds the forward unit (`dct1d_bitserial`) and the inverse unit
(`idct1d_bitserial`) side by side, as an encoder and a decoder would.  Each
unit has its own frame pulse (`dct_first`, `idct_first`) and its own
serial ports (`dct_x`/`dct_y` and `idct_y`/`idct_x`, `N_ROWS` x 8 wires
each).  Nothing connects the two units inside the top.  For a round trip,
wire `dct_y` to `idct_y`, pulse both frame inputs together and use frames
of 32 clocks.  The forward unit accepts longer frames than it needs, since
its inputs are sign extended.

## Clock rate

Every result bit leaves in the clock in which its input bits arrive.  The
price is that one clock must cover the whole adder network as a
combinational ripple: one full adder per cell on the longest path.  In a
single DCT that path has the input butterfly, up to four cells of a
coefficient field and the two output levels.  In a round trip wired
outside the top, the inverse adds its own chain.  The carry latches only
cut the path from one bit to the next, not from cell to cell.  No pipeline
registers are inserted.  If the clock rate matters, a flip-flop after a cell
delays its result by one clock.  Any such delay must be matched on every
path that meets it and added to the frame.

## Files

| file | content |
|---|---|
| `rtl/bs_pkg.sv` | recoding functions, digit masks, product-line structs |
| `rtl/bs_addsub.sv` | bit-serial adder / subtractor cell |
| `rtl/bs_latch_chain.sv` | shift chain with frame clearing |
| `rtl/bs_const_term.sv` | adder chain of one constant |
| `rtl/bs_mcm_field.sv` | several constants on one chain, with shared parts |
| `rtl/dct_pair_unit.sv` | input butterfly and the two coefficient fields |
| `rtl/dct_combine.sv` | output adder network |
| `rtl/dct8_bitserial.sv` | one 8-point DCT |
| `rtl/dct1d_bitserial.sv` | eight DCTs side by side |
| `rtl/idct8_bitserial.sv` | one 8-point inverse DCT |
| `rtl/idct1d_bitserial.sv` | eight inverse DCTs side by side |
| `rtl/dct_idct_top.sv` | top: forward and inverse units |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench drives serial frames, computes the expected values on its
own (products with integer arithmetic; DCT outputs from the cosine formula
with `$cos`) and compares every output bit in its clock.  It prints
`TB_RESULT checks=<n> failures=<n>`, and a watchdog ends a run that hangs.
With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/bs_pkg.sv tb/tb_dct_idct_top.sv --top-module tb_dct_idct_top
./obj_dir/Vtb_dct_idct_top
```

Replace the testbench name to run another one.  All of them finish in
seconds.

`tb_dct_idct_top` runs the top at its default size.  It wires the forward
unit into the inverse unit and checks both bit by bit.  It also checks
that every sample comes back after division by 2^18.  Blocks are sent
back to back (20 blocks in exactly 20 frames), after idle gaps and after a
mid-run reset.  The test then runs the inverse unit on its own frames
while the forward unit works on frames offset by 7 clocks.  It fails if
any of these cases never occurred, or if no result was negative or above
2^16.

`tb_dct1d_bitserial` checks the forward unit alone at its own frame of 20
clocks, including blocks at the extremes -128 and 127.
`tb_bs_const_term` checks the worked example clock by clock, and
`tb_bs_mcm_field` checks the cell counts of the shared fields.

## Changing it

* **Other constants**: set `K` (packed array, `CW` bits each) and `NK` of
  `bs_mcm_field`.  Keep the frame long enough for the largest product.
* **Coefficient precision**: `CW` and `KA`..`KG` of `dct_pair_unit`.  With
  more fraction bits, lengthen the frame by the same number of clocks.
* **Sample width**: nothing in the RTL depends on it; only the frame length
  does (sample width + coefficient width + 4 for the DCT).
* **No recoding**: `USE_SD = 0` on a field gives the plain binary form.

## Design decisions

The following follow the published architecture:

* LSB-first bit-serial arithmetic.
* The adder with an empty carry latch and the subtractor with a latch set
  to one.
* A constant as the choice of adders on a latch chain.
* The recoding of runs of ones into a subtractor.
* Sharing the chain and common parts (pairwise matching) among constants.
* The DCT dataflow: butterfly, then the a, c, f and b, d, e, g fields, then
  two add/subtract levels.
* Eight single DCTs forming the 1-D DCT.
* That the inverse transform can be built from the same cells.

The following are this design's own choices:

* The `first` frame pulse and sign-extended framing of signed words.
* Clearing the chain taps at frame start.
* The asynchronous reset.
* A run length of three for recoding.
* The order of cells in a chain.
* The tie-breaking and the one-shared-term-per-term limit of the matching.
* The 8-bit samples, the 8-bit coefficients and their values, and the
  20-clock frame.
* Leaving out the DCT's factor 1/2.
* The whole dataflow of the inverse DCT, which is only said to be possible.
* Which two products meet in each first-level cell of the output network.
  Only the kind of each cell (add or subtract) and the shared first level
  of Y0/Y4 are given.

The architecture also mentions multiplexers taken from a cell library.
It does not say where they sit or what they select, so none are built.

One departure in structure: in the two-constant example the published
network adds B's two remaining taps to each other first and then adds the
shared term.  Here B is one chain (shared + tap 3 + tap 5).  It uses the
same number of cells.
