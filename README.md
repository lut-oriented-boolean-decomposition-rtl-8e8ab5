# Arithmetic as Boolean functions: LUT-oriented decomposition

Wide arithmetic such as a modular product, a long constant product or a division by a
constant is usually built from adders and multipliers. A synthesis tool then has to
recover efficient logic from them. This design takes a different route. It cuts the
operands into sub-words so small that each partial result becomes a Boolean function of
at most six to eight inputs. It writes down the truth table of every such function and
maps it directly onto 6-input look-up tables (LUTs). Only the few remaining partial
results are summed, in a balanced adder tree. A modular correction at the end brings the
sum into range.

The RTL implements this flow as a set of parameterized SystemVerilog modules. It also
contains the worked examples the method is usually explained with:

- a 2x2 multiplier written three ways;
- a modular multiplier mod 241 whose top partial product is mapped by hand onto three
  fractured LUTs;
- a modular multiplier mod 3329;
- multiplication by large constants;
- reduction of a 168-bit number modulo a small prime;
- division by a constant;
- a plain multiplier built the same way.

All datapaths are combinational. There is no clock, no register and no reset in `rtl/`.

## The six stages and where they live

| Stage | What happens | Module |
|---|---|---|
| 1. Arithmetic decomposition | write the operation as a sum of small products, `F = sum A_i * B_j * C_ij` | parameters and generate loops of `modmul`, `mult_decomp`, `modred`, `const_mult`, `const_div` |
| 2. Boolean mapping | each small product becomes a Boolean function `g(X)` of the sub-word bits | truth tables computed at elaboration (`pp_func`, and functions inside the others) |
| 3. Minimization / decomposition | functions with more than six inputs are split into 6-input sub-functions | `lut_func` |
| 4. LUT mapping | one 6-input function or two 5-input functions per LUT cell | `lut6_2`, `lut_func`, `mod241_tfunc` |
| 5. Adder tree | balanced pairwise addition of the partial results | `adder_tree` |
| 6. Result integration | concatenation of disjoint fields, then `R - P if R >= P` | `mult_decomp` (concatenation), `mod_fold`, `mod_correct` |

In this RTL the truth tables are the whole of stage 3's minimization. A synthesis tool
minimizes each LUT's contents anyway, so no external minimizer (Espresso, ABC) takes
part. This differs from the published flow, which minimizes the functions before mapping.

## The LUT cell and how functions are mapped

`lut6_2` is a fracturable 6-input LUT. Two 5-input tables read inputs x1..x5:

- The first table, `INIT[31:0]`, drives `y1`.
- A multiplexer controlled by x6 drives `y2`. It passes the first table when x6 = 0
  and the second table, `INIT[63:32]`, when x6 = 1.

The cell therefore computes one 6-input function on `y2`, or two 5-input functions of
the same inputs when x6 is tied to 1. This is the usual FPGA convention. Which
multiplexer input x6 = 1 selects is an assumption of this design.

`lut_func` takes a multi-output truth table. Output `o` for input value `v` is bit
`TT[o*2**NI + v]`. The table is placed on cells by these rules:

- **NI <= 5.** Outputs are paired and each pair shares one cell in dual mode.
- **NI = 6.** Each output takes one cell.
- **NI > 6.** Each output is expanded (Shannon expansion) over the upper NI-6 inputs.
  This gives 2**(NI-6) cells of six inputs each. A multiplexer on the upper inputs picks
  one of them, like the wide-function multiplexers found after FPGA LUTs. The method
  says only that such functions are "decomposed into sub-functions of 5 or 6 variables".
  This particular split is this design's choice.

## Modular multiplication, `modmul`

`a` and `b` (N bits each) are cut from the LSB into sub-words of SW bits. The top
sub-word may be shorter: N = 8 and SW = 3 give 3/3/2. Then

    (a*b) mod P = ( sum over i,j of  g_ij(A_i, B_j) ) mod P,
    g_ij = (A_i * B_j * (2**(SW*(i+j)) mod P)) mod P

Each `g_ij` has at most 2*SW inputs, so at most 8 with the sizes used here. It is one
`pp_func`, and its result is already below P. The weights are reduced constants. For
P = 3329 with 4-bit sub-words they are 1, 2^4, 2^8, 767 (= 2^12 mod P) and
2285 (= 2^16 mod P). For P = 241 with the 3/3/2 split they are 1, 2^3, 2^6,
30 (= 2^9 mod P) and 240 (= 2^12 mod P).

### The hand-mapped mod-241 term

In the 8-bit mod-241 case one term is `(a8 a7)*(b8 b7)*240 mod 241`. It is a function
of only four bits. Because 240 = -1 mod 241, its value is 0 or 241 - a*b. Its eight
output bits are:

    t1 = a8(b8 ~b7 | ~a7 b7) | a7 b8 ~b7
    t2 = a8 b7 (~a7 | ~b8) | a7 b8 (~a8 | ~b7)
    t3 = a8(~b8 b7 | ~a7 b8 ~b7) | ~a8 a7 b8
    t4 = a8(b8 | b7) | a7 b8
    t5 = ~a8 a7 ~b8 b7
    t6 = t7 = t8 = (a8 | a7)(b8 | b7)

Since t6, t7 and t8 are one function, the eight outputs fit in three dual-output cells:
(t1,t2), (t3,t4) and (t5, t6/t7/t8). `mod241_tfunc` builds exactly that. `modmul` uses
it when P = 241, N = 8 and SW = 3. Every other configuration uses `pp_func` for all
terms. The equations are sums of products. Equivalent XOR (Reed-Muller) forms exist, but
these were checked against the arithmetic for all 16 inputs.

### Closing the sum: `mod_fold` and `mod_correct`

The adder tree adds NS*NS residues, so its sum can reach several multiples of P. One
conditional subtraction is not enough. `mod_fold` first treats the sum bits above
n = ceil(log2 P) as one more sub-word. A table gives `(hi * 2**n) mod P`, and this is
added to the low n bits. The result is below 2**n + P < 3P. Two `mod_correct` stages
(`R - P if R >= P`) then finish the reduction. The final conditional subtraction comes
from the method. The fold in front of it is this design's addition.

## The other operations

- **`const_mult`: A times a large constant C.** Only A is split, into SW-bit sub-words
  (SW = 5 or 6). Each `A_i * C` is a function of at most SW inputs with WC + SW outputs.
  The products are shifted by SW*i and summed in a tree. Defaults: 7-bit A,
  C = 2^29 - 3.
- **`modred`: A mod P for very wide A.** Each 6-bit sub-word gives
  `(A_i * (2**(6i) mod P)) mod P`. The residues are summed and then folded and
  corrected as above. Defaults: 168-bit A, P = 241.
- **`const_div`: X / d.** X is cut into delta-bit chunks, with delta = ceil(log2 d).
  The method has three steps:
  1. One table per chunk gives `{Q_k, R_k}` for `X_k * 2**(delta*k) / d`.
  2. The residues `R_k` are summed, and one more table divides that small sum by d,
     giving `{Q_t, R}`.
  3. The quotient is `Q = sum Q_k + Q_t`.

  Example with d = 7 and X = 489 = 111_101_001b: the chunks give {64,0}, {5,5} and
  {0,1}. The residue sum 6 gives {0,6}, so Q = 69 and R = 6. Defaults: 16-bit X, d = 5.
- **`mult_decomp`: plain A*B.** The same split as `modmul`, without a modulus. The
  diagonal products `A_i * B_i` fall into disjoint bit fields `[2*SW*i +: 2*SW]`, so
  they are concatenated into one word for free. Only the off-diagonal products go
  through the adder tree, together with that word. Defaults: 8-bit operands,
  4-bit sub-words. The method gives no size for this operation.
- **2x2 multipliers.** These are small references for the logic-level forms the method
  starts from:
  - `mult2x2_sb` uses AND gates and two half adders (3 levels, 8 gates).
  - `mult2x2_dnf` uses a minimized AND/OR form (3 levels, 12 gates).
  - `mult2x2_rm` uses an AND/XOR Reed-Muller form (3 levels, 7 gates).

## Top level

`lut_arith_top` places the examples side by side, each with its own ports:

| Ports | Function | Instance parameters |
|---|---|---|
| `m2_a`, `m2_b` -> `m2_r_sb`, `m2_r_dnf`, `m2_r_rm` | 2-bit product, three forms | - |
| `mm241_a`, `mm241_b` -> `mm241_r` | (A*B) mod 241 | N=8, SW=3 |
| `mm3329_a`, `mm3329_b` -> `mm3329_r` | (A*B) mod 3329 | N=12, SW=4 |
| `cm_a` -> `cm_r` | A * 536870909 | WA=7, WC=29, SW=6 |
| `mr_a` (168 b) -> `mr_r` | A mod 241 | WA=168, SW=6 |
| `cd_x` -> `cd_q`, `cd_r` | X / 5 | WX=16, D=5 |
| `mul_a`, `mul_b` -> `mul_r` | A * B, 16-bit product | N=8, SW=4 |

Inputs to `modmul` may take any value below 2**N. They do not have to be reduced below P.

## Sizes the method is evaluated on

Every module is parameterized. The evaluated sizes below are reached by setting
parameters, and testbenches run all of them:

- `modmul`: P = 241, 491, 997, 2011, 4051, with ceil(log2 P)-bit operands;
- `const_mult`: 7x29, 8x46, 9x101, 9x157, 10x183 bits;
- `modred`: 168- and 270-bit A, each with the five P above;
- `const_div`: 16-, 32-, 48- and 64-bit X with d from 5 to 241.

Requirements and limits:

- `const_div` needs WX <= 64, because its tables are computed with 64-bit integers.
- `mod_fold` needs the sum to be wider than ceil(log2 P).
- The size of a `lut_func` grows with 2**NI. Keep every function at 8 to 11 inputs or
  fewer.

## What follows the method and what does not

These parts follow the method as described:

- the six-stage flow;
- sub-word splits (3/3/2 for mod 241, 4/4/4 for mod 3329);
- reduced weights;
- per-term reduction mod P;
- the LUT structure and the 6-input / 2x5-input packing;
- the hand-mapped mod-241 term;
- the balanced adder tree;
- the final `R - P` correction;
- concatenation of non-overlapping partial products;
- the three-step constant division;
- the three 2x2 multipliers.

These are choices of this design:

- the INIT encoding of the LUT cell;
- Shannon expansion for functions wider than six inputs;
- folding the high sum bits before the correction;
- splitting only the variable in constant multiplication;
- the complete arrangement of wide modular reduction, which the method only evaluates;
- combinational timing throughout.

The following operations belong to the same family but are not provided:

- modular addition and division;
- residue number systems;
- floating-point units;
- multiply-accumulate forms;
- constant multiplication modulo P.

Results are exact by construction, and the testbenches check them. Area and delay depend
entirely on how a synthesis tool packs the generated tables. This RTL makes no claim
about them.

## Simulating

Every testbench in `tb/` checks itself. It prints `TB_RESULT checks=N failures=M` and
stops on its own. For example:

    verilator --binary --timing --assert -Irtl tb/tb_modmul.sv --top-module tb_modmul -Mdir obj
    ./obj/Vtb_modmul

The testbenches are:

- `tb_<module>`: one per module;
- `tb_lut_arith_top`: runs every example at its default size. It also counts how often
  the T-function term, the fold table, each correction stage, the multi-term constant
  product, the residue re-division and the diagonal concatenation fire, and fails if one of them never does;
- `tb_wl_modmul`, `tb_wl_modred`, `tb_wl_const_div`: run the evaluated sizes listed
  above.

References are computed with SystemVerilog's own `*`, `/` and `%` on full-width
operands.
