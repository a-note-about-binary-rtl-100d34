# GF(2^m) multiplication as a parallel matrix product

Multiplying two elements of a binary field GF(2^m) usually means multiplying
two polynomials over GF(2) and then reducing the result modulo the field
polynomial f(x). A bit-serial shift-and-add multiplier does this in about m
clock cycles. A schoolbook multiply followed by a separate division takes
around 4m.

This design represents each field element as an m x m bit matrix instead. Two
elements are then multiplied with one ordinary matrix product over GF(2), in
which every entry is an AND/XOR inner product. All m^2 entries are computed at
once, and the product matrix is already a valid field element, so no reduction
step follows. One result takes two clock cycles at any field size. In exchange
the design needs m^3 AND gates.

## Why the matrix product needs no reduction

Let f(x) = f0 + f1 x + ... + f(m-1) x^(m-1) + x^m. Its *companion matrix* A is
the m x m matrix with:

* ones just below the diagonal;
* the column (f0, f1, ..., f(m-1)) as its last column;
* zeros everywhere else.

Multiplying A by a coefficient vector v shifts v up one power and folds the
x^m term back through f. In other words, A v is x·v(x) mod f(x). A therefore
satisfies f(A) = 0 and plays the role of a root of f. An element
a(x) = sum a_i x^i is represented by the matrix a(A) = sum a_i A^i. Sums map to
sums and products map to products: a(A)·b(A) = (a·b mod f)(A). The reduction
modulo f is built into A itself.

The hardware never forms powers of A. Because a(A) commutes with A and
a(A)·e0 = a, column j of a(A) is A^j·a, which is x^j·a(x) mod f(x). So:

* **Encoding** an element means taking a, x·a, x^2·a, ... (each reduced mod f)
  as the columns of its matrix. Each step is a shift plus a conditional XOR
  with f.
* **Decoding** the product means reading column 0 of c(A), which is the
  coefficient vector of c(x) = a(x)·b(x) mod f(x).

## Blocks

| module | role | timing |
|---|---|---|
| `gf2m_pkg` | shared constants: `GF_M = 16` (largest field), `MUL_LATENCY = 2` | — |
| `companion_encoder` | a(x), f(x) → a(A), as a chain of M-1 multiply-by-x stages | combinational |
| `gf2_matrix_mul` | C = A·B over GF(2): `C[i][j] = XOR_k (A[i][k] AND B[k][j])`, all entries in parallel | 2 cycles, 1 per cycle |
| `gf2m_matrix_multiplier` | **top**: two encoders → matrix product → `c_mat` and `c_poly` (column 0) | 2 cycles, 1 per cycle |

### Parallel matrix product (`gf2_matrix_mul`)

This is the core of the design. For each (i, j) the block ANDs row i of A with
column j of B (M AND gates) and XOR-reduces the M bits. That makes M^3 ANDs and
M^2 XOR trees of depth log2 M. The two cycles are split as follows:

* edge 1 captures the operand matrices (B is stored transposed, so a column is
  one packed word);
* edge 2 captures the product.

The array is fully pipelined, so a new operand pair can enter every cycle. Two
assertions in the module state the valid rule: each accepted pair produces
exactly one `out_valid`, `MUL_LATENCY` edges later. At
M = 16, yosys coarse synthesis reports 256 16-bit ANDs, 256 16-input XOR
reductions and 770 flip-flops (three 256-bit matrix registers plus two valid
bits).

### Encoder (`companion_encoder`)

The degree m is the position of the highest set bit of `f_poly`. A mask
`live[i] = (i < m)` is derived from it, along with a one-hot marker `top` at
bit m-1. Column 0 is `a & live`. Each later column is built from the previous
one:

    col[j] = ((col[j-1] << 1) & live) ^ (col[j-1][m-1] ? f_low : 0)

Here `f_low` holds the coefficients of f below its leading one. Rows and
columns at or above m are forced to zero. The critical path is the M-1 stage
chain, which sits in front of the operand register of the product.

## Interface of the top (`gf2m_matrix_multiplier`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous, active low; clears the valid pipeline only |
| `in_valid` | in | 1 | operands present this cycle |
| `f_poly` | in | M+1 | field polynomial including its leading one; bit i = coefficient of x^i |
| `a_poly`, `b_poly` | in | M | operands in polynomial basis, degree < m; higher bits are ignored |
| `out_valid` | out | 1 | result present; follows `in_valid` by exactly 2 rising edges |
| `c_mat` | out | M x M | product matrix, packed `c_mat[row][col]`, zero outside the leading m x m block |
| `c_poly` | out | M | a·b mod f, equal to column 0 of `c_mat` |

There is no back-pressure. Outputs hold their value until the next valid
result.

### Several field sizes in one build

The degree comes from `f_poly` at run time, so a build with M = 16 also
multiplies in GF(2^2), GF(2^4) and GF(2^8). A smaller field occupies the
leading m x m corner of the array, and the rest stays zero. The latency is 2
cycles for every m. The field polynomial should be irreducible for the result
to be a field product. With a reducible f the block still returns a·b mod f,
which is a product in the quotient ring.

## Design choices

The following points are this design's own decisions, not fixed by the method:

* **Polynomial-basis front end.** The method multiplies matrices. The encoders
  and the column-0 readout let the block accept and return ordinary
  polynomial-basis elements. If your data already lives in matrix form,
  instantiate `gf2_matrix_mul` directly.
* **What the two cycles are.** The method gives a two-cycle multiply. Here the
  two cycles are an operand register followed by a product register, and the
  encoders are combinational in front of the first register.
* **One build for all sizes.** A run-time field polynomial with degree 1..M
  replaces a separate build per field size.
* **Handshake and reset.** The valid/valid handshake and the synchronous reset
  of the valid flags only.
* **Default size.** The default M = 16 is the largest field size the method was
  evaluated at. Sizes 2, 4 and 8 were also evaluated, and a 4 x 4 example is
  the one used to present it.

Only column 0 of the product is needed for `c_poly`. A cheaper datapath would
compute a(A)·b with M^2 ANDs, but it would no longer be the full matrix
product. The design keeps the full product because `c_mat` is a usable
element in matrix form, for example as an operand of the next multiply.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F` and has a watchdog.

* `tb_gf2_matrix_mul` (M = 16) runs 400 products with random gaps in
  `in_valid`, covering identity, zero, all-ones and random matrices, plus a
  small hand-worked case ([1 0; 1 1]·[0 1; 1 0] = [0 1; 1 1] in the leading
  corner). The
  reference counts the one-bits of each inner product and takes the parity.
  The test also checks that every result arrives exactly 2 edges after its
  operands.
* `tb_companion_encoder` (M = 16) covers degrees 2, 4, 8, 16 and random
  degrees. The reference builds the companion matrix from its definition and
  sums explicit powers A^i.
* `tb_gf2m_matrix_multiplier` runs the top at its default parameters. It does
  2000 multiplies in GF(2^2) (x^2+x+1), GF(2^4) (x^4+x+1),
  GF(2^8) (x^8+x^4+x^3+x+1) and GF(2^16) (x^16+x^5+x^3+x^2+1), plus random
  polynomials. The reference is shift-and-XOR long multiplication and
  division. Both `c_poly` and the whole `c_mat` are checked, along with the
  2-cycle latency. The test requires at least one of each of the following:
  * back-to-back operands;
  * idle gaps;
  * products that needed a reduction;
  * an element times its inverse, which must give 1;
  * a reset in mid-stream, which drops results in flight.

To run one with plain Verilator from the repository root:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
      --top-module tb_gf2m_matrix_multiplier rtl/gf2m_pkg.sv tb/tb_gf2m_matrix_multiplier.sv
    ./obj_dir/Vtb_gf2m_matrix_multiplier

All three testbenches pass. Each one also fails when its module is replaced by
an empty module, and when it runs against a deliberately broken copy of the
module:

* OR instead of XOR in the inner product;
* the encoder's reduction dropped;
* the result read from row 0 instead of column 0.

The full-size run takes well under a second.

## Changing it

* **Field size.** Set `M` on the top. Cost grows as M^3 ANDs and about 3·M^2
  flip-flops, so M in the hundreds (elliptic-curve sizes) becomes very large.
* **Latency.** To change it, move or remove the registers in `gf2_matrix_mul`
  and update `gf2m_pkg::MUL_LATENCY`, which the testbenches use.
* **Fixed field.** For a single fixed field, tie `f_poly` to a constant. The
  encoder logic then simplifies to XOR networks during synthesis.
