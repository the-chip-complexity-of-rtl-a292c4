# Regular-layout prefix adder and transform multiplier

An n-bit addition is slow because of its carries: carry c_i depends on every
bit below position i. Brent and Kung's observation is that the carries are
the prefixes of an associative operator on (generate, propagate) pairs. A
prefix computation can be evaluated as a binary tree followed by the same
tree run backwards. The result is a network that is regular, has fan-out two
everywhere, finds all n carries in 2 lg n - 1 steps, and fits in area
proportional to n lg n. The network can also be pipelined. The operands then
enter W bits per cycle, and one accumulator corrects the carries of each
W-bit segment with the carry of all the segments below it. An n-bit addition
then takes about n/W + 2 lg W cycles on hardware of size W lg W.

This repository implements that adder, from its two kinds of cell up to a
streaming W-bit adder (default W = 16). Next to it is the integer multiplier
from the same paper. That multiplier computes a product through a discrete
Fourier transform over a finite field F_p. The transform is laid out as
sqrt(n) x sqrt(n) matrix products on a systolic array, and the final sum uses
the prefix adder. It is the paper's example of a multiplier whose area-time
cost comes close to its lower bound (default n = 64, i.e. a 32 x 32-bit
product).

Everything is synthesizable SystemVerilog (IEEE 1800-2017).

## 1. Carries as a prefix computation

For bit i, g_i = a_i & b_i (the bit generates a carry) and p_i = a_i ^ b_i
(the bit passes an incoming carry on). Define

    (g, p) o (g', p') = (g | (p & g'), p & p')

with the more significant block on the left. The operator is associative,
and (0, 1) is its identity. The block pair (G_i, P_i) = (g_i,p_i) o ... o (g_1,p_1)
has G_i = c_i, the carry out of bit i when the carry into bit 1 is 0. The sum
is then s_i = p_i ^ c_(i-1), and s_(n+1) = c_n.

`bk_pkg` holds the pair type `gp_t`, the operator `gp_combine` and the
identity `GP_IDENTITY`.

## 2. The carry network (`bk_carry_network`)

This is the heart of the design and the part worth reading closely. There
are W columns, one per bit position; column i is bit i, with bit 1 at the
right. There are 2 lg W rows. Each row is one clock cycle, and each cell of a
row is one of two processors:

* a **white** processor (`bk_white`) passes its column's pair up unchanged;
* a **black** processor (`bk_black`) combines its column's pair with the pair
  of a column further right: `(own) o (right)`.

Both are registers, so a row is a pipeline stage.

Row 0 holds the inputs. Rows 1 .. lg W form a binary tree. At level t, every
column i with i mod 2^t = 0 takes column i - 2^(t-1). After row lg W, column W
holds (G_W, P_W), and every column whose index is a power of two is also
complete. Rows lg W + 1 .. 2 lg W - 1 run the tree in reverse to fill in the
other columns. With d = 2 lg W - row, column i is black when
i mod 2^d = 2^(d-1) and i > 2^d, and it takes column i - 2^(d-1).

For W = 16 (B = black; the column number is the bit index):

    col:   16 15 14 13 12 11 10  9  8  7  6  5  4  3  2  1
    T=7     .  B  .  B  .  B  .  B  .  B  .  B  .  B  .  .    from col-1
    T=6     .  .  B  .  .  .  B  .  .  .  B  .  .  .  .  .    from col-2
    T=5     .  .  .  .  B  .  .  .  .  .  .  .  .  .  .  .    from col-4
    T=4     B  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .    from col-8
    T=3     B  .  .  .  .  .  .  .  B  .  .  .  .  .  .  .    from col-4
    T=2     B  .  .  .  B  .  .  .  B  .  .  .  B  .  .  .    from col-2
    T=1     B  .  B  .  B  .  B  .  B  .  B  .  B  .  B  .    from col-1
    T=0     inputs (g_i, p_i)

After row 2 lg W - 1 (T = 7 for W = 16), every column holds its (G_i, P_i).
The network's output `gp_out` appears 2 lg W cycles after `gp_in` is
presented. A new segment may be presented every cycle. `total_out` taps
column W at row lg W, where the segment's total is ready lg W + 1 cycles
after input. The pipelined adder needs it there.

Black processors number 2W - 2 - lg W. Each pair is read by at most two
cells: its own column and one to the left.

## 3. Adding segment by segment (`bk_pipelined_carry`)

With W < n, the operands are cut into W-bit segments. The segments enter the
network one per cycle, least significant first. The network's output for
segment i assumes no carry into the segment. Each result must still be
combined, on the right, with the pair (G_(i-1)W, P_(i-1)W) of all lower
segments. Two extra pieces do this:

* **Square processor** (`bk_square`). This is an accumulator that starts at
  (0, 1). When segment i's total arrives from row lg W, it outputs its stored
  value (G_(i-1)W, P_(i-1)W), and at the clock edge it stores
  total_i o stored. The output is therefore the processor's own result
  delayed by one segment.
* **Broadcast tree** (`bk_broadcast_tree`). This is a binary tree of white
  processors with lg W - 1 register levels. It takes the square processor's
  output to W leaves without any node driving more than two others.

The tree has exactly as many levels as the upper half of the network. So the
pair meant for segment i reaches the top in the same cycle as segment i's
own results. A final row of W black leaf processors then forms
`local o broadcast`. Its g outputs are the true carries of the whole
addition.

Timing for a segment presented in cycle 0, W = 16:

    cycle 1      row 0 holds the segment
    cycle 5      row 4 holds the segment total -> square processor outputs
                 the pair of all lower segments and stores the new total
    cycles 6-8   the pair climbs the tree while the segment climbs rows 5-7
    cycle 9      leaf row: final carries, out_valid

One thing is this design's own: a `first` flag travels with each segment.
When the first segment of an addition reaches the square processor, the
processor uses (0, 1) in place of its stored value. Additions can therefore
follow each other with no idle cycle, and no separate clear is needed.
`valid` and `last` travel alongside.

## 4. The adder (`bk_adder`)

`bk_adder` forms g and p from each W-bit pair of operand segments, sends
them through `bk_pipelined_carry`, and delays p in a shift register until
the carries arrive. The sum is then `p ^ {carry[W-2:0], carry_into_segment}`.
On the segment flagged `last`, `cout_out` is s_(n+1).

| port | dir | meaning |
|---|---|---|
| `in_valid`, `in_first`, `in_last` | in | a segment is present; it is the lowest / highest of its addition (both for a one-segment addition) |
| `a_in`, `b_in` [W] | in | operand segments, least significant first |
| `out_valid`, `out_first`, `out_last` | out | the same flags, 2 lg W + 1 cycles later |
| `sum_out` [W], `cout_out` | out | sum segment; carry out of it |

* Latency: 2 lg W + 1 cycles per segment (9 for W = 16).
* Throughput: one segment per cycle.
* An addition of n = mW bits is complete m + 2 lg W cycles after its first
  segment was presented.
* The carry into bit 1 is 0.
* The number of segments in an addition is not a parameter. It is set at
  run time by the flags, so the same hardware adds numbers of any multiple
  of W bits.
* With W = n, the whole addition is one segment.

W must be a power of two and at least 2. W = 1, the plain serial carry
chain, is not supported.

## 5. The transform multiplier (`ntt_multiplier`)

The multiplier works on operands a and b of n/2 bits each. The upper halves
of the n-bit inputs are zero, so the n-bit product never wraps.

**Arithmetic.** Write c_m = sum_i a_i b_(m-i), the convolution of the two
bit strings. The product is sum c_m 2^m. The convolution is computed exactly
with a number-theoretic transform:

* The field is F_p, where p is the smallest prime of the form n*q + 1.
* u is an element of order n in F_p, and w = u^K with K = sqrt(n).
* Every c_m is at most n/2 < p, so nothing is lost modulo p.

p and u are constants of the circuit. `ntt_pkg` finds them while the design
is elaborated: p = 193 and u = 11 for n = 64.

**Transform as matrix products.** The n bits of an operand are placed in a
K x K matrix A, with A[i][j] = bit i*K + j. With W[i][j] = w^(ij),
U[i][j] = u^(ij) and o the componentwise product,

    A''' = ((W A) o U) W

A'''[i][j] is transform coefficient j*K + i. One n-point transform is
therefore two K x K matrix products and one componentwise product. The
inverse is C = W^-1 ((C''' W^-1) o U'), with U'[i][j] = u^-(ij). Here W^-1 is
the true inverse (1/K)[w^-(ij)], so the 1/n of the inverse transform is
built into the two matrix products. C comes back in natural order:
C[i][j] = c_(i*K + j).

**Program.** One `fp_systolic_array` runs ten operations in sequence. The
controller's `PROGRAM` table holds them, and all four constant matrices are
elaboration-time parameters.

| # | operation | # | operation |
|---|---|---|---|
| 0 | RA = W RA | 5 | RB = RB W |
| 1 | RA = RA o U | 6 | RA = RA o RB |
| 2 | RA = RA W | 7 | RA = RA W^-1 |
| 3 | RB = W RB | 8 | RA = RA o U' |
| 4 | RB = RB o U | 9 | RA = W^-1 RA |

**Systolic array** (`fp_systolic_array`, `fp_pe`).

* The array moves in beats. A beat is B = ceil(lg p) clock cycles (8 for
  p = 193), the time an element needs for one serial multiply-add.
* It is a K x K mesh. Row i of X enters from the left, delayed by i beats.
  Column j of Y enters from the top, delayed by j beats.
* Element (i, j) meets X[i][s] and Y[s][j] at beat i + j + s and adds their
  product to an accumulator that stays in place.
* A matrix product takes 1 + (3K - 2)B cycles (185 for K = 8): one cycle
  clears the operand and accumulator registers, then 3K - 2 beats carry
  data.
* In componentwise mode, each element multiplies its own two entries in one
  beat (1 + B cycles in all).

**Serial multiply-add** (`fp_pe`). In the first cycle of a beat the element
takes its two operands and passes them on to its neighbours for the next
beat. It then forms the product mod p by Horner's rule, one bit of the first
operand per cycle, most significant bit first:

    r <- 2r mod p          (one conditional subtraction of p)
    r <- r + bit * b mod p (one conditional subtraction of p)

In the last cycle of the beat r is added to the accumulator mod p. Each
element holds a few B-bit registers and three B-bit adders, so its area and
its time per step both grow as lg p.

**Final sum.** Each c_m has CB = clog2(n/2 + 1) bits.

* Bit t of all the c_m, placed at positions m + t, forms an n-bit number
  X_t. The product is X_0 + ... + X_(CB-1).
* These CB - 1 additions run one after the other on a `bk_adder` of width
  K, K product bits per cycle.
* Sum segments are written back into the accumulator as they come out.

**Interface and timing.**

* Interface:
  * `start` is a one-cycle pulse while the multiplier is idle. It captures
    `a_in` and `b_in` [n/2].
  * `busy` stays high until `done` pulses.
  * `product_out` [n] holds the result until the next start.
* Cycle count from `start` to `done`: (18K - 8)B + 20 for the ten matrix
  steps (one issue cycle each), plus (CB - 1)(K + 2 lg K + 1) for the
  additions, plus 3. For n = 64 that is 1108 + 75 + 3 = 1186 cycles.
* n must be the square of a power of two (16, 64, 256, ...). The matrix
  layout needs a square, and the K-bit prefix adder needs K to be a power
  of two.

## 6. Top level (`bk_arith_top`)

The adder (W = 16) and the multiplier (n = 64) stand side by side. They
share only `clk` and `rst_n`, and their ports are brought out with the
prefixes `add_` and `mul_`. All resets are synchronous and active low.

Module hierarchy:

    bk_arith_top
    +- bk_adder (W=16)
    |  +- bk_pipelined_carry
    |     +- bk_carry_network -> bk_white, bk_black
    |     +- bk_square
    |     +- bk_broadcast_tree -> bk_white
    |     +- bk_black (leaf row)
    +- ntt_multiplier (N=64)
       +- fp_systolic_array -> fp_pe
       +- bk_adder (W=8)
    packages: bk_pkg, ntt_pkg

## 7. Choices that go beyond the paper

The paper describes the carry network, the square processor and the
broadcast tree exactly. It describes the multiplier as a sketch. These
points are this implementation's own:

* **One unit of time is one clock cycle.** Every processor output is
  registered, including the input row and the tree nodes.
* **The square processor's output.** The paper's drawing labels the square
  processor's outputs with its updated value. Its text, however, requires
  segment i's carries to meet the pair of the segments below i. The
  implementation follows the text and sends out the stored, delayed value.
* **Control and the sum.** The valid/first/last control, the p delay line
  and the sum stage are not drawn in the paper.
* **F_p arithmetic.** The paper asks for a serial pipeline multiplier and
  a serial adder in each element, with O(lg p) area and time per step. Here
  the multiplier bits enter one per cycle, but the additions inside a step
  are B bits wide rather than bit-serial. Each step reduces by at most two
  conditional subtractions of p. The paper also assumes a built-in
  approximation of 1/p for F_p arithmetic; this design needs none.
* **The systolic array.** The paper cites a hexagonal array; this one is a
  square output-stationary mesh. A single array is reused for all ten matrix
  steps.
* **The final sum.** The paper forms per-row sums R_i and adds the shifted
  R_i. Here the convolution is added by bit planes on the same K-wide prefix
  adder.
* **The multiplier's size.** The paper gives no size; n = 64 is this
  design's default.

## 8. Simulating

Each module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`. The packages must be named on the command
line; verilator finds the other modules by file name:

    verilator --binary --timing -Irtl -y rtl rtl/bk_pkg.sv rtl/ntt_pkg.sv \
        tb/tb_bk_arith_top.sv --top-module tb_bk_arith_top
    ./obj_dir/Vtb_bk_arith_top

What the testbenches check:

* `tb_bk_arith_top` runs both units at full size concurrently:
  * 400 random and extreme additions of 16 to 128 bits, with exact latency
    checks;
  * 30 multiplications, checked against a * b and the 1186-cycle count.
  It also counts each mechanism and fails if one never happened: carries
  across segments, back-to-back restarts, a full ripple, carry out, idle
  cycles, and matrix, componentwise and plane-addition steps.
* `tb_bk_adder` is the same adder test on its own.
* `tb_bk_carry_network` and `tb_bk_pipelined_carry` compare every carry with
  a serial evaluation of the carry recurrence.
* `tb_fp_pe` runs random serial multiply-add beats, including the operands
  0, 1 and p - 1, and checks the forwarding of operands between beats.
* `tb_fp_systolic_array` compares matrix and componentwise products and
  their cycle counts.
* `tb_ntt_multiplier` checks 60 products.

To try other sizes, override `W` on `bk_adder` (any power of two of at
least 2) or `N` on `ntt_multiplier` (16, 64, 256, ...); p and u follow
automatically. Widths 2 to 64 for the adder, and n = 16 and 256 for the
multiplier, have been simulated.
