# One-level carry-skip adder with optimum unequal blocks

A ripple-carry adder is small and frugal, but its worst case is a carry that
travels through every bit position. A carry-skip adder keeps the ripple cells
and cuts the positions into blocks. Each block also gets a fast bypass: when
every position of a block has `x_i != y_i`, the carry out of the block equals
the carry into it. The carry then jumps over the block in one *skip time*
instead of rippling through it.

How fast the adder is depends on how the positions are split into blocks.
Equal blocks are not the best choice. The longest carry starts low in one
block, skips the blocks in between and ends high in another block. So the
blocks at the two ends should be small, because a carry ripples through them
at the start or the end of its trip. The middle blocks can be large, because a
long carry skips them. This RTL builds that adder for any block partition. By
default it uses the partition that is optimal for 32 result positions when a
skip takes 1.334 times as long as one ripple step.

## The delay model behind the block sizes

Two technology figures describe the adder:

- the ripple time `r`: one cell, carry in to carry out;
- the skip time `s`: one block, however large.

Their ratio is `rho = s / r`. All other delays are constant:

- the XOR layer;
- the all-propagate test (a few levels of AND gates);
- the final sum XOR.

Take a carry generated in block `b1` and killed in block `b2 > b1`. It ripples
to the top of `b1`, skips the `b2 - b1 - 1` blocks between them, and ripples
from the bottom of `b2` to where it dies. The worst case is

    max over b1 < b2 of   r * (m(b1) + m(b2) - 2) + s * (b2 - b1 - 1)

Here `m(b)` is the number of positions in block `b`. A good partition keeps
this maximum small. The partitions below come from a design-time search that
finds the exact optimum for any real `rho`. The search is not part of the
hardware: its only output is the `BLOCK_SIZES` parameter. The delay model,
the search and the partitions are those of V. Kantabutra, "Designing Optimum
Carry-Skip Adders"; the RTL and its tests are an independent implementation.

| result positions | rho    | blocks, most significant first | worst carry delay |
|------------------|--------|--------------------------------|-------------------|
| 32 (default)     | 1.334  | 1 2 3 5 6 6 4 3 2              | 10.338 r          |
| 32               | 1.334  | 2 4 6 8 6 4 2 (best integer-rho design, rho=2) | 12.000 r |
| 31               | 1.0001 | 1 2 3 4 5 6 5 3 2              | 9.0005 r          |
| 32               | 5.5    | 2 8 13 7 2                     | 19.000 r          |
| 64               | 0.85   | 1 2 3 4 5 5 6 7 7 6 5 4 3 3 2 1 | 12.8 r           |

At `rho = 1.334` the best partition found by assuming an integer ratio is
16% slower than the optimum.

## Positions, operands and the top block

An n-bit addition has n+1 result bits. The adder partitions all n+1 result
positions, so the sizes in `BLOCK_SIZES` add up to n+1. The default partition
adds up to 32, so the default adder takes **31-bit operands** and gives a
**32-bit result**. The top position, n, has operand bits fixed at 0. It only
receives the carry `c_n` and shows it as `z[n]`. Because of this, the top
block can never be skipped, its `skip` flag is always 0, and nothing carries
out of the adder. An assertion in `carry_skip_adder` checks that last point.

The published lists are read with the most significant block first, the way
blocks are drawn from left to right. So `BLOCK_SIZES[0]`, block 0 at the least
significant end, is the *last* number of a list. The delay model is symmetric,
so reading a list the other way round gives the same worst case.

If you want an adder with n-bit operands *plus* a separate carry out, give it
a partition of n+1 positions. The top bit of `z` is the carry out.

## Structure

```
carry_skip_adder      NUM_BLOCKS, BLOCK_SIZES[]
 └─ skip_block  (one per block, M = BLOCK_SIZES[b])
     ├─ full_adder_cell  x M   ripple chain
     └─ block_propagate        XOR layer + tree of 4-input ANDs
```

- **`full_adder_cell`**: `z = x^y^c`, `co = xy + yc + cx`.
- **`block_propagate`**: computes `x_i ^ y_i` for every position of the block
  and ANDs the results with 4-input gates. For a block of up to 16 positions
  that takes two AND levels. Larger blocks get more levels.
- **`skip_block`**: a ripple chain plus two kinds of multiplexer, both steered
  by the block's propagate signal:
  - the *skip multiplexer* drives the block's carry out with the block's carry
    in;
  - one multiplexer per position forces the carry into that position to the
    block's carry in. When the whole block propagates, every internal carry
    has that value anyway, so forcing it saves the sum bits from waiting for
    the ripple.
- **`carry_skip_adder`**: chains the blocks. The carry out of block `b` is the
  carry into block `b+1`. `c0` feeds block 0. The positions of block `b` start
  at the sum of the sizes of the blocks below it. Both are computed at
  elaboration time from `BLOCK_SIZES`.

### What the multiplexers do and do not change

When the propagate signal is 1, both kinds of multiplexer select a value the
ripple chain would produce anyway, only later. So they change no result bit:
they exist only for speed. A functional simulation cannot see the speed-up.
The delay model above is what justifies them, and the RTL has no `#` delays.
What simulation does check is that:

- the skip path carries the correct value, both 0 and 1;
- the skip flag is exactly the all-positions-propagate condition;
- the sums are right for every mix of skipped and rippled blocks.

A synthesis tool may see through the multiplexers and merge them with the
ripple logic. To keep the skip structure in a real implementation, keep the
`skip_block` hierarchy, or constrain the multiplexers.

## Interface of the top

| port   | dir | width        | meaning |
|--------|-----|--------------|---------|
| `x`    | in  | N            | operand X |
| `y`    | in  | N            | operand Y |
| `c0`   | in  | 1            | carry into position 0. Use 0 for a plain add, or `z[N]` of a lower adder to build a wider add |
| `z`    | out | N+1          | result. `z[N]` is the final carry |
| `skip` | out | NUM_BLOCKS   | `skip[b]` = block `b` is passed by its skip path |

`N` equals `BLOCK_SIZES.sum() - 1`. The adder is purely combinational, with
no clock or reset.

## Design choices not fixed by the delay model

- The skip path is a 2:1 multiplexer on the block carry. An AND-OR skip gate
  would give the same function.
- The carry forcing is a multiplexer per position.
- In the propagate tree, the lowest four positions share one gate, and a
  narrower gate takes any remainder.
- The `skip` flags are brought out as ports for observation.
- There is no pipelining and no register. The delays in the model are in
  ripple times, not clock cycles.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=<n> failures=<n>`.

- **`tb_full_adder_cell`**: all 8 input combinations.
- **`tb_block_propagate`**: three block sizes:
  - 5 positions, tested exhaustively;
  - 7 positions, every single and double position mismatch;
  - 16 positions, random operands, mostly propagating.
- **`tb_skip_block`**: blocks of 1 and 5 positions tested exhaustively, and a
  block of 13 positions with random operands. Checks the sums, the skip flag,
  and that a skipped block's carry out equals its carry in.
- **`tb_carry_skip_adder`**: the default 32-position adder, with no parameter
  overrides, compared against integer addition. It drives directed patterns
  and 200,000 random pairs, and chains two adders for 62-bit additions. It
  counts these events and fails if any never happens:
  - each block, except the top one, skips a carry of 1;
  - a carry of 1 crosses two or more skipped blocks in a row;
  - a carry ripples from one block into the next;
  - a carry dies inside a block;
  - a carry passes from one adder to a chained adder;
  - the longest carry occurs: generated at position 0 and ending at position n.
- **`tb_published_partitions`**: builds an adder for each partition in the
  table above, plus the other published partitions listed in its header, and
  tests each with random additions. It also recomputes each partition's worst
  carry delay by trying every pair of generating and killing positions. It
  checks the result against the published figure and checks the 16% gap at
  `rho = 1.334`. It also checks an adder of four 5-position blocks (plus the
  top position) on an operand pair in which only block 2 propagates.
  `partition_under_test` is its helper.

Run one with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_carry_skip_adder tb/tb_carry_skip_adder.sv
./obj_dir/Vtb_carry_skip_adder
```

Each testbench finishes in well under a second.

## Changing the partition

Override both parameters together. List the sizes from block 0, the least
significant block, upward:

```
carry_skip_adder #(
  .NUM_BLOCKS (5),
  .BLOCK_SIZES('{2, 7, 13, 8, 2})   // 32 positions, optimum for rho = 5.5
) u_add ( ... );
```

Every block needs at least one position, and the partition needs at least two
positions in total. Elaboration-time assertions check both.

## Limits

- The delay model takes the skip time to be independent of block size. It
  also counts a skipped block as one skip time even when rippling through a
  very small block would be faster. The actual speed of a netlist depends on
  how synthesis treats the multiplexers (see above).
- Only one-level skipping is built. Skipping over groups of blocks
  (two-level) is not included.
