// carry_skip_adder - one-level carry-skip adder with unequal block sizes.
//
// The n+1 result positions of an n-bit addition are cut into NUM_BLOCKS
// blocks of contiguous positions, block 0 holding the least significant ones;
// BLOCK_SIZES[b] is the number of positions m(b) of block b. Each block is a
// skip_block: a carry ripples inside a block but passes a block whose positions
// all propagate in one skip time. A carry generated in block b1 and killed in
// block b2 therefore costs r*(m(b1) + m(b2) - 2) + s*(b2 - b1 - 1) in the delay
// model (ripple time r per position, skip time s per block), and the block
// sizes are chosen so the largest such carry life is as small as possible:
// small blocks at both ends, the largest ones in the middle.
//
// The most significant position, n, is the result's top bit z[n]. Its operand
// bits are 0, so it only receives the carry c_n; it belongs to the last block
// like any other position.
//
// Interface: n-bit operands x and y, carry in c0 (0 for a plain addition, or
// the top result bit of a less significant adder to build a wider one); the
// (n+1)-bit result z; skip[b] shows that block b is passed by its skip path.
// The top block's skip flag is always 0, because position n never propagates;
// it is kept so that skip has one bit per block. Purely combinational.
//
// The default partition is the optimum one published for 32 result
// positions and a skip/ripple time ratio of 1.334: blocks of 1 2 3 5 6 6 4 3 2
// positions listed from the most significant block down, so block 0 has 2
// positions and the top block 1. That the printed lists run from the most
// significant block down (the way the blocks are drawn), and that n+1 rather
// than n positions are partitioned, are readings this design makes; since the
// delay model is symmetric, the reverse order gives the same worst case.
module carry_skip_adder #(
  parameter int unsigned NUM_BLOCKS = 9,
  parameter int unsigned BLOCK_SIZES [NUM_BLOCKS] = '{2, 3, 4, 6, 6, 5, 3, 2, 1},
  // Result positions n+1 and operand width n, both set by the partition.
  localparam int unsigned POSITIONS = BLOCK_SIZES.sum(),
  localparam int unsigned N         = POSITIONS - 1
) (
  input  logic [N-1:0]          x,
  input  logic [N-1:0]          y,
  input  logic                  c0,
  output logic [N:0]            z,
  output logic [NUM_BLOCKS-1:0] skip
);

  // Lowest position of block b.
  function automatic int unsigned block_start(int unsigned b);
    int unsigned acc = 0;
    for (int unsigned k = 0; k < b; k++) acc += BLOCK_SIZES[k];
    return acc;
  endfunction

  // Operands extended by the result position n, whose operand bits are 0.
  logic [N:0] xe, ye;
  assign xe = {1'b0, x};
  assign ye = {1'b0, y};

  // carry[b] is the carry into block b; carry[NUM_BLOCKS] leaves position n
  // and is always 0, since nothing can carry out of a position with x=y=0.
  logic [NUM_BLOCKS:0] carry;
  assign carry[0] = c0;

  for (genvar b = 0; b < NUM_BLOCKS; b++) begin : g_blk
    localparam int unsigned LO = block_start(b);
    localparam int unsigned M  = BLOCK_SIZES[b];

    skip_block #(.M(M)) u_blk (
      .x    (xe[LO +: M]),
      .y    (ye[LO +: M]),
      .ci   (carry[b]),
      .z    (z[LO +: M]),
      .co   (carry[b+1]),
      .skip (skip[b])
    );
  end

  // Position n has x = y = 0, so no carry can leave the adder.
  always_comb
    assert (carry[NUM_BLOCKS] == 1'b0)
      else $error("carry_skip_adder: carry out of position n");

  initial begin
    for (int unsigned b = 0; b < NUM_BLOCKS; b++)
      assert (BLOCK_SIZES[b] >= 1)
        else $error("carry_skip_adder: block %0d has no positions", b);
    assert (POSITIONS >= 2)
      else $error("carry_skip_adder: at least two result positions are needed");
  end

endmodule
