// skip_block - one block of a one-level carry-skip adder.
//
// The block holds M contiguous bit positions. Inside it the carry ripples
// from cell to cell (full_adder_cell). Beside the ripple chain, block_propagate
// checks whether every position has x_i != y_i. When it does, the carry out of
// the block must equal the carry into it, so the skip path hands ci directly to
// co without waiting for the ripple; the carries into the block's own positions
// are then also all equal to ci and are forced to that uniform value. When some
// position has x_i == y_i the carry into the block dies at (or before) the
// lowest such position, the block's carry out is decided inside the block, and
// the rippled carry is used.
//
// Interface: M-bit x, y and the block carry-in ci; M-bit sum z, the block
// carry-out co and skip (1 when the skip path is taken). Combinational. In the
// delay model the skip path costs one skip time s and each cell one ripple
// time r.
//
// The ripple chain, the all-propagate test and the forcing of the block's
// carries follow the published design, which only says the carry out "gets set" to the
// carry in; realising that as a 2:1 multiplexer on the carry out, and the
// forcing as a multiplexer on each internal carry, is this design's choice.
module skip_block #(
  parameter int unsigned M = 5
) (
  input  logic [M-1:0] x,
  input  logic [M-1:0] y,
  input  logic         ci,
  output logic [M-1:0] z,
  output logic         co,
  output logic         skip
);

  // ripple[i] is the carry into position i as rippled through the cells;
  // ripple[M] is the rippled carry out of the block.
  logic [M:0]   ripple;
  // carry[i] is the carry the cell at position i actually uses.
  logic [M-1:0] carry;

  assign ripple[0] = ci;

  block_propagate #(.M(M)) u_prop (
    .x (x),
    .y (y),
    .p (skip)
  );

  for (genvar i = 0; i < M; i++) begin : g_pos
    // Uniform carry when the whole block propagates.
    assign carry[i] = skip ? ci : ripple[i];

    full_adder_cell u_cell (
      .x  (x[i]),
      .y  (y[i]),
      .c  (carry[i]),
      .z  (z[i]),
      .co (ripple[i+1])
    );
  end

  // Skip multiplexer.
  assign co = skip ? ci : ripple[M];

endmodule
