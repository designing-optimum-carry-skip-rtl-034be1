// full_adder_cell - one bit position of the carry-skip adder.
//
// Computes the result bit z = x ^ y ^ c and the carry out
// co = x&y | y&c | c&x, the two textbook relations every position of the
// adder is built from. The carry input c is the carry into this position and
// co the carry into the next more significant one; a chain of these cells is
// the ripple path inside a carry-skip block.
//
// Interface: single-bit x, y, c in; z, co out. Purely combinational, one
// ripple delay (the unit r of the delay model) from c to co.
//
// The two equations are the textbook ones; the cell has no choices of its own.
module full_adder_cell (
  input  logic x,
  input  logic y,
  input  logic c,
  output logic z,
  output logic co
);

  always_comb begin
    z  = x ^ y ^ c;
    co = (x & y) | (y & c) | (c & x);
  end

endmodule
