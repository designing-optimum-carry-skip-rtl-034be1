// block_propagate - "does a carry pass straight through this block?"
//
// A carry entering a block leaves it unchanged exactly when every position of
// the block has x_i != y_i. This module forms p_i = x_i ^ y_i for the M
// positions (one layer of XOR gates) and ANDs them together in a tree of
// 4-input AND gates, so the answer costs a few gate delays whatever the block
// size (two AND layers cover blocks of up to 16 positions).
//
// Interface: M-bit x and y of the block in; p out, 1 when all positions
// propagate. Combinational.
//
// The XOR layer and the 4-input AND layers follow the published design. How the
// positions are grouped into the 4-input gates (lowest four positions first,
// a narrower gate for the remainder) is this design's choice.
module block_propagate #(
  parameter int unsigned M = 5
) (
  input  logic [M-1:0] x,
  input  logic [M-1:0] y,
  output logic         p
);

  localparam int unsigned FAN_IN = 4;

  // Number of AND layers needed to reduce M inputs with FAN_IN-input gates.
  function automatic int unsigned and_levels(int unsigned n);
    int unsigned lv = 0;
    while (n > 1) begin
      n  = (n + FAN_IN - 1) / FAN_IN;
      lv = lv + 1;
    end
    return lv;
  endfunction

  localparam int unsigned LEVELS = and_levels(M);

  // Signals of layer l occupy tree[l][0 .. width(l)-1]; unused entries are 1.
  logic [M-1:0] tree [LEVELS+1];

  always_comb begin
    int unsigned w;
    for (int l = 0; l <= LEVELS; l++) tree[l] = '1;
    tree[0] = x ^ y;
    w = M;
    for (int l = 1; l <= LEVELS; l++) begin
      for (int g = 0; g < (w + FAN_IN - 1) / FAN_IN; g++) begin
        logic a;
        a = 1'b1;
        for (int k = 0; k < FAN_IN; k++)
          if (g * FAN_IN + k < w) a = a & tree[l-1][g*FAN_IN+k];
        tree[l][g] = a;
      end
      w = (w + FAN_IN - 1) / FAN_IN;
    end
    p = tree[LEVELS][0];
  end

endmodule
