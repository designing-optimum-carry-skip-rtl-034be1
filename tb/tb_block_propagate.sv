// tb_block_propagate - checks the all-positions-propagate detector.
//
// Three instances: the 5-position blocks of the worked partition example,
// a 16-position block (two full layers of 4-input AND gates) and a
// 7-position block (a partly filled gate). Small widths are checked
// exhaustively; the 16-position one with every single-position and
// two-position disagreement plus random vectors. The reference is
// (x ^ y) == all ones, worked out here without the AND tree.
module tb_block_propagate;

  int checks = 0;
  int failures = 0;

  logic [4:0]  x5,  y5;  logic p5;
  logic [6:0]  x7,  y7;  logic p7;
  logic [15:0] x16, y16; logic p16;

  block_propagate #(.M(5))  u5  (.x(x5),  .y(y5),  .p(p5));
  block_propagate #(.M(7))  u7  (.x(x7),  .y(y7),  .p(p7));
  block_propagate #(.M(16)) u16 (.x(x16), .y(y16), .p(p16));

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0b want %0b", what, got, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int n_true = 0;
    // Five-position block: all 1024 operand pairs.
    for (int v = 0; v < 1024; v++) begin
      {x5, y5} = 10'(v);
      #1;
      check(p5, (x5 ^ y5) == 5'b11111, $sformatf("M=5 x=%b y=%b", x5, y5));
      if (p5) n_true++;
    end
    // Two blocks of the four-block illustration: block 2 propagates, block 0 does not.
    x5 = 5'b01011; y5 = 5'b10100; #1; check(p5, 1'b1, "example block 2");
    x5 = 5'b01011; y5 = 5'b01100; #1; check(p5, 1'b0, "example block 0");
    // M=7: all x with y = ~x flipped in zero, one or two positions.
    for (int v = 0; v < 128; v++) begin
      for (int i = -1; i < 7; i++) begin
        for (int j = -1; j < 7; j++) begin
          logic [6:0] d;
          d = '0;
          if (i >= 0) d[i] = 1'b1;
          if (j >= 0) d[j] = 1'b1;
          x7 = 7'(v);
          y7 = ~x7 ^ d;
          #1;
          check(p7, d == '0, $sformatf("M=7 x=%b y=%b", x7, y7));
        end
      end
    end
    // M=16: single and double disagreements, then random pairs.
    for (int i = -1; i < 16; i++) begin
      for (int j = -1; j < 16; j++) begin
        logic [15:0] d;
        d = '0;
        if (i >= 0) d[i] = 1'b1;
        if (j >= 0) d[j] = 1'b1;
        x16 = 16'($urandom);
        y16 = ~x16 ^ d;
        #1;
        check(p16, d == '0, $sformatf("M=16 x=%h y=%h", x16, y16));
      end
    end
    for (int k = 0; k < 2000; k++) begin
      x16 = 16'($urandom);
      y16 = (k % 2 == 0) ? ~x16 ^ (16'(1) << ($urandom % 17)) : 16'($urandom);
      #1;
      check(p16, (x16 ^ y16) == 16'hffff, $sformatf("M=16 x=%h y=%h", x16, y16));
    end
    // 32 of the 1024 five-position pairs propagate.
    checks++;
    if (n_true != 32) begin
      failures++;
      $display("FAIL M=5 propagate count %0d, want 32", n_true);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
