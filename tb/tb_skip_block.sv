// tb_skip_block - checks one carry-skip block.
//
// A 5-position block is checked exhaustively (all x, y and carry in), a
// 1-position block (the smallest of the worked partition) likewise, and a
// 13-position block (the largest) with random and all-propagate vectors.
// The reference result is the integer sum x + y + ci: the low M bits are z
// and bit M is the carry out. skip must be 1 exactly when x ^ y is all ones,
// and in that case the carry out must equal the carry in. The test counts
// how often a block was skipped with a carry of 1, so the skip path is shown
// to carry a 1 as well as a 0.
module tb_skip_block;

  int checks = 0;
  int failures = 0;
  int skipped_ones = 0;

  logic [4:0]  x5,  y5,  z5;  logic ci5,  co5,  sk5;
  logic [0:0]  x1,  y1,  z1;  logic ci1,  co1,  sk1;
  logic [12:0] x13, y13, z13; logic ci13, co13, sk13;

  skip_block #(.M(5))  u5  (.x(x5),  .y(y5),  .ci(ci5),  .z(z5),  .co(co5),  .skip(sk5));
  skip_block #(.M(1))  u1  (.x(x1),  .y(y1),  .ci(ci1),  .z(z1),  .co(co1),  .skip(sk1));
  skip_block #(.M(13)) u13 (.x(x13), .y(y13), .ci(ci13), .z(z13), .co(co13), .skip(sk13));

  task automatic check(input int unsigned got, input int unsigned want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0h want %0h", what, got, want);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2048; v++) begin
      {ci5, x5, y5} = 11'(v);
      #1;
      check(int'({co5, z5}), int'(x5) + int'(y5) + int'(ci5), $sformatf("M=5 x=%b y=%b ci=%b", x5, y5, ci5));
      check(int'(sk5), int'((x5 ^ y5) == 5'b11111), "M=5 skip");
      if (sk5) check(int'(co5), int'(ci5), "M=5 skip carry");
      if (sk5 && ci5) skipped_ones++;
    end
    for (int v = 0; v < 8; v++) begin
      {ci1, x1, y1} = 3'(v);
      #1;
      check(int'({co1, z1}), int'(x1) + int'(y1) + int'(ci1), "M=1 sum");
      check(int'(sk1), int'(x1 != y1), "M=1 skip");
    end
    for (int k = 0; k < 20000; k++) begin
      x13  = 13'($urandom);
      y13  = (k % 3 == 0) ? ~x13 : 13'($urandom);
      ci13 = 1'($urandom);
      #1;
      check(int'({co13, z13}), int'(x13) + int'(y13) + int'(ci13), $sformatf("M=13 x=%h y=%h ci=%b", x13, y13, ci13));
      check(int'(sk13), int'((x13 ^ y13) == 13'h1fff), "M=13 skip");
      if (sk13 && ci13) skipped_ones++;
    end
    checks++;
    if (skipped_ones == 0) begin
      failures++;
      $display("FAIL the skip path never carried a 1");
    end
    $display("skip path carried a 1 %0d times", skipped_ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
