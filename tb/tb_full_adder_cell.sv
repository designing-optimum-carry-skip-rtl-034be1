// tb_full_adder_cell - exhaustive check of one adder position.
//
// Applies all eight combinations of x, y and the carry in, and compares
// {co, z} with the integer sum x + y + c.
module tb_full_adder_cell;

  logic x, y, c, z, co;
  int   checks = 0;
  int   failures = 0;

  full_adder_cell dut (.x(x), .y(y), .c(c), .z(z), .co(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int unsigned sum;
      {x, y, c} = 3'(v);
      #1;
      sum = int'(x) + int'(y) + int'(c);
      checks++;
      if ({co, z} != 2'(sum)) begin
        failures++;
        $display("FAIL x=%0b y=%0b c=%0b: got co=%0b z=%0b, want %0d", x, y, c, co, z, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
