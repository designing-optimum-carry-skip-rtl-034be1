// partition_under_test - drives one carry-skip adder of a given partition
// with random and mostly-propagating operands and checks every result
// against the integer sum. Used by tb_published_partitions, which instantiates
// one of these per block-size list it evaluates.
//
// Parameters: NUM_BLOCKS and BLOCK_SIZES as for carry_skip_adder (at most
// 64 result positions, so the reference fits 64-bit arithmetic), NTESTS the
// number of operand pairs. Outputs: the check and failure counts, and done,
// which rises when all pairs have been applied (one pair per time unit).
module partition_under_test #(
  parameter int unsigned NUM_BLOCKS = 2,
  parameter int unsigned BLOCK_SIZES [NUM_BLOCKS] = '{1, 1},
  parameter int unsigned NTESTS = 1000
) (
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int unsigned N = BLOCK_SIZES.sum() - 1;

  logic [N-1:0]          x, y;
  logic                  c0;
  logic [N:0]            z;
  logic [NUM_BLOCKS-1:0] skip;

  carry_skip_adder #(.NUM_BLOCKS(NUM_BLOCKS), .BLOCK_SIZES(BLOCK_SIZES)) dut (
    .x(x), .y(y), .c0(c0), .z(z), .skip(skip)
  );

  function automatic logic [N-1:0] rand_operand();
    logic [63:0] r;
    r = {$urandom, $urandom};
    return r[N-1:0];
  endfunction

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    for (int unsigned k = 0; k < NTESTS; k++) begin
      logic [63:0] want;
      x  = rand_operand();
      y  = (k % 2 == 0) ? rand_operand() : ~x ^ (rand_operand() & rand_operand() & rand_operand());
      c0 = 1'($urandom);
      #1;
      want = 64'(x) + 64'(y) + 64'(c0);
      checks++;
      if (64'(z) !== want) begin
        failures++;
        $display("FAIL %0d-bit partition: x=%h y=%h c0=%b got %h want %h", N, x, y, c0, z, want);
      end
      // The top block holds position n, whose operand bits are 0: never skipped.
      checks++;
      if (skip[NUM_BLOCKS-1]) begin
        failures++;
        $display("FAIL %0d-bit partition: top block skipped", N);
      end
    end
    done = 1'b1;
  end

endmodule
