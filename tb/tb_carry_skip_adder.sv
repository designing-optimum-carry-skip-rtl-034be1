// tb_carry_skip_adder - end-to-end test of the carry-skip adder at its
// default partition (32 result positions, blocks 2 3 4 6 6 5 3 2 1 from
// block 0 up, 31-bit operands).
//
// Reference: the integer sum x + y + c0 in 64-bit arithmetic. The skip
// flags are compared with a per-block "all positions differ" test computed
// from a block-size list written out here independently of the adder.
//
// Besides random operands it drives the patterns that exercise each
// mechanism of the adder, and counts how often each happened:
//   skip1     a block was skipped while carrying a 1 (every block that can be
//             skipped must see this; the top block never can)
//   multi     a 1 crossed two or more consecutive skipped blocks
//   ripple    a carry generated in one block rippled into the next one
//             without a skip
//   killed    a carry of 1 entered a block and died inside it
//   chain     a second adder took this adder's top bit as its carry in,
//             forming a 62-bit addition
//   longest   the longest carry: generated at position 0, killed at n
// A mechanism that never happened counts as a failure.
module tb_carry_skip_adder;

  localparam int unsigned NB = 9;
  localparam int unsigned SIZES [NB] = '{2, 3, 4, 6, 6, 5, 3, 2, 1};
  localparam int unsigned N = 31;

  int checks = 0;
  int failures = 0;
  int n_skip1 [NB];
  int n_multi = 0, n_ripple = 0, n_killed = 0, n_chain = 0, n_longest = 0;

  logic [N-1:0] x, y, xh, yh;
  logic         c0;
  logic [N:0]   z, zh;
  logic [NB-1:0] skip, skiph;

  // Adder under test, default parameters.
  carry_skip_adder dut (.x(x), .y(y), .c0(c0), .z(z), .skip(skip));
  // Upper half of a 62-bit addition, its carry in taken from z[N].
  carry_skip_adder dut_hi (.x(xh), .y(yh), .c0(z[N]), .z(zh), .skip(skiph));

  function automatic int unsigned lo_of(int unsigned b);
    int unsigned a = 0;
    for (int unsigned k = 0; k < b; k++) a += SIZES[k];
    return a;
  endfunction

  task automatic check(input logic [63:0] got, input logic [63:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0h want %0h", what, got, want);
    end
  endtask

  // Apply one operand pair and check it; classify the carries seen.
  task automatic apply(input logic [N-1:0] a, input logic [N-1:0] b, input logic cin);
    logic [N:0]  xe, ye, p, cref;
    logic [NB-1:0] want_skip;
    int run;
    x = a; y = b; c0 = cin;
    #1;
    check(64'(z), 64'(a) + 64'(b) + 64'(cin), $sformatf("sum x=%h y=%h c0=%b", a, b, cin));
    xe = {1'b0, a};
    ye = {1'b0, b};
    p  = xe ^ ye;
    // Reference carries c_i into each position.
    cref[0] = cin;
    for (int i = 1; i <= N; i++)
      cref[i] = (xe[i-1] & ye[i-1]) | (p[i-1] & cref[i-1]);
    run = 0;
    for (int unsigned bk = 0; bk < NB; bk++) begin
      int unsigned lo = lo_of(bk);
      logic all;
      logic [N:0] pb;
      pb = p >> lo;
      all = 1'b1;
      for (int unsigned k = 0; k < SIZES[bk]; k++) all &= pb[k];
      want_skip[bk] = all;
      if (all && cref[lo]) begin
        n_skip1[bk]++;
        run++;
        if (run == 2) n_multi++;
      end else begin
        run = 0;
      end
      // A 1 leaving a block that was not skipped was generated in it.
      if (bk > 0 && !want_skip[bk-1] && cref[lo]) n_ripple++;
      if (!all && cref[lo] && bk + 1 < NB && !cref[lo_of(bk+1)])
        n_killed++;
    end
    check(64'(skip), 64'(want_skip), "skip flags");
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] ones;
    ones = '1;
    foreach (n_skip1[i]) n_skip1[i] = 0;
    xh = '0; yh = '0;

    // The longest carry: generated at position 0 and propagated to n.
    apply(31'd1, ones, 1'b0);
    if (z == {1'b1, 31'd0}) n_longest++;
    // Everything propagates, carry in 1: every block but the top one skips.
    apply(31'h2aaaaaaa, 31'h55555555, 1'b1);
    apply(31'h55555555, 31'h2aaaaaaa, 1'b0);
    apply('0, '0, 1'b1);
    apply(ones, ones, 1'b1);

    // For each block, generate a carry just below it and let it propagate
    // through a chosen number of blocks.
    for (int unsigned bk = 0; bk < NB; bk++) begin
      for (int unsigned len = 0; len + bk < NB; len++) begin
        logic [N:0] xe, ye;
        automatic int unsigned lo = lo_of(bk);
        automatic int unsigned hi = lo_of(bk + len + 1);
        xe = {1'b0, 31'($urandom)};
        ye = {1'b0, 31'($urandom)};
        for (int unsigned i = lo; i < hi && i < N; i++) ye[i] = ~xe[i];
        if (lo > 0) begin
          xe[lo-1] = 1'b1;
          ye[lo-1] = 1'b1;
          apply(xe[N-1:0], ye[N-1:0], 1'b0);
        end else begin
          apply(xe[N-1:0], ye[N-1:0], 1'b1);
        end
      end
    end

    // Random operands, with a share of mostly-propagating pairs.
    for (int k = 0; k < 200000; k++) begin
      logic [N-1:0] a, b;
      a = 31'($urandom);
      case (k % 4)
        0: b = 31'($urandom);
        1: b = ~a ^ (31'(1) << ($urandom % 31));
        2: b = ~a ^ (31'($urandom) & 31'($urandom) & 31'($urandom));
        default: b = ~a;
      endcase
      apply(a, b, 1'($urandom));
    end

    // 62-bit additions through two chained adders.
    for (int k = 0; k < 20000; k++) begin
      logic [61:0] a, b;
      logic [62:0] want;
      logic cin;
      a = {31'($urandom), 31'($urandom)};
      b = (k % 2 == 0) ? {31'($urandom), 31'($urandom)} : ~a ^ 62'($urandom % 4);
      cin = 1'($urandom);
      xh = a[61:31];
      yh = b[61:31];
      apply(a[30:0], b[30:0], cin);
      want = 63'(a) + 63'(b) + 63'(cin);
      check(64'(zh), 64'(want[62:31]), "62-bit upper half");
      if (z[N]) n_chain++;
    end

    // Mechanism coverage.
    for (int unsigned bk = 0; bk < NB - 1; bk++) begin
      checks++;
      if (n_skip1[bk] == 0) begin
        failures++;
        $display("FAIL block %0d never skipped a carry of 1", bk);
      end
    end
    checks++;
    if (n_skip1[NB-1] != 0) begin
      failures++;
      $display("FAIL top block skipped");
    end
    begin
      automatic int cov [5];
      automatic string nm [5];
      cov = '{n_multi, n_ripple, n_killed, n_chain, n_longest};
      nm  = '{"multi", "ripple", "killed", "chain", "longest"};
      for (int i = 0; i < 5; i++) begin
        checks++;
        $display("mechanism %-8s happened %0d times", nm[i], cov[i]);
        if (cov[i] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", nm[i]);
        end
      end
    end
    for (int unsigned bk = 0; bk < NB; bk++)
      $display("block %0d (%0d positions) skipped a 1 %0d times", bk, SIZES[bk], n_skip1[bk]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
