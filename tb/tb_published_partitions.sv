// tb_published_partitions - the block partitions evaluated for the design, built
// and checked as adders, and their worst-case carry delays recomputed.
//
// For each partition (listed from block 0 up) an adder is instantiated and
// driven with random operands (see partition_under_test). Separately, the
// worst carry life of the partition is found by trying every pair of a
// generating position g and a killing position t > g: inside one block the
// carry ripples t - g positions; across blocks it ripples to the top of its
// own block, skips every block in between and ripples from the bottom of the
// killing block up to t. With the ripple time as the unit and rho the ratio
// of skip time to ripple time, the largest such life must equal the delay
// published for that partition (to within 0.0006, the rounding of the
// published figures).
//
// Partitions (result positions; rho; published delay in ripple times):
//   optimum for 32 positions, rho 1.334        -> 10.3380
//   integer-rho design for rho 2, run at 1.334 -> 12.000
//   integer-rho design for rho 1, run at 1.334 -> 12.006 (36 positions)
//   optimum for rho 1.0001 / 1.025 / 1.05      -> 9.0005 / 9.1250 / 9.2500
//   near-optimum for the same three rho values -> 10.0000
//   optimum for 32 positions, rho 5.5          -> 19.0000
//   near-optimum for 32 positions, rho 5.5     -> 20.0000
//   optimum (and near-optimum) for 64, rho 0.85 -> 12.8
//
// One more adder, of five blocks of 5 5 5 5 1 positions, is driven with the
// operands of the four-block illustration (blocks of five bits), in which
// only block 2 has x_i != y_i in every position: its skip flags must be
// 00100 and its sum correct.
module tb_published_partitions;

  // Copy a block-size list into the queue q.
  `define LOAD_Q(P) begin q.delete(); foreach (P[i]) q.push_back(P[i]); end

  int checks = 0;
  int failures = 0;

  localparam int unsigned P_OPT_1334 [9]  = '{2, 3, 4, 6, 6, 5, 3, 2, 1};
  localparam int unsigned P_INT2     [7]  = '{2, 4, 6, 8, 6, 4, 2};
  localparam int unsigned P_INT1     [11] = '{1, 2, 3, 4, 5, 6, 5, 4, 3, 2, 1};
  localparam int unsigned P_OPT_1    [9]  = '{2, 3, 5, 6, 5, 4, 3, 2, 1};
  localparam int unsigned P_NEAR_1   [9]  = '{2, 3, 4, 6, 6, 4, 3, 2, 1};
  localparam int unsigned P_OPT_55   [5]  = '{2, 7, 13, 8, 2};
  localparam int unsigned P_NEAR_55  [4]  = '{6, 11, 10, 5};
  localparam int unsigned P_OPT_085  [16] = '{1, 2, 3, 3, 4, 5, 6, 7, 7, 6, 5, 5, 4, 3, 2, 1};

  localparam int unsigned NT = 20000;

  int   ck [8];
  int   fl [8];
  logic dn [8];

  partition_under_test #(.NUM_BLOCKS(9),  .BLOCK_SIZES(P_OPT_1334), .NTESTS(NT)) u0 (ck[0], fl[0], dn[0]);
  partition_under_test #(.NUM_BLOCKS(7),  .BLOCK_SIZES(P_INT2),     .NTESTS(NT)) u1 (ck[1], fl[1], dn[1]);
  partition_under_test #(.NUM_BLOCKS(11), .BLOCK_SIZES(P_INT1),     .NTESTS(NT)) u2 (ck[2], fl[2], dn[2]);
  partition_under_test #(.NUM_BLOCKS(9),  .BLOCK_SIZES(P_OPT_1),    .NTESTS(NT)) u3 (ck[3], fl[3], dn[3]);
  partition_under_test #(.NUM_BLOCKS(9),  .BLOCK_SIZES(P_NEAR_1),   .NTESTS(NT)) u4 (ck[4], fl[4], dn[4]);
  partition_under_test #(.NUM_BLOCKS(5),  .BLOCK_SIZES(P_OPT_55),   .NTESTS(NT)) u5 (ck[5], fl[5], dn[5]);
  partition_under_test #(.NUM_BLOCKS(4),  .BLOCK_SIZES(P_NEAR_55),  .NTESTS(NT)) u6 (ck[6], fl[6], dn[6]);
  partition_under_test #(.NUM_BLOCKS(16), .BLOCK_SIZES(P_OPT_085),  .NTESTS(NT)) u7 (ck[7], fl[7], dn[7]);

  localparam int unsigned FIG_SIZES [5] = '{5, 5, 5, 5, 1};
  logic [19:0] fx, fy;
  logic [20:0] fz;
  logic [4:0]  fskip;
  carry_skip_adder #(.NUM_BLOCKS(5), .BLOCK_SIZES(FIG_SIZES)) u_fig (
    .x(fx), .y(fy), .c0(1'b0), .z(fz), .skip(fskip)
  );

  // Worst carry life, in ripple times, by enumerating generate/kill pairs.
  function automatic real worst_life(int unsigned sizes[$], real rho);
    int unsigned blk [$];
    int unsigned lo  [$];
    int unsigned pos;
    real worst;
    pos = 0;
    foreach (sizes[b]) begin
      lo.push_back(pos);
      for (int unsigned k = 0; k < sizes[b]; k++) blk.push_back(b);
      pos += sizes[b];
    end
    worst = 0.0;
    for (int g = 0; g < blk.size(); g++) begin
      for (int t = g + 1; t < blk.size(); t++) begin
        real life;
        int unsigned bg = blk[g];
        int unsigned bt = blk[t];
        if (bg == bt)
          life = real'(t - g);
        else
          life = real'(lo[bg] + sizes[bg] - 1 - g) + real'(t - lo[bt])
               + rho * real'(bt - bg - 1);
        if (life > worst) worst = life;
      end
    end
    return worst;
  endfunction

  task automatic check_delay(input string name, input int unsigned sizes[$], input real rho,
                             input real published);
    real d;
    d = worst_life(sizes, rho);
    checks++;
    $display("%-34s rho=%6.4f worst carry life %8.4f r (published %8.4f r)", name, rho, d, published);
    if (d > published + 0.0006 || d < published - 0.0006) begin
      failures++;
      $display("FAIL delay of %s", name);
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
    int unsigned q [$];
    `LOAD_Q(P_OPT_1334) check_delay("optimum, 32 positions",      q, 1.334, 10.3380);
    `LOAD_Q(P_INT2)     check_delay("integer-rho 2 design",       q, 1.334, 12.000);
    `LOAD_Q(P_INT1)     check_delay("integer-rho 1 design",       q, 1.334, 12.006);
    `LOAD_Q(P_OPT_1)    check_delay("optimum, rho 1.0001",        q, 1.0001, 9.0005);
    `LOAD_Q(P_OPT_1)    check_delay("optimum, rho 1.025",         q, 1.025, 9.1250);
    `LOAD_Q(P_OPT_1)    check_delay("optimum, rho 1.05",          q, 1.05, 9.2500);
    `LOAD_Q(P_NEAR_1)   check_delay("near-optimum, rho 1.0001",   q, 1.0001, 10.0000);
    `LOAD_Q(P_NEAR_1)   check_delay("near-optimum, rho 1.025",    q, 1.025, 10.0000);
    `LOAD_Q(P_NEAR_1)   check_delay("near-optimum, rho 1.05",     q, 1.05, 10.0000);
    `LOAD_Q(P_OPT_55)   check_delay("optimum, rho 5.5",           q, 5.5, 19.0000);
    `LOAD_Q(P_NEAR_55)  check_delay("near-optimum, rho 5.5",      q, 5.5, 20.0000);
    `LOAD_Q(P_OPT_085)  check_delay("optimum, 64 positions, 0.85", q, 0.85, 12.8);

    // The optimum partition must beat both integer-rho designs at rho 1.334.
    checks++;
    begin
      real d_opt, d_int2;
      `LOAD_Q(P_OPT_1334)
      d_opt  = worst_life(q, 1.334);
      `LOAD_Q(P_INT2)
      d_int2 = worst_life(q, 1.334);
      $display("integer-rho 2 design is %0.2f%% slower", 100.0 * (d_int2 - d_opt) / d_opt);
      if (!(d_opt < d_int2)) begin
        failures++;
        $display("FAIL optimum partition not faster");
      end
    end

    fx = 20'b10100_01011_10100_01011;
    fy = 20'b01101_10100_01010_01100;
    #1;
    checks += 2;
    if (fz !== 21'(fx) + 21'(fy)) begin
      failures++;
      $display("FAIL four-block example sum %h", fz);
    end
    if (fskip !== 5'b00100) begin
      failures++;
      $display("FAIL four-block example skip flags %b", fskip);
    end

    for (int i = 0; i < 8; i++) wait (dn[i]);
    for (int i = 0; i < 8; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `undef LOAD_Q

endmodule
