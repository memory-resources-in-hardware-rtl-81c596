// tb_mem_capacity - message memory capacity needed by each organisation when
// every G unit keeps only the message words it reads (MEM_COMPACT = 1).
// The RAM depths of the compact configuration come from blake_pkg::msg_mask;
// this testbench recomputes, per round instance, the min/max depth and the
// sum over the eight G units, and the total over the cascade, and compares
// them with the expected figures:
//   BLAKE  x1: 112 words (3.50 kb)   x2: 69 + 73 = 142   x4: 56+59+45+47 = 207
//          x5: 32+32+31+30+31 = 156
//   BLAKE2 x1: 112  x2: 142  x4: 45+44+30+31 = 150  x5: 156
// It then builds compact BLAKE x4 and BLAKE2 x4 cores, reads the depths of
// all their message RAMs through the hierarchy and checks the totals.
module tb_mem_capacity;
  import blake_pkg::*;

  int checks = 0, failures = 0;

  blake_core #(.BLAKE2(1'b0), .UNROLL(4), .MEM_COMPACT(1'b1)) u_b1 (
    .clk(1'b0), .rst_n(1'b0), .start(1'b0), .t('0), .f('0), .h_in('0), .salt('0),
    .msg_valid(1'b0), .msg_ready(), .msg_words('0), .busy(), .fin_valid(), .h_next());
  blake_core #(.BLAKE2(1'b1), .UNROLL(4), .MEM_COMPACT(1'b1)) u_b2 (
    .clk(1'b0), .rst_n(1'b0), .start(1'b0), .t('0), .f('0), .h_in('0), .salt('0),
    .msg_valid(1'b0), .msg_ready(), .msg_words('0), .busy(), .fin_valid(), .h_next());

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: %0d, expected %0d", what, got, exp);
    end
  endtask

  // Per-round sums, minima and maxima for one organisation.
  task automatic org(int nr, int k, int exp_sum [], int exp_min [], int exp_max [], int exp_tot);
    int tot, s, mn, mx, mu;
    tot = 0;
    for (int j = 0; j < k; j++) begin
      s = 0; mn = 99; mx = 0;
      for (int gi = 0; gi < 8; gi++) begin
        mu = popcount16(msg_mask(k, nr, j, gi));
        s += mu;
        if (mu < mn) mn = mu;
        if (mu > mx) mx = mu;
      end
      check(s, exp_sum[j], $sformatf("nr=%0d x%0d R%0d sum", nr, k, j));
      check(mn, exp_min[j], $sformatf("nr=%0d x%0d R%0d min", nr, k, j));
      check(mx, exp_max[j], $sformatf("nr=%0d x%0d R%0d max", nr, k, j));
      tot += s;
    end
    check(tot, exp_tot, $sformatf("nr=%0d x%0d total", nr, k));
  endtask

  initial begin
    int d1, d2;
    org(14, 1, '{112}, '{13}, '{15}, 112);
    org(14, 2, '{69, 73}, '{7, 8}, '{10, 10}, 142);
    org(14, 4, '{56, 59, 45, 47}, '{5, 6, 4, 5}, '{8, 8, 6, 6}, 207);
    org(14, 5, '{32, 32, 31, 30, 31}, '{4, 4, 3, 3, 3}, '{4, 4, 4, 4, 4}, 156);
    org(10, 1, '{112}, '{13}, '{15}, 112);
    org(10, 2, '{69, 73}, '{7, 8}, '{10, 10}, 142);
    org(10, 4, '{45, 44, 30, 31}, '{5, 4, 2, 3}, '{6, 6, 4, 4}, 150);
    org(10, 5, '{32, 32, 31, 30, 31}, '{4, 4, 3, 3, 3}, '{4, 4, 4, 4, 4}, 156);
    // kilobits for x1 and BLAKE x4: words * 32 / 1024, two decimals
    check(112 * 32 * 100 / 1024, 350, "x1 kb*100");
    check(207 * 32 * 100 / 1024, 646, "BLAKE x4 kb*100 (6.47 rounded)");
    // depths of the RAMs actually built
    d1 = u_b1.g_rnd[0].u_round.g_mem[0].DEPTH;
    d2 = u_b2.g_rnd[2].u_round.g_mem[0].DEPTH;
    check(d1, popcount16(msg_mask(4, 14, 0, 0)), "built depth BLAKE x4 R0 M0");
    check(d2, popcount16(msg_mask(4, 10, 2, 0)), "built depth BLAKE2 x4 R2 M0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
