// tb_avg_transition_locator: exhaustive check of the average transition
// locator.
//
// For every previous phase p and every set of transition counts T_0..T_4
// (0..4 each, not all zero) the expected phase is computed directly from
// the weighted balance f(h) = sum g(n - h) T_n over the unwrapped region
// p-2 .. p+2, with g(+-0.5,+-1.5,...) = +-(1,2,4,8,16): the result is the
// phase whose upper boundary has f >= 0 and whose lower boundary has f < 0
// (the boundary below the region counts as negative). The two worked
// examples (counts 2,1,0,0,1 with previous phase 2 and 4, giving 1 and 0) are checked on
// their own, and the number of inputs with one to four transitions on which
// the power-of-two rule and the exact rounded mean disagree is reported.
module tb_avg_transition_locator;
  import cdr_pkg::*;

  tcount_t   t_cnt [OSR];
  phase_oh_t prev_phase, fine_phase;
  int checks = 0, failures = 0;

  avg_transition_locator dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // weight g for a distance d2 = 2*(n - h), d2 odd
  function automatic int g(int d2);
    int m;
    m = (d2 < 0) ? -d2 : d2;
    return (d2 < 0) ? -(1 << ((m - 1) / 2)) : (1 << ((m - 1) / 2));
  endfunction

  function automatic int ref_phase(int tc[5], int p);
    // region positions k = -2..2 hold phase (p + k) mod 5
    for (int k = -2; k <= 2; k++) begin
      int f_up, f_dn;
      f_up = 0; f_dn = 0;
      for (int j = -2; j <= 2; j++) begin
        f_up += g(2*j - (2*k - 1)) * tc[(p + j + 5) % 5];
        f_dn += g(2*j - (2*k + 1)) * tc[(p + j + 5) % 5];
      end
      if (f_up >= 0 && (k == 2 || f_dn < 0)) return (p + k + 5) % 5;
    end
    return -1;
  endfunction

  // exact rounded mean of the unwrapped transition phases (ties ignored)
  function automatic int mean_phase(int tc[5], int p);
    int num, tot;
    num = 0; tot = 0;
    for (int j = -2; j <= 2; j++) begin
      num += j * tc[(p + j + 5) % 5];
      tot += tc[(p + j + 5) % 5];
    end
    // round num/tot to nearest
    for (int k = -2; k <= 2; k++)
      if (2*num >= (2*k - 1)*tot && 2*num < (2*k + 1)*tot) return (p + k + 5) % 5;
    return (p + 2) % 5;
  endfunction

  task automatic apply(int tc[5], int p, output int got);
    for (int n = 0; n < OSR; n++) t_cnt[n] = tcount_t'(tc[n]);
    prev_phase = idx2oh(3'(p));
    #1;
    got = -1;
    for (int n = 0; n < OSR; n++) if (fine_phase[n]) got = n;
    checks++;
    if (!$onehot(fine_phase)) begin
      failures++;
      $display("not one-hot: %b", fine_phase);
    end
  endtask

  initial begin
    int tc[5];
    int got, exp_p, mism, total;
    // worked example: counts 2,1,0,0,1
    tc = '{2, 1, 0, 0, 1};
    apply(tc, 2, got); checks++;
    if (got != 1) begin failures++; $display("example, prev 2: got %0d", got); end
    apply(tc, 4, got); checks++;
    if (got != 0) begin failures++; $display("example, prev 4: got %0d", got); end

    mism = 0; total = 0;
    for (int p = 0; p < 5; p++)
      for (int code = 1; code < 3125; code++) begin
        int c, s;
        c = code; s = 0;
        for (int n = 0; n < 5; n++) begin tc[n] = c % 5; c /= 5; s += tc[n]; end
        apply(tc, p, got);
        exp_p = ref_phase(tc, p);
        checks++;
        if (got != exp_p) begin
          failures++;
          if (failures < 10) $display("p=%0d T=%p got %0d exp %0d", p, tc, got, exp_p);
        end
        if (p == 2 && s <= 4) begin
          total++;
          if (got != mean_phase(tc, p)) mism++;
        end
      end
    $display("power-of-two rule vs exact mean: %0d of %0d inputs with 1-4 transitions differ",
             mism, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
