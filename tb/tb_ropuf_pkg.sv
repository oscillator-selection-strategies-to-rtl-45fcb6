// tb_ropuf_pkg -- checks the location map and the placement strategies:
// index/coordinate mapping, that each strategy gives distinct locations in
// range, that the same-domain strategies use only odd columns (Slice(1)),
// and the direction of the trends in the frequency model.
module tb_ropuf_pkg;
  timeunit 1ps;
  timeprecision 1fs;
  import ropuf_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bit used [N_LOCATIONS];
    int loc, odd_count;
    real s1, s0, lo, hi;
    strategy_e st;

    check(loc_x(0) == 0 && loc_y(0) == 0, "index 0 at X0Y0");
    check(loc_x(101) == 1 && loc_y(101) == 1, "index 101 at X1Y1");
    check(loc_x(3999) == 99 && loc_y(3999) == 39, "index 3999 at X99Y39");
    check(loc_x(3900) == 0 && loc_y(3900) == 39, "index 3900 at X0Y39");

    check(ro_location(STRAT_FIRST, 0) == 0 && ro_location(STRAT_FIRST, 199) == 199, "first 200");
    check(ro_location(STRAT_FIRST_SAME_DOMAIN, 0) == 1 &&
          ro_location(STRAT_FIRST_SAME_DOMAIN, 1) == 3 &&
          ro_location(STRAT_FIRST_SAME_DOMAIN, 199) == 399, "first same-domain 1, 3 .. 399");

    for (int s = 0; s < 4; s++) begin
      st = strategy_e'(s);
      foreach (used[i]) used[i] = 1'b0;
      odd_count = 0;
      for (int i = 0; i < 200; i++) begin
        loc = ro_location(st, i);
        check(loc >= 0 && loc < N_LOCATIONS && !used[loc],
              $sformatf("strategy %0d oscillator %0d location %0d", s, i, loc));
        used[loc] = 1'b1;
        if (is_slice1(loc)) odd_count++;
      end
      if (st == STRAT_FIRST_SAME_DOMAIN || st == STRAT_RANDOM_SAME_DOMAIN)
        check(odd_count == 200, $sformatf("strategy %0d: %0d Slice(1)", s, odd_count));
      if (st == STRAT_FIRST)
        check(odd_count == 100, "first 200: half in each domain");
      if (st == STRAT_RANDOM)
        check(odd_count > 60 && odd_count < 140, $sformatf("random: %0d in Slice(1)", odd_count));
    end
    // Random strategy spreads over the whole grid.
    lo = 1.0e9;
    hi = -1.0;
    for (int i = 0; i < 200; i++) begin
      loc = ro_location(STRAT_RANDOM, i);
      if (real'(loc) < lo) lo = real'(loc);
      if (real'(loc) > hi) hi = real'(loc);
    end
    check(lo < 400.0 && hi > 3600.0, "random strategy covers the grid");

    // Frequency model trends, averaged over a device.
    s1 = 0.0;
    s0 = 0.0;
    for (int i = 0; i < 2000; i++) begin
      s1 += ro_freq_mhz(3, 2 * i + 1);
      s0 += ro_freq_mhz(3, 2 * i);
    end
    s1 /= 2000.0;
    s0 /= 2000.0;
    check(s1 > 600.0 && s1 < 612.0 && s0 > 572.0 && s0 < 584.0,
          $sformatf("domain means %0f / %0f MHz", s1, s0));
    lo = 0.0;
    hi = 0.0;
    for (int i = 0; i < 200; i++) begin
      lo += ro_freq_mhz(3, 2 * (50 + i) + 1);
      hi += ro_freq_mhz(3, 2 * (1750 + i) + 1);
    end
    check(lo > hi + 200.0 * 5.0, "frequency falls with index");
    check(ro_freq_mhz(3, 17) != ro_freq_mhz(4, 17), "devices differ");
    check(stage_delay_ps(3, 17) > 190.0 && stage_delay_ps(3, 17) < 230.0, "stage delay range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
