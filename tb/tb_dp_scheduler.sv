// tb_dp_scheduler: self-checking test of the dynamic-programming scheduler.
//
// Two engines share one table-write bus: 'dut' with the default sizes and
// 'dut_small' whose solution lists hold only 4 entries. The test runs
//  1. ten identical tasks (window 0..6, levels 1/2, total 4) on a tariff of
//     rate 1 up to a load of 1 and rate 2 above it, and compares every
//     placement, the total cost and the round count with values worked out
//     beforehand by a separate model of the algorithm;
//  2. eight household appliances over 96 quarter-hour periods with a winter
//     time-of-use tariff (rate +1 above 1260 kJ per quarter), comparing the
//     load of every period and the total cost; the small engine must report
//     list overflows and drop the tasks it can no longer place exactly;
//  2b. updates: a changed and an added appliance are placed again on top of
//     the finished day without clearing it (cost, loads and a cycle count
//     well under a full run's), then the added one is made invalid and must
//     disappear from the schedule;
//  3. a task whose total no sequence of its levels can reach (left out);
//  4. random small workloads, checked only through rules any valid schedule
//     obeys.
// After each run the schedule is checked against those rules as well: each
// task runs in one unbroken stretch inside its window at one of its two
// levels and receives exactly its total (or nothing); the period loads are
// the sums of the placements; the total cost is the tariff applied to them.
module tb_dp_scheduler;
  import sched_pkg::*;

  localparam int unsigned HOURS = 96;
  localparam int unsigned MAXT  = 200;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic          cfg_task_we = 1'b0, cfg_price_we = 1'b0;
  logic [7:0]    cfg_task_idx = '0;
  task_field_e   cfg_task_field = F_START;
  logic [6:0]    cfg_price_idx = '0;
  price_field_e  cfg_price_field = F_THRESHOLD;
  logic [31:0]   cfg_data = '0;
  logic [8:0]    num_tasks = '0;
  logic          start = 1'b0, update = 1'b0;
  logic [8:0]    first_task = '0;
  logic [6:0]    mon_period = '0, rd_period = '0;
  logic [7:0]    mon_task = '0, rd_task = '0;

  logic          busy, done, converged, busy_s, done_s, conv_s;
  energy_t       rd_level, mon_level, mon_power, rd_level_s, mon_level_s, mon_power_s;
  cost_t         cost_total, cost_s;
  logic [7:0]    passes, passes_s;
  logic [31:0]   n_pruned, n_overflow, n_unplaced, pr_s, ov_s, un_s;

  dp_scheduler dut (
    .clk, .rst, .cfg_task_we, .cfg_task_idx, .cfg_task_field, .cfg_price_we,
    .cfg_price_idx, .cfg_price_field, .cfg_data, .num_tasks, .start, .update, .first_task,
    .busy, .done, .rd_period, .rd_task, .rd_level, .mon_period, .mon_task, .mon_level, .mon_power,
    .cost_total, .passes, .converged, .n_pruned, .n_overflow, .n_unplaced
  );

  dp_scheduler #(.MAX_SOL(4)) dut_small (
    .clk, .rst, .cfg_task_we, .cfg_task_idx, .cfg_task_field, .cfg_price_we,
    .cfg_price_idx, .cfg_price_field, .cfg_data, .num_tasks, .start, .update, .first_task, .busy(busy_s),
    .done(done_s), .rd_period, .rd_task, .rd_level(rd_level_s), .mon_period, .mon_task,
    .mon_level(mon_level_s), .mon_power(mon_power_s), .cost_total(cost_s),
    .passes(passes_s), .converged(conv_s), .n_pruned(pr_s), .n_overflow(ov_s),
    .n_unplaced(un_s)
  );

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  // watchdog
  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // local copy of the tables, for the rule checks
  int unsigned tk_s[MAXT], tk_e[MAXT], tk_l1[MAXT], tk_l2[MAXT], tk_tot[MAXT];
  int unsigned pr_thr[HOURS], pr_lo[HOURS], pr_hi[HOURS];

  task automatic wr_task(int idx, int unsigned s, int unsigned e, int unsigned l1,
                         int unsigned l2, int unsigned tot);
    int unsigned v[5] = '{s, e, l1, l2, tot};
    tk_s[idx] = s; tk_e[idx] = e; tk_l1[idx] = l1; tk_l2[idx] = l2; tk_tot[idx] = tot;
    for (int f = 0; f < 5; f++) begin
      @(negedge clk);
      cfg_task_we = 1'b1; cfg_task_idx = 8'(idx); cfg_task_field = task_field_e'(f);
      cfg_data = v[f];
    end
    @(negedge clk) cfg_task_we = 1'b0;
  endtask

  task automatic wr_price(int h, int unsigned thr, int unsigned lo, int unsigned hi);
    int unsigned v[3] = '{thr, lo, hi};
    pr_thr[h] = thr; pr_lo[h] = lo; pr_hi[h] = hi;
    for (int f = 0; f < 3; f++) begin
      @(negedge clk);
      cfg_price_we = 1'b1; cfg_price_idx = 7'(h); cfg_price_field = price_field_e'(f);
      cfg_data = v[f];
    end
    @(negedge clk) cfg_price_we = 1'b0;
  endtask

  task automatic run(int n, output longint took, input bit upd = 1'b0, input int first = 0);
    longint t0;
    @(negedge clk);
    num_tasks = 9'(n);
    update = upd; first_task = 9'(first);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0; update = 1'b0;
    t0 = cycles;
    check(busy && !done, "engine busy after start");
    while (!(done && done_s)) @(negedge clk);
    took = cycles - t0;
  endtask

  function automatic int unsigned pcost(int h, int unsigned load);
    return (load <= pr_thr[h]) ? pr_lo[h] * load : pr_hi[h] * load;
  endfunction

  // rules every schedule of the default engine must obey
  task automatic check_rules(int n, string tag);
    int unsigned sum_cost = 0;
    for (int h = 0; h < HOURS; h++) begin
      int unsigned psum = 0;
      for (int t = 0; t < n; t++) begin
        mon_period = 7'(h); mon_task = 8'(t); #1;
        psum += mon_level;
      end
      mon_period = 7'(h); #1;
      check(mon_power == psum, $sformatf("%s: period %0d load %0d, placements sum to %0d", tag, h, mon_power, psum));
      sum_cost += pcost(h, psum);
    end
    check(cost_total == sum_cost, $sformatf("%s: total cost %0d, tariff gives %0d", tag, cost_total, sum_cost));
    for (int t = 0; t < n; t++) begin
      int unsigned esum = 0;
      int first = -1, last = -1;
      bit ok = 1'b1;
      for (int h = 0; h < HOURS; h++) begin
        mon_period = 7'(h); mon_task = 8'(t); #1;
        if (mon_level != 0) begin
          if (first < 0) first = h;
          else if (last != h - 1) ok = 1'b0;          // gap
          last = h;
          esum += mon_level;
          if (mon_level != tk_l1[t] && mon_level != tk_l2[t]) ok = 1'b0;
        end
      end
      if (first >= 0) begin
        if (first < int'(tk_s[t]) || last > int'(tk_e[t])) ok = 1'b0;
        if (esum != tk_tot[t]) ok = 1'b0;
      end
      check(ok, $sformatf("%s: task %0d placement breaks the rules (energy %0d of %0d)", tag, t, esum, tk_tot[t]));
    end
  endtask

  // expected results, from an independent model of the algorithm
  localparam int unsigned EX1_BEST [70] = '{1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 2, 2, 2, 2, 2, 2, 2, 2, 1, 1, 2, 2, 2, 2, 2, 2, 2, 2, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam int unsigned EX3_POWER [96] = '{1548, 1548, 1548, 1548, 873, 873, 873, 873, 873, 873, 873, 873, 873, 873, 873, 873, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 0, 0, 0, 0, 1170, 1170, 720, 360, 360, 360, 360, 0, 0, 1080, 1080, 0, 0, 0, 2385, 2385, 2385, 2385, 2385, 2385, 2385, 2385, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};

  int unsigned q_rate;
  longint took, full_took;
  localparam int unsigned UPD_POWER [96] = '{1548, 1548, 1548, 1548, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 1098, 1098, 1098, 1098, 1098, 1098, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 0, 0, 0, 0, 1170, 1170, 720, 360, 360, 360, 360, 0, 0, 1080, 1080, 0, 0, 0, 2385, 2385, 2385, 2385, 2385, 2385, 2385, 2385, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 225, 225, 225, 225, 225, 225, 225, 225, 225, 225, 225, 225, 0, 0, 0, 0, 0, 0, 0, 0};

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // ---------------- 1: ten identical tasks over 7 hours ----------------
    for (int h = 0; h < HOURS; h++) wr_price(h, 1, 1, 2);
    for (int t = 0; t < 10; t++) wr_task(t, 0, 6, 1, 2, 4);
    run(10, took);
    $display("example 1: cost %0d after %0d rounds, %0d cycles", cost_total, passes, took);
    check(cost_total == 75, $sformatf("ex1 cost %0d, expected 75", cost_total));
    check(passes == 2 && converged, "ex1 stops after 2 rounds by the 1% rule");
    check(n_pruned > 0, "ex1 pruned partial schedules");
    for (int h = 0; h < 7; h++)
      for (int t = 0; t < 10; t++) begin
        mon_period = 7'(h); mon_task = 8'(t); #1;
        check(mon_level == EX1_BEST[h*10+t], $sformatf("ex1 task %0d period %0d level %0d, expected %0d",
              t, h, mon_level, EX1_BEST[h*10+t]));
      end
    check_rules(10, "ex1");
    // the not-started path may not be counted as running
    mon_period = 7'd7; mon_task = 8'd0; #1;
    check(mon_level == 0, "nothing placed outside the windows");

    // ---------------- 2: household appliances, 96 quarter hours ----------------
    for (int q = 0; q < HOURS; q++) begin
      if (q < 28 || q >= 76) q_rate = 6;
      else if (q < 44 || q >= 68) q_rate = 12;
      else q_rate = 10;
      wr_price(q, 1260, q_rate, q_rate + 1);
    end
    wr_task(0, 40, 49,  810, 1620,  1620);   // mini oven
    wr_task(1, 44, 49,  360,  540,  1080);   // rice cooker
    wr_task(2, 32, 58,  360,  540,  1800);   // clothes washer
    wr_task(3, 58, 68, 2385, 4770, 19080);   // clothes dryer
    wr_task(4,  0, 95,  648,  648, 25920);   // refrigerator
    wr_task(5,  0, 75,  900, 1080,  3600);   // vacuum cleaner
    wr_task(6, 53, 75, 1080, 2160,  2160);   // dishwasher
    wr_task(7,  0, 95,  225,  900,  2700);   // water pump
    run(8, took);
    $display("example 3: cost %0d (%0d.%02d cents) after %0d rounds, %0d cycles",
             cost_total, cost_total / 3600, (cost_total % 3600) * 100 / 3600, passes, took);
    check(cost_total == 522648, $sformatf("ex3 cost %0d, expected 522648", cost_total));
    check(passes == 2 && converged, "ex3 rounds");
    check(n_overflow == 0 && n_unplaced == 0, "ex3 fits the default lists");
    for (int h = 0; h < HOURS; h++) begin
      mon_period = 7'(h); #1;
      check(mon_power == EX3_POWER[h], $sformatf("ex3 period %0d load %0d, expected %0d", h, mon_power, EX3_POWER[h]));
    end
    check_rules(8, "ex3");
    // small lists overflow
    check(ov_s == 2356, $sformatf("small engine overflows %0d, expected 2356", ov_s));
    check(un_s == 8, $sformatf("small engine leaves %0d placements out, expected 8", un_s));
    check(cost_s == 75600, $sformatf("small engine cost %0d, expected 75600", cost_s));

    // ---------------- 2b: updates during the day ----------------
    // The water pump's window shrinks to 60..90 and a ninth appliance (window
    // 20..40, levels 450/900, total 2700) is added; only tasks 7 and 8 are
    // placed again. Then the ninth gets an invalid level and is taken out.
    full_took = took;
    wr_task(7, 60, 90, 225, 900, 2700);
    wr_task(8, 20, 40, 450, 900, 2700);
    run(9, took, 1'b1, 7);
    $display("update: cost %0d after %0d rounds, %0d cycles", cost_total, passes, took);
    check(cost_total == 538848, $sformatf("update cost %0d, expected 538848", cost_total));
    check(passes == 2 && converged && n_unplaced == 0, "update rounds");
    check(took * 4 < full_took, $sformatf("update took %0d cycles, a full run %0d", took, full_took));
    for (int h = 0; h < HOURS; h++) begin
      mon_period = 7'(h); #1;
      check(mon_power == UPD_POWER[h], $sformatf("update period %0d load %0d, expected %0d", h, mon_power, UPD_POWER[h]));
    end
    check_rules(9, "update");
    wr_task(8, 20, 40, 0, 900, 2700);
    run(9, took, 1'b1, 8);
    check(cost_total == 522648 && n_unplaced == 2,
          $sformatf("removal by update: cost %0d unplaced %0d", cost_total, n_unplaced));
    for (int h = 0; h < HOURS; h++) begin
      mon_period = 7'(h); mon_task = 8'd8; #1;
      check(mon_level == 0, $sformatf("removed task still at level %0d in period %0d", mon_level, h));
    end
    check_rules(9, "update removal");

    // ---------------- 3: a task that cannot be placed exactly ----------------
    wr_task(0, 0, 5, 2, 2, 3);
    run(1, took);
    check(n_unplaced == 2 && cost_total == 0 && passes == 2, $sformatf("unplaceable task: unplaced %0d cost %0d", n_unplaced, cost_total));
    check_rules(1, "unplaceable");

    // ---------------- 4: random workloads ----------------
    for (int r = 0; r < 4; r++) begin
      automatic int n = 3 + int'($urandom_range(0, 9));
      for (int h = 0; h < HOURS; h++) begin
        automatic int unsigned lo = $urandom_range(1, 9);
        wr_price(h, $urandom_range(0, 12), lo, lo + $urandom_range(0, 4));
      end
      for (int t = 0; t < n; t++) begin
        automatic int unsigned s = $urandom_range(0, 80);
        automatic int unsigned e = s + $urandom_range(0, 15);
        automatic int unsigned l1 = $urandom_range(1, 4);
        automatic int unsigned l2 = l1 + $urandom_range(0, 3);
        wr_task(t, s, e, l1, l2, l1 * $urandom_range(0, 3) + l2 * $urandom_range(1, 3));
      end
      run(n, took);
      $display("random %0d: %0d tasks, cost %0d, %0d rounds, %0d left out, %0d cycles", r, n, cost_total, passes, n_unplaced, took);
      check(passes >= 1 && passes <= 10, "round count within 1..10");
      check_rules(n, $sformatf("random %0d", r));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
