// tb_smart_home_top: end-to-end test of the whole controller at its default
// sizes (96 periods, 200 tasks, 200-entry lists, 10 rounds, 18 LEDs).
//
// Run 1 loads ten identical tasks (window 0..6, levels 1 and 2, total 4) and
// a tariff of rate 1 up to a load of 1 and rate 2 above. After the schedule
// is done it steps the period with KEY[0] through periods 0..7 and checks, for
// each, the clock time on HEX3..HEX0 and the brightness of LEDR0..17: every
// LED must be lit for level/16 of the time, where the level is the one a
// separate model of the algorithm gives that task in that period. It then
// presses KEY[0] until the selection wraps to 0.
// Run 2 loads eighteen tasks over the first 24 periods, one per LED, with the
// same tariff, and checks the cost and, period by period, the digits and the
// brightness of all 18 LEDs.
// Run 3 loads eight household appliances over 96 quarter hours with a winter
// time-of-use tariff and checks the total cost and every period's load
// against the model.
// Run 4 changes one appliance and adds a ninth and reschedules only those two
// on top of the day (update mode), checking the new cost and that it took far
// fewer cycles than the full run.
// Each mechanism is counted and must have happened: pruning of partial
// schedules, more than one round, the 1% stopping rule, a KEY step, the
// wrap of the selection, LED sweeps, a partly lit LED, a time shown and a
// partial update.
module tb_smart_home_top;
  import sched_pkg::*;

  logic CLOCK_50 = 1'b0;
  logic [1:0] KEY = 2'b00;                 // KEY[1] pressed: reset
  always #10 CLOCK_50 = ~CLOCK_50;         // 50 MHz

  logic          cfg_task_we = 1'b0, cfg_price_we = 1'b0;
  logic [7:0]    cfg_task_idx = '0;
  task_field_e   cfg_task_field = F_START;
  logic [6:0]    cfg_price_idx = '0;
  price_field_e  cfg_price_field = F_THRESHOLD;
  logic [31:0]   cfg_data = '0;
  logic [8:0]    num_tasks = '0;
  logic          start = 1'b0, update = 1'b0;
  logic [8:0]    first_task = '0;
  logic [6:0]    mon_period = '0;
  logic [7:0]    mon_task = '0;

  logic          busy, done, converged;
  cost_t         cost_total;
  logic [7:0]    passes;
  logic [31:0]   n_pruned, n_overflow, n_unplaced, led_sweeps;
  energy_t       mon_level, mon_power;
  logic [6:0]    sel_period;
  logic [17:0]   LEDR;
  logic [6:0]    HEX0, HEX1, HEX2, HEX3;

  smart_home_top dut (
    .CLOCK_50, .KEY, .cfg_task_we, .cfg_task_idx, .cfg_task_field, .cfg_price_we,
    .cfg_price_idx, .cfg_price_field, .cfg_data, .num_tasks, .start, .update,
    .first_task, .busy, .done,
    .cost_total, .passes, .converged, .n_pruned, .n_overflow, .n_unplaced,
    .mon_period, .mon_task, .mon_level, .mon_power, .sel_period, .LEDR,
    .HEX0, .HEX1, .HEX2, .HEX3, .led_sweeps
  );

  int checks = 0, failures = 0;
  int m_prune = 0, m_rounds = 0, m_conv = 0, m_step = 0, m_wrap = 0, m_sweep = 0,
      m_dim = 0, m_time = 0, m_update = 0;
  int took;

  initial begin
    repeat (5_000_000) @(posedge CLOCK_50);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr_task(int idx, int unsigned s, int unsigned e, int unsigned l1,
                         int unsigned l2, int unsigned tot);
    int unsigned v[5] = '{s, e, l1, l2, tot};
    for (int f = 0; f < 5; f++) begin
      @(negedge CLOCK_50);
      cfg_task_we = 1'b1; cfg_task_idx = 8'(idx); cfg_task_field = task_field_e'(f);
      cfg_data = v[f];
    end
    @(negedge CLOCK_50) cfg_task_we = 1'b0;
  endtask

  task automatic wr_price(int h, int unsigned thr, int unsigned lo, int unsigned hi);
    int unsigned v[3] = '{thr, lo, hi};
    for (int f = 0; f < 3; f++) begin
      @(negedge CLOCK_50);
      cfg_price_we = 1'b1; cfg_price_idx = 7'(h); cfg_price_field = price_field_e'(f);
      cfg_data = v[f];
    end
    @(negedge CLOCK_50) cfg_price_we = 1'b0;
  endtask

  task automatic run(int n, bit upd = 1'b0, int first = 0);
    @(negedge CLOCK_50);
    num_tasks = 9'(n); start = 1'b1; update = upd; first_task = 9'(first);
    @(negedge CLOCK_50);
    start = 1'b0; update = 1'b0;
    took = 1;
    while (!done) begin
      @(negedge CLOCK_50);
      took++;
    end
    if (n_pruned > 0) m_prune++;
    if (passes > 1) m_rounds++;
    if (converged) m_conv++;
  endtask

  task automatic press_key0();
    logic [6:0] prev_sel = sel_period;
    KEY[0] = 1'b0;
    repeat (4) @(negedge CLOCK_50);
    KEY[0] = 1'b1;
    repeat (4) @(negedge CLOCK_50);
    if (sel_period != prev_sel) m_step++;
    if (sel_period == 0 && prev_sel == 7'd95) m_wrap++;
  endtask

  localparam logic [6:0] SEG [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19,
                                      7'h12, 7'h02, 7'h78, 7'h00, 7'h10};
  function automatic int digit(logic [6:0] s);
    for (int d = 0; d < 10; d++) if (s == SEG[d]) return d;
    return -1;
  endfunction

  // Waits for two LED sweeps at the selected period, then checks the clock
  // time on the digits and that LED i is lit for exactly lv[i] of every 16
  // clocks; finally presses KEY[0] to step to the next period.
  task automatic check_period(int p, int unsigned lv [18], string tag);
    int shown, lit [18];
    automatic int unsigned s0 = led_sweeps;
    check(sel_period == 7'(p), $sformatf("%s: selection %0d, expected %0d", tag, sel_period, p));
    wait (led_sweeps >= s0 + 2);
    @(negedge CLOCK_50);
    if (led_sweeps > s0) m_sweep++;
    shown = digit(HEX3) * 1000 + digit(HEX2) * 100 + digit(HEX1) * 10 + digit(HEX0);
    check(shown == (p / 4) * 100 + (p % 4) * 15, $sformatf("%s: period %0d shows %0d", tag, p, shown));
    if (shown == (p / 4) * 100 + (p % 4) * 15) m_time++;
    foreach (lit[i]) lit[i] = 0;
    for (int c = 0; c < 64; c++) begin
      foreach (lit[i]) lit[i] += int'(LEDR[i]);
      @(negedge CLOCK_50);
    end
    foreach (lit[i]) begin
      check(lit[i] == 4 * int'(lv[i]), $sformatf("%s: period %0d LED %0d lit %0d/64, level %0d", tag, p, i, lit[i], lv[i]));
      if (lit[i] > 0 && lit[i] < 64) m_dim++;
    end
    press_key0();
  endtask

  localparam int unsigned EX1_BEST [70] = '{1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 2, 2, 2, 2, 2, 2, 2, 2, 1, 1, 2, 2, 2, 2, 2, 2, 2, 2, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam int unsigned EX2_BEST [432] = '{1, 0, 0, 2, 2, 2, 2, 2, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 2, 2, 2, 2, 2, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 2, 2, 2, 2, 2, 2, 2, 2, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 2, 2, 2, 2, 2, 2, 2, 2, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 2, 2, 2, 2, 2, 2, 2, 2, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam int unsigned EX3_POWER [96] = '{1548, 1548, 1548, 1548, 873, 873, 873, 873, 873, 873, 873, 873, 873, 873, 873, 873, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 0, 0, 0, 0, 1170, 1170, 720, 360, 360, 360, 360, 0, 0, 1080, 1080, 0, 0, 0, 2385, 2385, 2385, 2385, 2385, 2385, 2385, 2385, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};

  initial begin
    repeat (4) @(negedge CLOCK_50);
    KEY = 2'b11;                           // release reset, KEY[0] up
    repeat (4) @(negedge CLOCK_50);

    // ---------------- run 1: the ten-task example on the board ----------------
    for (int h = 0; h < 96; h++) wr_price(h, 1, 1, 2);
    for (int t = 0; t < 10; t++) wr_task(t, 0, 6, 1, 2, 4);
    run(10);
    check(cost_total == 75, $sformatf("run 1 cost %0d, expected 75", cost_total));
    check(passes == 2, "run 1 takes two rounds");
    for (int p = 0; p < 8; p++) begin
      int unsigned lv [18];
      foreach (lv[i]) lv[i] = (p < 7 && i < 10) ? EX1_BEST[p * 10 + i] : 0;
      check_period(p, lv, "run 1");
    end
    while (sel_period != 0) press_key0();

    // ---------------- run 2: eighteen tasks over 24 periods, one per LED ----------------
    // 8 tasks (window 0..11, levels 1/2, total 4), 8 tasks (12..22, levels 2/3,
    // total 6), one (16..23, levels 1/2, total 4) and one (22..23, level 1,
    // total 1); the same tariff as run 1.
    for (int t = 0; t < 8; t++) wr_task(t, 0, 11, 1, 2, 4);
    for (int t = 8; t < 16; t++) wr_task(t, 12, 22, 2, 3, 6);
    wr_task(16, 16, 23, 1, 2, 4);
    wr_task(17, 22, 23, 1, 1, 1);
    run(18);
    check(cost_total == 155, $sformatf("run 2 cost %0d, expected 155", cost_total));
    check(passes == 2 && n_unplaced == 0, "run 2 takes two rounds and places every task");
    for (int p = 0; p < 24; p++) begin
      int unsigned lv [18];
      foreach (lv[i]) lv[i] = EX2_BEST[p * 18 + i];
      check_period(p, lv, "run 2");
    end

    // ---------------- run 3: eight appliances over a day ----------------
    for (int q = 0; q < 96; q++) begin
      automatic int unsigned r = (q < 28 || q >= 76) ? 6 : ((q < 44 || q >= 68) ? 12 : 10);
      wr_price(q, 1260, r, r + 1);
    end
    wr_task(0, 40, 49,  810, 1620,  1620);
    wr_task(1, 44, 49,  360,  540,  1080);
    wr_task(2, 32, 58,  360,  540,  1800);
    wr_task(3, 58, 68, 2385, 4770, 19080);
    wr_task(4,  0, 95,  648,  648, 25920);
    wr_task(5,  0, 75,  900, 1080,  3600);
    wr_task(6, 53, 75, 1080, 2160,  2160);
    wr_task(7,  0, 95,  225,  900,  2700);
    run(8);
    check(cost_total == 522648, $sformatf("run 3 cost %0d, expected 522648", cost_total));
    check(n_unplaced == 0 && n_overflow == 0, "run 3 places every task");
    for (int h = 0; h < 96; h++) begin
      mon_period = 7'(h); #1;
      check(mon_power == EX3_POWER[h], $sformatf("run 3 period %0d load %0d, expected %0d", h, mon_power, EX3_POWER[h]));
    end

    // ---------------- run 4: a changed and an added appliance ----------------
    begin
      automatic int full = took;
      wr_task(7, 60, 90, 225, 900, 2700);
      wr_task(8, 20, 40, 450, 900, 2700);
      run(9, 1'b1, 7);
      check(cost_total == 538848, $sformatf("run 4 cost %0d, expected 538848", cost_total));
      check(n_unplaced == 0, "run 4 places every task");
      if (took * 4 < full) m_update++;
      $display("full day %0d cycles, update %0d cycles", full, took);
    end

    // ---------------- mechanisms ----------------
    $display("mechanisms: prune %0d rounds %0d converge %0d key-step %0d wrap %0d sweep %0d dim-LED %0d time %0d update %0d",
             m_prune, m_rounds, m_conv, m_step, m_wrap, m_sweep, m_dim, m_time, m_update);
    check(m_prune > 0, "pruning happened");
    check(m_rounds > 0, "rescheduling rounds happened");
    check(m_conv > 0, "1% stopping rule fired");
    check(m_step > 0, "KEY step happened");
    check(m_wrap > 0, "selection wrapped");
    check(m_sweep > 0, "LED sweeps happened");
    check(m_dim > 0, "an LED was partly lit");
    check(m_time > 0, "time display showed a period");
    check(m_update > 0, "a partial update ran faster than a full run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
