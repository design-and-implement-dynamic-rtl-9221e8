// tb_workload_community: the community workload, run on the whole controller
// at its default sizes. Fifteen households each bring the same eight
// appliances (mini oven, rice cooker, clothes washer, clothes dryer with a
// whole-day-to-evening window, refrigerator, vacuum cleaner, dishwasher, water
// pump), 120 tasks in all, over 96 quarter-hour periods of a winter
// time-of-use tariff whose rate rises by 1 above 1260 kJ per quarter. The
// total cost, the rounds and every period's community load are compared with
// the results of a separate model of the algorithm, and the run time in
// clock cycles is reported.
module tb_workload_community;
  import sched_pkg::*;

  logic CLOCK_50 = 1'b0;
  logic [1:0] KEY = 2'b00;
  always #10 CLOCK_50 = ~CLOCK_50;

  logic          cfg_task_we = 1'b0, cfg_price_we = 1'b0;
  logic [7:0]    cfg_task_idx = '0;
  task_field_e   cfg_task_field = F_START;
  logic [6:0]    cfg_price_idx = '0;
  price_field_e  cfg_price_field = F_THRESHOLD;
  logic [31:0]   cfg_data = '0;
  logic [8:0]    num_tasks = '0;
  logic          start = 1'b0;
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
    .cfg_price_idx, .cfg_price_field, .cfg_data, .num_tasks, .start, .update(1'b0),
    .first_task(9'd0), .busy, .done,
    .cost_total, .passes, .converged, .n_pruned, .n_overflow, .n_unplaced,
    .mon_period, .mon_task, .mon_level, .mon_power, .sel_period, .LEDR,
    .HEX0, .HEX1, .HEX2, .HEX3, .led_sweeps
  );

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge CLOCK_50) cycles <= cycles + 1;

  initial begin
    repeat (50_000_000) @(posedge CLOCK_50);
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

  localparam int unsigned EX4_POWER [96] = '{60822, 60822, 60822, 60822, 47322, 47322, 47322, 47322, 11547, 11547, 11547, 11547, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 9072, 0, 0, 0, 0, 18990, 18990, 1080, 1080, 1080, 1080, 1080, 1080, 1080, 20520, 20160, 6300, 6948, 1188, 1188, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 648, 1098, 1098, 1098, 1098, 1098, 1098, 1098, 1098, 1098, 1098, 1098, 2898, 1098, 1098, 1098, 1098, 1098, 1098, 1098, 1098};

  initial begin
    longint t0;
    repeat (4) @(negedge CLOCK_50);
    KEY = 2'b11;
    repeat (4) @(negedge CLOCK_50);
    for (int q = 0; q < 96; q++) begin
      automatic int unsigned r = (q < 28 || q >= 76) ? 6 : ((q < 44 || q >= 68) ? 12 : 10);
      wr_price(q, 1260, r, r + 1);
    end
    for (int u = 0; u < 15; u++) begin
      wr_task(u * 8 + 0, 40, 49,  810, 1620,  1620);
      wr_task(u * 8 + 1, 44, 49,  360,  540,  1080);
      wr_task(u * 8 + 2, 32, 58,  360,  540,  1800);
      wr_task(u * 8 + 3,  0, 68, 2385, 4770, 19080);
      wr_task(u * 8 + 4,  0, 95,  648,  648, 25920);
      wr_task(u * 8 + 5,  0, 75,  900, 1080,  3600);
      wr_task(u * 8 + 6, 53, 75, 1080, 2160,  2160);
      wr_task(u * 8 + 7,  0, 95,  225,  900,  2700);
    end
    @(negedge CLOCK_50);
    num_tasks = 9'd120; start = 1'b1;
    @(negedge CLOCK_50);
    start = 1'b0;
    t0 = cycles;
    while (!done) @(negedge CLOCK_50);
    $display("community: cost %0d (%0d.%02d cents) after %0d rounds in %0d cycles (%0d us at 50 MHz), %0d prunes",
             cost_total, cost_total / 3600, (cost_total % 3600) * 100 / 3600, passes,
             cycles - t0, (cycles - t0) / 50, n_pruned);
    check(cost_total == 7158978, $sformatf("cost %0d, expected 7158978", cost_total));
    check(passes == 2 && converged, "two rounds, stopped by the 1% rule");
    check(n_unplaced == 0 && n_overflow == 0, "every task placed, no list overflow");
    for (int h = 0; h < 96; h++) begin
      mon_period = 7'(h); #1;
      check(mon_power == EX4_POWER[h], $sformatf("period %0d load %0d, expected %0d", h, mon_power, EX4_POWER[h]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
