// tb_sched_pkg: self-checking test of the shared price function and record
// layout.
//
// period_cost is compared with the tariff rule worked out here in 64-bit
// arithmetic and cut to 32 bits: the low rate times the whole load at or below
// the threshold, the high rate times the whole load above it. Loads at, just
// below and just above the threshold are tried for many random price records,
// plus loads of 0 and products that wrap. The test also checks that a task
// record packs to 7 + 7 + 3 x 32 bits and a price record to 3 x 32 bits, and
// that the field selectors have the codes the table write port uses.
module tb_sched_pkg;
  import sched_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint unsigned expect_cost(energy_t thr, cost_t lo, cost_t hi, energy_t load);
    longint unsigned full = (load > thr) ? 64'(hi) * 64'(load) : 64'(lo) * 64'(load);
    return full & 64'hFFFF_FFFF;
  endfunction

  initial begin
    price_t pr;
    energy_t load;
    @(posedge clk);
    check($bits(task_t) == 110, $sformatf("task_t is %0d bits", $bits(task_t)));
    check($bits(price_t) == 96, $sformatf("price_t is %0d bits", $bits(price_t)));
    check(F_START == 3'd0 && F_END == 3'd1 && F_LEVEL1 == 3'd2 && F_LEVEL2 == 3'd3 && F_TOTAL == 3'd4,
          "task field codes");
    check(F_THRESHOLD == 2'd0 && F_RATE_LOW == 2'd1 && F_RATE_HIGH == 2'd2, "price field codes");

    // the example tariff: 6 cents up to 1260 units, 7 above
    pr = '{threshold: 1260, rate_low: 6, rate_high: 7};
    check(period_cost(pr, 1260) == 7560, "1260 units at the low rate");
    check(period_cost(pr, 1261) == 8827, "1261 units at the high rate");
    check(period_cost(pr, 0) == 0, "no load, no cost");

    for (int i = 0; i < 300; i++) begin
      pr.threshold = $urandom_range(0, 5000);
      pr.rate_low  = $urandom_range(0, 20);
      pr.rate_high = pr.rate_low + $urandom_range(0, 5);
      for (int d = -2; d <= 2; d++) begin
        load = energy_t'(int'(pr.threshold) + d);
        if (int'(pr.threshold) + d < 0) continue;
        check(64'(period_cost(pr, load)) == expect_cost(pr.threshold, pr.rate_low, pr.rate_high, load),
              $sformatf("thr %0d lo %0d hi %0d load %0d gives %0d", pr.threshold, pr.rate_low,
                        pr.rate_high, load, period_cost(pr, load)));
      end
      @(posedge clk);
    end

    // products that no longer fit 32 bits wrap
    pr = '{threshold: 10, rate_low: 1, rate_high: 32'h0001_0000};
    check(64'(period_cost(pr, 32'h0002_0003)) == expect_cost(10, 1, 32'h0001_0000, 32'h0002_0003),
          "32-bit wrap of a large product");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
