// tb_led_refresher: connects the sweep to a real PIO bank and to a table of
// per-period levels held in the testbench. It checks that nothing is written
// while disabled, that after each change of the selected period every LED
// register holds that period's level of its task within two sweeps, that
// only the KEY PIO is read, and that a sweep takes 1 + 18 cycles.
module tb_led_refresher;
  localparam int unsigned N = 18;
  localparam int unsigned PERIODS = 96;

  logic clk = 1'b0, rst = 1'b1, enable = 1'b0;
  logic [31:0] address, writedata, readdata, lvl_value, sweeps;
  logic write, read;
  logic [6:0] lvl_period, sel = '0;
  logic [7:0] lvl_task;
  logic [3:0] led [N];
  int unsigned table_lvl [PERIODS][N];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  led_refresher dut (.clk, .rst, .enable, .address, .write, .writedata, .read,
                     .readdata, .lvl_period, .lvl_task, .lvl_value, .sweeps);
  pio_bank #(.KEY_W(7)) u_pio (.clk, .rst, .address, .write, .writedata, .read,
                               .readdata, .in_port_key(sel), .out_port_led(led));

  assign lvl_value = (int'(lvl_task) < N) ? table_lvl[lvl_period][lvl_task] : 32'hdead;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // only the KEY PIO may be read
  always @(posedge clk)
    if (read && address != 32'h0180_3120) begin
      failures++;
      $display("FAIL: read of %h", address);
    end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < PERIODS; p++)
      for (int i = 0; i < N; i++) table_lvl[p][i] = $urandom_range(0, 15);
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (50) @(negedge clk);
    check(sweeps == 0 && !write, "idle while disabled");
    foreach (led[i]) check(led[i] == 0, "LEDs untouched while disabled");
    enable = 1'b1;
    // sweep length
    begin
      longint t0, t1;
      wait (sweeps == 1); @(negedge clk); t0 = $time;
      wait (sweeps == 2); @(negedge clk); t1 = $time;
      check((t1 - t0) / 10 == N + 1, $sformatf("sweep takes %0d cycles", (t1 - t0) / 10));
    end
    for (int r = 0; r < 40; r++) begin
      int unsigned s0;
      @(negedge clk);
      sel = 7'($urandom_range(0, PERIODS - 1));
      s0 = sweeps;
      wait (sweeps == s0 + 2);
      @(negedge clk);
      foreach (led[i])
        check(led[i] == 4'(table_lvl[sel][i]),
              $sformatf("period %0d LED %0d is %0d expected %0d", sel, i, led[i], table_lvl[sel][i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
