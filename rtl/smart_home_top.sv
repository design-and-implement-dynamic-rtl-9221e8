// smart_home_top: home-automation controller that schedules a community's
// appliance tasks against a time-of-use tariff and shows the result on the
// DE2 board's LEDs and seven-segment digits.
//
// Data flow. The task table (window, two power levels, total energy per task)
// and the price table (threshold and two unit rates per period) are written
// through the cfg_* port, where the processor system with its flash file store
// would deliver them. A one-cycle 'start' runs dp_scheduler, which places every
// task with its dynamic program and repeats the rounds until the total cost
// settles; with 'update' high it instead places only tasks first_task.. again
// on top of the existing schedule, for tasks changed or added during the day. Its results stay readable: led_refresher copies the levels of tasks
// 0..17 in the selected period into the 18 LED registers of pio_bank, and each
// LED is dimmed in proportion to its task's level by a brightness comparator
// against the shared 4-bit simple_counter (0 = dark, 15 = brightest). KEY[0]
// steps the selected period (hours_display), which also goes to the KEY PIO
// and to time_display, so HEX3..HEX0 show the period's start time as HH MM.
//
// Clock and reset. Everything runs on CLOCK_50. KEY[1], low while pressed,
// resets the design; it is synchronised by two flip-flops, so reset acts two
// cycles after the button goes down and ends two cycles after it is released.
//
// The default parameters give the 96 quarter-hour periods, up to 200 tasks,
// up to 10 rounds and 18 LEDs of the report's last configuration. The hour
// selection is 7 bits wide here so that all 96 periods can be chosen; the
// report's button counter and KEY PIO were 5 bits for 24 hours. The mon_*
// port is a second read port into the schedule for inspection.
module smart_home_top
  import sched_pkg::*;
#(
  parameter int unsigned HOURS      = 96,
  parameter int unsigned MAX_TASKS  = 200,
  parameter int unsigned MAX_SOL    = 200,
  parameter int unsigned MAX_PASSES = 10,
  parameter int unsigned N_LEDS     = 18,
  localparam int unsigned PW = (HOURS > 1) ? $clog2(HOURS) : 1,
  localparam int unsigned TW = (MAX_TASKS > 1) ? $clog2(MAX_TASKS) : 1
) (
  input  logic          CLOCK_50,
  input  logic [1:0]    KEY,
  // table loading
  input  logic          cfg_task_we,
  input  logic [TW-1:0] cfg_task_idx,
  input  task_field_e   cfg_task_field,
  input  logic          cfg_price_we,
  input  logic [PW-1:0] cfg_price_idx,
  input  price_field_e  cfg_price_field,
  input  logic [31:0]   cfg_data,
  input  logic [TW:0]   num_tasks,
  // scheduler control and status
  input  logic          start,
  input  logic          update,
  input  logic [TW:0]   first_task,
  output logic          busy,
  output logic          done,
  output cost_t         cost_total,
  output logic [7:0]    passes,
  output logic          converged,
  output logic [31:0]   n_pruned,
  output logic [31:0]   n_overflow,
  output logic [31:0]   n_unplaced,
  // inspection port
  input  logic [PW-1:0] mon_period,
  input  logic [TW-1:0] mon_task,
  output energy_t       mon_level,
  output energy_t       mon_power,
  // board outputs
  output logic [PW-1:0] sel_period,
  output logic [N_LEDS-1:0] LEDR,
  output logic [6:0]    HEX0,
  output logic [6:0]    HEX1,
  output logic [6:0]    HEX2,
  output logic [6:0]    HEX3,
  output logic [31:0]   led_sweeps
);

  logic clk;
  logic [1:0] rst_sync;
  logic rst;

  assign clk = CLOCK_50;

  always_ff @(posedge clk) rst_sync <= {rst_sync[0], ~KEY[1]};
  assign rst = rst_sync[1];

  // scheduler
  logic [PW-1:0] rd_period;
  logic [TW-1:0] rd_task;
  energy_t       rd_level;

  dp_scheduler #(
    .HOURS(HOURS), .MAX_TASKS(MAX_TASKS), .MAX_SOL(MAX_SOL), .MAX_PASSES(MAX_PASSES)
  ) u_sched (
    .clk, .rst,
    .cfg_task_we, .cfg_task_idx, .cfg_task_field,
    .cfg_price_we, .cfg_price_idx, .cfg_price_field, .cfg_data, .num_tasks,
    .start, .update, .first_task, .busy, .done,
    .rd_period, .rd_task, .rd_level,
    .mon_period, .mon_task, .mon_level, .mon_power,
    .cost_total, .passes, .converged, .n_pruned, .n_overflow, .n_unplaced
  );

  // period selection by push button
  hours_display #(.NUM_PERIODS(HOURS), .WIDTH(PW)) u_hours (
    .clk, .rst, .key_n(KEY[0]), .hours(sel_period)
  );

  // PIO bank and the sweep that fills it
  logic [31:0]   bus_addr, bus_wdata, bus_rdata;
  logic          bus_write, bus_read;
  logic [3:0]    led_level [N_LEDS];

  pio_bank #(.N_LEDS(N_LEDS), .LED_W(4), .KEY_W(PW)) u_pio (
    .clk, .rst,
    .address(bus_addr), .write(bus_write), .writedata(bus_wdata),
    .read(bus_read), .readdata(bus_rdata),
    .in_port_key(sel_period), .out_port_led(led_level)
  );

  led_refresher #(.N_LEDS(N_LEDS), .PW(PW), .TW(TW)) u_refresh (
    .clk, .rst, .enable(done),
    .address(bus_addr), .write(bus_write), .writedata(bus_wdata),
    .read(bus_read), .readdata(bus_rdata),
    .lvl_period(rd_period), .lvl_task(rd_task), .lvl_value(rd_level),
    .sweeps(led_sweeps)
  );

  // LED dimming
  logic [3:0] pwm_count;

  simple_counter #(.WIDTH(4)) u_count (.clk, .rst, .counter_out(pwm_count));

  for (genvar i = 0; i < N_LEDS; i++) begin : g_led
    brightness #(.WIDTH(4)) u_bright (
      .clk, .factor(led_level[i]), .counter(pwm_count), .out(LEDR[i])
    );
  end

  // clock-time display of the selected period
  time_display u_time (
    .clk, .time_period(7'(sel_period)),
    .HEX0, .HEX1, .HEX2, .HEX3
  );

endmodule
