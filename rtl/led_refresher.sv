// led_refresher: keeps the LED registers showing the schedule of the selected
// period, the job of the processor's display loop.
//
// While 'enable' is high it repeats a sweep: read the KEY PIO to learn the
// selected period, then for task i = 0..N_LEDS-1 look up the power level the
// schedule gives task i in that period and write it to LED PIO i. A sweep takes
// one read cycle and N_LEDS write cycles; a new selection therefore shows on
// all LEDs within two sweeps. The level lookup is combinational (lvl_period,
// lvl_task -> lvl_value); levels wider than the LED register are cut to its
// low bits by the PIO. Reading the key through the PIO and writing the levels
// of the first 18 tasks follow the report; the hardware sweep replaces its
// software loop.
module led_refresher #(
  parameter int unsigned N_LEDS     = 18,
  parameter int unsigned PW         = 7,
  parameter int unsigned TW         = 8,
  parameter logic [31:0] BASE       = 32'h0180_3000,
  parameter logic [31:0] KEY_OFFSET = 32'h0000_0120
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable,
  // master port to the PIO bank
  output logic [31:0]   address,
  output logic          write,
  output logic [31:0]   writedata,
  output logic          read,
  input  logic [31:0]   readdata,
  // schedule lookup
  output logic [PW-1:0] lvl_period,
  output logic [TW-1:0] lvl_task,
  input  logic [31:0]   lvl_value,
  // number of completed sweeps
  output logic [31:0]   sweeps
);

  localparam int unsigned IW = $clog2(N_LEDS + 1);

  typedef enum logic [1:0] {R_IDLE, R_KEY, R_LED} rstate_e;
  rstate_e       st;
  logic [IW-1:0] idx;
  logic [PW-1:0] period;

  assign lvl_period = period;
  assign lvl_task   = TW'(idx);

  always_comb begin
    address   = '0;
    write     = 1'b0;
    read      = 1'b0;
    writedata = '0;
    unique case (st)
      R_KEY: begin
        address = BASE + KEY_OFFSET;
        read    = 1'b1;
      end
      R_LED: begin
        address   = BASE + 32'(idx) * 32'd16;
        write     = 1'b1;
        writedata = lvl_value;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= R_IDLE;
      idx    <= '0;
      period <= '0;
      sweeps <= '0;
    end else begin
      unique case (st)
        R_IDLE: if (enable) st <= R_KEY;
        R_KEY: begin
          period <= readdata[PW-1:0];
          idx    <= '0;
          st     <= R_LED;
        end
        R_LED: begin
          if (int'(idx) == N_LEDS - 1) begin
            sweeps <= sweeps + 1'b1;
            st     <= enable ? R_KEY : R_IDLE;
          end
          idx <= idx + 1'b1;
        end
        default: st <= R_IDLE;
      endcase
    end
  end

endmodule
