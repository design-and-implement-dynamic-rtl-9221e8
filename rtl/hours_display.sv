// hours_display: selects which period's schedule is shown, one step per press
// of a push button.
//
// 'key_n' is the DE2 push button, low while pressed. Each press (a falling
// edge) advances 'hours' by one and wraps from NUM_PERIODS-1 back to 0. The
// report clocks the counter directly on the button's falling edge; here the
// button is brought into the clock domain through two flip-flops and its
// falling edge detected there, so the counter changes two to three clock
// cycles after the press. The synchronous reset to period 0 is also this
// design's addition. Defaults are the report's: 24 hours on a 5-bit output.
module hours_display #(
  parameter int unsigned NUM_PERIODS = 24,
  parameter int unsigned WIDTH       = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             key_n,
  output logic [WIDTH-1:0] hours
);

  logic [2:0] key_sync;   // [0],[1] synchroniser, [2] previous value
  logic       press;

  always_ff @(posedge clk) begin
    if (rst) key_sync <= '1;
    else     key_sync <= {key_sync[1:0], key_n};
  end

  assign press = key_sync[2] & ~key_sync[1];

  always_ff @(posedge clk) begin
    if (rst)
      hours <= '0;
    else if (press) begin
      if (hours >= WIDTH'(NUM_PERIODS - 1)) hours <= '0;
      else                                  hours <= hours + 1'b1;
    end
  end

endmodule
