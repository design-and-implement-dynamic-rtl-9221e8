// brightness: PWM comparator that dims one LED according to a task's power
// level.
//
// 'counter' runs 0..15 (from simple_counter). The output is high while
// counter < factor, so a level of N lights the LED for N of every 16 cycles:
// level 0 is dark and a higher level is brighter. The output is registered,
// one cycle behind the inputs. The report describes the duty as N of 16 steps;
// its own comparison (counter <= factor) would give N+1 of 16, and this design
// follows the N of 16 description.
module brightness #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] factor,
  input  logic [WIDTH-1:0] counter,
  output logic             out
);

  always_ff @(posedge clk) out <= (counter < factor);

endmodule
