// simple_counter: free-running 4-bit counter, the time base of the LED
// brightness control.
//
// The count steps by one on every rising clock edge and wraps from 15 to 0,
// so one PWM frame is 16 clock cycles (320 ns at 50 MHz). The wrap and width
// follow the report; the synchronous active-high reset is this design's
// addition so that simulation starts from a known count.
module simple_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] counter_out
);

  always_ff @(posedge clk) begin
    if (rst) counter_out <= '0;
    else     counter_out <= counter_out + 1'b1;
  end

endmodule
