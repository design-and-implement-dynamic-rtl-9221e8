// time_display: shows the start time of a 15-minute period on four
// seven-segment digits as HH MM.
//
// A day is 96 periods; period p starts at hour p/4 and minute 15*(p mod 4).
// HEX3/HEX2 show the tens and units of the hour, HEX1/HEX0 the minutes
// (00, 15, 30 or 45). The digits are registered once, so the display follows
// 'time_period' one clock later; the decoders behind the registers are
// combinational. The hour/minute split and the digit assignment follow the
// report; computing all four digits in one register stage is this design's
// choice. Periods above 95 show hours above 23 unchanged.
module time_display (
  input  logic       clk,
  input  logic [6:0] time_period,
  output logic [6:0] HEX0,
  output logic [6:0] HEX1,
  output logic [6:0] HEX2,
  output logic [6:0] HEX3
);

  logic [4:0] hour;
  logic [3:0] d_hour_tens, d_hour_units, d_min_tens, d_min_units;

  assign hour = 5'(time_period >> 2);

  always_ff @(posedge clk) begin
    d_hour_tens  <= 4'(hour / 5'd10);
    d_hour_units <= 4'(hour % 5'd10);
    unique case (time_period[1:0])
      2'd0: begin d_min_tens <= 4'd0; d_min_units <= 4'd0; end
      2'd1: begin d_min_tens <= 4'd1; d_min_units <= 4'd5; end
      2'd2: begin d_min_tens <= 4'd3; d_min_units <= 4'd0; end
      2'd3: begin d_min_tens <= 4'd4; d_min_units <= 4'd5; end
    endcase
  end

  hex_display u_h3 (.t(d_hour_tens),  .q(HEX3));
  hex_display u_h2 (.t(d_hour_units), .q(HEX2));
  hex_display u_h1 (.t(d_min_tens),   .q(HEX1));
  hex_display u_h0 (.t(d_min_units),  .q(HEX0));

endmodule
