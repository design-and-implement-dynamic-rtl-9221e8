// hex_display: decoder from one decimal digit to an active-low seven-segment
// pattern, bit 0 = segment a through bit 6 = segment g (the DE2 board's
// HEXn[6:0] order, where a 0 lights the segment).
//
// Digits 0..9 give their usual shapes; codes 10..15 blank the display. Purely
// combinational.
module hex_display (
  input  logic [3:0] t,
  output logic [6:0] q
);

  always_comb begin
    unique case (t)
      4'd0:    q = 7'b1000000;
      4'd1:    q = 7'b1111001;
      4'd2:    q = 7'b0100100;
      4'd3:    q = 7'b0110000;
      4'd4:    q = 7'b0011001;
      4'd5:    q = 7'b0010010;
      4'd6:    q = 7'b0000010;
      4'd7:    q = 7'b1111000;
      4'd8:    q = 7'b0000000;
      4'd9:    q = 7'b0010000;
      default: q = 7'b1111111;
    endcase
  end

endmodule
