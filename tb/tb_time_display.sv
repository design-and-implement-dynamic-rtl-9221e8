// tb_time_display: for every period 0..95 checks the four digits shown one
// clock later against the period's start time HH:MM, decoding the segment
// patterns back to digits.
module tb_time_display;
  logic clk = 1'b0;
  logic [6:0] period = '0;
  logic [6:0] HEX0, HEX1, HEX2, HEX3;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  time_display dut (.clk, .time_period(period), .HEX0, .HEX1, .HEX2, .HEX3);

  // segments a..g (bit 0..6) lit, active low, for digits 0..9
  localparam logic [6:0] SEG [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19,
                                      7'h12, 7'h02, 7'h78, 7'h00, 7'h10};

  function automatic int digit(logic [6:0] s);
    for (int d = 0; d < 10; d++) if (s == SEG[d]) return d;
    return -1;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 96; p++) begin
      int hh, mm, shown;
      @(negedge clk);
      period = 7'(p);
      @(negedge clk);                      // one register stage
      hh = p / 4;
      mm = (p % 4) * 15;
      shown = digit(HEX3) * 1000 + digit(HEX2) * 100 + digit(HEX1) * 10 + digit(HEX0);
      checks++;
      if (shown != hh * 100 + mm || digit(HEX3) < 0 || digit(HEX2) < 0 ||
          digit(HEX1) < 0 || digit(HEX0) < 0) begin
        failures++;
        $display("FAIL: period %0d shows %0d expected %02d%02d", p, shown, hh, mm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
