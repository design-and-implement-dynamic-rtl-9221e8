// tb_hours_display: presses the button (active low) many times with random
// press and release lengths and checks that the selection advances once per
// press, within three clocks, and wraps after the last hour (23). A second
// instance with 96 periods on 7 bits checks the wrap at 95.
module tb_hours_display;
  logic clk = 1'b0, rst = 1'b1, key_n = 1'b1;
  logic [4:0] hours;
  logic [6:0] hours96;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  hours_display dut (.clk, .rst, .key_n, .hours);
  hours_display #(.NUM_PERIODS(96), .WIDTH(7)) dut96 (.clk, .rst, .key_n, .hours(hours96));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp24 = 0, exp96 = 0;
    repeat (4) @(negedge clk);
    checks++; if (hours != 0 || hours96 != 0) begin failures++; $display("FAIL: reset"); end
    rst = 1'b0;
    for (int p = 0; p < 200; p++) begin
      key_n = 1'b0;                          // press
      repeat (3) @(negedge clk);
      exp24 = (exp24 + 1) % 24;
      exp96 = (exp96 + 1) % 96;
      checks++;
      if (hours != 5'(exp24) || hours96 != 7'(exp96)) begin
        failures++;
        $display("FAIL: press %0d shows %0d/%0d expected %0d/%0d", p, hours, hours96, exp24, exp96);
      end
      repeat ($urandom_range(0, 5)) @(negedge clk);
      key_n = 1'b1;                          // release
      repeat ($urandom_range(3, 8)) @(negedge clk);
      checks++;
      if (hours != 5'(exp24)) begin
        failures++;
        $display("FAIL: release changed the selection");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
