// tb_brightness: for every level 0..15, runs the comparator against a
// free-running 0..15 count for several frames and checks that the LED is lit
// for exactly 'level' of every 16 cycles, and that it follows the count one
// cycle late.
module tb_brightness;
  logic clk = 1'b0;
  logic [3:0] factor = '0, counter = '0;
  logic out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  brightness dut (.clk, .factor, .counter, .out);

  always @(posedge clk) counter <= counter + 1'b1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int lvl = 0; lvl < 16; lvl++) begin
      int on;
      @(negedge clk);
      factor = 4'(lvl);
      repeat (20) @(negedge clk);          // settle
      on = 0;
      for (int c = 0; c < 64; c++) begin
        // out now reflects the count of the previous cycle
        checks++;
        if (out != (4'(counter - 1'b1) < factor)) begin
          failures++;
          $display("FAIL: level %0d count %0d out %0d", lvl, counter, out);
        end
        on += int'(out);
        @(negedge clk);
      end
      checks++;
      if (on != 4 * lvl) begin
        failures++;
        $display("FAIL: level %0d lit %0d of 64 cycles", lvl, on);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
