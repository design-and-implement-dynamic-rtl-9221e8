// tb_simple_counter: checks that the PWM time base resets to 0, steps by one
// every clock and wraps from 15 to 0.
module tb_simple_counter;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] cnt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  simple_counter dut (.clk, .rst, .counter_out(cnt));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_v;
    @(negedge clk); @(negedge clk);
    checks++; if (cnt != 0) begin failures++; $display("FAIL: reset value %0d", cnt); end
    rst = 1'b0;
    expect_v = 0;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      expect_v = (expect_v + 1) % 16;
      checks++;
      if (cnt != 4'(expect_v)) begin failures++; $display("FAIL: step %0d count %0d expected %0d", i, cnt, expect_v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
