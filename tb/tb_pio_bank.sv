// tb_pio_bank: writes random values to every LED PIO at its address and
// checks the board outputs and the read-back, checks that writes outside the
// LED spans (other offsets, the KEY PIO, foreign addresses) change nothing,
// that the KEY PIO reads the input port, and that reset clears the LEDs.
module tb_pio_bank;
  localparam int unsigned N = 18;
  localparam logic [31:0] BASE = 32'h0180_3000;

  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] address = '0, writedata = '0, readdata;
  logic write = 1'b0, read = 1'b0;
  logic [4:0] key = '0;
  logic [3:0] led [N];
  logic [3:0] model [N];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pio_bank dut (.clk, .rst, .address, .write, .writedata, .read, .readdata,
                .in_port_key(key), .out_port_led(led));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    address = a; writedata = d; write = 1'b1;
    @(negedge clk);
    write = 1'b0;
  endtask

  task automatic check_all(string tag);
    for (int i = 0; i < N; i++) begin
      check(led[i] == model[i], $sformatf("%s: LED %0d is %0d expected %0d", tag, i, led[i], model[i]));
      address = BASE + 32'(i) * 32'h10; read = 1'b1; #1;
      check(readdata == 32'(model[i]), $sformatf("%s: read-back of LED %0d", tag, i));
      read = 1'b0;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    foreach (model[i]) model[i] = '0;
    check_all("after reset");
    for (int r = 0; r < 200; r++) begin
      int i = int'($urandom_range(0, N - 1));
      logic [31:0] d = $urandom;
      bus_write(BASE + 32'(i) * 32'h10, d);
      model[i] = d[3:0];
      // writes that must not land anywhere
      bus_write(BASE + 32'(i) * 32'h10 + 32'h4, $urandom);
      bus_write(BASE + 32'h120, $urandom);
      bus_write(BASE - 32'h10, $urandom);
      bus_write(BASE + 32'h130, $urandom);
    end
    check_all("after writes");
    // KEY input port
    for (int r = 0; r < 20; r++) begin
      key = 5'($urandom);
      address = BASE + 32'h120; read = 1'b1; #1;
      check(readdata == 32'(key), "KEY PIO reads the input");
      read = 1'b0;
    end
    address = BASE + 32'h200; read = 1'b1; #1;
    check(readdata == 0, "unmapped address reads 0");
    read = 1'b0;
    // reset clears the LEDs
    @(negedge clk); rst = 1'b1; @(negedge clk); rst = 1'b0;
    foreach (model[i]) model[i] = '0;
    check_all("after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
