// pio_bank: the parallel I/O registers through which the schedule reaches the
// board: one output register per LED and one input port for the selected hour.
//
// The bank is a memory-mapped slave. Each PIO occupies 16 bytes starting at
// BASE; its data register is at offset 0 of its span. LED PIO i (i = 0..N_LEDS-1)
// sits at BASE + 16*i, is output-only, LED_W bits wide and resets to 0; a write
// stores writedata[LED_W-1:0] and a read returns the stored value. The KEY PIO
// sits at BASE + KEY_OFFSET, is input-only and KEY_W bits wide; a read returns
// the input zero-extended and writes to it are ignored. Other addresses read 0.
// Writes take effect at the clock edge; read data is combinational (no wait
// states). The addresses, widths, directions and reset value are those of the
// report's processor system (18 LED PIOs of 4 bits from 0x01803000 in steps of
// 0x10, a 5-bit KEY PIO at 0x01803120); the simplified bus and the read-back of
// the LED registers are this design's choices.
module pio_bank #(
  parameter int unsigned N_LEDS     = 18,
  parameter int unsigned LED_W      = 4,
  parameter int unsigned KEY_W      = 5,
  parameter logic [31:0] BASE       = 32'h0180_3000,
  parameter logic [31:0] KEY_OFFSET = 32'h0000_0120
) (
  input  logic             clk,
  input  logic             rst,
  // slave port
  input  logic [31:0]      address,
  input  logic             write,
  input  logic [31:0]      writedata,
  input  logic             read,
  output logic [31:0]      readdata,
  // board side
  input  logic [KEY_W-1:0] in_port_key,
  output logic [LED_W-1:0] out_port_led [N_LEDS]
);

  logic [31:0] offset;
  assign offset = address - BASE;

  // which LED PIO the address selects, N_LEDS if none
  function automatic int unsigned led_sel(logic [31:0] off);
    for (int unsigned i = 0; i < N_LEDS; i++)
      if (off == 32'(i * 16)) return i;
    return N_LEDS;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < N_LEDS; i++) out_port_led[i] <= '0;
    end else if (write && led_sel(offset) < N_LEDS) begin
      out_port_led[led_sel(offset)] <= writedata[LED_W-1:0];
    end
  end

  always_comb begin
    readdata = '0;
    if (read) begin
      if (offset == KEY_OFFSET)
        readdata = 32'(in_port_key);
      else if (led_sel(offset) < N_LEDS)
        readdata = 32'(out_port_led[led_sel(offset)]);
    end
  end

endmodule
