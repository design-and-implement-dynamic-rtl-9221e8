// tb_hex_display: compares the decoder with segment patterns built from the
// list of segments each digit lights (a..g, active low); codes 10..15 must be
// blank.
module tb_hex_display;
  logic [3:0] t;
  logic [6:0] q;
  int checks = 0, failures = 0;

  hex_display dut (.t, .q);

  // segments lit per digit, as strings of segment letters
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg",
                      "abc", "abcdefg", "abcdfg"};

  function automatic logic [6:0] pattern(int d);
    logic [6:0] p = 7'h7f;
    if (d < 10)
      foreach (lit[d][i]) p[lit[d][i] - "a"] = 1'b0;
    return p;
  endfunction

  initial begin
    for (int d = 0; d < 16; d++) begin
      t = 4'(d);
      #1;
      checks++;
      if (q != pattern(d)) begin
        failures++;
        $display("FAIL: digit %0d gives %b expected %b", d, q, pattern(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
