// tb_hex7seg: checks all 16 digits. The expected shapes are written as the
// set of lit segment letters; a segment output must be 0 exactly when its
// letter is in the set.
module tb_hex7seg;
  logic [3:0] hex;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;

  hex7seg dut (.hex, .seg_n);

  string shapes[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                        "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                        "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 16; h++) begin
      hex = 4'(h);
      #1;
      for (int s = 0; s < 7; s++) begin
        bit on;
        on = 0;
        for (int k = 0; k < shapes[h].len(); k++)
          if (shapes[h][k] == byte'("a" + s)) on = 1;
        checks++;
        if (seg_n[s] != !on) begin
          failures++;
          $display("FAIL digit %h segment %0d", h, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
