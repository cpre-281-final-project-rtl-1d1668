// tb_seg7_display: checks seven-segment mode over two 640x480 frames with
// random digits and random digit enables. The testbench sweeps the screen
// itself (a few blank cycles before each line, line_end on the last active
// pixel, some blank lines after the frame, pixel enable every second
// clock) and computes each pixel, which bin shows right after the
// enabled edge of that position, from its position: block column x/32,
// digit (x/32)/5, column in the digit (x/32)%5, block row y/32, and the
// segment picture of the digit's hex value.
module tb_seg7_display;
  logic clk = 0, rst_n = 0, en = 0;
  logic h_active = 0, v_active = 0, line_end = 0;
  logic [3:0] digits [4];
  logic [3:0] digit_en;
  logic bin;
  int checks = 0, failures = 0;

  seg7_display dut (.clk, .rst_n, .en, .h_active, .v_active, .line_end,
                    .digits, .digit_en, .bin);

  always #5 clk = ~clk;

  initial begin
    #100000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string shapes[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                        "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                        "cdefg", "adef", "bcdeg", "adefg", "aefg"};
  string picture[8] = '{"....", ".AA.", "F..B", "F..B",
                        ".GG.", "E..C", "E..C", ".DD."};

  function automatic bit expected(int x, int y);
    int bc, d, sub, br;
    byte ch;
    bc = x / 32; d = bc / 5; sub = bc % 5; br = y / 32;
    if (d >= 4 || !digit_en[d] || sub == 4 || br >= 8) return 0;
    ch = picture[br][sub];
    if (ch == byte'(".")) return 0;
    for (int k = 0; k < shapes[digits[d]].len(); k++)
      if (shapes[digits[d]][k] == ch - byte'("A") + byte'("a")) return 1;
    return 0;
  endfunction

  // one pixel period: a cycle without enable, then one with it
  task automatic pixel(bit ha, bit le);
    h_active = ha; line_end = 0; en = 0;
    @(negedge clk);
    line_end = le; en = 1;
    @(negedge clk);
  endtask

  initial begin
    int lit = 0, dark = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int d = 0; d < 4; d++) digits[d] = (f == 0) ? 4'(d + 8) : 4'($urandom);
      digit_en = (f == 0) ? 4'b1111 : 4'b0101;
      v_active = 1;
      for (int y = 0; y < 480; y++) begin
        for (int b = 0; b < 6; b++) pixel(0, 0);
        for (int x = 0; x < 640; x++) begin
          bit e;
          pixel(1, x == 639);
          e = expected(x, y);
          checks++;
          if (bin != e) begin
            failures++;
            if (failures < 10) $display("FAIL pixel %0d,%0d got %b", x, y, bin);
          end
          lit += bin; dark += !bin;
        end
      end
      v_active = 0;
      for (int l = 0; l < 3; l++) for (int b = 0; b < 20; b++) pixel(0, 0);
    end
    checks++;
    if (lit == 0 || dark == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
