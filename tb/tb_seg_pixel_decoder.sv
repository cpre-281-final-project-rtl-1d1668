// tb_seg_pixel_decoder: checks every block position of a digit cell with
// many segment patterns. The expected layout is drawn as a picture, one
// string per block row, each character naming the segment of that block
// ('.' for none); a block must be lit exactly when its segment input is 0.
module tb_seg_pixel_decoder;
  logic [4:0] data;
  logic [6:0] seg_n;
  logic lit;
  int checks = 0, failures = 0;

  seg_pixel_decoder dut (.data, .seg_n, .lit);

  string picture[8] = '{"....", ".AA.", "F..B", "F..B",
                        ".GG.", "E..C", "E..C", ".DD."};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lit_seen = 0;
    for (int p = 0; p < 128; p++) begin
      seg_n = 7'(p);
      for (int rc = 0; rc < 32; rc++) begin
        byte ch;
        bit expect_lit;
        data = 5'(rc);
        #1;
        ch = picture[rc / 4][rc % 4];
        expect_lit = (ch != byte'(".")) && !seg_n[ch - byte'("A")];
        checks++;
        lit_seen += lit;
        if (lit != expect_lit) begin
          failures++;
          $display("FAIL row %0d col %0d segments %b", rc / 4, rc % 4, seg_n);
        end
      end
    end
    checks++;
    if (lit_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
