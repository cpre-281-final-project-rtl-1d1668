// tb_pixel_source_mux: checks the pixel selection for every mode code and
// both input bits: character mode passes char_bin, seven-segment mode
// passes seg_bin, colour mode gives 0.
module tb_pixel_source_mux;
  import vga_pkg::*;
  mode_e mode;
  logic char_bin, seg_bin, bin;
  int checks = 0, failures = 0;

  pixel_source_mux dut (.mode, .char_bin, .seg_bin, .bin);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode_e modes[3] = '{MODE_COLOR, MODE_CHAR, MODE_SEG};
    for (int m = 0; m < 3; m++) begin
      for (int v = 0; v < 4; v++) begin
        bit exp;
        mode = modes[m];
        {char_bin, seg_bin} = 2'(v);
        #1;
        exp = (m == 1) ? char_bin : (m == 2) ? seg_bin : 1'b0;
        checks++;
        if (bin != exp) begin
          failures++;
          $display("FAIL mode %0d inputs %b", m, v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
