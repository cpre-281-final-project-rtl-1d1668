// pixel_source_mux: picks the one-bit pixel that reaches the colorizer.
//
// In character mode the glyph pixel of char_controller is passed on, in
// seven-segment mode the pixel of seg7_display; in colour mode the colorizer
// fills the screen by itself and the selected bit is 0. A multiplexer at
// this point is part of the design; the exact select encoding is this
// implementation's. Combinational.
module pixel_source_mux
  import vga_pkg::*;
(
  input  mode_e mode,
  input  logic  char_bin,
  input  logic  seg_bin,
  output logic  bin
);

  always_comb begin
    unique case (mode)
      MODE_CHAR: bin = char_bin;
      MODE_SEG:  bin = seg_bin;
      default:   bin = 1'b0;
    endcase
  end

endmodule
