// char_controller: character mode, reading glyphs from the font SRAM.
//
// The font holds 256 characters of 8x16 pixels. Each glyph row is one byte,
// bit k being pixel column k (bit 0 leftmost), and two rows share one 16-bit
// SRAM word: the even row in the low byte, the odd row in the high byte. A
// glyph therefore takes 8 words, and its row r is at word
// {character code, r[3:1]}. Each character cell on screen is 16 pixels wide:
// the 8 glyph pixels followed by 8 blank pixels, and 16 lines high, so the
// 640x480 screen holds 40x30 cells, all showing the one selected character.
// The address layout, byte order, bit order and cell size follow the design.
// Taking the cell column from the low bits of the pixel column (rather than
// from a free-running counter) is this implementation's choice; both agree
// since the line length is a multiple of 16.
//
// Interface: row is the screen line mod 16 (its low 4 bits), col the low 4 bits of the pixel column.
// sram_addr is registered in enabled cycles; sram_dq is the asynchronous
// read data for it. bin is registered: it is the pixel for the row and col
// presented one enabled cycle earlier. The address is stable for a whole
// line, so sram_dq has settled long before the first active pixel.
module char_controller #(
  parameter int unsigned ADDR_W    = 20,
  parameter int unsigned CHAR_BITS = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [CHAR_BITS-1:0] char_code,
  input  logic [3:0]           row,
  input  logic [3:0]           col,
  input  logic [15:0]          sram_dq,
  output logic [ADDR_W-1:0]    sram_addr,
  output logic                 bin
);

  logic [3:0] glyph_row;
  assign glyph_row = row;   // screen line mod 16

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sram_addr <= '0;
      bin       <= 1'b0;
    end else if (en) begin
      sram_addr <= ADDR_W'({char_code, glyph_row[3:1]});
      if (col[3])
        bin <= 1'b0;                                  // 8-pixel gap
      else
        bin <= sram_dq[{glyph_row[0], col[2:0]}];     // odd rows: high byte
    end
  end

endmodule
