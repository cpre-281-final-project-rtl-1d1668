// seg_pixel_decoder: which segment covers a block of a big digit.
//
// A digit cell is 4 blocks wide (col 0..3) and 8 blocks high (row 0..7),
// each block 32x32 pixels. Row 0 stays empty. A is the top bar (row 1,
// cols 1-2), F and B the upper sides (rows 2-3, col 0 and col 3), G the
// middle bar (row 4, cols 1-2), E and C the lower sides (rows 5-6, col 0 and
// col 3) and D the bottom bar (row 7, cols 1-2). Corner blocks stay empty.
// This layout is the design's. The block is lit when its segment is on;
// segments arrive active low from the hex decoder, so a 0 lights it.
//
// Interface: combinational. data = {row[2:0], col[1:0]}; seg_n[0] is A
// through seg_n[6], G.
module seg_pixel_decoder (
  input  logic [4:0] data,
  input  logic [6:0] seg_n,
  output logic       lit
);

  logic [2:0] row;
  logic [1:0] col;
  logic       bar, left, right;

  assign row   = data[4:2];
  assign col   = data[1:0];
  assign bar   = (col == 2'd1) || (col == 2'd2);
  assign left  = (col == 2'd0);
  assign right = (col == 2'd3);

  always_comb begin
    lit = 1'b0;
    unique case (row)
      3'd1:       if (bar) lit = ~seg_n[0];                 // A
      3'd2, 3'd3: if (right) lit = ~seg_n[1];               // B
                  else if (left) lit = ~seg_n[5];           // F
      3'd4:       if (bar) lit = ~seg_n[6];                 // G
      3'd5, 3'd6: if (right) lit = ~seg_n[2];               // C
                  else if (left) lit = ~seg_n[4];           // E
      3'd7:       if (bar) lit = ~seg_n[3];                 // D
      default:    lit = 1'b0;
    endcase
  end

endmodule
