// hex7seg: hexadecimal digit to seven-segment pattern.
//
// Combinational. seg_n[0] is segment A (top) through seg_n[6], segment G
// (middle), in the usual clockwise A-F order. Outputs are active low, as the
// board's segment decoder was: a 0 lights the segment. The digit shapes for
// 0-9 and A, b, C, d, E, F are the common ones and are this
// implementation's choice.
module hex7seg (
  input  logic [3:0] hex,
  output logic [6:0] seg_n
);

  logic [6:0] seg;   // active high, bit 0 = A

  always_comb begin
    unique case (hex)
      4'h0: seg = 7'b0111111;
      4'h1: seg = 7'b0000110;
      4'h2: seg = 7'b1011011;
      4'h3: seg = 7'b1001111;
      4'h4: seg = 7'b1100110;
      4'h5: seg = 7'b1101101;
      4'h6: seg = 7'b1111101;
      4'h7: seg = 7'b0000111;
      4'h8: seg = 7'b1111111;
      4'h9: seg = 7'b1101111;
      4'hA: seg = 7'b1110111;
      4'hB: seg = 7'b1111100;
      4'hC: seg = 7'b0111001;
      4'hD: seg = 7'b1011110;
      4'hE: seg = 7'b1111001;
      4'hF: seg = 7'b1110001;
    endcase
    seg_n = ~seg;
  end

endmodule
