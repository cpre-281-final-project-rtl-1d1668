// colorizer: turns a one-bit pixel into the 24-bit VGA colour.
//
// In colour mode (color_flag high) it takes the 4-bit red, green and blue
// switch values, widens each to 8 bits by doubling every bit, stores the
// result and drives it on every pixel, so the whole screen shows that
// colour. In any other mode the stored colour is kept and painted where the
// binary pixel bin is 1; pixels where bin is 0 are black. Leaving colour
// mode therefore keeps the last colour chosen. All of this follows the
// design; the reset value (black) is this implementation's choice.
//
// Timing: one register stage. The outputs update in enabled cycles (en, the
// pixel enable) from the inputs of that cycle, so they lag bin by one pixel.
module colorizer
  import vga_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       bin,
  input  logic       color_flag,
  input  logic [3:0] i_r,
  input  logic [3:0] i_g,
  input  logic [3:0] i_b,
  output logic [7:0] r,
  output logic [7:0] g,
  output logic [7:0] b
);

  logic [7:0] s_r, s_g, s_b;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {s_r, s_g, s_b} <= '0;
      {r, g, b}       <= '0;
    end else if (en) begin
      if (color_flag) begin
        s_r <= expand4(i_r);
        s_g <= expand4(i_g);
        s_b <= expand4(i_b);
        r   <= expand4(i_r);
        g   <= expand4(i_g);
        b   <= expand4(i_b);
      end else if (bin) begin
        r <= s_r;
        g <= s_g;
        b <= s_b;
      end else begin
        {r, g, b} <= '0;
      end
    end
  end

endmodule
