// vga_top: 640x480 VGA generator with colour, character and seven-segment
// modes.
//
// The 50 MHz board clock is halved to the pixel rate. Horizontal and
// vertical counters produce the sync pulses, the active-video windows and
// the pixel coordinates. A three-state mode machine, loaded from three
// switches while the push button is held, selects what is drawn:
//   colour mode (000)   the whole screen in the 12-bit colour set on sw
//                       (sw[3:0] red, sw[7:4] green, sw[11:8] blue);
//   character mode (001) the character whose code is on sw[7:0], repeated
//                       over the screen, its glyph read from an external
//                       1M x 16 asynchronous font SRAM;
//   seven-segment (010) sw[3:0], sw[7:4] and sw[11:8] as three large hex
//                       digits; the fourth digit position stays dark.
// The one-bit pixel of the active mode goes to the colorizer, which paints
// it in the colour last chosen in colour mode. Two AND gates merge the
// horizontal and vertical blanks into vga_blank_n and the two sync pulses
// into vga_sync_n; vga_hs and vga_vs go out separately. All of this is the
// design's structure; the switch-to-channel order and using only three of
// the four digit positions follow its user manual.
//
// Choices of this implementation: one clock domain (the board clock) with a
// pixel enable; the push button is active low and is used as a level; the
// sync and blank outputs are delayed by two pixels so that they line up
// with the two register stages in the pixel path (pixel generator, then
// colorizer); the SRAM is only read, with its chip, output and byte enables
// held active and write disabled. The font fills 2048 words, so
// sram_addr[19:11] is always 0, and mode[2] is always 0 since only three
// states exist.
//
// frame_end pulses for one board-clock cycle at the end of every frame.
//
// Reset: rst_n is synchronous and active low; it puts the timing at the
// start of a line and frame and the mode machine in colour mode.
module vga_top
  import vga_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] sw,
  input  logic [2:0]  mode_sw,
  input  logic        key_n,
  output logic [19:0] sram_addr,
  input  logic [15:0] sram_dq,
  output logic        sram_ce_n,
  output logic        sram_oe_n,
  output logic        sram_we_n,
  output logic        sram_ub_n,
  output logic        sram_lb_n,
  output logic        vga_clk,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic [2:0]  mode,
  output logic        frame_end
);

  // ---------------------------------------------------------------- timing
  logic       pix_en;
  logic       h_sync, h_blank, line_end;
  logic       v_sync, v_blank;
  logic [9:0] x, y;

  clk_div2 u_clkdiv (.clk, .rst_n, .pix_clk(vga_clk), .pix_en(pix_en));

  h_timing u_h (
    .clk, .rst_n, .en(pix_en),
    .h_sync(h_sync), .h_blank(h_blank), .x(x), .line_end(line_end)
  );

  v_timing u_v (
    .clk, .rst_n, .line_in(line_end),
    .v_sync(v_sync), .v_blank(v_blank), .y(y), .frame_end(frame_end)
  );

  // ------------------------------------------------------------ mode select
  mode_e state;
  logic  color_s, char_s, seg_s;

  mode_fsm u_fsm (
    .clk, .rst_n, .en(pix_en), .w(~key_n), .i(mode_sw),
    .state(state), .color_s(color_s), .char_s(char_s), .seg_s(seg_s)
  );

  assign mode = state;

  // ------------------------------------------------------- pixel generators
  logic char_bin, seg_bin, bin;

  char_controller u_char (
    .clk, .rst_n, .en(pix_en),
    .char_code(sw[7:0]), .row(y[3:0]), .col(x[3:0]),
    .sram_dq(sram_dq), .sram_addr(sram_addr), .bin(char_bin)
  );

  logic [3:0] digits [4];
  assign digits[0] = sw[3:0];
  assign digits[1] = sw[7:4];
  assign digits[2] = sw[11:8];
  assign digits[3] = 4'h0;

  seg7_display u_seg (
    .clk, .rst_n, .en(pix_en),
    .h_active(h_blank), .v_active(v_blank), .line_end(line_end),
    .digits(digits), .digit_en(4'b0111), .bin(seg_bin)
  );

  pixel_source_mux u_mux (.mode(state), .char_bin(char_bin), .seg_bin(seg_bin), .bin(bin));

  colorizer u_col (
    .clk, .rst_n, .en(pix_en), .bin(bin), .color_flag(color_s),
    .i_r(sw[3:0]), .i_g(sw[7:4]), .i_b(sw[11:8]),
    .r(vga_r), .g(vga_g), .b(vga_b)
  );

  // -------------------------------------- sync/blank aligned with the pixels
  logic [3:0] ctl_d1, ctl_d2;   // {h_sync, v_sync, h_blank, v_blank}

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctl_d1 <= 4'b1100;
      ctl_d2 <= 4'b1100;
    end else if (pix_en) begin
      ctl_d1 <= {h_sync, v_sync, h_blank, v_blank};
      ctl_d2 <= ctl_d1;
    end
  end

  assign vga_hs      = ctl_d2[3];
  assign vga_vs      = ctl_d2[2];
  assign vga_sync_n  = ctl_d2[3] & ctl_d2[2];
  assign vga_blank_n = ctl_d2[1] & ctl_d2[0];

  // ------------------------------------------------------------ font SRAM
  assign sram_ce_n = 1'b0;
  assign sram_oe_n = 1'b0;
  assign sram_we_n = 1'b1;
  assign sram_ub_n = 1'b0;
  assign sram_lb_n = 1'b0;

endmodule
