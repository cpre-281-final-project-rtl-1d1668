// tb_vga_top: end-to-end test of the VGA generator at its default 640x480
// timing, six full frames.
//
// The font SRAM is a behavioural model filled with a random font. The
// testbench changes the switches and presses the button right at the end of
// each frame (frame_end), stepping through: colour mode, character mode,
// seven-segment mode, a frame where only the mode switches change (no
// press, the mode must hold), an unused mode code (must fall back to colour
// mode) and character mode again.
//
// The checker samples the outputs once per pixel and rebuilds the screen
// position from the sync and blank outputs alone: the line period (800),
// the hsync width (96), the start of active video 144 pixels after the
// hsync edge, 640 active pixels per line, the frame period (524 lines),
// the vsync width (2 lines) and 480 active lines per frame are all checked.
// Every active pixel is compared with the colour computed from its
// position, the mode and the switches of that frame. Each mechanism (each
// mode, the hold, the fallback, lit and dark pixels, the glyph gap) is
// counted, and one that never happened counts as a failure.
module tb_vga_top;
  logic clk = 0, rst_n = 0, key_n = 1;
  logic [11:0] sw = 12'hA5C;
  logic [2:0]  mode_sw = 3'b000;
  logic [19:0] sram_addr;
  logic [15:0] sram_dq;
  logic sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n;
  logic vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n, frame_end;
  logic [7:0] vga_r, vga_g, vga_b;
  logic [2:0] mode;
  int checks = 0, failures = 0;

  vga_top dut (.*);

  sram_model #(.ADDR_W(20)) u_sram (
    .addr(sram_addr), .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n),
    .ub_n(sram_ub_n), .lb_n(sram_lb_n), .dq_out(sram_dq)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #70000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
  string shapes[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                        "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                        "cdefg", "adef", "bcdeg", "adefg", "aefg"};
  string picture[8] = '{"....", ".AA.", "F..B", "F..B",
                        ".GG.", "E..C", "E..C", ".DD."};

  function automatic logic [7:0] dbl(logic [3:0] c);
    logic [7:0] v;
    for (int k = 0; k < 8; k++) v[k] = c[k / 2];
    return v;
  endfunction

  function automatic bit font_pixel(int code, int x, int y);
    logic [15:0] word;
    logic [7:0]  line;
    if (x % 16 >= 8) return 0;
    word = u_sram.mem[code * 8 + (y % 16) / 2];
    line = (y % 2) ? word[15:8] : word[7:0];
    return line[x % 8];
  endfunction

  function automatic bit seg_pixel(logic [11:0] s, int x, int y);
    int bc, d, sub, br;
    byte ch;
    logic [3:0] v;
    bc = x / 32; d = bc / 5; sub = bc % 5; br = y / 32;
    if (d >= 3 || sub == 4 || br >= 8) return 0;
    v = s[4*d +: 4];
    ch = picture[br][sub];
    if (ch == byte'(".")) return 0;
    for (int k = 0; k < shapes[v].len(); k++)
      if (shapes[v][k] == ch - byte'("A") + byte'("a")) return 1;
    return 0;
  endfunction

  // what the current frame should show
  logic [2:0]  exp_mode = 3'b000;
  logic [11:0] exp_sw = 12'hA5C;
  logic [23:0] exp_color;
  int frames_color = 0, frames_char = 0, frames_seg = 0;
  int holds = 0, fallbacks = 0;
  int lit_char = 0, dark_char = 0, gap_char = 0, lit_seg = 0, dark_seg = 0;

  // ------------------------------------------------------------ stimulus
  task automatic next_frame(logic [2:0] msw, logic [11:0] s, bit press);
    @(negedge clk iff frame_end);
    // the colorizer keeps loading the switches while in colour mode, so
    // the data switches move only once the new mode is in place
    mode_sw = msw;
    if (press) begin
      key_n = 0;
      repeat (4) @(negedge clk);
      key_n = 1;
    end
    sw = s;
  endtask

  initial begin
    for (int a = 0; a < 2**20; a++) u_sram.mem[a] = (a < 2048) ? 16'($urandom) : 16'h0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    // F0: colour mode from reset
    exp_color = {dbl(sw[3:0]), dbl(sw[7:4]), dbl(sw[11:8])};
    frames_color++;
    // F1: character mode, code 'A' plus noise in the unused switches
    next_frame(3'b001, 12'h341, 1);
    exp_mode = 3'b001; exp_sw = sw; frames_char++;
    // F2: seven-segment mode, digits 9, E, 2
    next_frame(3'b010, 12'h2E9, 1);
    exp_mode = 3'b010; exp_sw = sw; frames_seg++;
    // F3: mode switches moved but no press: stays in seven-segment mode
    next_frame(3'b001, 12'h805, 0);
    exp_sw = sw; frames_seg++;
    if (mode == 3'b010) holds++;
    // F4: unused code 110 falls back to colour mode, new colour
    next_frame(3'b110, 12'h3F7, 1);
    exp_mode = 3'b000; exp_sw = sw; frames_color++;
    exp_color = {dbl(sw[3:0]), dbl(sw[7:4]), dbl(sw[11:8])};
    fallbacks++;
    // F5: character mode, random code, painted in the F4 colour
    next_frame(3'b001, 12'($urandom), 1);
    exp_mode = 3'b001; exp_sw = sw; frames_char++;
    @(negedge clk iff frame_end);
    repeat (10) @(negedge clk);
    check(frames_color == 2 && frames_char == 2 && frames_seg == 2, "all frames run");
    check(holds == 1, "mode held without a press");
    check(fallbacks == 1, "unused code fell back to colour mode");
    check(lit_char > 0 && dark_char > 0 && gap_char > 0, "character pixels lit, dark and gap");
    check(lit_seg > 0 && dark_seg > 0, "segment pixels lit and dark");
    check(lines_checked == 6 * 480, "active lines seen");
    check(frames_checked >= 5, "vsync periods seen");
    $display("mechanisms: colour frames %0d, char frames %0d, seg frames %0d, holds %0d, fallbacks %0d",
             frames_color, frames_char, frames_seg, holds, fallbacks);
    $display("pixels: char lit %0d dark %0d gap %0d, seg lit %0d dark %0d",
             lit_char, dark_char, gap_char, lit_seg, dark_seg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ checker
  int lines_checked = 0, frames_checked = 0;

  initial begin
    int n = 0, last_hs_fall = -1, hs_low = 0, since_fall = 0;
    int run = 0, y_next = 0, y = 0, lines_since_vs = 0, last_vs_line = -1;
    int vs_low = 0, line_no = 0;
    bit prev_hs = 1, prev_vs = 1, prev_blank = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (frame_end) y_next = 0;
      if (vga_clk) begin
        n++;
        since_fall++;
        // horizontal sync
        if (prev_hs && !vga_hs) begin
          if (last_hs_fall >= 0) check(n - last_hs_fall == 800, "line period 800");
          last_hs_fall = n;
          since_fall = 0;
          line_no++;
        end
        if (!vga_hs) hs_low++;
        if (!prev_hs && vga_hs) begin check(hs_low == 96, "hsync width 96"); hs_low = 0; end
        // vertical sync
        if (prev_vs && !vga_vs) begin
          if (last_vs_line >= 0) begin
            check(line_no - last_vs_line == 524, "frame period 524 lines");
            frames_checked++;
          end
          last_vs_line = line_no;
        end
        if (!vga_vs) vs_low++;
        if (!prev_vs && vga_vs) begin check(vs_low == 2 * 800, "vsync width 2 lines"); vs_low = 0; end
        check(vga_sync_n == (vga_hs && vga_vs), "sync_n is the AND of both syncs");
        // active video
        if (!prev_blank && vga_blank_n) begin
          check(since_fall == 144, "active video starts 144 pixels after hsync");
          run = 0;
          y = y_next++;
          lines_checked++;
        end
        if (prev_blank && !vga_blank_n) check(run == 640, "640 active pixels");
        if (vga_blank_n) begin
          logic [23:0] want;
          bit b;
          case (exp_mode)
            3'b001: begin
              b = font_pixel(exp_sw[7:0], run, y);
              if (run % 16 >= 8) gap_char++;
              else if (b) lit_char++;
              else dark_char++;
            end
            3'b010: begin
              b = seg_pixel(exp_sw, run, y);
              if (b) lit_seg++; else dark_seg++;
            end
            default: b = 1;
          endcase
          want = b ? exp_color : 24'h0;
          check({vga_r, vga_g, vga_b} == want, "pixel colour");
          if ({vga_r, vga_g, vga_b} != want && failures < 20)
            $display("  pixel %0d,%0d mode %b want %h got %h", run, y, exp_mode, want, {vga_r, vga_g, vga_b});
          check(y < 480, "at most 480 active lines");
          run++;
        end
        if (vga_blank_n) check(mode == exp_mode, "mode output");
        prev_hs = vga_hs; prev_vs = vga_vs; prev_blank = vga_blank_n;
      end
    end
  end
endmodule
