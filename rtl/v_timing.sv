// v_timing: vertical VGA timing.
//
// Counts lines and decodes the vertical outputs from the count. A frame is
// 480 active lines, then an 11-line front porch, a 2-line sync pulse and a
// 31-line back porch, 524 lines in all. v_sync is low during the sync lines
// and v_blank is high only during the active lines (active-low blank). The
// line numbers follow the design; the design derived the vertical signals
// from two separate counters, which are merged into one here.
//
// Interface: the counter advances on line_in, the line_end pulse of the
// horizontal timing, so a new line starts together with the next front
// porch of the horizontal counter. y is the active line number (0..479),
// meaningful while v_blank is high. frame_end pulses with the line_in of the
// last line of the frame. Reset (synchronous) selects line 0.
module v_timing #(
  parameter int unsigned V_ACTIVE = vga_pkg::V_ACTIVE_DEF,
  parameter int unsigned V_FP     = vga_pkg::V_FP_DEF,
  parameter int unsigned V_SYNC   = vga_pkg::V_SYNC_DEF,
  parameter int unsigned V_BP     = vga_pkg::V_BP_DEF
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       line_in,
  output logic       v_sync,
  output logic       v_blank,
  output logic [9:0] y,
  output logic       frame_end
);

  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [9:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n)
      cnt <= '0;
    else if (line_in)
      cnt <= (cnt == 10'(V_TOTAL - 1)) ? '0 : cnt + 10'd1;
  end

  always_comb begin
    v_blank   = (cnt < 10'(V_ACTIVE));
    v_sync    = !((cnt >= 10'(V_ACTIVE + V_FP)) && (cnt < 10'(V_ACTIVE + V_FP + V_SYNC)));
    y         = v_blank ? cnt : '0;
    frame_end = line_in && (cnt == 10'(V_TOTAL - 1));
  end

endmodule
