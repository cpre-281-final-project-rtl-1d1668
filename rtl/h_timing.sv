// h_timing: horizontal VGA timing.
//
// One counter runs through the 800 pixel periods of a line in the order
// front porch (16), sync pulse (96), back porch (48) and active video (640),
// and both horizontal outputs are decoded from it: h_sync is low only during
// the sync pulse and h_blank is high only during active video (it is an
// active-low blank). The region order and lengths are the design's; a clean
// 0..799 counter with decoded outputs is this implementation's form of it.
//
// Interface: the counter advances when en (the pixel enable) is high.
// x is the column inside active video (0..H_ACTIVE-1) and is meaningful
// while h_blank is high. line_end pulses for one enabled cycle on the last
// pixel of the line, i.e. the last active pixel. Reset (synchronous, rst_n
// low) puts the counter at the start of the front porch.
module h_timing #(
  parameter int unsigned H_FP     = vga_pkg::H_FP_DEF,
  parameter int unsigned H_SYNC   = vga_pkg::H_SYNC_DEF,
  parameter int unsigned H_BP     = vga_pkg::H_BP_DEF,
  parameter int unsigned H_ACTIVE = vga_pkg::H_ACTIVE_DEF
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  output logic       h_sync,
  output logic       h_blank,
  output logic [9:0] x,
  output logic       line_end
);

  localparam int unsigned H_TOTAL = H_FP + H_SYNC + H_BP + H_ACTIVE;
  localparam int unsigned H_START = H_FP + H_SYNC + H_BP;

  logic [9:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n)
      cnt <= '0;
    else if (en)
      cnt <= (cnt == 10'(H_TOTAL - 1)) ? '0 : cnt + 10'd1;
  end

  always_comb begin
    h_sync   = !((cnt >= 10'(H_FP)) && (cnt < 10'(H_FP + H_SYNC)));
    h_blank  = (cnt >= 10'(H_START));
    x        = h_blank ? cnt - 10'(H_START) : '0;
    line_end = en && (cnt == 10'(H_TOTAL - 1));
  end

endmodule
