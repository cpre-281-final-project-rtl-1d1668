// vga_pkg: types and constants shared by the VGA generator.
//
// Holds the display-mode encoding of the mode state machine and the default
// 640x480 timing numbers. The horizontal numbers (16 front porch, 96 sync,
// 48 back porch, 640 active, 800 per line) and the vertical numbers (480
// active, 11 front porch, 2 sync, 31 back porch, 524 lines per frame) are the
// ones the design was specified with; the mode codes follow its state table
// (colour 000, character 001, seven-segment 010).
package vga_pkg;

  typedef enum logic [2:0] {
    MODE_COLOR = 3'b000,
    MODE_CHAR  = 3'b001,
    MODE_SEG   = 3'b010
  } mode_e;

  localparam int unsigned H_FP_DEF     = 16;
  localparam int unsigned H_SYNC_DEF   = 96;
  localparam int unsigned H_BP_DEF     = 48;
  localparam int unsigned H_ACTIVE_DEF = 640;

  localparam int unsigned V_ACTIVE_DEF = 480;
  localparam int unsigned V_FP_DEF     = 11;
  localparam int unsigned V_SYNC_DEF   = 2;
  localparam int unsigned V_BP_DEF     = 31;

  // Expand a 4-bit colour channel to 8 bits by doubling every bit,
  // b3 b3 b2 b2 b1 b1 b0 b0.
  function automatic logic [7:0] expand4(input logic [3:0] c);
    return {c[3], c[3], c[2], c[2], c[1], c[1], c[0], c[0]};
  endfunction

endpackage
