// mode_fsm: display-mode state machine.
//
// Three states: colour mode (000), character mode (001) and seven-segment
// mode (010). While the load input w is low the state holds. While w is high
// the state is loaded from the three mode switches I2..I0 when they hold one
// of the codes 001 or 010, and returns to colour mode for any other code.
// This is the design's next-state table: S2 = 0,
// S1 = ~w*S1 + w*~I2*I1*~I0, S0 = ~w*S0 + w*~I2*~I1*I0.
//
// Interface: the register is clocked on clk and changes only in cycles
// where en (the pixel enable) is high. w is the push button, already made
// active high. The state is also decoded into one flag per mode. Reset
// (synchronous) selects colour mode, the state the board starts in.
module mode_fsm
  import vga_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       w,
  input  logic [2:0] i,
  output mode_e      state,
  output logic       color_s,
  output logic       char_s,
  output logic       seg_s
);

  mode_e next;

  always_comb begin
    next = state;
    if (w) begin
      unique case (i)
        3'b001:  next = MODE_CHAR;
        3'b010:  next = MODE_SEG;
        default: next = MODE_COLOR;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= MODE_COLOR;
    else if (en) state <= next;
  end

  assign color_s = (state == MODE_COLOR);
  assign char_s  = (state == MODE_CHAR);
  assign seg_s   = (state == MODE_SEG);

  // S2 is never set: only the three listed states can be reached.
  a_legal_state: assert property (@(posedge clk) disable iff (!rst_n)
                                  state inside {MODE_COLOR, MODE_CHAR, MODE_SEG});

endmodule
