// clk32_div: synchronous divide-by-32.
//
// Five toggle stages in a synchronous chain form a 5-bit counter; stage k
// toggles when all lower stages are 1. The top stage is the input rate
// divided by 32. The design uses two of these to cut the screen into 32x32
// pixel blocks: one counting pixels and cleared outside active video, one
// counting lines and cleared outside the active frame.
//
// Interface: counts enabled cycles (en); rst_n is a synchronous clear that
// wins over en. q is the count, div the divided square wave (q[4]) and tick
// a one-cycle pulse in the enabled cycle that wraps the count from 31 to 0,
// i.e. once every 32 counted events.
module clk32_div (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  output logic [4:0] q,
  output logic       div,
  output logic       tick
);

  logic [4:0] t;   // toggle enables of the five stages

  assign t[0] = en;
  assign t[1] = t[0] & q[0];
  assign t[2] = t[1] & q[1];
  assign t[3] = t[2] & q[2];
  assign t[4] = t[3] & q[3];

  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else        q <= q ^ t;
  end

  assign div  = q[4];
  assign tick = t[4] & q[4];

endmodule
