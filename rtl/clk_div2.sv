// clk_div2: pixel clock from the 50 MHz board clock.
//
// A single toggle flip-flop divides the board clock by two, giving the
// 25 MHz square wave used as the VGA pixel clock (the nominal 25.175 MHz
// is not needed exactly). The divided clock is brought out for the video
// DAC; the rest of the design stays on the board clock and uses pix_en, a
// one-cycle enable that is high in the board-clock cycle whose rising edge
// also raises pix_clk. Using an enable rather than clocking logic from the
// divided wave is this implementation's choice.
//
// Timing: pix_clk and pix_en are 0 during reset (rst_n low, synchronous);
// afterwards pix_en is high every second cycle, starting with the first
// cycle after reset.
module clk_div2 (
  input  logic clk,
  input  logic rst_n,
  output logic pix_clk,
  output logic pix_en
);

  always_ff @(posedge clk) begin
    if (!rst_n) pix_clk <= 1'b0;
    else        pix_clk <= ~pix_clk;
  end

  // pix_clk rises at the next edge exactly when it is low now.
  assign pix_en = rst_n & ~pix_clk;

endmodule
