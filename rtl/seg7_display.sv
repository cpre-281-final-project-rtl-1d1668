// seg7_display: seven-segment mode, big digits drawn on the screen.
//
// The 640x480 picture is cut into 32x32-pixel blocks, a 20x15 grid. Each
// digit takes 4 block columns plus one empty column as a gap, 5 columns in
// all, so the width holds 4 digit positions; a digit uses the top 8 block
// rows (see seg_pixel_decoder for which block belongs to which segment).
// Two divide-by-32 counters (clk32_div) make the blocks: one counts pixels
// and is cleared outside active video, one counts lines and is cleared
// outside the active frame. Their ticks step a column-in-digit counter
// (0..4), a digit counter and a block-row counter. The digit counter selects
// one of the digit values, hex7seg turns it into active-low segments and
// seg_pixel_decoder tells whether the current block is lit. The block grid,
// the 4+1 column digit and the divide-by-32 counters follow the design.
// The digit_en mask (a disabled position stays dark) and leftmost digit =
// digits[0] are this implementation's choices.
//
// Interface: en is the pixel enable; h_active and v_active are the
// active-high video windows (the timing blocks' blank outputs); line_end
// pulses on the last active pixel of a line. bin is registered and gives the
// pixel presented one enabled cycle earlier.
module seg7_display #(
  parameter int unsigned NUM_DIGITS = 4,
  parameter int unsigned CELL_W     = 5   // block columns per digit, gap included
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  h_active,
  input  logic                  v_active,
  input  logic                  line_end,
  input  logic [3:0]            digits [NUM_DIGITS],
  input  logic [NUM_DIGITS-1:0] digit_en,
  output logic                  bin
);

  logic       x_tick, y_tick;
  logic [2:0] sub;      // block column inside the digit cell
  logic [2:0] digit;    // digit position, counts past the last one at the right edge
  logic [3:0] brow;     // block row

  clk32_div u_xdiv (
    .clk, .rst_n(rst_n & h_active), .en(en & h_active),
    .q(), .div(), .tick(x_tick)
  );

  clk32_div u_ydiv (
    .clk, .rst_n(rst_n & v_active), .en(line_end & v_active),
    .q(), .div(), .tick(y_tick)
  );

  always_ff @(posedge clk) begin
    if (!(rst_n && h_active)) begin
      sub   <= '0;
      digit <= '0;
    end else if (x_tick) begin
      if (sub == 3'(CELL_W - 1)) begin
        sub   <= '0;
        digit <= digit + 3'd1;
      end else begin
        sub <= sub + 3'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!(rst_n && v_active)) brow <= '0;
    else if (y_tick)          brow <= brow + 4'd1;
  end

  logic [3:0] value;
  logic [6:0] seg_n;
  logic       lit, shown;

  always_comb begin
    // digit multiplexer: the value and enable of the current position
    value = '0;
    shown = 1'b0;
    for (int d = 0; d < NUM_DIGITS; d++) begin
      if (32'(digit) == d) begin
        value = digits[d];
        shown = digit_en[d];
      end
    end
    shown = shown && (sub < 3'd4) && (brow < 4'd8);
  end

  hex7seg u_hex (.hex(value), .seg_n(seg_n));

  seg_pixel_decoder u_pix (
    .data({brow[2:0], sub[1:0]}), .seg_n(seg_n), .lit(lit)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)  bin <= 1'b0;
    else if (en) bin <= shown && lit && h_active && v_active;
  end

endmodule
