// tb_char_controller: checks character mode against a random font held in
// the SRAM model. For random character codes and every glyph row and cell
// column, the address must be {code, row[3:1]} and the pixel must be bit
// {row[0], col[2:0]} of the word read, or 0 in the 8-column gap; the pixel
// appears one enabled cycle after its row and column are presented.
module tb_char_controller;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0]  char_code = 0;
  logic [3:0]  row = 0, col = 0;
  logic [15:0] sram_dq;
  logic [19:0] sram_addr;
  logic bin;
  int checks = 0, failures = 0;

  char_controller dut (.clk, .rst_n, .en, .char_code, .row, .col, .sram_dq, .sram_addr, .bin);

  sram_model #(.ADDR_W(20)) u_sram (
    .addr(sram_addr), .ce_n(1'b0), .oe_n(1'b0), .we_n(1'b1), .ub_n(1'b0), .lb_n(1'b0),
    .dq_out(sram_dq)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #10000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference font: byte per glyph row, two rows per word, even row low
  function automatic bit font_pixel(int code, int r, int c);
    logic [15:0] word;
    logic [7:0]  line;
    word = u_sram.mem[code * 8 + r / 2];
    line = (r % 2) ? word[15:8] : word[7:0];
    return line[c];
  endfunction

  initial begin
    int ones = 0, zeros = 0;
    for (int a = 0; a < 2**20; a++) u_sram.mem[a] = (a < 2048) ? 16'($urandom) : 16'h0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      char_code = (t == 0) ? 8'h41 : 8'($urandom);
      for (int r = 0; r < 16; r++) begin
        row = 4'(r);
        col = 0;
        en = 1;
        @(negedge clk);
        check(sram_addr == 20'({char_code, row[3:1]}), "SRAM address");
        for (int c = 0; c < 16; c++) begin
          bit exp;
          col = 4'(c);
          en = 0;
          @(negedge clk);          // no enable: the pixel must not move
          en = 1;
          @(negedge clk);
          exp = (c < 8) ? font_pixel(char_code, r, c) : 1'b0;
          check(bin == exp, "glyph pixel");
          if (c < 8) begin ones += exp; zeros += !exp; end
        end
      end
    end
    en = 0;
    check(ones > 0 && zeros > 0, "both pixel values seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
