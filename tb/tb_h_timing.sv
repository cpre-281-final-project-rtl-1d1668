// tb_h_timing: checks the horizontal timing over three lines at the default
// 640x480 numbers. The pixel enable is high every second clock. For every
// pixel the expected h_sync, h_blank, x and line_end come from the position
// in the line (front porch 16, sync 96, back porch 48, active 640); the
// line period is checked to be 800 pixels from the spacing of line_end.
module tb_h_timing;
  logic clk = 0, rst_n = 0, en = 0;
  logic h_sync, h_blank, line_end;
  logic [9:0] x;
  int checks = 0, failures = 0;

  h_timing dut (.clk, .rst_n, .en, .h_sync, .h_blank, .x, .line_end);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos, last_end, sync_len, active_len;
    repeat (2) @(posedge clk);
    rst_n = 1;
    last_end = -1;
    for (int p = 0; p < 3 * 800; p++) begin
      // one pixel: enable low for a cycle (nothing may move), then high
      en = 0;
      @(negedge clk);
      pos = p % 800;
      check(h_sync == !(pos >= 16 && pos < 112), "h_sync");
      check(h_blank == (pos >= 160), "h_blank");
      if (pos >= 160) check(x == 10'(pos - 160), "x");
      check(line_end == 0, "no line_end without enable");
      en = 1;
      #1;
      check(line_end == (pos == 799), "line_end");
      if (line_end) begin
        if (last_end >= 0) check(p - last_end == 800, "line period 800");
        last_end = p;
      end
      @(negedge clk);
    end
    en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
