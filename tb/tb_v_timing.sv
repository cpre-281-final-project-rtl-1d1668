// tb_v_timing: checks the vertical timing over two frames at the default
// numbers (480 active, 11 front porch, 2 sync, 31 back porch, 524 lines).
// Line pulses are given every third clock; the expected v_sync, v_blank, y
// and frame_end come from the line number, and the frame period is checked
// from the spacing of frame_end.
module tb_v_timing;
  logic clk = 0, rst_n = 0, line_in = 0;
  logic v_sync, v_blank, frame_end;
  logic [9:0] y;
  int checks = 0, failures = 0;

  v_timing dut (.clk, .rst_n, .line_in, .v_sync, .v_blank, .y, .frame_end);

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
    int ln, last_end, sync_lines;
    repeat (2) @(posedge clk);
    rst_n = 1;
    last_end = -1;
    sync_lines = 0;
    for (int l = 0; l < 2 * 524; l++) begin
      line_in = 0;
      repeat (2) @(negedge clk);
      ln = l % 524;
      check(v_blank == (ln < 480), "v_blank");
      check(v_sync == !(ln == 491 || ln == 492), "v_sync");
      sync_lines += !v_sync;
      if (ln < 480) check(y == 10'(ln), "y");
      check(frame_end == 0, "frame_end only with line_in");
      line_in = 1;
      #1;
      check(frame_end == (ln == 523), "frame_end");
      if (frame_end) begin
        if (last_end >= 0) check(l - last_end == 524, "frame period 524");
        last_end = l;
      end
      @(negedge clk);
    end
    check(sync_lines == 4, "two sync lines per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
