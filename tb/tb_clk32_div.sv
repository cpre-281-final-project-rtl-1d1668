// tb_clk32_div: checks the divide-by-32 counter. Enables arrive at random;
// the count must follow a reference counter, tick must fire exactly on the
// enable that wraps 31 to 0, div must be the top bit, and a clear must win.
module tb_clk32_div;
  logic clk = 0, rst_n = 0, en = 0;
  logic [4:0] q;
  logic div, tick;
  int checks = 0, failures = 0;

  clk32_div dut (.clk, .rst_n, .en, .q, .div, .tick);

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
    int ref_cnt, ticks, events;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    ref_cnt = 0; ticks = 0; events = 0;
    for (int c = 0; c < 3000; c++) begin
      en = ($urandom_range(0, 3) != 0);
      if (c == 1500) rst_n = 0;
      #1;
      check(q == 5'(ref_cnt), "count");
      check(div == (ref_cnt >= 16), "div is the top bit");
      check(tick == (en && rst_n && ref_cnt == 31), "tick");
      ticks += tick;
      @(negedge clk);
      if (!rst_n) ref_cnt = 0;
      else if (en) begin ref_cnt = (ref_cnt + 1) % 32; events++; end
      rst_n = 1;
    end
    check(ticks > 50 && events > 1600, "enough ticks seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
