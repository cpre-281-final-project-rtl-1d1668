// tb_clk_div2: checks the pixel clock divider.
// After reset pix_clk must toggle every board clock and pix_en must be high
// exactly in the cycles where pix_clk is low (the cycle before it rises), so
// pix_en fires every second cycle. A reset in the middle must force both low.
module tb_clk_div2;
  logic clk = 0, rst_n = 0;
  logic pix_clk, pix_en;
  int checks = 0, failures = 0;

  clk_div2 dut (.clk, .rst_n, .pix_clk, .pix_en);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit expect_clk;
    int en_count;
    repeat (3) @(posedge clk);
    #1 check(pix_clk == 0 && pix_en == 0, "reset state");
    rst_n = 1;
    #1 check(pix_en == 1, "enable right after reset");
    expect_clk = 0;
    en_count = 0;
    for (int c = 0; c < 100; c++) begin
      @(posedge clk); #1;
      expect_clk = ~expect_clk;
      check(pix_clk == expect_clk, "pix_clk toggles");
      check(pix_en == !expect_clk, "pix_en is one cycle before the rise");
      en_count += pix_en;
    end
    check(en_count == 50, "pix_en rate is half the clock");
    rst_n = 0;
    @(posedge clk); #1;
    check(pix_clk == 0 && pix_en == 0, "mid-run reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
