// tb_colorizer: checks the colorizer against a reference model. Random
// switch colours, mode flags, binary pixels and enables are applied; the
// model stores the bit-doubled colour in colour mode and produces the stored
// colour, or black, from bin otherwise, one enabled cycle later.
module tb_colorizer;
  logic clk = 0, rst_n = 0, en = 0, bin = 0, color_flag = 0;
  logic [3:0] i_r = 0, i_g = 0, i_b = 0;
  logic [7:0] r, g, b;
  int checks = 0, failures = 0;

  colorizer dut (.clk, .rst_n, .en, .bin, .color_flag, .i_r, .i_g, .i_b, .r, .g, .b);

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

  // doubling written bit by bit: bit k of the result is bit k/2 of c
  function automatic logic [7:0] dbl(logic [3:0] c);
    logic [7:0] v;
    for (int k = 0; k < 8; k++) v[k] = c[k / 2];
    return v;
  endfunction

  initial begin
    logic [23:0] stored, out_exp;
    int lit = 0, dark = 0, loads = 0;
    repeat (2) @(negedge clk);
    check({r, g, b} == 0, "reset to black");
    rst_n = 1;
    stored = 0; out_exp = 0;
    for (int c = 0; c < 2000; c++) begin
      en = ($urandom_range(0, 2) != 0);
      color_flag = ($urandom_range(0, 4) == 0);
      bin = $urandom_range(0, 1);
      {i_r, i_g, i_b} = 12'($urandom);
      @(negedge clk);
      if (en) begin
        if (color_flag) begin
          stored = {dbl(i_r), dbl(i_g), dbl(i_b)};
          out_exp = stored;
          loads++;
        end else if (bin) begin
          out_exp = stored; lit++;
        end else begin
          out_exp = 0; dark++;
        end
      end
      check({r, g, b} == out_exp, "colour output");
    end
    check(loads > 0 && lit > 0 && dark > 0, "all three cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
