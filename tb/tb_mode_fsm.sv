// tb_mode_fsm: checks the mode state machine against its state table.
// From each of the three states every combination of the load input w and
// the mode switches is applied; the state must hold while w is low or the
// pixel enable is low, go to 001 or 010 for those codes, and to colour mode
// (000) for every other code. The mode flags must match the state.
module tb_mode_fsm;
  import vga_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, w = 0;
  logic [2:0] i = 0;
  mode_e state;
  logic color_s, char_s, seg_s;
  int checks = 0, failures = 0;

  mode_fsm dut (.clk, .rst_n, .en, .w, .i, .state, .color_s, .char_s, .seg_s);

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

  // expected next state, written as the two K-map equations
  function automatic logic [2:0] next_of(logic [2:0] s, logic wv, logic [2:0] iv);
    logic s1, s0;
    s1 = (!wv && s[1]) || (wv && !iv[2] && iv[1] && !iv[0]);
    s0 = (!wv && s[0]) || (wv && !iv[2] && !iv[1] && iv[0]);
    return {1'b0, s1, s0};
  endfunction

  task automatic go_to(logic [2:0] s);
    @(negedge clk); w = 1; i = s; en = 1;
    @(negedge clk); w = 0; en = 0;
  endtask

  initial begin
    logic [2:0] start, exp;
    repeat (2) @(negedge clk);
    check(state == MODE_COLOR, "reset to colour mode");
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      start = (s == 0) ? 3'b000 : (s == 1) ? 3'b001 : 3'b010;
      for (int wi = 0; wi < 2; wi++) begin
        for (int code = 0; code < 8; code++) begin
          go_to(start);
          check(state == start, "reached start state");
          // enable low: nothing may change
          @(negedge clk); w = wi[0]; i = 3'(code); en = 0;
          @(negedge clk);
          check(state == start, "hold without enable");
          en = 1;
          @(negedge clk); en = 0; w = 0;
          exp = next_of(start, wi[0], 3'(code));
          check(state == exp, "next state");
          check(color_s == (exp == 3'b000) && char_s == (exp == 3'b001)
                && seg_s == (exp == 3'b010), "mode flags");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
