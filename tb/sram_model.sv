// sram_model: behavioural model of the board's asynchronous 1M x 16 SRAM,
// for simulation only.
//
// Reads are combinational: with the chip and output enabled and write
// disabled, dq_out shows mem[addr] at once; otherwise dq_out is 0 (the
// simulator has no high-impedance state). The byte enables gate the two
// halves. Writes are not modelled; testbenches fill mem directly.
module sram_model #(
  parameter int unsigned ADDR_W = 20
) (
  input  logic [ADDR_W-1:0] addr,
  input  logic              ce_n,
  input  logic              oe_n,
  input  logic              we_n,
  input  logic              ub_n,
  input  logic              lb_n,
  output logic [15:0]       dq_out
);

  logic [15:0] mem [2**ADDR_W];

  always_comb begin
    dq_out = '0;
    if (!ce_n && !oe_n && we_n) begin
      if (!lb_n) dq_out[7:0]  = mem[addr][7:0];
      if (!ub_n) dq_out[15:8] = mem[addr][15:8];
    end
  end

endmodule
