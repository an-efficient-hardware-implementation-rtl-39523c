// int_mult: pipelined unsigned integer multiplier, the "DSP" half of the
// modular multiplier.
//
// p = a * b, registered twice (input registers and product register), the
// way a DSP slice is normally pipelined, so the product appears LAT = 2
// clock cycles after the operands. Inputs are taken every cycle. Having an
// integer multiplier separate from the reduction follows the published architecture; the
// two-stage depth is this implementation's choice.
module int_mult #(
  parameter int unsigned AW = 12,
  parameter int unsigned BW = 12
) (
  input  logic            clk,
  input  logic [AW-1:0]   a,
  input  logic [BW-1:0]   b,
  output logic [AW+BW-1:0] p
);
  logic [AW-1:0] a_q;
  logic [BW-1:0] b_q;

  always_ff @(posedge clk) begin
    a_q <= a;
    b_q <= b;
    p   <= (AW+BW)'(a_q) * (AW+BW)'(b_q);
  end
endmodule
