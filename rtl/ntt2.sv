// ntt2: the butterfly unit (NTT2) of a processing element.
//
// Gentleman-Sande butterfly on two 12-bit coefficients and a twiddle factor:
//   E = (in0 + in1) mod q
//   O = (in0 - in1) * mul_in * 2^-16 mod q
// mul_in is expected in Montgomery form, so O = (in0 - in1) * twiddle.
// The modular adder and subtractor are registered (1 cycle); the difference
// then goes through the 5-cycle Montgomery multiplier and one output flip-flop.
// The sum is carried along a shift register of the same length, so E and O
// leave together LAT = 7 cycles after the inputs, one butterfly per cycle.
// With in0 = 0 the unit is a modular multiplier: O = -in1 * mul_in, which is
// why the weights in the twiddle memory are stored negated.
module ntt2
  import ntt_pkg::*;
(
  input  logic  clk,
  input  coef_t in0,
  input  coef_t in1,
  input  coef_t mul_in,
  output coef_t even_out,
  output coef_t odd_out
);
  localparam int unsigned LAT = 7;

  coef_t sum, diff, mul_q, prod, odd_q;
  coef_t e_sr [LAT-1];

  mod_add u_add (.clk(clk), .a(in0), .b(in1), .s(sum));
  mod_sub u_sub (.clk(clk), .a(in0), .b(in1), .d(diff));
  mod_mult u_mul (.clk(clk), .a(diff), .b(mul_q), .res(prod));

  always_ff @(posedge clk) begin
    mul_q    <= mul_in;
    odd_q    <= prod;
    e_sr[0]  <= sum;
    for (int i = 1; i < LAT-1; i++) e_sr[i] <= e_sr[i-1];
  end

  assign even_out = e_sr[LAT-2];
  assign odd_out  = odd_q;
endmodule
