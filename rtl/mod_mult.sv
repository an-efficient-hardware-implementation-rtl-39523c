// mod_mult: 12-bit Montgomery modular multiplier, res = a * b * 2^-16 mod q.
//
// An int_mult (2-cycle pipelined 12x12 product) feeds a mont_reduce (3
// cycles), so the result appears LAT = 5 cycles after the operands, one
// result per cycle. Operands must be below q. To get a plain product a * b
// mod q, pass b in Montgomery form (b * 2^16 mod q); the twiddle memory does
// exactly that.
module mod_mult
  import ntt_pkg::*;
(
  input  logic  clk,
  input  coef_t a,
  input  coef_t b,
  output coef_t res
);
  logic [23:0] p;

  int_mult #(.AW(CW), .BW(CW)) u_mul (.clk(clk), .a(a), .b(b), .p(p));
  mont_reduce u_red (.clk(clk), .c(p), .res(res));
endmodule
