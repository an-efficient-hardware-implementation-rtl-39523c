// mod_add: registered modular adder, s = (a + b) mod q for a, b < q.
// The sum is computed one bit wider, q is subtracted, and the sign of the
// difference selects the result. One cycle of latency.
module mod_add
  import ntt_pkg::*;
(
  input  logic  clk,
  input  coef_t a,
  input  coef_t b,
  output coef_t s
);
  logic [CW:0]   sum;
  logic [CW+1:0] diff;

  always_comb begin
    sum  = {1'b0, a} + {1'b0, b};
    diff = {1'b0, sum} - (CW+2)'(Q);
  end

  always_ff @(posedge clk) s <= diff[CW+1] ? CW'(sum) : CW'(diff);
endmodule
