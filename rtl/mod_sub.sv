// mod_sub: registered modular subtractor, d = (a - b) mod q for a, b < q.
// The raw difference is computed one bit wider; when it is negative, q is
// added back. One cycle of latency.
module mod_sub
  import ntt_pkg::*;
(
  input  logic  clk,
  input  coef_t a,
  input  coef_t b,
  output coef_t d
);
  logic [CW:0] diff;

  always_comb diff = {1'b0, a} - {1'b0, b};

  always_ff @(posedge clk) d <= diff[CW] ? CW'(diff[CW-1:0] + CW'(Q)) : CW'(diff);
endmodule
