// mont_red_sub: one word-level Montgomery reduction step (Modulo Reduction
// sub-block) for an NTT-friendly modulus q = QH * 2^8 + 1.
//
// The input T is split into its low byte T1L and the rest T1H = T >> 8. With
// T2 = -T1L mod 2^8 (two's complement), T + T2 * q is a multiple of 2^8, and
// (T + T2 * q) / 2^8 = T1H + QH * T2 + Cin, where the carry Cin out of
// T1L + T2 is 1 exactly when T1L != 0, computed as T2[7] | T1L[7]. The
// output is therefore congruent to T * 2^-8 mod q and needs no multiplier by
// -q^-1. Purely combinational; the caller registers the result.
module mont_red_sub
  import ntt_pkg::*;
#(
  parameter int unsigned IN_W  = 24,
  parameter int unsigned OUT_W = 16
) (
  input  logic [IN_W-1:0]  t_in,
  output logic [OUT_W-1:0] t_out
);
  logic [W-1:0]      t1l, t2;
  logic [IN_W-W-1:0] t1h;
  logic              cin;

  always_comb begin
    t1l   = t_in[W-1:0];
    t1h   = t_in[IN_W-1:W];
    t2    = W'(~t1l + W'(1));
    cin   = t2[W-1] | t1l[W-1];
    t_out = OUT_W'(OUT_W'(t1h) + OUT_W'(QH) * OUT_W'(t2) + OUT_W'(cin));
  end
endmodule
