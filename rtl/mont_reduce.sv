// mont_reduce: word-level Montgomery reduction, res = c * 2^-16 mod q, for
// q = 3329 and any 24-bit c < q^2.
//
// Two mont_red_sub steps take the 24-bit product to a 16-bit and then to a
// 14-bit intermediate (each step divides by 2^8 modulo q). The second value
// is below 2q, so one subtraction of q and a multiplexer finish the
// reduction. Each of the three steps is registered: the result appears
// LAT = 3 cycles after c, with a new input accepted every cycle. The
// structure follows the published architecture; the register placement is this
// implementation's choice.
module mont_reduce
  import ntt_pkg::*;
(
  input  logic        clk,
  input  logic [23:0] c,
  output coef_t       res
);
  logic [15:0] red1_d, red1_q;
  logic [13:0] red2_d, red2_q;
  logic [14:0] t4;

  mont_red_sub #(.IN_W(24), .OUT_W(16)) u_red1 (.t_in(c),      .t_out(red1_d));
  mont_red_sub #(.IN_W(16), .OUT_W(14)) u_red2 (.t_in(red1_q), .t_out(red2_d));

  // T4 = T - q; keep T when T4 is negative.
  assign t4 = {1'b0, red2_q} - 15'(Q);

  always_ff @(posedge clk) begin
    red1_q <= red1_d;
    red2_q <= red2_d;
    res    <= t4[14] ? CW'(red2_q) : CW'(t4);
  end
endmodule
