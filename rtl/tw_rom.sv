// tw_rom: twiddle-factor memory (TW BRAM) of a processing element.
//
// A read-only table of 384 12-bit words, all in Montgomery form
// (value * 2^16 mod q), with ZETA = 17 and OMEGA = ZETA^2 = 289:
//   [  0.. 63]  OMEGA^e              forward butterfly twiddles
//   [ 64..127]  OMEGA^-e             inverse butterfly twiddles
//   [128..255]  -ZETA^j              forward input weights (psi^j)
//   [256..383]  -(128^-1 * ZETA^-j)  inverse output weights
// The weights are negated because the butterfly multiplies by -in1 when used
// as a plain multiplier. The table is computed at elaboration time by
// ntt_pkg::tw_value, so no data file is needed. Synchronous read, one cycle
// of latency, like the block RAM it stands for.
module tw_rom
  import ntt_pkg::*;
(
  input  logic             clk,
  input  logic [TW_AW-1:0] addr,
  output coef_t            data
);
  typedef coef_t table_t [TW_DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned a = 0; a < TW_DEPTH; a++) t[a] = CW'(tw_value(a));
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) data <= (int'(addr) < TW_DEPTH) ? TABLE[addr] : '0;
endmodule
