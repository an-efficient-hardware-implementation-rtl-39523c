// ntt_pkg: constants, types and elaboration-time helper functions shared by
// the Kyber NTT core.
//
// Kyber works modulo q = 3329 = 13 * 2^8 + 1. The core treats the 256-point
// Kyber transform as two 128-point transforms (even and odd coefficients), so
// N = 128, LOGN = 7. Multiplication uses word-level Montgomery reduction with
// w = 8 and two words, i.e. R = 2^16; R mod q = 2285 and R^-1 mod q = 169.
// ZETA = 17 is Kyber's primitive 256-th root of unity (psi), OMEGA = ZETA^2 is
// the primitive 128-th root used by the butterflies.
package ntt_pkg;

  localparam int unsigned Q      = 3329;
  localparam int unsigned QH     = 13;     // q = QH * 2^W + 1
  localparam int unsigned W      = 8;      // Montgomery word size
  localparam int unsigned CW     = 12;     // coefficient width
  localparam int unsigned N      = 128;    // points per half transform
  localparam int unsigned LOGN   = 7;
  localparam int unsigned R_MOD_Q = 2285;  // 2^16 mod q
  localparam int unsigned ZETA   = 17;
  localparam int unsigned N_INV  = 3303;   // 128^-1 mod q

  typedef logic [CW-1:0] coef_t;

  // Transform direction requested at the top level.
  typedef enum logic {MODE_NTT = 1'b0, MODE_INTT = 1'b1} mode_e;

  // Twiddle memory layout (entries are Montgomery form x * 2^16 mod q).
  localparam int unsigned TW_FWD  = 0;     // 64 entries: omega^e
  localparam int unsigned TW_INV  = 64;    // 64 entries: omega^-e
  localparam int unsigned TW_PRE  = 128;   // 128 entries: -psi^j
  localparam int unsigned TW_POST = 256;   // 128 entries: -(n^-1 * psi^-j)
  localparam int unsigned TW_DEPTH = 384;
  localparam int unsigned TW_AW   = 9;

  function automatic int unsigned mulmod(int unsigned a, int unsigned b);
    longint unsigned p;
    p = longint'(a) * longint'(b);
    return int'(p % longint'(Q));
  endfunction

  function automatic int unsigned powmod(int unsigned b, int unsigned e);
    int unsigned r;
    r = 1;
    for (int unsigned i = 0; i < e; i++) r = mulmod(r, b);
    return r;
  endfunction

  // Modular inverse by Fermat: x^(q-2).
  function automatic int unsigned invmod(int unsigned x);
    int unsigned r, b, e;
    r = 1; b = x % Q; e = Q - 2;
    while (e != 0) begin
      if (e[0]) r = mulmod(r, b);
      b = mulmod(b, b);
      e = e >> 1;
    end
    return r;
  endfunction

  // Bit reversal of the low 'bits' bits of x.
  function automatic int unsigned bitrev(int unsigned x, int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < bits; i++) r = (r << 1) | ((x >> i) & 1);
    return r;
  endfunction

  // Content of twiddle memory address a (see layout above).
  function automatic int unsigned tw_value(int unsigned a);
    int unsigned omega, v;
    omega = mulmod(ZETA, ZETA);
    if (a < TW_INV)        v = powmod(omega, a - TW_FWD);
    else if (a < TW_PRE)   v = powmod(invmod(omega), a - TW_INV);
    else if (a < TW_POST)  v = (Q - powmod(ZETA, a - TW_PRE)) % Q;
    else if (a < TW_DEPTH) v = (Q - mulmod(N_INV, powmod(invmod(ZETA), a - TW_POST))) % Q;
    else                   v = 0;
    return mulmod(v, R_MOD_Q);
  endfunction

endpackage
