# Kyber NTT/INTT core with two butterfly processing elements

CRYSTALS-Kyber multiplies polynomials in Z_3329[x]/(x^256 + 1), and it does
that through the number theoretic transform (NTT). This core computes Kyber's
forward NTT and its inverse on 256 coefficients of 12 bits. It uses two
processing elements (PEs). Each PE holds one butterfly unit and its own
memories.

The design rests on three ideas:

- **Two independent halves.** The 256-point Kyber transform is really two
  128-point negacyclic transforms, one on the even coefficients and one on the
  odd ones. PE 0 holds a[0], a[2], ..., a[254]. PE 1 holds a[1], a[3], ...,
  a[255]. A single address generator drives both PEs with the same addresses
  and twiddles, so two butterflies complete every cycle.
- **Ping-pong memories.** Each PE has two dual-port coefficient banks. A
  stage reads a butterfly pair from one bank through both ports, and writes
  the two results into the other bank through both ports. So one butterfly
  per cycle needs no memory conflicts and no reordering buffers.
- **Word-level Montgomery multiplication.** The modulus q = 3329 equals
  13·2^8 + 1. Because of that, Montgomery reduction by 2^8 needs only a
  two's complement, a multiply by 13 and an add. There is no multiplication
  by −q⁻¹. Two such steps divide by R = 2^16.

## What the core computes

The forward mode (`mode = MODE_NTT`) produces exactly Kyber's NTT, in
Kyber's standard output order. With ζ = 17 and br7 the 7-bit bit reversal:

    dout[2i]   = Σ_j a[2j]   · ζ^((2·br7(i)+1)·j)  mod 3329
    dout[2i+1] = Σ_j a[2j+1] · ζ^((2·br7(i)+1)·j)  mod 3329      i, j = 0..127

The inverse mode (`MODE_INTT`) computes the exact inverse, so
INTT(NTT(a)) = a. It includes the factor 1/128. In Kyber's reference code the
factor is a Montgomery constant, but here the result carries no Montgomery
factor.

Each direction is eight passes over both halves:

| pass      | forward (NTT)                                   | inverse (INTT)                                     |
|-----------|-------------------------------------------------|----------------------------------------------------|
| weighting | first: a[j] ← a[j]·ψ^j                          | last: a[j] ← a[j]·128⁻¹·ψ^−j                       |
| stages    | 7 Gentleman-Sande stages, m = 64, 32, …, 1      | 7 Gentleman-Sande stages, m = 1, 2, …, 64          |
| twiddle   | ω^(2^(s−1)·k), ω = ψ² = 289                     | ω^−br6(k), ω⁻¹ = 2419                              |

Here ψ = ζ = 17 is a primitive 256-th root of unity, and j indexes the 128
words of one half. A forward stage s (1..7, with m = 2^(7−s)) pairs index
i_e = 2·j·m + k with i_o = i_e + m. Every butterfly computes

    E = (U + V) mod q          O = (U − V) · W mod q

The ψ weighting turns the cyclic 128-point transform into the negacyclic
one. Without it the stages alone would give the plain cyclic NTT. The forward
stages take a normal-order input and leave a bit-reversed result. Combined
with the weighting, that bit-reversed order is exactly Kyber's order. The
inverse stages take that order back to normal order.

A weighting pass uses the butterfly as a plain multiplier. It drives in0 = 0
and in1 = the coefficient, so O = −in1·W. The weights in the twiddle table
are stored negated to cancel that sign.

## Address generator and pass timing

`addr_gen` is a three-state machine (IDLE, NTT, WAIT).

- **NTT state.** It issues one read per cycle from a counter c.
  - In a butterfly stage with distance m, i_e is c with a 0 inserted at bit
    log2(m), and i_o = i_e | m.
  - The forward twiddle exponent is the part of c below that bit, shifted
    up to a multiple of 2^(s−1).
  - The inverse twiddle is ω^−br6(c >> log2(m)).
  - A weighting pass reads index c from 0 to 127.
- **Write addresses.** Every read enters an 8-deep delay line. The delay
  line produces the write enable and the write addresses exactly when the
  PE's results arrive: 1 cycle for the memory read plus 7 for the butterfly.
- **WAIT state.** After the last read of a pass, the machine waits until the
  last result has been written. Only then does the next pass start, because
  it reads the bank that was just written.
- **End of a transform.** After the eighth pass the machine returns to IDLE
  and pulses `finish`. The eight passes alternate banks 0→1→0…, so the
  result always ends in bank 0, where the inputs were loaded.

| pass             | issue cycles | WAIT cycles |
|------------------|-------------:|------------:|
| weighting        | 128          | 8           |
| each of 7 stages | 64           | 8           |
| total            | 576          | 64          |

From the clock edge that samples `start` to `done` takes **641 cycles**, in
either direction. After that, the 256 results stream out in another 256
cycles.

## Montgomery multiplier

`mod_mult` = `int_mult` (12×12 product, 2 pipeline stages) followed by
`mont_reduce` (3 stages). Its result is a·b·2^−16 mod q, five cycles after
the operands, with one result per cycle.

One reduction step (`mont_red_sub`) splits T into T1H = T >> 8 and
T1L = T mod 2^8, and computes:

    T2  = (−T1L) mod 2^8                (two's complement of the low byte)
    Cin = T2[7] | T1L[7]                (= 1 exactly when T1L ≠ 0)
    T'  = T1H + 13·T2 + Cin             (= (T + T2·q) / 2^8)

The step maps a 24-bit product below q² to at most 46 580, which fits in 16
bits. A second step maps that to at most 3 497, which is below 2q. One
subtraction of q and a multiplexer finish the reduction. Since
2^−16 ≡ 169 (mod 3329), the twiddle memory stores every constant x as
x·2285 mod q, because 2285 = 2^16 mod q. The multiplier then returns the
plain product.

## Butterfly and processing element

`ntt2` registers the modular sum and difference (`mod_add`, `mod_sub`,
1 cycle). The difference and the twiddle (also registered once) enter the
multiplier (5 cycles), followed by one output flip-flop. The sum travels down
a 6-stage shift register, so E and O leave together **7 cycles** after the
inputs.

`pe` wraps the butterfly with:

- two `dp_bram` banks (128 × 12, true dual-port, synchronous read-first);
- one `tw_rom`.

During a pass, the source bank's ports A and B read i_e and i_o, and the
destination bank's ports A and B write E and O. A weighting pass writes only
the product, through port A. Between transforms, port A of bank 0 takes the
load writes and port B of bank 0 serves the result reads.

The twiddle memory holds 384 words, computed at elaboration by
`ntt_pkg::tw_value`. All entries are in Montgomery form (×2^16 mod q):

| addresses | content              |
|-----------|----------------------|
| 0–63      | ω^e                  |
| 64–127    | ω^−e                 |
| 128–255   | −ψ^j                 |
| 256–383   | −128⁻¹·ψ^−j          |

Both PEs hold identical tables.

## Interface (`ntt_top`)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of the control logic (memories are not reset) |
| `load_we`, `load_addr`, `load_data` | in | 1, 8, 12 | write coefficient `load_addr` (any order, value < q) while idle |
| `start`, `mode` | in | 1, 1 | start a transform; `mode_e`: 0 = NTT, 1 = INTT |
| `busy` | out | 1 | transform or read-out running; loads and starts are ignored |
| `done` | out | 1 | rises when the transform finishes, held until the next start |
| `dout_valid`, `dout_index`, `dout` | out | 1, 8, 12 | results in index order 0…255, one per cycle, the first one cycle after `done` rises |

A new `start` without reloading transforms the result held in bank 0 again.
This is how an NTT can be followed directly by an INTT.

## Where this departs from the published design

The core follows a published architecture: two PEs, an NTT2 butterfly with a
word-level Montgomery multiplier, three memories per PE, an IDLE/NTT/WAIT
address generator and a DOUT block. Some of its details are this design's
own:

- **One butterfly per PE.** The published description also mentions two
  butterflies inside each PE. Here there are two butterflies in total, one
  per PE, and each PE works on its own half.
- **Weighting pass.** The ψ weighting of the negacyclic convolution is an
  extra pass on the PE's multiplier. For the INTT it is merged with the 1/n
  scaling. That makes 8 passes where the published design speaks of 7 NTT
  states.
- **Latency.** It is 641 cycles for both NTT and INTT. The published figures
  are 686 cycles for the NTT and 842 for the INTT, and their breakdown is not
  known, so they are not reproduced.
- **Fixed at two PEs.** The architecture allows up to n/2 PEs, as long as
  the count is a power of two. This RTL is built around exactly two, one per
  half. More PEs would need a second level of address interleaving inside
  each half.
- **Memories.** The published design gives several memory counts. Here each
  PE has two 128-word data banks and its own 384-word twiddle table. Only one
  port of the twiddle table is used.
- **Own choices.** These were not specified: pipeline depths (multiplier 2+3,
  adder 1, butterfly 7), the load/read-out interface, `busy`, `dout_index`,
  the reset behaviour and the bank-port assignment.

## Verification

Every module has a self-checking testbench in `tb/`, and each one ends by
printing `TB_RESULT checks=… failures=…`.

- `tb_ntt_top` runs the full-size core end to end with random polynomials:
  - a forward NTT against Kyber's definition, evaluated directly in the
    testbench;
  - an INTT chained on that result, which must return the original input;
  - an INTT of fresh data against the inverse definition.
- Along the way, `tb_ntt_top` also checks:
  - the 641-cycle latency;
  - the output order;
  - that a load and a start issued while busy are ignored;
  - that every mechanism occurred: weighting passes, 24 WAIT states, ignored
    requests and a chained run.
- `tb_polymul` multiplies two random polynomials modulo x^256 + 1 through
  the core. It runs NTT(a) and NTT(b) on the core, then Kyber's base
  multiplication in the testbench: coefficient pair (2p, 2p+1) is a residue
  modulo x² − 17^(2·br7(p)+1). It loads that product, runs the INTT on the
  core, and compares with the schoolbook product.
- `tb_addr_gen` compares every read against the loops of the iterative NTT
  and INTT, and checks write timing, bank alternation and WAIT lengths.
- The arithmetic testbenches compare against integer formulas on corner
  cases and random operands, including the exact cycle latency.

To run one with Verilator:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/ntt_pkg.sv tb/tb_ntt_top.sv --top-module tb_ntt_top
    ./obj_dir/Vtb_ntt_top

Use the same command with any other `tb/tb_<module>.sv`. The full-size test
finishes in well under a second.

## Files

- `rtl/ntt_pkg.sv`: constants (q, 13, 2^8, n = 128), types (`coef_t`,
  `mode_e`), modular helper functions and the twiddle-table
  formula.
- `rtl/ntt_top.sv`: the top level.
- `rtl/addr_gen.sv`, `rtl/pe.sv`, `rtl/dout_block.sv`: controller,
  processing element and output block.
- `rtl/ntt2.sv`, `rtl/mod_add.sv`, `rtl/mod_sub.sv`, `rtl/mod_mult.sv`,
  `rtl/int_mult.sv`, `rtl/mont_reduce.sv`, `rtl/mont_red_sub.sv`: the
  arithmetic.
- `rtl/dp_bram.sv`, `rtl/tw_rom.sv`: the memories.
