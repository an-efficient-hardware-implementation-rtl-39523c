// ntt_top: CRYSTALS-Kyber NTT / INTT core with two processing elements.
//
// Kyber's 256-coefficient transform is split into two independent 128-point
// transforms: PE 0 holds the even coefficients a[2j], PE 1 the odd ones
// a[2j+1]. One address generator drives both PEs in lockstep with the same
// addresses and twiddles, so each stage processes two butterflies per cycle.
//
// Forward (mode = MODE_NTT): each half is weighted by psi^j (psi = 17), then
// transformed by seven Gentleman-Sande stages with omega = psi^2. The result
// is exactly Kyber's NTT: dout[2i] = sum_j a[2j] * 17^((2*br7(i)+1)*j),
// dout[2i+1] likewise with a[2j+1], all mod 3329.
// Inverse (mode = MODE_INTT): seven stages (m = 1 ... 64, twiddle
// omega^-br6(k)), then
// each coefficient j is weighted by 128^-1 * psi^-j, so INTT(NTT(a)) = a.
//
// Use: with the core idle, write the 256 inputs (load_we, load_addr,
// load_data, any order, values below q), pulse start with the mode. busy
// stays high for the transform (done is set by the 641st clock edge after
// the edge that samples start, in either mode) and the 256-cycle read-out. When
// the transform ends, done rises (held until the next start) and the results
// appear on dout with dout_valid and dout_index, in index order, one per
// cycle, the first one cycle after done rises. The results also stay in the PEs, so a
// new start without loading runs the next transform on them. Loads and
// starts while busy are ignored. Synchronous active-low reset.
module ntt_top
  import ntt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load_we,
  input  logic [7:0] load_addr,
  input  coef_t      load_data,
  input  logic       start,
  input  mode_e      mode,
  output logic       busy,
  output logic       done,
  output logic       dout_valid,
  output logic [7:0] dout_index,
  output coef_t      dout
);
  localparam int unsigned AW = LOGN;

  logic             rd_valid, rd_scale, src_bank;
  logic [AW-1:0]    rd_addr_e, rd_addr_o, wr_addr_e, wr_addr_o;
  logic [TW_AW-1:0] tw_addr;
  logic             wr_en, wr_scale, dst_bank;
  logic             ag_busy, in_wait, finish, streaming, start_ok;
  logic [AW-1:0]    rdout_addr;
  coef_t            pe_data [2];

  assign busy     = ag_busy | streaming;
  assign start_ok = start && !busy;

  addr_gen #(.NPTS(N), .PIPE_LAT(8)) u_ag (
    .clk(clk), .rst_n(rst_n), .start(start_ok), .mode(mode),
    .rd_valid(rd_valid), .rd_addr_e(rd_addr_e), .rd_addr_o(rd_addr_o),
    .tw_addr(tw_addr), .rd_scale(rd_scale), .src_bank(src_bank),
    .wr_en(wr_en), .wr_addr_e(wr_addr_e), .wr_addr_o(wr_addr_o),
    .wr_scale(wr_scale), .dst_bank(dst_bank),
    .busy(ag_busy), .in_wait(in_wait), .finish(finish)
  );

  for (genvar p = 0; p < 2; p++) begin : g_pe
    pe #(.NPTS(N)) u_pe (
      .clk(clk),
      .ld_we(load_we && !busy && (load_addr[0] == 1'(p))),
      .ld_addr(load_addr[7:1]), .ld_data(load_data),
      .rdout_addr(rdout_addr), .rdout_data(pe_data[p]),
      .rd_valid(rd_valid), .rd_addr_e(rd_addr_e), .rd_addr_o(rd_addr_o),
      .tw_addr(tw_addr), .rd_scale(rd_scale), .src_bank(src_bank),
      .wr_en(wr_en), .wr_addr_e(wr_addr_e), .wr_addr_o(wr_addr_o),
      .wr_scale(wr_scale), .dst_bank(dst_bank)
    );
  end

  dout_block #(.NCOEF(2*N)) u_dout (
    .clk(clk), .rst_n(rst_n), .start(start_ok), .finish(finish),
    .rd_addr(rdout_addr), .pe_data(pe_data), .done(done),
    .streaming(streaming), .dout_valid(dout_valid),
    .dout_index(dout_index), .dout(dout)
  );
endmodule
