// pe: processing element of the NTT core.
//
// Holds one 128-coefficient half of the polynomial in two DATA BRAMs (bank 0
// and bank 1, true dual-port) used ping-pong: each pass reads every
// coefficient from the source bank and writes the results to the other bank.
// A TW BRAM (tw_rom) supplies the twiddle factor or weight, and one NTT2
// butterfly does the arithmetic.
//
// Read side: with rd_valid, port A of the source bank reads rd_addr_e and
// port B reads rd_addr_o; one cycle later the words reach the butterfly as
// in0 and in1, together with the twiddle read at tw_addr. In a weighting pass
// (rd_scale) the butterfly gets in0 = 0 and in1 = the port A word, so it acts
// as a multiplier. Write side: with wr_en, the destination bank dst_bank
// stores the even output at wr_addr_e (port A) and the odd output at
// wr_addr_o (port B); in a weighting pass only the product is written, at
// wr_addr_e. The address generator lines the write up with the butterfly's
// 7-cycle latency.
// When no pass is running, port A of bank 0 takes the load writes (ld_we,
// ld_addr, ld_data) and port B of bank 0 serves result reads (rdout_addr ->
// rdout_data one cycle later). Inputs are loaded into, and results are read
// from, bank 0. The three-memory organisation follows the published architecture; the port
// assignment is this implementation's.
module pe
  import ntt_pkg::*;
#(
  parameter int unsigned NPTS = 128,
  localparam int unsigned AW  = $clog2(NPTS)
) (
  input  logic             clk,
  // load port (bank 0, port A)
  input  logic             ld_we,
  input  logic [AW-1:0]    ld_addr,
  input  coef_t            ld_data,
  // result read port (bank 0, port B)
  input  logic [AW-1:0]    rdout_addr,
  output coef_t            rdout_data,
  // pass control from the address generator
  input  logic             rd_valid,
  input  logic [AW-1:0]    rd_addr_e,
  input  logic [AW-1:0]    rd_addr_o,
  input  logic [TW_AW-1:0] tw_addr,
  input  logic             rd_scale,
  input  logic             src_bank,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr_e,
  input  logic [AW-1:0]    wr_addr_o,
  input  logic             wr_scale,
  input  logic             dst_bank
);
  logic [AW-1:0] addr_a [2], addr_b [2];
  logic          we_a   [2], we_b   [2];
  coef_t         wd_a   [2], wd_b   [2];
  coef_t         rd_a   [2], rd_b   [2];
  coef_t         tw, bf_in0, bf_in1, even_out, odd_out;
  logic          src_q, scale_q;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    always_comb begin
      if (wr_en && (dst_bank == 1'(b))) begin
        addr_a[b] = wr_addr_e;
        we_a[b]   = 1'b1;
        wd_a[b]   = wr_scale ? odd_out : even_out;
        addr_b[b] = wr_addr_o;
        we_b[b]   = !wr_scale;
        wd_b[b]   = odd_out;
      end else if (rd_valid && (src_bank == 1'(b))) begin
        addr_a[b] = rd_addr_e;
        we_a[b]   = 1'b0;
        wd_a[b]   = '0;
        addr_b[b] = rd_addr_o;
        we_b[b]   = 1'b0;
        wd_b[b]   = '0;
      end else begin
        addr_a[b] = ld_addr;
        we_a[b]   = ld_we && (b == 0);
        wd_a[b]   = ld_data;
        addr_b[b] = rdout_addr;
        we_b[b]   = 1'b0;
        wd_b[b]   = '0;
      end
    end

    dp_bram #(.DEPTH(NPTS), .WIDTH(CW)) u_data (
      .clk(clk),
      .addr_a(addr_a[b]), .we_a(we_a[b]), .wdata_a(wd_a[b]), .rdata_a(rd_a[b]),
      .addr_b(addr_b[b]), .we_b(we_b[b]), .wdata_b(wd_b[b]), .rdata_b(rd_b[b])
    );
  end

  tw_rom u_tw (.clk(clk), .addr(tw_addr), .data(tw));

  always_ff @(posedge clk) begin
    src_q   <= src_bank;
    scale_q <= rd_scale;
  end

  always_comb begin
    bf_in0 = scale_q ? '0 : rd_a[src_q];
    bf_in1 = scale_q ? rd_a[src_q] : rd_b[src_q];
  end

  ntt2 u_bf (.clk(clk), .in0(bf_in0), .in1(bf_in1), .mul_in(tw),
             .even_out(even_out), .odd_out(odd_out));

  assign rdout_data = rd_b[0];
endmodule
