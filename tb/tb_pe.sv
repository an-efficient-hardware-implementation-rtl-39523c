// tb_pe: drives one processing element directly, playing the role of the
// address generator with its own schedule (writes 8 cycles after reads):
//   1. load 128 random coefficients x[j] into bank 0;
//   2. weighting pass bank 0 -> bank 1 with the forward weights, which must
//      give y[j] = x[j] * 17^j mod q;
//   3. butterfly pass bank 1 -> bank 0 on the pairs (c, c + 64) with twiddle
//      omega^c, which must give y[c] + y[c+64] and (y[c] - y[c+64]) * 289^c;
//   4. read bank 0 back through the result port and compare.
module tb_pe;
  import ntt_pkg::*;
  localparam int unsigned PL = 8;

  logic clk = 1'b0;
  logic ld_we;
  logic [6:0] ld_addr, rdout_addr, rd_addr_e, rd_addr_o, wr_addr_e, wr_addr_o;
  coef_t ld_data, rdout_data;
  logic rd_valid, rd_scale, src_bank, wr_en, wr_scale, dst_bank;
  logic [8:0] tw_addr;
  int checks = 0, failures = 0;
  longint unsigned x [128], y [128], z [128];

  pe #(.NPTS(128)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned pw(longint unsigned b, int e);
    longint unsigned r = 1;
    repeat (e) r = (r * b) % Q;
    return r;
  endfunction

  // One pass of 'cnt' issues; addresses come from the arrays below.
  int ie [128], io [128], tw [128];
  task automatic pass(input int cnt, input bit scale, input bit src);
    for (int t = 0; t < cnt + int'(PL); t++) begin
      rd_valid <= (t < cnt);
      rd_scale <= scale;
      src_bank <= src;
      if (t < cnt) begin
        rd_addr_e <= 7'(ie[t]); rd_addr_o <= 7'(io[t]); tw_addr <= 9'(tw[t]);
      end
      wr_en    <= (t >= int'(PL));
      wr_scale <= scale;
      dst_bank <= !src;
      if (t >= int'(PL)) begin
        wr_addr_e <= 7'(ie[t-PL]); wr_addr_o <= 7'(io[t-PL]);
      end
      @(posedge clk);
    end
    rd_valid <= 1'b0; wr_en <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    ld_we = 0; ld_addr = 0; ld_data = 0; rdout_addr = 0;
    rd_valid = 0; rd_scale = 0; src_bank = 0; wr_en = 0; wr_scale = 0; dst_bank = 0;
    rd_addr_e = 0; rd_addr_o = 0; wr_addr_e = 0; wr_addr_o = 0; tw_addr = 0;
    @(posedge clk);
    for (int j = 0; j < 128; j++) begin
      x[j] = (j == 5) ? Q-1 : $urandom_range(Q-1);
      ld_we <= 1'b1; ld_addr <= 7'(j); ld_data <= CW'(x[j]);
      @(posedge clk);
    end
    ld_we <= 1'b0;
    // weighting pass
    for (int j = 0; j < 128; j++) begin
      ie[j] = j; io[j] = 0; tw[j] = TW_PRE + j;
      y[j] = (x[j] * pw(17, j)) % Q;
    end
    pass(128, 1'b1, 1'b0);
    // butterfly pass, issued in a scrambled order
    for (int c = 0; c < 64; c++) begin
      automatic int cc = (c * 37) % 64;
      ie[c] = cc; io[c] = cc + 64; tw[c] = TW_FWD + cc;
      z[cc]      = (y[cc] + y[cc+64]) % Q;
      z[cc + 64] = ((y[cc] + Q - y[cc+64]) * pw(289, cc)) % Q;
    end
    pass(64, 1'b0, 1'b1);
    // read back
    #1;
    for (int j = 0; j < 128; j++) begin
      rdout_addr <= 7'(j);
      @(posedge clk);
      #1;
      checks++;
      if (longint'(rdout_data) != z[j]) begin
        failures++;
        if (failures < 5) $display("bank0[%0d] = %0d, expected %0d", j, rdout_data, z[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
