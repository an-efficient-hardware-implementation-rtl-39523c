// tb_addr_gen: runs the address generator through a forward and an inverse
// transform and checks every read it issues against the loops of the
// iterative NTT (Gentleman-Sande, m = 64 ... 1, twiddle omega^(2^(i-1)k))
// and the iterative INTT (m = 1 ... 64, twiddle omega^-br6(k)), evaluated
// here independently: each butterfly of each stage must be issued exactly
// once with the right partner and twiddle address. Weighting passes must
// read 0..127 in order with their weight addresses. Every read must come
// back as a write exactly PIPE_LAT = 8 cycles later, to the other bank;
// banks alternate by pass; each WAIT lasts 8 cycles; finish comes 640
// cycles after the start edge.
module tb_addr_gen;
  import ntt_pkg::*;
  localparam int unsigned PL = 8;

  logic clk = 1'b0;
  logic rst_n, start;
  mode_e mode;
  logic rd_valid, rd_scale, src_bank, wr_en, wr_scale, dst_bank, busy, in_wait, finish;
  logic [6:0] rd_addr_e, rd_addr_o, wr_addr_e, wr_addr_o;
  logic [8:0] tw_addr;
  int checks = 0, failures = 0;

  addr_gen #(.NPTS(128), .PIPE_LAT(PL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned br6(int unsigned x);
    int unsigned r = 0;
    for (int i = 0; i < 6; i++) if (x & (1 << i)) r |= 1 << (5 - i);
    return r;
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("%s", msg);
  endtask

  typedef struct {int ae; int ao; int scale; int bank;} rd_t;

  task automatic run(input mode_e m);
    int exp_io [128], exp_tw [128], seen [128];
    int cyc, pass, cnt, wait_len, wait_start;
    rd_t pend [$];
    int  pend_t [$];
    bit  was_rd;
    mode  <= m;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0; pass = -1; cnt = 0; wait_len = 0; was_rd = 0;
    forever begin
      #1;
      // --- reads ---
      if (rd_valid && !was_rd) begin
        // a new pass begins
        if (pass >= 0) begin
          checks++;
          if (wait_len != int'(PL)) fail($sformatf("pass %0d: WAIT %0d cycles", pass, wait_len));
        end
        pass++; cnt = 0; wait_len = 0;
        foreach (seen[i]) seen[i] = 0;
        foreach (exp_io[i]) begin exp_io[i] = -1; exp_tw[i] = -1; end
        if (!((m == MODE_NTT && pass == 0) || (m == MODE_INTT && pass == 7))) begin
          int st, mm;
          st = (m == MODE_NTT) ? pass : pass + 1;      // stage number 1..7
          if (m == MODE_NTT) begin
            mm = 1 << (7 - st);
            for (int j = 0; j < (1 << (st - 1)); j++)
              for (int k = 0; k < mm; k++) begin
                exp_io[2*j*mm + k] = 2*j*mm + k + mm;
                exp_tw[2*j*mm + k] = TW_FWD + (1 << (st - 1)) * k;
              end
          end else begin
            mm = 1 << (st - 1);
            for (int i = 0; i < mm; i++) begin
              int k = 0;
              for (int j = i; j <= 126; j += 2*mm) begin
                exp_io[j] = j + mm;
                exp_tw[j] = TW_INV + br6(k);
                k++;
              end
            end
          end
        end
        checks++;
        if (src_bank != 1'(pass % 2)) fail($sformatf("pass %0d reads bank %0d", pass, src_bank));
      end
      if (in_wait) wait_len++;
      if (rd_valid) begin
        rd_t r;
        bit is_scale;
        is_scale = (m == MODE_NTT && pass == 0) || (m == MODE_INTT && pass == 7);
        checks++;
        if (rd_scale != is_scale) fail("scale flag");
        if (is_scale) begin
          checks += 2;
          if (int'(rd_addr_e) != cnt) fail($sformatf("weight pass read %0d at %0d", rd_addr_e, cnt));
          if (int'(tw_addr) != ((m == MODE_NTT) ? TW_PRE : TW_POST) + cnt) fail("weight address");
        end else begin
          checks += 3;
          if (exp_io[rd_addr_e] < 0) fail($sformatf("pass %0d: %0d is not an even index", pass, rd_addr_e));
          else begin
            if (int'(rd_addr_o) != exp_io[rd_addr_e]) fail($sformatf("pass %0d: pair (%0d,%0d)", pass, rd_addr_e, rd_addr_o));
            if (int'(tw_addr) != exp_tw[rd_addr_e]) fail($sformatf("pass %0d: tw %0d for %0d, exp %0d", pass, tw_addr, rd_addr_e, exp_tw[rd_addr_e]));
          end
          if (seen[rd_addr_e]) fail("butterfly issued twice");
          seen[rd_addr_e] = 1;
        end
        r.ae = rd_addr_e; r.ao = rd_addr_o; r.scale = rd_scale; r.bank = int'(!src_bank);
        pend.push_back(r); pend_t.push_back(cyc);
        cnt++;
      end
      was_rd = rd_valid;
      // --- writes ---
      if (wr_en) begin
        rd_t r;
        int  t;
        checks++;
        if (pend.size() == 0) fail("write without read");
        else begin
          r = pend.pop_front(); t = pend_t.pop_front();
          if (cyc - t != int'(PL) || int'(wr_addr_e) != r.ae || (!r.scale && int'(wr_addr_o) != r.ao) ||
              int'(wr_scale) != r.scale || int'(dst_bank) != r.bank)
            fail($sformatf("write %0d/%0d at +%0d does not match read %0d/%0d", wr_addr_e, wr_addr_o, cyc - t, r.ae, r.ao));
        end
      end
      if (finish) break;
      @(posedge clk);
      cyc++;
    end
    checks += 4;
    if (cyc != 640) fail($sformatf("finish after %0d cycles", cyc));
    if (pass != 7) fail($sformatf("%0d passes", pass + 1));
    if (pend.size() != 0) fail("reads never written");
    @(posedge clk); #1;
    if (busy) fail("still busy");
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; mode = MODE_NTT;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(MODE_NTT);
    repeat (5) @(posedge clk);
    run(MODE_INTT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
