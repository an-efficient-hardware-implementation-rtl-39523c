// tb_polymul: polynomial multiplication in Z_3329[x]/(x^256 + 1) through the
// core, the use the transform exists for. For random a and b it runs
// NTT(a) and NTT(b) on the core, multiplies the two results pair by pair in
// the testbench (Kyber's base multiplication: coefficient pair (2p, 2p+1) is
// a residue modulo x^2 - 17^(2*br7(p)+1)), loads the product, runs the
// INTT on the core and compares with the schoolbook negacyclic product
// computed here. Each of the three transforms must take 641 cycles from start to done.
module tb_polymul;
  import ntt_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       load_we;
  logic [7:0] load_addr;
  coef_t      load_data;
  logic       start;
  mode_e      mode;
  logic       busy, done, dout_valid;
  logic [7:0] dout_index;
  coef_t      dout;

  int checks = 0, failures = 0;
  int unsigned got [256];

  ntt_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (dout_valid) got[dout_index] = dout;

  task automatic transform(input int unsigned x [256], input mode_e m, output int unsigned y [256]);
    int cyc = 0;
    for (int i = 0; i < 256; i++) begin
      load_we <= 1'b1; load_addr <= 8'(i); load_data <= CW'(x[i]);
      @(posedge clk);
    end
    load_we <= 1'b0;
    mode <= m; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    #1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != 641) begin failures++; $display("latency %0d", cyc); end
    while (busy) @(posedge clk);
    @(posedge clk);
    y = got;
  endtask

  initial begin
    int unsigned a [256], b [256], ah [256], bh [256], ch [256], c [256], ref_c [256];
    rst_n = 1'b0; load_we = 1'b0; load_addr = '0; load_data = '0; start = 1'b0; mode = MODE_NTT;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int rep = 0; rep < 2; rep++) begin
      for (int i = 0; i < 256; i++) begin
        a[i] = $urandom_range(Q-1);
        b[i] = (rep == 1 && i > 3) ? 0 : $urandom_range(Q-1);   // second run: short b
      end
      // schoolbook product modulo x^256 + 1
      for (int k = 0; k < 256; k++) begin
        automatic longint unsigned acc = 0;
        for (int i = 0; i < 256; i++) begin
          automatic int j = k - i;
          if (j >= 0) acc += longint'(a[i]) * b[j];
          else        acc += longint'(a[i]) * ((Q - b[j + 256]) % Q);
        end
        ref_c[k] = int'(acc % Q);
      end
      transform(a, MODE_NTT, ah);
      transform(b, MODE_NTT, bh);
      for (int p = 0; p < 128; p++) begin
        longint unsigned g, a0, a1, b0, b1;
        g  = powmod(ZETA, 2 * bitrev(p, 7) + 1);
        a0 = ah[2*p]; a1 = ah[2*p+1]; b0 = bh[2*p]; b1 = bh[2*p+1];
        ch[2*p]   = int'((a0 * b0 + ((a1 * b1) % Q) * g) % Q);
        ch[2*p+1] = int'((a0 * b1 + a1 * b0) % Q);
      end
      transform(ch, MODE_INTT, c);
      for (int k = 0; k < 256; k++) begin
        checks++;
        if (c[k] != ref_c[k]) begin
          failures++;
          if (failures < 6) $display("run %0d: c[%0d] = %0d, expected %0d", rep, k, c[k], ref_c[k]);
        end
      end
      $display("run %0d: product compared", rep);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
