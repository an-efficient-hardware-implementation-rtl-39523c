// tb_ntt_top: end-to-end test of the Kyber NTT core at its full size.
//
// Runs, on random polynomials:
//   1. a forward NTT, compared word by word with Kyber's NTT computed here
//      directly from its definition, dout[2i+b] = sum_j a[2j+b] *
//      17^((2*br7(i)+1)*j) mod 3329;
//   2. an inverse NTT started on the result left in the core (no reload),
//      which must give back the original polynomial;
//   3. an inverse NTT of a freshly loaded random vector, compared with the
//      inverse computed from its definition.
// Each run checks the start-to-done latency (641 cycles), that done is held,
// the output order and count, and that loads and starts issued while the
// core is busy are ignored. It counts how often each mechanism occurred:
// weighting passes, WAIT states, ignored busy requests, chained runs.
module tb_ntt_top;
  import ntt_pkg::*;

  localparam int unsigned LATENCY = 641;

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
  int n_pre = 0, n_post = 0, n_wait = 0, n_ignored = 0, n_chained = 0;

  int unsigned zp [512];
  int unsigned a [256], ref_v [256], got [256];
  int          got_n;

  ntt_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, observed on the address generator.
  logic wait_q = 1'b0;
  always @(posedge clk) begin
    wait_q <= dut.u_ag.in_wait;
    if (dut.u_ag.in_wait && !wait_q) n_wait++;
    if (dut.u_ag.rd_valid && dut.u_ag.rd_scale && dut.u_ag.cnt == 0)
      if (dut.u_ag.mode_q == MODE_NTT) n_pre++; else n_post++;
  end

  // Output collector.
  always @(posedge clk) begin
    if (dout_valid) begin
      checks++;
      if (int'(dout_index) != got_n) begin
        failures++;
        $display("output order: index %0d, expected %0d", dout_index, got_n);
      end
      got[dout_index] = dout;
      got_n++;
    end
  end

  function automatic int unsigned br7(int unsigned x);
    return bitrev(x, 7);
  endfunction

  task automatic ref_ntt(input int unsigned x [256], output int unsigned y [256]);
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < 128; i++) begin
        longint unsigned acc = 0;
        for (int j = 0; j < 128; j++)
          acc += longint'(x[2*j+b]) * zp[((2*br7(i)+1)*j) % 256];
        y[2*i+b] = int'(acc % Q);
      end
  endtask

  task automatic ref_intt(input int unsigned x [256], output int unsigned y [256]);
    for (int b = 0; b < 2; b++)
      for (int j = 0; j < 128; j++) begin
        longint unsigned acc = 0;
        for (int i = 0; i < 128; i++)
          acc += longint'(x[2*i+b]) * zp[(256 - ((2*br7(i)+1)*j) % 256) % 256];
        y[2*j+b] = mulmod(int'(acc % Q), N_INV);
      end
  endtask

  task automatic load(input int unsigned x [256]);
    for (int i = 0; i < 256; i++) begin
      load_we   <= 1'b1;
      load_addr <= 8'(i);
      load_data <= CW'(x[i]);
      @(posedge clk);
    end
    load_we <= 1'b0;
  endtask

  // Start a transform, poke it with requests it must ignore, check latency
  // and collect the 256 outputs.
  task automatic run(input mode_e m, input string tag);
    int cyc;
    got_n = 0;
    mode  <= m;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    // a load and a start while busy must have no effect
    repeat (3) @(posedge clk);
    cyc += 3;
    checks++;
    if (!busy) begin failures++; $display("%s: not busy after start", tag); end
    load_we <= 1'b1; load_addr <= 8'd0; load_data <= CW'(1234);
    start <= 1'b1; mode <= (m == MODE_NTT) ? MODE_INTT : MODE_NTT;
    @(posedge clk);
    cyc++;
    load_we <= 1'b0; start <= 1'b0; mode <= m;
    n_ignored++;
    while (!done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != int'(LATENCY)) begin
      failures++;
      $display("%s: latency %0d cycles, expected %0d", tag, cyc, LATENCY);
    end else $display("%s: start-to-done latency %0d cycles", tag, cyc);
    while (busy) @(posedge clk);
    @(posedge clk);
    checks++;
    if (got_n != 256 || !done) begin
      failures++;
      $display("%s: %0d outputs, done=%0b", tag, got_n, done);
    end
  endtask

  task automatic compare(input int unsigned exp_v [256], input string tag);
    int bad = 0;
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (got[i] != exp_v[i]) begin
        failures++;
        if (bad++ < 5) $display("%s: coef %0d = %0d, expected %0d", tag, i, got[i], exp_v[i]);
      end
    end
  endtask

  initial begin
    int unsigned orig [256];
    for (int e = 0; e < 512; e++) zp[e] = powmod(ZETA, e % 256);
    rst_n = 1'b0; load_we = 1'b0; load_addr = '0; load_data = '0;
    start = 1'b0; mode = MODE_NTT;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1. forward NTT
    for (int i = 0; i < 256; i++) a[i] = $urandom_range(Q-1);
    orig = a;
    load(a);
    run(MODE_NTT, "ntt");
    ref_ntt(a, ref_v);
    compare(ref_v, "ntt");

    // 2. inverse NTT on the result still held by the core
    run(MODE_INTT, "intt-chained");
    n_chained++;
    compare(orig, "intt-chained");

    // 3. inverse NTT of a fresh random vector, including the extremes
    for (int i = 0; i < 256; i++) a[i] = $urandom_range(Q-1);
    a[0] = Q-1; a[1] = 0; a[255] = Q-1;
    load(a);
    run(MODE_INTT, "intt");
    ref_intt(a, ref_v);
    compare(ref_v, "intt");

    $display("mechanisms: pre=%0d post=%0d wait=%0d ignored=%0d chained=%0d",
             n_pre, n_post, n_wait, n_ignored, n_chained);
    checks += 5;
    if (n_pre  != 1)  begin failures++; $display("PRE weighting passes: %0d", n_pre); end
    if (n_post != 2)  begin failures++; $display("POST weighting passes: %0d", n_post); end
    if (n_wait != 24) begin failures++; $display("WAIT states: %0d", n_wait); end
    if (n_ignored == 0) failures++;
    if (n_chained == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
