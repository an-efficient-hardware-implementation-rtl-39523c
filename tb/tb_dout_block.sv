// tb_dout_block: checks the output block with a behavioural model of the two
// PEs' result ports (synchronous read, word = 1000 * pe + address). After a
// finish pulse, done must rise and stay high, and 256 words must come out on
// consecutive cycles in index order, word i taken from PE i[0] at address
// i >> 1, starting two cycles after finish. A start must clear done.
module tb_dout_block;
  import ntt_pkg::*;
  logic clk = 1'b0;
  logic rst_n, start, finish, done, streaming, dout_valid;
  logic [6:0] rd_addr;
  logic [7:0] dout_index;
  coef_t pe_data [2], dout;
  int checks = 0, failures = 0;

  dout_block #(.NCOEF(256)) dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    pe_data[0] <= CW'(rd_addr);
    pe_data[1] <= CW'(1000 + int'(rd_addr));
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, first;
    rst_n = 1'b0; start = 1'b0; finish = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int rep = 0; rep < 2; rep++) begin
      checks++;
      if (done !== (rep == 1)) begin failures++; $display("done before finish wrong"); end
      start <= 1'b1; @(posedge clk); start <= 1'b0; @(posedge clk); #1;
      checks++;
      if (done) begin failures++; $display("start did not clear done"); end
      finish <= 1'b1; @(posedge clk); finish <= 1'b0;
      n = 0; first = -1;
      for (int t = 1; t < 300; t++) begin
        #1;
        checks++;
        if (!done) begin failures++; $display("done dropped"); end
        if (dout_valid) begin
          int ex;
          if (first < 0) first = t;
          ex = (n % 2) ? 1000 + n / 2 : n / 2;
          checks += 2;
          if (int'(dout_index) != n) begin failures++; $display("index %0d, expected %0d", dout_index, n); end
          if (int'(dout) != ex) begin failures++; $display("dout %0d, expected %0d", dout, ex); end
          n++;
        end
        @(posedge clk);
      end
      checks += 3;
      if (n != 256) begin failures++; $display("%0d words", n); end
      if (first != 2) begin failures++; $display("first word after %0d cycles", first); end
      if (streaming) begin failures++; $display("still streaming"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
