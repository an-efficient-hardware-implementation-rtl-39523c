// tb_int_mult: feeds a new random operand pair every cycle to the pipelined
// 12x12 multiplier and checks that each product appears exactly two cycles
// later.
module tb_int_mult;
  logic clk = 1'b0;
  logic [11:0] a, b;
  logic [23:0] p;
  int checks = 0, failures = 0;
  int unsigned hist_a [$], hist_b [$];

  int_mult #(.AW(12), .BW(12)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int unsigned x, y;
      x = (i == 0) ? 4095 : $urandom_range(4095);
      y = (i == 0) ? 4095 : $urandom_range(4095);
      a <= 12'(x); b <= 12'(y);
      hist_a.push_back(x); hist_b.push_back(y);
      @(posedge clk);
      #1;
      if (hist_a.size() == 2) begin
        int unsigned ex;
        ex = hist_a.pop_front() * hist_b.pop_front();
        checks++;
        if (int'(p) != ex) begin
          failures++;
          if (failures < 5) $display("product %0d, expected %0d", p, ex);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
