// tb_mont_reduce: checks res = c * 2^-16 mod q (2^-16 = 169 mod 3329) for
// corner cases and random c < q^2, one new input per cycle, each result
// exactly three cycles later, fully reduced below q.
module tb_mont_reduce;
  import ntt_pkg::*;
  logic clk = 1'b0;
  logic [23:0] c;
  coef_t res;
  int checks = 0, failures = 0;
  longint unsigned hist [$];

  mont_reduce dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      longint unsigned x;
      case (i)
        0: x = 0;
        1: x = (Q-1) * (Q-1);
        2: x = Q;
        3: x = 1;
        4: x = Q * 256;
        default: x = $urandom_range((Q-1)*(Q-1));
      endcase
      c <= 24'(x);
      hist.push_back(x);
      @(posedge clk);
      #1;
      if (hist.size() == 3) begin
        longint unsigned ex;
        ex = (hist.pop_front() * 169) % Q;
        checks++;
        if (longint'(res) != ex) begin
          failures++;
          if (failures < 5) $display("res %0d, expected %0d", res, ex);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
