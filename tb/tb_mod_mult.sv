// tb_mod_mult: checks the Montgomery modular multiplier, res = a * b * 169
// mod q (169 = 2^-16 mod 3329), on corner cases and random operands below
// q, with one operand pair per cycle and each result exactly five cycles
// later. It also checks that a Montgomery-form operand b * 2285 mod q gives
// the plain product.
module tb_mod_mult;
  import ntt_pkg::*;
  logic clk = 1'b0;
  coef_t a, b, res;
  int checks = 0, failures = 0;
  longint unsigned hist [$];

  mod_mult dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6000; i++) begin
      longint unsigned x, y, ex;
      case (i)
        0: begin x = Q-1; y = Q-1; end
        1: begin x = 0;   y = Q-1; end
        2: begin x = 1;   y = 1;   end
        default: begin x = $urandom_range(Q-1); y = $urandom_range(Q-1); end
      endcase
      if (i % 2 == 1) begin
        // Montgomery-form operand: expect the plain product
        ex = (x * y) % Q;
        y  = (y * 2285) % Q;
      end else begin
        ex = (((x * y) % Q) * 169) % Q;
      end
      a <= CW'(x); b <= CW'(y);
      hist.push_back(ex);
      @(posedge clk);
      #1;
      if (hist.size() == 5) begin
        checks++;
        ex = hist.pop_front();
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
