// tb_mod_add: checks the registered modular adder against (a + b) % q on
// the corner cases and random operands, one new pair per cycle, with the
// result expected exactly one cycle later.
module tb_mod_add;
  import ntt_pkg::*;
  logic clk = 1'b0;
  coef_t a, b, s;
  int checks = 0, failures = 0;
  int unsigned ea, eb;

  mod_add dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5004; i++) begin
      case (i)
        0: begin ea = 0;   eb = 0;   end
        1: begin ea = Q-1; eb = Q-1; end
        2: begin ea = Q-1; eb = 1;   end
        3: begin ea = Q-2; eb = 1;   end
        default: begin ea = $urandom_range(Q-1); eb = $urandom_range(Q-1); end
      endcase
      a <= CW'(ea); b <= CW'(eb);
      @(posedge clk);   // operands sampled here
      #1;
      checks++;
      if (int'(s) != (ea + eb) % Q) begin
        failures++;
        if (failures < 5) $display("%0d + %0d -> %0d", ea, eb, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
