// tb_mont_red_sub: checks one word-level reduction step. For an input T the
// output must equal (T + m * q) / 256 with m = (-T) mod 256, the exact value
// of a Montgomery step; this implies output * 256 = T (mod q). Tested on
// corner cases and random 24-bit inputs below q^2 with the default widths.
module tb_mont_red_sub;
  import ntt_pkg::*;
  logic [23:0] t_in;
  logic [15:0] t_out;
  int checks = 0, failures = 0;

  mont_red_sub #(.IN_W(24), .OUT_W(16)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int unsigned t, m, ex;
      case (i)
        0: t = 0;
        1: t = (Q-1) * (Q-1);
        2: t = 256;
        3: t = 255;
        4: t = 128;
        default: t = $urandom_range((Q-1)*(Q-1));
      endcase
      m  = (256 - (t % 256)) % 256;
      ex = (t + m * Q) / 256;
      t_in = 24'(t);
      #1;
      checks++;
      if (int'(t_out) != ex || (int'(t_out) * 256) % Q != t % Q) begin
        failures++;
        if (failures < 5) $display("T=%0d -> %0d, expected %0d", t, t_out, ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
