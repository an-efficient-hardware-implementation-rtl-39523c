// tb_ntt2: checks the butterfly. With a twiddle t in Montgomery form
// (t * 2285 mod q) it must give E = (in0 + in1) mod q and
// O = (in0 - in1) * t mod q, both exactly seven cycles after the inputs,
// one butterfly per cycle. Every fourth input uses the multiplier mode
// (in0 = 0), where O must be -in1 * t mod q.
module tb_ntt2;
  import ntt_pkg::*;
  logic clk = 1'b0;
  coef_t in0, in1, mul_in, even_out, odd_out;
  int checks = 0, failures = 0;
  longint unsigned he [$], ho [$];

  ntt2 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_mult = 0;
    for (int i = 0; i < 6000; i++) begin
      longint unsigned u, v, t;
      u = (i % 4 == 3) ? 0 : $urandom_range(Q-1);
      v = (i == 0) ? Q-1 : $urandom_range(Q-1);
      t = (i == 0) ? Q-1 : $urandom_range(Q-1);
      if (u == 0) n_mult++;
      in0 <= CW'(u); in1 <= CW'(v); mul_in <= CW'((t * 2285) % Q);
      he.push_back((u + v) % Q);
      ho.push_back(((u + Q - v) * t) % Q);
      @(posedge clk);
      #1;
      if (he.size() == 7) begin
        longint unsigned ee, eo;
        ee = he.pop_front(); eo = ho.pop_front();
        checks += 2;
        if (longint'(even_out) != ee) begin
          failures++;
          if (failures < 5) $display("E %0d, expected %0d", even_out, ee);
        end
        if (longint'(odd_out) != eo) begin
          failures++;
          if (failures < 5) $display("O %0d, expected %0d", odd_out, eo);
        end
      end
    end
    checks++;
    if (n_mult == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
