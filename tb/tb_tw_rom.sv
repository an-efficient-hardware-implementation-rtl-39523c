// tb_tw_rom: reads every address of the twiddle memory and compares it with
// values computed here by repeated multiplication, independently of the
// package functions: omega = 289, omega^-1 = 2419, psi = 17,
// psi^-1 = 1175, 128^-1 = 3303, Montgomery factor 2^16 mod q = 2285,
// weights negated. Also checks the one-cycle read latency.
module tb_tw_rom;
  logic clk = 1'b0;
  logic [8:0]  addr;
  logic [11:0] data;
  int checks = 0, failures = 0;
  longint unsigned expv [384];

  tw_rom dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned q = 3329, w = 1, wi = 1, p = 1, pi = 1;
    for (int e = 0; e < 64; e++) begin
      expv[e]      = (w  * 2285) % q;
      expv[64 + e] = (wi * 2285) % q;
      w  = (w * 289) % q;
      wi = (wi * 2419) % q;
    end
    for (int j = 0; j < 128; j++) begin
      expv[128 + j] = ((q - p) * 2285) % q;
      expv[256 + j] = (((q - (3303 * pi) % q) % q) * 2285) % q;
      p  = (p * 17) % q;
      pi = (pi * 1175) % q;
    end
    checks++;
    if ((289 * 2419) % 3329 != 1) failures++;
    for (int a = 0; a < 384; a++) begin
      addr <= 9'(a);
      @(posedge clk);
      #1;
      checks++;
      if (longint'(data) != expv[a]) begin
        failures++;
        if (failures < 5) $display("tw[%0d] = %0d, expected %0d", a, data, expv[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
