// tb_dp_bram: checks the true dual-port RAM against a reference array:
// random mixes of reads and writes on both ports each cycle (never the same
// address written twice in a cycle), one-cycle read latency, read-first
// behaviour when a port reads the address it writes, and one port reading
// what the other wrote earlier.
module tb_dp_bram;
  logic clk = 1'b0;
  logic [6:0]  addr_a, addr_b;
  logic        we_a, we_b;
  logic [11:0] wdata_a, wdata_b, rdata_a, rdata_b;
  logic [11:0] model [128];
  int checks = 0, failures = 0;

  dp_bram #(.DEPTH(128), .WIDTH(12)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] exp_a, exp_b;
    // fill with known values via both ports
    for (int i = 0; i < 64; i++) begin
      addr_a <= 7'(2*i); we_a <= 1'b1; wdata_a <= 12'(3*i + 7);
      addr_b <= 7'(2*i+1); we_b <= 1'b1; wdata_b <= 12'(5*i + 1);
      model[2*i] = 12'(3*i + 7); model[2*i+1] = 12'(5*i + 1);
      @(posedge clk);
    end
    for (int i = 0; i < 4000; i++) begin
      logic [6:0] xa, xb;
      logic wa, wb;
      logic [11:0] da, db;
      xa = 7'($urandom); xb = 7'($urandom);
      wa = 1'($urandom); wb = 1'($urandom);
      if (wa && wb && xa == xb) wb = 1'b0;
      da = 12'($urandom); db = 12'($urandom);
      addr_a <= xa; we_a <= wa; wdata_a <= da;
      addr_b <= xb; we_b <= wb; wdata_b <= db;
      exp_a = model[xa]; exp_b = model[xb];     // read-first
      if (wb && !wa && xa == xb) exp_a = model[xa];
      @(posedge clk);
      if (wa) model[xa] = da;
      if (wb) model[xb] = db;
      #1;
      checks += 2;
      if (rdata_a !== exp_a) begin failures++; if (failures < 5) $display("A[%0d]=%0d exp %0d", xa, rdata_a, exp_a); end
      if (rdata_b !== exp_b) begin failures++; if (failures < 5) $display("B[%0d]=%0d exp %0d", xb, rdata_b, exp_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
