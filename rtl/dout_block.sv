// dout_block: DOUT BLOCK of the NTT core.
//
// When the address generator reports the end of the last pass ('finish'),
// it raises 'done' (held until the next start) and streams the 256 result
// coefficients in natural Kyber order, one per cycle. Coefficient i lives in
// processing element i[0] at bank-0 address i >> 1: the block issues that
// address on rd_addr and, one cycle later, presents the word of PE i[0]
// (pe_data[i[0]]) on dout with dout_valid and dout_index = i. 'streaming' is
// high while reads are being issued or the last word is still on its way.
// Raising done and delivering the data on dout follow the published architecture; the
// one-word-per-cycle stream is this implementation's choice.
module dout_block
  import ntt_pkg::*;
#(
  parameter int unsigned NCOEF = 256,
  localparam int unsigned IW   = $clog2(NCOEF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,       // clears done
  input  logic          finish,
  output logic [IW-2:0] rd_addr,
  input  coef_t         pe_data [2],
  output logic          done,
  output logic          streaming,
  output logic          dout_valid,
  output logic [IW-1:0] dout_index,
  output coef_t         dout
);
  logic          active;
  logic [IW-1:0] idx;
  logic          v_q;
  logic [IW-1:0] idx_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      idx    <= '0;
      done   <= 1'b0;
      v_q    <= 1'b0;
      idx_q  <= '0;
    end else begin
      if (start) done <= 1'b0;
      if (finish) begin
        active <= 1'b1;
        idx    <= '0;
        done   <= 1'b1;
      end else if (active) begin
        idx <= idx + IW'(1);
        if (idx == IW'(NCOEF-1)) active <= 1'b0;
      end
      v_q   <= active;
      idx_q <= idx;
    end
  end

  assign rd_addr    = idx[IW-1:1];
  assign dout_valid = v_q;
  assign dout_index = idx_q;
  assign dout       = pe_data[idx_q[0]];
  assign streaming  = active | v_q;
endmodule
