// addr_gen: address generator and stage controller of the NTT core.
//
// A three-state machine (IDLE, NTT, WAIT). A start pulse in IDLE begins a
// transform of eight passes over each 128-coefficient half:
//   forward : PRE weighting pass, then butterfly stages 1..7 (iterative forward NTT,
//             m = 64, 32, ..., 1, twiddle omega^(2^(s-1) * k) in stage s)
//   inverse : butterfly stages 1..7 (iterative inverse NTT, m = 1, 2, ..., 64,
//             twiddle omega^-br6(k)), then the POST weighting pass
// In NTT state one read is issued per cycle: for a butterfly stage the pair
// (ie, io = ie + m), where ie is the counter with a 0 inserted at bit log2(m),
// plus the twiddle address; for a weighting pass one coefficient and its
// weight. The pass reads bank src_bank and writes the other bank. Every read
// is copied into a PIPE_LAT-deep delay line that produces the write address
// and write enable when the processing element's result arrives. After the
// last read the machine sits in WAIT until every result of the pass is
// written, then starts the next pass or, after the eighth, returns to IDLE
// with a one-cycle 'finish' pulse. The results always end in bank 0.
//
// Timing: a butterfly stage takes N/2 issue cycles plus PIPE_LAT WAIT
// cycles, a weighting pass N plus PIPE_LAT. With the defaults one transform
// takes 128 + 8 + 7 * (64 + 8) = 640 cycles of passes; finish is set by
// the 640th clock edge after the edge that samples start. PIPE_LAT must equal the
// memory read latency (1) plus the butterfly latency (7).
// The three states, the per-stage read pattern and the separate write
// addresses follow the published architecture; the weighting passes, the counter-to-index
// mapping and the cycle-exact WAIT length are this implementation's.
module addr_gen
  import ntt_pkg::*;
#(
  parameter int unsigned NPTS     = 128,
  parameter int unsigned PIPE_LAT = 8,
  localparam int unsigned AW      = $clog2(NPTS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  mode_e            mode,
  // read side (to the processing elements)
  output logic             rd_valid,
  output logic [AW-1:0]    rd_addr_e,
  output logic [AW-1:0]    rd_addr_o,
  output logic [TW_AW-1:0] tw_addr,
  output logic             rd_scale,    // weighting pass: single coefficient
  output logic             src_bank,
  // write side, PIPE_LAT cycles after the matching read
  output logic             wr_en,
  output logic [AW-1:0]    wr_addr_e,
  output logic [AW-1:0]    wr_addr_o,
  output logic             wr_scale,
  output logic             dst_bank,
  // status
  output logic             busy,
  output logic             in_wait,
  output logic             finish
);
  typedef enum logic [1:0] {S_IDLE, S_NTT, S_WAIT} state_e;

  typedef struct packed {
    logic          valid;
    logic [AW-1:0] ae;
    logic [AW-1:0] ao;
    logic          scale;
    logic          bank;
  } wr_item_t;

  localparam int unsigned NPASS = AW + 1;   // 7 stages + 1 weighting pass

  state_e         state;
  mode_e          mode_q;
  logic [3:0]     pass_idx;
  logic [AW-1:0]  cnt;
  logic           scale_pass, last_issue;
  logic [2:0]     stage;                     // butterfly stage 0..6
  logic [2:0]     bitpos;                    // log2(m)
  wr_item_t       dl [PIPE_LAT];
  logic           pending;

  // Which pass is this?
  always_comb begin
    scale_pass = (mode_q == MODE_NTT) ? (pass_idx == 0) : (pass_idx == 4'(NPASS-1));
    stage      = (mode_q == MODE_NTT) ? 3'(pass_idx - 1) : 3'(pass_idx);
    bitpos     = (mode_q == MODE_NTT) ? 3'(AW - 1 - int'(stage)) : stage;
    last_issue = scale_pass ? (cnt == AW'(NPTS-1)) : (cnt == AW'(NPTS/2-1));
  end

  // Address computation for the current counter value.
  always_comb begin
    logic [AW-1:0] low_mask, low, high, k;
    low_mask  = (AW'(1) << bitpos) - AW'(1);
    low       = cnt & low_mask;
    high      = (cnt & ~low_mask) << 1;
    rd_addr_e = scale_pass ? cnt : (high | low);
    rd_addr_o = rd_addr_e | (AW'(1) << bitpos);
    k         = cnt >> bitpos;
    if (scale_pass)
      tw_addr = TW_AW'((mode_q == MODE_NTT) ? TW_PRE : TW_POST) + TW_AW'(cnt);
    else if (mode_q == MODE_NTT)
      tw_addr = TW_AW'(TW_FWD) + TW_AW'(low << (AW - 1 - int'(bitpos)));
    else
      tw_addr = TW_AW'(TW_INV) + TW_AW'(bitrev(int'(k), AW - 1));
  end

  assign rd_valid = (state == S_NTT);
  assign rd_scale = scale_pass;
  assign src_bank = pass_idx[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      mode_q   <= MODE_NTT;
      pass_idx <= '0;
      cnt      <= '0;
      finish   <= 1'b0;
    end else begin
      finish <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_NTT;
          mode_q   <= mode;
          pass_idx <= '0;
          cnt      <= '0;
        end
        S_NTT: begin
          cnt <= cnt + AW'(1);
          if (last_issue) begin
            state <= S_WAIT;
            cnt   <= '0;
          end
        end
        S_WAIT: if (!pending) begin
          if (pass_idx == 4'(NPASS-1)) begin
            state  <= S_IDLE;
            finish <= 1'b1;
          end else begin
            state    <= S_NTT;
            pass_idx <= pass_idx + 4'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Write-address delay line.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < PIPE_LAT; i++) dl[i] <= '0;
    end else begin
      dl[0] <= '{valid: rd_valid, ae: rd_addr_e, ao: rd_addr_o,
                 scale: scale_pass, bank: ~pass_idx[0]};
      for (int i = 1; i < PIPE_LAT; i++) dl[i] <= dl[i-1];
    end
  end

  // Writes still to come after this cycle.
  always_comb begin
    pending = 1'b0;
    for (int i = 0; i < PIPE_LAT-1; i++) pending |= dl[i].valid;
  end

  assign wr_en     = dl[PIPE_LAT-1].valid;
  assign wr_addr_e = dl[PIPE_LAT-1].ae;
  assign wr_addr_o = dl[PIPE_LAT-1].ao;
  assign wr_scale  = dl[PIPE_LAT-1].scale;
  assign dst_bank  = dl[PIPE_LAT-1].bank;
  assign busy      = (state != S_IDLE);
  assign in_wait   = (state == S_WAIT);

  // A butterfly writes two different words of the destination bank.
  a_wr_distinct: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_en && !wr_scale) |-> (wr_addr_e != wr_addr_o));
  // Reads and writes of one pass never touch the same bank.
  a_bank_split: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_en && rd_valid) |-> (dst_bank != src_bank));
endmodule
