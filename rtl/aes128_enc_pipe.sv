// aes128_enc_pipe: fully pipelined AES-128 encryption, E_K(x).
//
// PXOR-Hash calls AES-128 once per input block, and the recovery-tag update
// needs two calls (old and new block) that should overlap, so the cipher is
// built as an 11-stage pipeline that accepts one block per cycle: stage 0
// applies the initial AddRoundKey, stages 1..10 each perform one full round
// (the last one without MixColumns). The round key travels down the pipeline
// with its block, so the key may change between blocks without a flush.
// AES itself is the standard FIPS-197 cipher; the one-round-per-stage
// organisation and the round-key-per-stage registers are this design's choice.
//
// Interface: in_valid/in_key/in_blk/in_side enter every cycle (no back
// pressure). out_valid/out_blk/out_side appear exactly LATENCY = 11 cycles
// later. in_side is a user side band carried alongside the block.
module aes128_enc_pipe
  import aes128_pkg::*;
#(
  parameter int unsigned SIDE_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  aes_blk_t          in_key,
  input  aes_blk_t          in_blk,
  input  logic [SIDE_W-1:0] in_side,
  output logic              out_valid,
  output aes_blk_t          out_blk,
  output logic [SIDE_W-1:0] out_side
);

  localparam int unsigned NR = 10;

  logic              vld  [NR+1];
  aes_blk_t          st   [NR+1];
  aes_blk_t          rk   [NR+1];
  logic [SIDE_W-1:0] side [NR+1];

  // Stage 0: initial AddRoundKey.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld[0] <= 1'b0;
    else        vld[0] <= in_valid;
  end
  always_ff @(posedge clk) begin
    st[0]   <= in_blk ^ in_key;
    rk[0]   <= in_key;
    side[0] <= in_side;
  end

  // Stages 1..10: one round each.
  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_blk_t k_next, sb;
    always_comb begin
      k_next = next_round_key(rk[r-1], rcon_of(r));
      sb     = sub_shift(st[r-1]);
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld[r] <= 1'b0;
      else        vld[r] <= vld[r-1];
    end
    always_ff @(posedge clk) begin
      st[r]   <= ((r == NR) ? sb : mix_columns(sb)) ^ k_next;
      rk[r]   <= k_next;
      side[r] <= side[r-1];
    end
  end

  assign out_valid = vld[NR];
  assign out_blk   = st[NR];
  assign out_side  = side[NR];

endmodule
