// new_counter_unit: counters of a newly built parent block after a crash.
//
// The old intermediate counters cannot be trusted or even reconstructed
// under split counters, so recovery builds a fresh tree whose counters are
// upper bounds on how often each node can have been updated. For parent node
// j of a block, with child blocks i' (each a major counter and K_SC minors):
//   ub[j]      = sum over child blocks of  major*(K_SC*(2^L_MI-1)+1) + sum(minors)
//   new major  = sum over j of floor(ub[j] / 2^L_MI)
//   new minor j= ub[j] mod 2^L_MI
// Child blocks arrive one per cycle on in_valid/in_blk. in_node_last marks
// the last child block of the current parent node; in_blk_last (given with
// in_node_last) marks the last parent node of the parent block (fewer than
// K_SC nodes for the root). The finished parent block is presented on
// out_valid/out_blk one cycle after the block's last input; minors of
// unused node slots are zero. out_overflow flags a major sum that does not
// fit in L_MA bits. The equations follow the design; the streaming interface
// and UB_W (wide enough for any 64-bit-field child block) are this design's.
module new_counter_unit
  import crystalor_pkg::*;
#(
  parameter int unsigned UB_W = 96
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  sc_block_t in_blk,
  input  logic      in_node_last,
  input  logic      in_blk_last,
  output logic      out_valid,
  output sc_block_t out_blk,
  output logic      out_overflow
);

  localparam logic [UB_W-1:0] C_MAX = UB_W'(K_SC * ((1 << L_MI) - 1) + 1);

  logic [UB_W-1:0]              ub_acc, contrib, ub;
  logic [UB_W-1:0]              maj_acc, maj_sum;
  logic [0:K_SC-1][L_MI-1:0]    minors, minors_nx;
  logic [$clog2(K_SC)-1:0]      j;

  always_comb begin
    contrib = UB_W'(in_blk.major[L_MA-1:0]) * C_MAX;
    for (int m = 0; m < K_SC; m++) contrib = contrib + UB_W'(in_blk.minor[m]);
    ub      = ub_acc + contrib;
    maj_sum = maj_acc + (ub >> L_MI);
    minors_nx    = minors;
    minors_nx[j] = ub[L_MI-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ub_acc    <= '0;
      maj_acc   <= '0;
      minors    <= '0;
      j         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && in_node_last && in_blk_last;
      if (in_valid) begin
        if (!in_node_last) begin
          ub_acc <= ub;
        end else if (!in_blk_last) begin
          ub_acc  <= '0;
          maj_acc <= maj_sum;
          minors  <= minors_nx;
          j       <= j + 1'b1;
        end else begin
          ub_acc  <= '0;
          maj_acc <= '0;
          minors  <= '0;
          j       <= '0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_node_last && in_blk_last) begin
      out_blk.major <= MA_FIELD_W'(maj_sum[L_MA-1:0]);
      out_blk.minor <= minors_nx;
      out_overflow  <= |(maj_sum >> L_MA);
    end
  end

endmodule
