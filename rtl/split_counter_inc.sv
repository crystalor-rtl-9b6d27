// split_counter_inc: one update of a split-counter block.
//
// Updating leaf node j of a block increments its minor counter. When that
// minor counter is already at its maximum (2^L_MI - 1) it overflows: every
// minor counter of the block is reset to zero and the shared major counter
// is incremented (modulo 2^L_MA). The result is the block's new counters,
// which is also the new PXOR-Hash input D'[i]. Combinational. The rule is
// the split-counter rule of the design; leaving the updated node's minor at
// zero after an overflow (rather than one) is this design's choice.
module split_counter_inc
  import crystalor_pkg::*;
(
  input  sc_block_t                 blk_in,
  input  logic [$clog2(K_SC)-1:0]   sel,
  output sc_block_t                 blk_out,
  output logic                      overflow
);

  always_comb begin
    blk_out  = blk_in;
    overflow = &blk_in.minor[sel];
    if (overflow) begin
      blk_out.minor = '0;
      blk_out.major = MA_FIELD_W'(L_MA'(blk_in.major[L_MA-1:0] + 1'b1));
    end else begin
      blk_out.minor[sel] = blk_in.minor[sel] + 1'b1;
    end
  end

endmodule
