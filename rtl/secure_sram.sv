// secure_sram: the on-chip secure SRAM of the recovery-tag hardware.
//
// It holds three 128-bit words: the PXOR-Hash key K, the precomputed mask
// L = E_K(0) and the recovery tag T, 384 bits in all. The words are never
// sent off chip. All three are read in parallel (they feed the accelerator
// and the recovery controller directly); one word is written per cycle,
// selected by waddr, and the write is visible from the next cycle.
// The contents are deliberately not cleared by any reset: the tag must
// survive a crash, so the array stands for a retained (battery-backed or
// non-volatile) on-chip store and is initialised by writing it. The 3x128
// organisation follows the design; the single write port and parallel read
// are this design's choices.
module secure_sram
  import crystalor_pkg::*;
(
  input  logic       clk,
  input  logic       we,
  input  sram_word_e waddr,
  input  blk_t       wdata,
  output blk_t       key,
  output blk_t       l_val,
  output blk_t       tag
);

  blk_t mem [3];

  always_ff @(posedge clk) begin
    if (we && waddr != 2'd3) mem[waddr] <= wdata;
  end

  assign key   = mem[SR_KEY];
  assign l_val = mem[SR_L];
  assign tag   = mem[SR_TAG];

endmodule
