// recovery_tag_cache: 128-bit cache of the recovery tag next to the
// PXOR-Hash accelerator.
//
// The accelerator reads the current tag from here. After a reset (including
// the one that follows a crash) the cache is invalid and refills itself from
// the SRAM copy on the next cycle. A tag update (upd_valid) writes the cache
// and, in the same cycle, writes the same value through to the SRAM TAG word
// (sram_we/sram_wdata), so the two copies change together, as the store
// sequence requires. invalidate forces a refill, e.g. after the SRAM word
// was written from outside. That the cache is write-through and refills
// itself is this design's choice; its 128-bit size and its place next to the
// accelerator follow the design.
module recovery_tag_cache
  import crystalor_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  blk_t sram_tag,
  input  logic upd_valid,
  input  blk_t upd_tag,
  input  logic invalidate,
  output blk_t tag,
  output logic tag_valid,
  output logic sram_we,
  output blk_t sram_wdata
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_valid <= 1'b0;
      tag       <= '0;
    end else if (upd_valid) begin
      tag_valid <= 1'b1;
      tag       <= upd_tag;
    end else if (invalidate) begin
      tag_valid <= 1'b0;
    end else if (!tag_valid) begin
      tag_valid <= 1'b1;
      tag       <= sram_tag;
    end
  end

  assign sram_we    = upd_valid;
  assign sram_wdata = upd_tag;

endmodule
