// tb_recovery_tag_cache: checks refill from the SRAM copy after reset,
// write-through of updates in the same cycle, and refill after invalidate.
module tb_recovery_tag_cache;
  import crystalor_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  blk_t sram_tag, upd_tag, tag, sram_wdata;
  logic upd_valid, invalidate, tag_valid, sram_we;
  recovery_tag_cache dut (.*);
  int checks = 0, failures = 0;
  task automatic c(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // Model SRAM behind the cache.
  always @(posedge clk) if (sram_we) sram_tag <= sram_wdata;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    blk_t v;
    upd_valid = 0; invalidate = 0; upd_tag = '0;
    sram_tag = 128'hfeed_0000_0000_0000_0000_0000_0000_beef;
    repeat (2) @(negedge clk);
    c(!tag_valid, "invalid in reset");
    rst_n = 1;
    @(negedge clk); @(negedge clk);
    c(tag_valid && tag === 128'hfeed_0000_0000_0000_0000_0000_0000_beef, "refill after reset");
    for (int t = 0; t < 20; t++) begin
      v = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); upd_valid = 1; upd_tag = v;
      #1 c(sram_we && sram_wdata === v, "write-through same cycle");
      @(negedge clk); upd_valid = 0;
      c(tag === v && sram_tag === v, "cache and SRAM agree");
    end
    sram_tag = 128'h1234;
    @(negedge clk); invalidate = 1;
    @(negedge clk); invalidate = 0;
    c(!tag_valid, "invalidated");
    @(negedge clk);
    c(tag_valid && tag === 128'h1234, "refill after invalidate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
