// tb_split_counter_inc: random blocks and node selections compared with an
// arithmetic model: minor + 1, or on overflow all minors zero and major + 1.
module tb_split_counter_inc;
  import crystalor_pkg::*;
  sc_block_t blk_in, blk_out;
  logic [$clog2(K_SC)-1:0] sel;
  logic overflow;
  split_counter_inc dut (.*);
  int checks = 0, failures = 0, novf = 0;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    sc_block_t e;
    for (int t = 0; t < 2000; t++) begin
      blk_in = {8'h00, 24'($urandom), $urandom, $urandom, $urandom};
      if (t % 4 == 0) blk_in.minor[$urandom_range(0, K_SC-1)] = 8'hff;
      if (t == 5) blk_in.major = 64'h00ff_ffff_ffff_ffff;   // major wrap
      sel = $urandom_range(0, K_SC-1);
      if (t == 5) blk_in.minor[sel] = 8'hff;
      #1;
      e = blk_in;
      if (blk_in.minor[sel] == 8'hff) begin
        for (int j = 0; j < K_SC; j++) e.minor[j] = 0;
        e.major = (blk_in.major + 1) % (64'd1 << L_MA);
        novf++;
      end else e.minor[sel] = blk_in.minor[sel] + 1;
      checks++;
      if (blk_out !== e || overflow !== (blk_in.minor[sel] == 8'hff)) begin
        failures++;
        $display("FAIL in %h sel %0d got %h exp %h", blk_in, sel, blk_out, e);
      end
    end
    checks++;
    if (novf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
