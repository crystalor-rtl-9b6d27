// tb_gf128_mul_idx: compares i*L with the reference field multiplication for
// chosen and random indices, and checks linearity (i^j)*L = i*L ^ j*L.
module tb_gf128_mul_idx;
  import tb_aes_ref_pkg::*;

  logic [39:0]  idx, idx2;
  logic [127:0] l_in, mask, mask2;
  int checks = 0, failures = 0;

  gf128_mul_idx dut  (.idx(idx),  .l_in(l_in), .mask(mask));
  gf128_mul_idx dut2 (.idx(idx2), .l_in(l_in), .mask(mask2));

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] m1;
    // 1*L = L, 2*L = doubling with carry, 0*L = 0
    l_in = 128'h8000_0000_0000_0000_0000_0000_0000_0001;
    idx = 40'd1; idx2 = 40'd2; #1;
    check(mask, l_in, "1*L");
    check(mask2, 128'h0000_0000_0000_0000_0000_0000_0000_0085, "2*L with reduction");
    idx = 40'd0; idx2 = 40'd3; #1;
    check(mask, 128'h0, "0*L");
    check(mask2, 128'h8000_0000_0000_0000_0000_0000_0000_0084, "3*L");
    for (int t = 0; t < 200; t++) begin
      l_in = {$urandom, $urandom, $urandom, $urandom};
      idx  = {8'($urandom), $urandom};
      idx2 = {8'($urandom), $urandom};
      #1;
      check(mask, ref_gf_mul_idx(64'(idx), l_in), "random idx");
      m1 = mask ^ mask2;
      idx = idx ^ idx2;
      #1;
      check(mask, m1, "linearity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
