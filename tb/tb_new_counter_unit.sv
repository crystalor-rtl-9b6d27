// tb_new_counter_unit: streams random child blocks for full parent blocks
// (K_SC nodes, 2 child blocks per node) and for a one-node root block, and
// compares each parent block with the upper-bound equations evaluated in
// the testbench with wide integer arithmetic. Also checks that every new
// history without any overflow gives exact sums, and that a major sum too
// wide for 56 bits raises the overflow flag.
module tb_new_counter_unit;
  import crystalor_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_node_last, in_blk_last, out_valid, out_overflow;
  sc_block_t in_blk, out_blk;
  new_counter_unit dut (.*);
  int checks = 0, failures = 0, nout = 0;
  sc_block_t exp_q [$];
  logic      ovf_q [$];
  int        novf = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    nout++;
    checks++;
    if (exp_q.size() == 0 || out_blk !== exp_q[0]) begin
      failures++;
      $display("FAIL got %h exp %h", out_blk, exp_q.size() ? exp_q[0] : '0);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
    checks++;
    if (ovf_q.size() == 0 || out_overflow !== ovf_q[0]) begin failures++; $display("FAIL overflow flag"); end
    if (out_overflow) novf++;
    if (ovf_q.size()) void'(ovf_q.pop_front());
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run_block(input int nodes, input int cpb, input logic low_major,
                         input logic ovf_case = 0);
    logic [127:0] ub, majs;
    sc_block_t e;
    e = '0; majs = 0;
    for (int n = 0; n < nodes; n++) begin
      ub = 0;
      for (int c = 0; c < cpb; c++) begin
        sc_block_t b;
        b = {8'h00, (low_major ? 24'h0 : (ovf_case ? 24'hff_ffff : 24'($urandom_range(0, 255)))), (low_major ? 32'($urandom_range(0,3)) : $urandom),
             $urandom, $urandom};
        ub += 128'(b.major) * 128'(8 * 255 + 1);
        for (int m = 0; m < K_SC; m++) ub += 128'(b.minor[m]);
        @(negedge clk);
        in_valid = 1; in_blk = b;
        in_node_last = (c == cpb - 1);
        in_blk_last  = (c == cpb - 1) && (n == nodes - 1);
      end
      e.minor[n] = ub[7:0];
      majs += ub >> 8;
    end
    e.major = 64'(majs[55:0]);
    exp_q.push_back(e);
    ovf_q.push_back((majs >> 56) != 0);
    @(negedge clk); in_valid = 0;
    if ($urandom_range(0, 1)) @(negedge clk);
  endtask
  initial begin
    in_valid = 0; in_node_last = 0; in_blk_last = 0; in_blk = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) run_block(K_SC, 2, t % 2);
    run_block(1, 2, 0);   // root: one node
    run_block(3, 1, 1);   // partial block, one child block per node
    run_block(K_SC, 2, 0, 1);   // major sum too large: overflow flag
    // Counters of a history with no overflow are exact sums.
    begin
      sc_block_t b;
      b = '0; b.minor[0] = 8'd5; b.minor[3] = 8'd7;
      @(negedge clk); in_valid = 1; in_blk = b; in_node_last = 1; in_blk_last = 1;
      @(negedge clk); in_valid = 0;
      ovf_q.push_back(1'b0);
      exp_q.push_back({64'd0, 8'd12, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0});
    end
    repeat (5) @(negedge clk);
    checks++;
    if (nout != 24 || novf != 1) begin failures++; $display("FAIL count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
