// tb_wpq: random push/pop traffic against a queue model; checks order, the
// full flag at 8 entries (push refused), empty, and that the crash reset of
// the rest of the chip does not touch the queue (it has no such input).
module tb_wpq;
  logic clk = 0, nv_rst_n = 0;
  always #5 clk = ~clk;
  logic push_valid, push_ready, pop_valid, pop_ready, empty, full;
  logic [31:0] push_data, pop_data;
  logic [3:0] count;
  wpq #(.W(32), .DEPTH(8)) dut (.*);
  int checks = 0, failures = 0, nfull = 0;
  logic [31:0] q [$];
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    push_valid = 0; pop_ready = 0; push_data = 0;
    repeat (2) @(negedge clk);
    nv_rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      push_valid = ($urandom_range(0, 99) < (t < 1500 ? 70 : 30));
      pop_ready  = ($urandom_range(0, 99) < (t < 1500 ? 30 : 70));
      push_data  = $urandom;
      #1;
      checks++;
      if (count != 4'(q.size()) || empty != (q.size() == 0) || full != (q.size() == 8)) begin
        failures++; $display("FAIL flags count %0d model %0d", count, q.size());
      end
      if (full) nfull++;
      if (pop_valid && pop_ready) begin
        checks++;
        if (pop_data !== q[0]) begin failures++; $display("FAIL order"); end
      end
      begin
        logic dpop, dpush;
        dpop  = pop_valid && pop_ready;
        dpush = push_valid && push_ready;
        @(posedge clk);
        if (dpop) void'(q.pop_front());
        if (dpush) q.push_back(push_data);
      end
    end
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
