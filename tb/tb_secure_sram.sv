// tb_secure_sram: writes each word and checks that all three read ports show
// the right values, that a write touches only its own word, and that
// contents stay put while no write is issued.
module tb_secure_sram;
  import crystalor_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we; sram_word_e waddr; blk_t wdata, key, l_val, tag;
  secure_sram dut (.*);
  int checks = 0, failures = 0;
  blk_t m [3];
  task automatic wr(input sram_word_e a, input blk_t d);
    @(negedge clk); we = 1; waddr = a; wdata = d; m[a] = d;
    @(negedge clk); we = 0;
  endtask
  task automatic chk();
    checks += 3;
    if (key !== m[0])   begin failures++; $display("FAIL key");   end
    if (l_val !== m[1]) begin failures++; $display("FAIL L");     end
    if (tag !== m[2])   begin failures++; $display("FAIL tag");   end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; waddr = SR_KEY; wdata = '0;
    wr(SR_KEY, {4{32'h1111_2222}});
    wr(SR_L,   {4{32'h3333_4444}});
    wr(SR_TAG, {4{32'h5555_6666}});
    chk();
    for (int t = 0; t < 50; t++) begin
      wr(sram_word_e'($urandom_range(0, 2)), {$urandom, $urandom, $urandom, $urandom});
      chk();
    end
    @(negedge clk); wdata = '1; repeat (5) @(negedge clk);
    chk();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
