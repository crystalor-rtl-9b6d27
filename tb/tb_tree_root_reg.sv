// tb_tree_root_reg: counts the root up past a minor overflow, checks
// root_next ahead of each increment, a load, and that only nv_rst_n clears it.
module tb_tree_root_reg;
  import crystalor_pkg::*;
  logic clk = 0, nv_rst_n = 0;
  always #5 clk = ~clk;
  logic inc, load;
  logic [L_MA-1:0] load_major, root_major;
  logic [L_MI-1:0] load_minor, root_minor;
  logic [ROOT_W-1:0] root_next;
  tree_root_reg dut (.*);
  int checks = 0, failures = 0;
  longint unsigned model;
  task automatic c(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    inc = 0; load = 0; load_major = 0; load_minor = 0;
    repeat (2) @(negedge clk);
    nv_rst_n = 1;
    model = 0;
    @(negedge clk);
    c({root_major, root_minor} == 64'(model), "zero after reset");
    for (int t = 0; t < 600; t++) begin
      c(root_next == 64'(model + 1), "root_next");
      inc = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (inc) model++;
      c({root_major, root_minor} == 64'(model), "count");
    end
    inc = 0;
    c(root_major >= 1, "minor overflowed into major");
    load = 1; load_major = 56'h12_3456_789a_bcde; load_minor = 8'hff;
    @(negedge clk); load = 0;
    c(root_major == 56'h12_3456_789a_bcde && root_minor == 8'hff, "load");
    c(root_next == {56'h12_3456_789a_bcdf, 8'h00}, "root_next over minor overflow");
    @(negedge clk); inc = 1; @(negedge clk); inc = 0;
    c(root_major == 56'h12_3456_789a_bcdf && root_minor == 0, "inc over overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
