// tb_crystalor_store_ctrl: drives stores through the controller with
// behavioural models of the encryption engine (fixed 6-cycle latency,
// ciphertext = data XOR a pattern of address and counters) and of the
// accelerator (13-cycle latency, tag = old tag XOR a function of the
// update). Checks the write pending queue entry, the committed tag, the
// counter update (including a minor overflow), the busy flag, root
// increments, the commit cycle, and a crash in the middle of a store
// followed by a redo that completes it exactly once.
module tb_crystalor_store_ctrl;
  import crystalor_pkg::*;

  localparam int LEAF_W = 1024, ADDR_W = 40, IDX_W = 40;
  localparam int WQ_W = ADDR_W + 2 * BLK_W + ROOT_W + LEAF_W;

  logic clk = 0, rst_n = 0, nv_rst_n = 0;
  always #5 clk = ~clk;

  logic st_valid, st_ready, redo_req, redo_done, busy_flag;
  logic [ADDR_W-1:0] st_addr, ae_addr, ctr_addr;
  logic [LEAF_W-1:0] st_data, ae_data, ae_rsp_ct;
  sc_block_t st_blk_old, ae_blk, ctr_blk;
  logic ae_valid, ae_ready, ae_rsp_valid;
  blk_t ae_rsp_tag;
  logic hc_valid, hc_ready, hr_valid;
  logic [IDX_W-1:0] hc_idx;
  blk_t hc_old, hc_new, hr_tag, tag_wdata;
  logic tag_we, wq_valid, wq_ready, root_inc, ctr_valid, ctr_overflow;
  logic [WQ_W-1:0] wq_data;
  logic [ROOT_W-1:0] root_next;

  crystalor_store_ctrl dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic c(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  function automatic logic [LEAF_W-1:0] ae_pat(input logic [ADDR_W-1:0] a, input sc_block_t b);
    return {LEAF_W/128{b}} ^ LEAF_W'(a) * 9973;
  endfunction
  function automatic blk_t h_pat(input logic [IDX_W-1:0] i, input blk_t o, input blk_t n);
    return {o[63:0], n[127:64]} ^ 128'(i) * 128'h1_0000_0001;
  endfunction

  // Behavioural encryption engine: accepts immediately, answers 6 cycles later.
  int ae_cnt = -1;
  logic [ADDR_W-1:0] ae_a; logic [LEAF_W-1:0] ae_d; sc_block_t ae_b;
  assign ae_ready = 1'b1;
  always @(posedge clk) begin
    ae_rsp_valid <= 0;
    if (ae_valid && ae_ready) begin ae_cnt <= 6; ae_a <= ae_addr; ae_d <= ae_data; ae_b <= ae_blk; end
    else if (ae_cnt > 0) ae_cnt <= ae_cnt - 1;
    if (ae_cnt == 1) begin
      ae_rsp_valid <= 1; ae_rsp_ct <= ae_d ^ ae_pat(ae_a, ae_b); ae_rsp_tag <= {ae_b[63:0], ae_b[127:64]};
    end
  end
  // Behavioural accelerator: 13 cycles.
  blk_t cur_tag;
  int h_cnt = -1;
  blk_t h_res;
  assign hc_ready = (h_cnt <= 0);
  always @(posedge clk) begin
    hr_valid <= 0;
    if (hc_valid && hc_ready) begin h_cnt <= 12; h_res <= cur_tag ^ h_pat(hc_idx, hc_old, hc_new); end
    else if (h_cnt > 0) h_cnt <= h_cnt - 1;
    if (h_cnt == 1) begin hr_valid <= 1; hr_tag <= h_res; end
  end
  always @(posedge clk) if (tag_we) cur_tag <= tag_wdata;
  // Root
  logic [ROOT_W-1:0] root;
  assign root_next = root + 1;
  always @(posedge clk) if (!nv_rst_n) root <= 0; else if (root_inc) root <= root + 1;
  // WPQ sink
  logic [WQ_W-1:0] wq_seen [$];
  int commit_cycle;
  assign wq_ready = 1'b1;
  always @(posedge clk) if (rst_n && wq_valid && wq_ready) begin
    wq_seen.push_back(wq_data); commit_cycle = cycle;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic do_store(input logic [ADDR_W-1:0] a, input logic [LEAF_W-1:0] d,
                          input sc_block_t old, input bit crash);
    sc_block_t nb; int sel; blk_t exp_tag; int t0; int n0;
    logic [ROOT_W-1:0] r0;
    sel = a % K_SC;
    nb = old;
    if (old.minor[sel] == 8'hff) begin nb.minor = '0; nb.major = old.major + 1; end
    else nb.minor[sel] = old.minor[sel] + 1;
    exp_tag = cur_tag ^ h_pat(IDX_W'(a / K_SC + 1), old, nb);
    r0 = root; n0 = wq_seen.size();
    @(negedge clk);
    st_valid = 1; st_addr = a; st_data = d; st_blk_old = old;
    while (!st_ready) @(negedge clk);
    t0 = cycle;
    @(negedge clk);
    st_valid = 0; st_data = '0; st_blk_old = '0;
    c(busy_flag, "busy raised");
    if (crash) begin
      repeat (4) @(negedge clk);
      rst_n = 0; @(negedge clk); rst_n = 1;          // crash: volatile state lost
      c(busy_flag, "busy survives crash");
      c(!st_ready, "no new store while busy");
      repeat (3) @(negedge clk);
      c(wq_seen.size() == n0, "nothing committed before redo");
      redo_req = 1;
      while (!redo_done) @(negedge clk);
      redo_req = 0;
    end else begin
      while (busy_flag) @(negedge clk);
      c(commit_cycle - t0 == 15, $sformatf("commit cycle %0d", commit_cycle - t0));
    end
    @(negedge clk);
    c(!busy_flag, "busy dropped");
    c(wq_seen.size() == n0 + 1, "exactly one WPQ entry");
    c(wq_seen[$] === {a, nb, {nb[63:0], nb[127:64]}, r0 + 64'd1, d ^ ae_pat(a, nb)}, "WPQ entry");
    c(cur_tag === exp_tag, "committed tag");
    c(root == r0 + 1, "root advanced once");
  endtask

  // counter update output
  sc_block_t last_ctr; logic last_ovf;
  always @(posedge clk) if (ctr_valid) begin last_ctr <= ctr_blk; last_ovf <= ctr_overflow; end

  initial begin
    sc_block_t b;
    st_valid = 0; st_addr = 0; st_data = 0; st_blk_old = 0; redo_req = 0;
    cur_tag = 128'h0123_4567_89ab_cdef_0011_2233_4455_6677;
    repeat (3) @(negedge clk);
    nv_rst_n = 1; rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      b = {8'h0, 24'($urandom), $urandom, $urandom, $urandom};
      do_store(ADDR_W'($urandom), {LEAF_W/32{$urandom}}, b, t % 4 == 3);
    end
    // minor overflow
    b = {64'd41, 64'h0};
    b.minor[5] = 8'hff;
    do_store(ADDR_W'(16'h1235), {LEAF_W/32{32'hcafe_f00d}}, b, 0);
    c(last_ovf && last_ctr.major == 64'd42 && last_ctr.minor == '0, "overflow reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
