// tb_crystalor_top_full: the top at its default size (1024-bit leaves,
// arity 128, depth 5, 40-bit addresses: a 4 TB protected region) taken
// through complete store operations. It loads the key, sets a recovery tag,
// stores to three leaves (one overflowing a minor counter) and checks each
// commit: ciphertext entry at the memory port, counter update, root
// increment, and the on-chip tag updated by exactly
// E_K(i*L ^ D[i]) ^ E_K(i*L ^ D'[i]) computed with a reference AES.
// A full recovery at this size reads 2^32 counter blocks and is not run.
module tb_crystalor_top_full;
  import crystalor_pkg::*;
  import tb_aes_ref_pkg::*;

  localparam int LEAF_W = 1024, ADDR_W = 40, IDX_W = 40, LVL_W = 3;
  localparam int AE_LAT = 14 + LEAF_W / 128;

  logic clk = 0, rst_n = 0, nv_rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_valid, cfg_ready; sram_word_e cfg_word; blk_t cfg_data;
  logic st_valid, st_ready; logic [ADDR_W-1:0] st_addr; logic [LEAF_W-1:0] st_data; sc_block_t st_blk_old;
  logic ae_valid, ae_ready; logic [ADDR_W-1:0] ae_addr; logic [LEAF_W-1:0] ae_data; sc_block_t ae_blk;
  logic ae_rsp_valid; logic [LEAF_W-1:0] ae_rsp_ct; blk_t ae_rsp_tag;
  logic ctr_valid; logic [ADDR_W-1:0] ctr_addr; sc_block_t ctr_blk; logic ctr_overflow;
  logic mem_wr_valid, mem_wr_ready; logic [ADDR_W-1:0] mem_wr_addr; sc_block_t mem_wr_blk;
  blk_t mem_wr_tag; logic [ROOT_W-1:0] mem_wr_root; logic [LEAF_W-1:0] mem_wr_ct;
  logic rec_start, rec_active, rec_done, rec_ok, rec_err, rec_ctr_overflow;
  logic rd_valid, rd_ready; logic [LVL_W-1:0] rd_level, nw_level; logic [IDX_W-1:0] rd_index, nw_index;
  logic rsp_valid; sc_block_t rsp_blk; logic nw_valid; sc_block_t nw_blk;
  logic busy_flag; logic [L_MA-1:0] root_major; logic [L_MI-1:0] root_minor;
  logic [3:0] wpq_count;

  crystalor_top dut (.*);

  int checks = 0, failures = 0;
  task automatic c(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // encryption engine model
  int ae_cnt = 0; logic [LEAF_W-1:0] ae_d; sc_block_t ae_b;
  assign ae_ready = (ae_cnt == 0);
  always @(posedge clk) begin
    ae_rsp_valid <= 0;
    if (ae_valid && ae_ready) begin ae_cnt <= AE_LAT; ae_d <= ae_data; ae_b <= ae_blk; end
    else if (ae_cnt > 0) ae_cnt <= ae_cnt - 1;
    if (ae_cnt == 1) begin ae_rsp_valid <= 1; ae_rsp_ct <= ~ae_d; ae_rsp_tag <= ae_b; end
  end
  assign mem_wr_ready = 1'b1;
  assign rd_ready = 1'b1;
  assign rsp_valid = 1'b0;
  assign rsp_blk = '0;

  logic [ADDR_W-1:0] got_addr; sc_block_t got_blk; logic [LEAF_W-1:0] got_ct; int n_wr = 0;
  int n_ovf = 0;
  always @(posedge clk) if (ctr_valid && ctr_overflow) n_ovf++;
  always @(posedge clk) if (mem_wr_valid) begin
    got_addr <= mem_wr_addr; got_blk <= mem_wr_blk; got_ct <= mem_wr_ct; n_wr++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic cfg_write(input sram_word_e w, input blk_t d);
    @(negedge clk); cfg_valid = 1; cfg_word = w; cfg_data = d;
    while (!cfg_ready) @(negedge clk);
    @(negedge clk); cfg_valid = 0;
    while (!cfg_ready) @(negedge clk);
  endtask

  blk_t key, lref, tag;

  task automatic store(input logic [ADDR_W-1:0] a, input sc_block_t old);
    sc_block_t nb; int s; logic [LEAF_W-1:0] d; logic [63:0] i;
    logic [ROOT_W-1:0] r0; int n0;
    s = a % K_SC; nb = old;
    if (old.minor[s] == 8'hff) begin nb.minor = '0; nb.major = old.major + 1; end
    else nb.minor[s] = old.minor[s] + 1;
    i = 64'(a / K_SC) + 1;
    d = {LEAF_W/32{$urandom}};
    r0 = {root_major, root_minor}; n0 = n_wr;
    @(negedge clk); st_valid = 1; st_addr = a; st_data = d; st_blk_old = old;
    while (!st_ready) @(negedge clk);
    @(negedge clk); st_valid = 0;
    while (busy_flag) @(negedge clk);
    repeat (3) @(negedge clk);
    tag = tag ^ ref_pxor_term(key, lref, i, old) ^ ref_pxor_term(key, lref, i, nb);
    c(dut.u_sram.tag === tag, "tag after store");
    c(n_wr == n0 + 1 && got_addr == a && got_blk === nb && got_ct === ~d, "memory write");
    c({root_major, root_minor} == r0 + 1, "root advanced");
  endtask

  initial begin
    cfg_valid = 0; cfg_word = SR_KEY; cfg_data = 0; st_valid = 0; st_addr = 0; st_data = 0;
    st_blk_old = 0; rec_start = 0;
    repeat (3) @(negedge clk);
    nv_rst_n = 1; rst_n = 1;
    key = {$urandom, $urandom, $urandom, $urandom};
    lref = ref_aes128(key, '0);
    tag = {$urandom, $urandom, $urandom, $urandom};
    cfg_write(SR_KEY, key);
    c(dut.u_sram.l_val === lref, "L = E_K(0)");
    cfg_write(SR_TAG, tag);
    store(40'h7f_ffff_fff3, {64'd12, 64'h0102_0304_0506_0708});
    store(40'h00_0000_0000, '0);
    begin
      sc_block_t b; b = {64'd99, 64'h0};
      b.minor[6] = 8'hff;
      store(40'h12_3456_789e, b);      // minor counter 6 overflows
      c(n_ovf == 1, "exactly one overflow reported");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
