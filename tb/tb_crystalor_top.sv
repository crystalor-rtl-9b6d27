// tb_crystalor_top: end-to-end run of the recovery-tag hardware on a
// two-level tree of the default arity (128, depth 2: 16384 leaves of 256
// bits, 2048 leaf counter blocks, 16 level-1 blocks, one root) with
// behavioural models of the encryption engine (latency 14 + 256/128 = 16
// cycles), the on-chip counter copy of the tree engine, and main memory.
// Sequence: load the key (L = E_K(0) is generated), set the tag of a memory
// whose counters start at random values, run stores (some overflow a minor
// counter, some find the write pending queue full because memory stalls),
// crash in the middle of a store, recover (redo, new tree, tag check: ok),
// store again, recover again (ok), then replay an old counter block in
// memory and recover (error). The recovery tag is checked against a
// PXOR-Hash TagGen computed here with a reference AES; the new level-1
// blocks and root against the upper-bound equations; ciphertexts against
// the encryption model; the store commit latency against the encryption
// latency (the tag update must add nothing). Each mechanism is counted and
// a mechanism that never happened counts as a failure.
module tb_crystalor_top;
  import crystalor_pkg::*;
  import tb_aes_ref_pkg::*;

  localparam int LEAF_W = 256, ADDR_W = 14, IDX_W = 16, BETA = 128, DEPTH = 2;
  localparam int LVL_W = $clog2(DEPTH + 1);
  localparam int NLEAF = BETA ** DEPTH, NB0 = NLEAF / K_SC, NB1 = NLEAF / BETA / K_SC;
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

  crystalor_top #(.LEAF_W(LEAF_W), .ADDR_W(ADDR_W), .IDX_W(IDX_W), .BETA(BETA), .DEPTH(DEPTH))
    dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic c(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  // mechanism counters
  int n_lgen = 0, n_store = 0, n_ovf = 0, n_full = 0, n_redo = 0, n_rec_ok = 0, n_rec_err = 0;
  int n_nodes = 0, n_root = 0, n_latency = 0;

  // ---------------------------------------------------------------- models
  blk_t key, lref;
  function automatic logic [LEAF_W-1:0] pad(input logic [ADDR_W-1:0] a, input sc_block_t b);
    return {LEAF_W/128{b ^ {120'h0, a}}} ^ {LEAF_W/32{32'h5a5a_0f0f}};
  endfunction

  // encryption engine
  int ae_cnt = 0; logic [ADDR_W-1:0] ae_a; logic [LEAF_W-1:0] ae_d; sc_block_t ae_b;
  assign ae_ready = (ae_cnt == 0);
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin ae_cnt <= 0; ae_rsp_valid <= 0; end
    else begin
      ae_rsp_valid <= 0;
      if (ae_valid && ae_ready) begin ae_cnt <= AE_LAT; ae_a <= ae_addr; ae_d <= ae_data; ae_b <= ae_blk; end
      else if (ae_cnt > 0) ae_cnt <= ae_cnt - 1;
      if (ae_cnt == 1) begin
        ae_rsp_valid <= 1; ae_rsp_ct <= ae_d ^ pad(ae_a, ae_b); ae_rsp_tag <= ae_b ^ 128'(ae_a);
      end
    end
  end

  // memory and on-chip counter copy
  sc_block_t mem_blk [NB0];
  sc_block_t mem_lvl1 [NB1];
  logic [LEAF_W-1:0] mem_ct [NLEAF];
  logic [LEAF_W-1:0] exp_ct [NLEAF];
  sc_block_t onchip [NB0];
  logic      mem_stall;
  assign mem_wr_ready = !mem_stall;
  always @(posedge clk) if (nv_rst_n && mem_wr_valid && mem_wr_ready) begin
    mem_blk[mem_wr_addr / K_SC] <= mem_wr_blk;
    mem_ct[mem_wr_addr] <= mem_wr_ct;
  end
  always @(posedge clk) if (rst_n && ctr_valid) begin
    onchip[ctr_addr / K_SC] <= ctr_blk;
    if (ctr_overflow) n_ovf++;
  end
  always @(posedge clk) if (wpq_count == 8 && busy_flag) n_full++;
  // memory stalls end after the full queue has held back a store 40 cycles
  int full_wait = 0;
  always @(negedge clk) begin
    if (mem_stall && wpq_count == 8 && busy_flag) full_wait++;
    if (full_wait == 40) begin mem_stall = 0; full_wait = 0; end
  end

  // recovery reads, 2-cycle latency
  sc_block_t rq [$]; int rl [$];
  assign rd_ready = 1'b1;
  always @(posedge clk) begin
    rsp_valid <= 0;
    if (rst_n && rd_valid) begin
      rq.push_back(rd_level == 0 ? mem_blk[rd_index] : mem_lvl1[rd_index]); rl.push_back(2);
    end
    foreach (rl[i]) rl[i]--;
    if (rl.size() && rl[0] <= 0) begin rsp_valid <= 1; rsp_blk <= rq.pop_front(); void'(rl.pop_front()); end
    if (rst_n && nw_valid) begin
      n_nodes++;
      if (nw_level == 1 && nw_index < NB1) mem_lvl1[nw_index] <= nw_blk;
      else begin failures++; $display("FAIL node address"); end
    end
  end

  // ---------------------------------------------------------------- reference
  function automatic blk_t ref_tag();
    blk_t t; t = '0;
    for (int i = 0; i < NB0; i++) t ^= ref_pxor_term(key, lref, 64'(i + 1), mem_blk[i]);
    return t;
  endfunction
  function automatic sc_block_t parent(input sc_block_t ch [], input int first, input int nodes);
    sc_block_t p; logic [127:0] ub, majs;
    p = '0; majs = 0;
    for (int n = 0; n < nodes; n++) begin
      ub = 0;
      for (int cb = 0; cb < BETA / K_SC; cb++) begin
        ub += 128'(ch[first + n * (BETA / K_SC) + cb].major) * 2041;
        for (int m = 0; m < K_SC; m++) ub += 128'(ch[first + n * (BETA / K_SC) + cb].minor[m]);
      end
      p.minor[n] = ub[7:0];
      majs += ub >> 8;
    end
    p.major = 64'(majs[55:0]);
    return p;
  endfunction

  // ---------------------------------------------------------------- tasks
  task automatic cfg_write(input sram_word_e w, input blk_t d);
    @(negedge clk); cfg_valid = 1; cfg_word = w; cfg_data = d;
    while (!cfg_ready) @(negedge clk);
    @(negedge clk); cfg_valid = 0;
    while (!cfg_ready) @(negedge clk);
  endtask

  int commit_cycle;
  always @(posedge clk) if (rst_n && ctr_valid) commit_cycle = cycle;

  task automatic store(input logic [ADDR_W-1:0] a, input bit crash, input bit check_lat);
    int t0; sc_block_t nb, old; int s;
    old = onchip[a / K_SC]; s = a % K_SC; nb = old;
    if (old.minor[s] == 8'hff) begin nb.minor = '0; nb.major = old.major + 1; end
    else nb.minor[s] = old.minor[s] + 1;
    @(negedge clk);
    st_valid = 1; st_addr = a; st_data = {LEAF_W/32{$urandom}}; st_blk_old = old;
    while (!st_ready) @(negedge clk);
    t0 = cycle;
    exp_ct[a] = st_data ^ pad(a, nb);
    @(negedge clk); st_valid = 0;
    n_store++;
    if (crash) begin
      repeat (6) @(negedge clk);
      c(busy_flag, "busy during store");
      rst_n = 0; @(negedge clk); rst_n = 1;
      c(busy_flag, "busy flag survives the crash");
      return;
    end
    while (busy_flag) @(negedge clk);
    if (check_lat) begin
      n_latency++;
      c(commit_cycle - t0 == AE_LAT + 3, $sformatf("store latency %0d", commit_cycle - t0));
    end
  endtask

  task automatic recover(input bit expect_ok);
    sc_block_t l0 [], l1 [], er;
    blk_t tref;
    bit was_busy;
    was_busy = busy_flag;
    mem_stall = 0;
    @(negedge clk); rec_start = 1; @(negedge clk); rec_start = 0;
    while (!rec_done) @(negedge clk);
    if (was_busy) begin
      n_redo++;
      c(!busy_flag, "redo cleared busy");
    end
    // memory now holds every leaf; compare with references
    l0 = new[NB0]; foreach (l0[i]) l0[i] = mem_blk[i];
    l1 = new[NB1];
    foreach (l1[b]) begin
      l1[b] = parent(l0, b * BETA, K_SC);
      c(mem_lvl1[b] === l1[b], $sformatf("new level-1 block %0d", b));
    end
    er = parent(l1, 0, 1);
    c(root_major == er.major[55:0] && root_minor == er.minor[0], "new root");
    n_root++;
    tref = ref_tag();
    c(rec_ok == expect_ok && rec_err == !expect_ok, "recovery verdict");
    if (rec_ok) n_rec_ok++;
    if (rec_err) n_rec_err++;
    if (expect_ok) c(dut.u_sram.tag === tref, "on-chip tag equals TagGen of memory");
    // the tree engine reloads its counter copy from memory
    foreach (onchip[i]) onchip[i] = mem_blk[i];
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sc_block_t snap [NB0];
    cfg_valid = 0; cfg_word = SR_KEY; cfg_data = 0; st_valid = 0; st_addr = 0; st_data = 0;
    st_blk_old = 0; rec_start = 0; mem_stall = 0;
    foreach (mem_ct[i]) begin mem_ct[i] = '0; exp_ct[i] = '0; end
    // memory in use: random counters, some minors at their maximum
    for (int i = 0; i < NB0; i++) begin
      mem_blk[i] = {8'h0, 40'h0, 16'($urandom), $urandom, $urandom};
      if (i % 4 == 0) for (int m = 0; m < K_SC; m++) mem_blk[i].minor[m] = 8'hff;
      onchip[i] = mem_blk[i];
    end
    repeat (3) @(negedge clk);
    nv_rst_n = 1; rst_n = 1;
    key = {$urandom, $urandom, $urandom, $urandom};
    lref = ref_aes128(key, '0);
    cfg_write(SR_KEY, key);
    n_lgen++;
    c(dut.u_sram.l_val === lref, "L = E_K(0) stored");
    cfg_write(SR_TAG, ref_tag());

    foreach (snap[i]) snap[i] = mem_blk[i];
    // nominal stores, first with latency checks
    for (int t = 0; t < 10; t++) store(ADDR_W'($urandom), 0, 1);
    // memory stalls: the queue fills up
    mem_stall = 1;
    for (int t = 0; t < 12; t++) begin
      store(ADDR_W'($urandom), 0, 0);
    end
    mem_stall = 0;
    repeat (20) @(negedge clk);
    foreach (exp_ct[i]) if (exp_ct[i] != 0) c(mem_ct[i] === exp_ct[i], "ciphertext in memory");
    // crash in the middle of a store, then recover
    mem_stall = 1;
    store(ADDR_W'(8'd3), 0, 0);
    store(ADDR_W'(8'd77), 1, 0);
    recover(1);
    c(mem_ct[77] === exp_ct[77], "interrupted store completed by redo");
    // nominal operation again
    for (int t = 0; t < 10; t++) store(ADDR_W'($urandom), 0, 0);
    repeat (20) @(negedge clk);
    recover(1);
    // replay: an old counter block written back to memory
    begin
      int j; j = -1;
      for (int i = 0; i < NB0; i++) if (mem_blk[i] !== snap[i] && j < 0) j = i;
      c(j >= 0, "some block changed");
      if (j >= 0) mem_blk[j] = snap[j];
    end
    recover(0);

    c(n_lgen > 0, "L generated");
    c(n_store > 0, "stores");
    c(n_ovf > 0, $sformatf("minor counter overflow (%0d)", n_ovf));
    c(n_full > 0, "write pending queue full");
    c(n_redo > 0, "redo after crash");
    c(n_rec_ok > 0, "recovery ok");
    c(n_rec_err > 0, "replay detected");
    c(n_nodes > 0 && n_root > 0, "new tree built");
    c(n_latency > 0, "latency checked");
    $display("mechanisms: lgen=%0d stores=%0d overflow=%0d wpq_full_cycles=%0d redo=%0d rec_ok=%0d rec_err=%0d nodes=%0d",
             n_lgen, n_store, n_ovf, n_full, n_redo, n_rec_ok, n_rec_err, n_nodes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
