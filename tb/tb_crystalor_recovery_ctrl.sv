// tb_crystalor_recovery_ctrl: runs recoveries on a small tree (arity 16,
// depth 2: 256 leaves in 32 counter blocks, 2 level-1 blocks, one root)
// held in a behavioural metadata memory with a 3-cycle read latency and
// random read stalls. A behavioural accelerator folds streamed blocks into
// a tag. Checks: redo handshake when the busy flag is set, the wait for the
// write pending queue to drain, every new level-1 block and the root against
// the upper-bound equations computed here, the order of the tag stream, and
// rec_ok for intact leaves versus rec_err after a leaf block is replayed.
// A last recovery runs without read stalls and checks the rate: the leaf
// counter blocks are read one per cycle and stream into the accelerator on
// consecutive cycles (one AES call per block per cycle).
module tb_crystalor_recovery_ctrl;
  import crystalor_pkg::*;

  localparam int BETA = 16, DEPTH = 2, IDX_W = 16;
  localparam int LVL_W = $clog2(DEPTH + 1);
  localparam int NB0 = 32, NB1 = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, active, hash_own, done, rec_ok, rec_err, ctr_overflow;
  logic busy_flag, redo_req, redo_done, wpq_empty;
  logic rd_valid, rd_ready, rsp_valid;
  logic [LVL_W-1:0] rd_level, nw_level;
  logic [IDX_W-1:0] rd_index, nw_index, hc_idx;
  sc_block_t rsp_blk, nw_blk;
  logic nw_valid, root_load;
  logic [L_MA-1:0] root_major;
  logic [L_MI-1:0] root_minor;
  logic hc_valid, hc_ready, hc_first, hc_last, tg_valid;
  blk_t hc_blk, tg_tag, tag_ref;

  crystalor_recovery_ctrl #(.BETA(BETA), .DEPTH(DEPTH), .IDX_W(IDX_W)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic c(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // metadata memory
  sc_block_t lvl0 [NB0];
  sc_block_t lvl1 [NB1];
  int nw_count = 0, root_count = 0;
  logic [L_MA-1:0] got_root_major; logic [L_MI-1:0] got_root_minor;
  sc_block_t pipe_q [$];
  int        lat_q  [$];
  bit stall_en = 1;
  int cyc = 0, hc_first_cyc = 0, hc_last_cyc = 0, rd0_first = -1, rd0_last = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    rd_ready <= stall_en ? ($urandom_range(0, 3) != 0) : 1'b1;
    if (rd_valid && rd_ready && rd_level == 0 && !hash_own) begin
      if (rd0_first < 0) rd0_first = cyc;
      rd0_last = cyc;
    end
    rsp_valid <= 0;
    if (rd_valid && rd_ready) begin
      pipe_q.push_back(rd_level == 0 ? lvl0[rd_index] : lvl1[rd_index]);
      lat_q.push_back(3);
    end
    for (int i = 0; i < lat_q.size(); i++) lat_q[i]--;
    if (lat_q.size() && lat_q[0] <= 0) begin
      rsp_valid <= 1; rsp_blk <= pipe_q.pop_front(); void'(lat_q.pop_front());
    end
    if (nw_valid) begin
      nw_count++;
      c(nw_level == 1 && nw_index < NB1, "node write address");
      if (nw_level == 1 && nw_index < NB1) lvl1[nw_index] <= nw_blk;
    end
    if (root_load) begin
      root_count++; got_root_major <= root_major; got_root_minor <= root_minor;
    end
  end

  // behavioural accelerator: XOR of a per-block mix, checks stream order
  function automatic blk_t mix(input logic [IDX_W-1:0] i, input blk_t d);
    return {d[63:0], d[127:64]} ^ (128'(i) * 128'h9e37_79b9_7f4a_7c15);
  endfunction
  blk_t acc; int nstream = 0; int tg_cnt = -1;
  assign hc_ready = 1'b1;
  always @(posedge clk) begin
    tg_valid <= 0;
    if (hc_valid) begin
      if (hc_first) hc_first_cyc = cyc;
      if (hc_last) hc_last_cyc = cyc;
      nstream++;
      acc <= (hc_first ? '0 : acc) ^ mix(hc_idx, hc_blk);
      if (hc_last) tg_cnt <= 12;
    end else if (tg_cnt > 0) tg_cnt <= tg_cnt - 1;
    if (tg_cnt == 1) begin tg_valid <= 1; tg_tag <= acc; end
  end

  // redo model
  int redo_seen = 0;
  always @(posedge clk) begin
    redo_done <= 0;
    if (redo_req && !redo_done && busy_flag) begin
      redo_seen++;
      if (redo_seen == 5) begin redo_done <= 1; busy_flag <= 0; end
    end
  end

  // reference
  function automatic sc_block_t parent(input sc_block_t ch [], input int first_blk, input int nodes);
    sc_block_t p; logic [127:0] ub, majs;
    p = '0; majs = 0;
    for (int n = 0; n < nodes; n++) begin
      ub = 0;
      for (int cb = 0; cb < BETA / K_SC; cb++) begin
        sc_block_t b;
        b = ch[first_blk + n * (BETA / K_SC) + cb];
        ub += 128'(b.major) * 2041;
        for (int m = 0; m < K_SC; m++) ub += 128'(b.minor[m]);
      end
      p.minor[n] = ub[7:0];
      majs += ub >> 8;
    end
    p.major = 64'(majs[55:0]);
    return p;
  endfunction

  function automatic blk_t ref_tag();
    blk_t t; t = '0;
    for (int i = 0; i < NB0; i++) t ^= mix(IDX_W'(i + 1), lvl0[i]);
    return t;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic recover(input bit busy, input bit expect_ok);
    sc_block_t e0, e1, eroot; sc_block_t l0 [], l1 [];
    int n0;
    busy_flag = busy; redo_seen = 0; nw_count = 0; root_count = 0; nstream = 0;
    wpq_empty = 0;
    l0 = new[NB0]; foreach (l0[i]) l0[i] = lvl0[i];
    e0 = parent(l0, 0, K_SC);
    e1 = parent(l0, 16, K_SC);
    l1 = new[NB1]; l1[0] = e0; l1[1] = e1;
    eroot = parent(l1, 0, 1);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    c(active && !rd_valid, "waits for redo / queue drain");
    c(busy == (redo_seen > 0), "redo requested only when busy");
    wpq_empty = 1;
    while (!done) @(negedge clk);
    c(nw_count == NB1, "level-1 blocks written");
    c(lvl1[0] === e0 && lvl1[1] === e1, "level-1 counters");
    c(root_count == 1, "root loaded once");
    c(got_root_major == eroot.major[55:0] && got_root_minor == eroot.minor[0], "root counters");
    c(nstream == NB0, "all leaf blocks streamed");
    c(rec_ok == expect_ok && rec_err == !expect_ok, "verdict");
    c(!active, "idle after done");
    // Counter bound: the new root is at least the sum of all leaf minors.
  endtask

  initial begin
    sc_block_t saved;
    start = 0; busy_flag = 0; wpq_empty = 1;
    for (int i = 0; i < NB0; i++) lvl0[i] = {8'h0, 32'h0, 8'($urandom), $urandom, $urandom};
    repeat (3) @(negedge clk); rst_n = 1;
    tag_ref = ref_tag();
    recover(1, 1);
    // Store some updates: leaves move forward, tag follows.
    saved = lvl0[7];
    for (int i = 0; i < NB0; i += 3) lvl0[i].minor[i % K_SC] += 1;
    lvl0[7].minor[2] += 1;
    tag_ref = ref_tag();
    recover(0, 1);
    // Replay: leaf block 7 rolled back to an old value.
    lvl0[7] = saved;
    recover(0, 0);
    // Stall-free run: rate checks.
    stall_en = 0; rd0_first = -1;
    tag_ref = ref_tag();
    recover(0, 1);
    c(hc_last_cyc - hc_first_cyc == NB0 - 1, $sformatf("tag stream rate: %0d cycles for %0d blocks", hc_last_cyc - hc_first_cyc + 1, NB0));
    c(rd0_last - rd0_first == NB0 - 1, $sformatf("leaf reads: %0d cycles for %0d blocks", rd0_last - rd0_first + 1, NB0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
