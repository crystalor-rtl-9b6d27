// tb_pxor_hash_accel: checks the PXOR-Hash accelerator against the reference
// model: L = E_K(0); a full TagGen over m blocks streamed one per cycle (and
// its rate: tag 12 cycles after the last block); back-to-back incremental
// updates (delta, new tag and the 13-cycle latency); and that a tag updated
// incrementally equals the TagGen of the modified data; then 200 random
// updates over the whole 40-bit index range with random gaps between them.
module tb_pxor_hash_accel;
  import crystalor_pkg::*;
  import tb_aes_ref_pkg::*;

  localparam int IDX_W = 40;
  localparam int M = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  blk_t key, l_val, tag_in;
  logic cmd_valid, cmd_ready;
  hash_op_e cmd_op;
  logic [IDX_W-1:0] cmd_idx;
  blk_t cmd_old, cmd_new;
  logic cmd_first, cmd_last;
  logic upd_valid, tg_valid, l_valid;
  blk_t upd_delta, upd_tag, tg_tag, l_out;

  pxor_hash_accel dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask
  task automatic check_int(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // Result capture
  blk_t deltas [$];
  blk_t utags  [$];
  int   upd_cycles [$];
  blk_t tg_got;
  int   tg_cycle;
  always @(posedge clk) begin
    if (rst_n && upd_valid) begin
      deltas.push_back(upd_delta);
      utags.push_back(upd_tag);
      upd_cycles.push_back(cycle);
    end
    if (rst_n && tg_valid) begin
      tg_got = tg_tag; tg_cycle = cycle;
    end
  end

  task automatic send(input hash_op_e op, input logic [IDX_W-1:0] i, input blk_t o, input blk_t n,
                      input logic f, input logic l, output int acc_cycle);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_idx = i; cmd_old = o; cmd_new = n; cmd_first = f; cmd_last = l;
    while (!cmd_ready) @(negedge clk);
    acc_cycle = cycle;        // accepted at the coming edge
    @(negedge clk);
    cmd_valid = 0;
  endtask

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  blk_t d [1:M];
  blk_t lref, tref, tnew;
  int   acc_c, last_c;
  int   acc_u [3];

  initial begin
    cmd_valid = 0; cmd_op = HOP_STREAM; cmd_idx = 0; cmd_old = 0; cmd_new = 0;
    cmd_first = 0; cmd_last = 0; tag_in = 0; l_val = 0;
    key = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // L = E_K(0)
    lref = ref_aes128(key, 128'h0);
    send(HOP_GEN_L, '0, '0, '0, 0, 0, acc_c);
    @(posedge l_valid); @(negedge clk);
    check(l_out, lref, "L = E_K(0)");
    l_val = l_out;

    // Full TagGen, blocks streamed back to back (cmd_valid held high).
    tref = '0;
    for (int i = 1; i <= M; i++) begin
      d[i] = {$urandom, $urandom, $urandom, $urandom};
      tref ^= ref_pxor_term(key, lref, 64'(i), d[i]);
    end
    @(negedge clk);
    for (int i = 1; i <= M; i++) begin
      cmd_valid = 1; cmd_op = HOP_STREAM; cmd_idx = IDX_W'(i); cmd_old = d[i];
      cmd_first = (i == 1); cmd_last = (i == M);
      checks++;
      if (!cmd_ready) begin failures++; $display("FAIL stream stalled"); end
      last_c = cycle;
      @(negedge clk);
    end
    cmd_valid = 0;
    repeat (20) @(posedge clk);
    check(tg_got, tref, "TagGen");
    check_int(tg_cycle - last_c, 13, "TagGen latency after last block");

    // Three updates issued back to back (port held valid).
    tag_in = tg_got;
    @(negedge clk);
    begin
      int which [3] = '{3, 7, 12};
      blk_t nd [3];
      for (int u = 0; u < 3; u++) nd[u] = {$urandom, $urandom, $urandom, $urandom};
      for (int u = 0; u < 3; u++) begin
        cmd_valid = 1; cmd_op = HOP_UPDATE; cmd_idx = IDX_W'(which[u]);
        cmd_old = d[which[u]]; cmd_new = nd[u]; cmd_first = 0; cmd_last = 0;
        while (!cmd_ready) @(negedge clk);
        acc_u[u] = cycle;
        @(negedge clk);
      end
      cmd_valid = 0;
      repeat (20) @(posedge clk);
      check_int(deltas.size(), 3, "number of update results");
      for (int u = 0; u < 3 && u < deltas.size(); u++) begin
        check(deltas[u], ref_pxor_term(key, lref, 64'(which[u]), d[which[u]]) ^
                         ref_pxor_term(key, lref, 64'(which[u]), nd[u]), "update delta");
        check(utags[u], tg_got ^ deltas[u], "update tag = tag_in ^ delta");
        check_int(upd_cycles[u] - acc_u[u], 14, "update latency");
      end
      // Apply all three deltas; compare with TagGen of the modified data.
      tnew = tg_got;
      for (int u = 0; u < deltas.size(); u++) tnew ^= deltas[u];
      for (int u = 0; u < 3; u++) d[which[u]] = nd[u];
      tref = '0;
      for (int i = 1; i <= M; i++) tref ^= ref_pxor_term(key, lref, 64'(i), d[i]);
      check(tnew, tref, "incremental tag equals full TagGen");
      // And the accelerator agrees when recomputing from scratch.
      for (int i = 1; i <= M; i++)
        send(HOP_STREAM, IDX_W'(i), d[i], '0, i == 1, i == M, acc_c);
      repeat (20) @(posedge clk);
      check(tg_got, tref, "TagGen after updates");
    end

    // Random updates, full index range, random spacing.
    deltas.delete(); utags.delete(); upd_cycles.delete();
    begin
      logic [IDX_W-1:0] ri [$];
      blk_t ro [$], rn [$];
      int   ra [$];
      for (int u = 0; u < 200; u++) begin
        logic [IDX_W-1:0] i;
        blk_t o, n;
        int a;
        i = IDX_W'({$urandom, $urandom});
        if (i == 0) i = 1;
        o = {$urandom, $urandom, $urandom, $urandom};
        n = {$urandom, $urandom, $urandom, $urandom};
        send(HOP_UPDATE, i, o, n, 0, 0, a);
        ri.push_back(i); ro.push_back(o); rn.push_back(n); ra.push_back(a);
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      repeat (20) @(posedge clk);
      check_int(deltas.size(), 200, "number of random update results");
      for (int u = 0; u < 200 && u < deltas.size(); u++) begin
        check(deltas[u], ref_pxor_term(key, lref, 64'(ri[u]), ro[u]) ^
                         ref_pxor_term(key, lref, 64'(ri[u]), rn[u]), "random update delta");
        check_int(upd_cycles[u] - ra[u], 14, "random update latency");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
