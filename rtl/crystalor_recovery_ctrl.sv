// crystalor_recovery_ctrl: recovery after a crash or a verification failure.
//
// The old intermediate nodes are abandoned; only the leaf counters are kept
// and checked. On start the controller runs, in this order:
//  1. Redo: if the busy flag is up, the interrupted store is replayed by the
//     store controller (redo_req/redo_done); then it waits for the write
//     pending queue to drain, so memory holds every committed leaf.
//  2. New tree: level by level from the leaves up, it reads every counter
//     block of level t-1 (rd_*), feeds them to new_counter_unit and writes
//     each new parent block of level t (nw_*) for the tree engine to tag and
//     store. At the top level the single root node is loaded into the
//     on-chip root register (root_load).
//  3. Tag check: it reads all leaf counter blocks again, streams them as
//     D[1..m] through the PXOR-Hash accelerator and compares the result with
//     the SRAM recovery tag: rec_ok if equal, rec_err (replay or
//     manipulation of leaf counters) otherwise.
// The tree has arity BETA and depth DEPTH: level t holds BETA^(DEPTH-t)
// nodes in blocks of K_SC sharing a major counter; each parent node has
// BETA/K_SC child blocks. Leaf data is not read: the leaves are
// authenticated lazily by the encryption engine when next used.
// Memory reads are pipelined: requests (rd_valid/rd_ready) may run ahead of
// responses, which return in order on rsp_valid/rsp_blk, at most one per
// cycle. nw_valid and root_load are one-cycle pulses with no back pressure.
// Steps, their order and the counter rule follow the design; the
// level-by-level schedule, the interfaces and the drain wait are this
// design's choices.
module crystalor_recovery_ctrl
  import crystalor_pkg::*;
#(
  parameter int unsigned BETA  = 128,
  parameter int unsigned DEPTH = 5,
  parameter int unsigned IDX_W = 40,
  localparam int unsigned LVL_W = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              active,
  output logic              hash_own,     // controller drives the accelerator
  output logic              done,
  output logic              rec_ok,
  output logic              rec_err,
  output logic              ctr_overflow, // a new major counter did not fit
  // step 1
  input  logic              busy_flag,
  output logic              redo_req,
  input  logic              redo_done,
  input  logic              wpq_empty,
  // metadata reads
  output logic              rd_valid,
  input  logic              rd_ready,
  output logic [LVL_W-1:0]  rd_level,
  output logic [IDX_W-1:0]  rd_index,
  input  logic              rsp_valid,
  input  sc_block_t         rsp_blk,
  // new node writes
  output logic              nw_valid,
  output logic [LVL_W-1:0]  nw_level,
  output logic [IDX_W-1:0]  nw_index,
  output sc_block_t         nw_blk,
  output logic              root_load,
  output logic [L_MA-1:0]   root_major,
  output logic [L_MI-1:0]   root_minor,
  // PXOR-Hash accelerator (stream mode)
  output logic              hc_valid,
  input  logic              hc_ready,
  output logic [IDX_W-1:0]  hc_idx,
  output blk_t              hc_blk,
  output logic              hc_first,
  output logic              hc_last,
  input  logic              tg_valid,
  input  blk_t              tg_tag,
  input  blk_t              tag_ref
);

  localparam int unsigned CPB = BETA / K_SC;   // child blocks per parent node

  typedef logic [DEPTH:0][63:0] cnt_table_t;

  function automatic cnt_table_t gen_nodes();
    cnt_table_t t;
    t[DEPTH] = 64'd1;
    for (int l = DEPTH - 1; l >= 0; l--) t[l] = t[l+1] * 64'(BETA);
    return t;
  endfunction

  function automatic cnt_table_t gen_blocks();
    cnt_table_t n, b;
    n = gen_nodes();
    for (int l = 0; l <= DEPTH; l++) b[l] = (n[l] + 64'(K_SC) - 1) / 64'(K_SC);
    return b;
  endfunction

  localparam cnt_table_t NODES  = gen_nodes();
  localparam cnt_table_t BLOCKS = gen_blocks();

  typedef enum logic [2:0] {
    R_IDLE, R_REDO, R_DRAIN, R_TREE, R_VERIFY, R_TAG, R_DONE
  } rstate_e;
  rstate_e state;

  logic [LVL_W-1:0] level;      // parent level being built (1..DEPTH)
  logic [IDX_W-1:0] req_cnt;    // blocks requested in this pass
  logic [IDX_W-1:0] rsp_cnt;    // blocks received in this pass
  logic [IDX_W-1:0] out_cnt;    // parent blocks produced at this level
  logic [IDX_W-1:0] child_in_node;
  logic [IDX_W-1:0] node_cnt;   // parent node index within the level
  logic [$clog2(K_SC)-1:0] node_in_blk;
  logic [IDX_W-1:0] pass_len;   // blocks to read in this pass

  logic      ncu_node_last, ncu_blk_last, ncu_out_valid, ncu_ovf;
  sc_block_t ncu_out;

  assign pass_len = (state == R_TREE) ? IDX_W'(BLOCKS[level - 1'b1]) : IDX_W'(BLOCKS[0]);

  assign ncu_node_last = (child_in_node == IDX_W'(CPB - 1));
  assign ncu_blk_last  = ncu_node_last &&
                         ((node_in_blk == ($clog2(K_SC))'(K_SC - 1)) ||
                          (node_cnt == IDX_W'(NODES[level] - 1)));

  new_counter_unit u_ncu (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (state == R_TREE && rsp_valid),
    .in_blk      (rsp_blk),
    .in_node_last(ncu_node_last),
    .in_blk_last (ncu_blk_last),
    .out_valid   (ncu_out_valid),
    .out_blk     (ncu_out),
    .out_overflow(ncu_ovf)
  );

  // Reads
  assign rd_valid = (state == R_TREE || state == R_VERIFY) && (req_cnt < pass_len);
  assign rd_level = (state == R_TREE) ? level - 1'b1 : '0;
  assign rd_index = req_cnt;

  // Stream leaf blocks into the accelerator as they return.
  assign hc_valid = (state == R_VERIFY) && rsp_valid;
  assign hc_idx   = rsp_cnt + 1'b1;
  assign hc_blk   = rsp_blk;
  assign hc_first = (rsp_cnt == '0);
  assign hc_last  = (rsp_cnt == pass_len - 1'b1);

  // New nodes
  assign nw_valid   = ncu_out_valid && (level != LVL_W'(DEPTH));
  assign nw_level   = level;
  assign nw_index   = out_cnt;
  assign nw_blk     = ncu_out;
  assign root_load  = ncu_out_valid && (level == LVL_W'(DEPTH));
  assign root_major = ncu_out.major[L_MA-1:0];
  assign root_minor = ncu_out.minor[0];

  assign active   = (state != R_IDLE) && (state != R_DONE);
  assign hash_own = (state == R_VERIFY) || (state == R_TAG);
  assign redo_req = (state == R_REDO);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= R_IDLE;
      level         <= '0;
      req_cnt       <= '0;
      rsp_cnt       <= '0;
      out_cnt       <= '0;
      child_in_node <= '0;
      node_cnt      <= '0;
      node_in_blk   <= '0;
      done          <= 1'b0;
      rec_ok        <= 1'b0;
      rec_err       <= 1'b0;
      ctr_overflow  <= 1'b0;
    end else begin
      if (rd_valid && rd_ready) req_cnt <= req_cnt + 1'b1;
      if ((state == R_TREE || state == R_VERIFY) && rsp_valid) rsp_cnt <= rsp_cnt + 1'b1;
      if (ncu_out_valid) begin
        out_cnt <= out_cnt + 1'b1;
        if (ncu_ovf) ctr_overflow <= 1'b1;
      end
      if (state == R_TREE && rsp_valid) begin
        if (ncu_node_last) begin
          child_in_node <= '0;
          node_cnt      <= node_cnt + 1'b1;
          node_in_blk   <= ncu_blk_last ? '0 : node_in_blk + 1'b1;
        end else begin
          child_in_node <= child_in_node + 1'b1;
        end
      end
      case (state)
        R_IDLE, R_DONE: begin
          if (start) begin
            state        <= busy_flag ? R_REDO : R_DRAIN;
            done         <= 1'b0;
            rec_ok       <= 1'b0;
            rec_err      <= 1'b0;
            ctr_overflow <= 1'b0;
          end
        end
        R_REDO: if (redo_done) state <= R_DRAIN;
        R_DRAIN: begin
          if (wpq_empty) begin
            state         <= R_TREE;
            level         <= LVL_W'(1);
            req_cnt       <= '0;
            rsp_cnt       <= '0;
            out_cnt       <= '0;
            child_in_node <= '0;
            node_cnt      <= '0;
            node_in_blk   <= '0;
          end
        end
        R_TREE: begin
          // Level done once its last parent block has come out.
          if (ncu_out_valid && out_cnt == IDX_W'(BLOCKS[level] - 1)) begin
            req_cnt       <= '0;
            rsp_cnt       <= '0;
            out_cnt       <= '0;
            child_in_node <= '0;
            node_cnt      <= '0;
            node_in_blk   <= '0;
            if (level == LVL_W'(DEPTH)) state <= R_VERIFY;
            else                        level <= level + 1'b1;
          end
        end
        R_VERIFY: if (rsp_valid && hc_last) state <= R_TAG;
        R_TAG: begin
          if (tg_valid) begin
            state   <= R_DONE;
            done    <= 1'b1;
            rec_ok  <= (tg_tag == tag_ref);
            rec_err <= (tg_tag != tag_ref);
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  // The accelerator never stalls a stream; a lost block would corrupt the tag.
  assert property (@(posedge clk) disable iff (!rst_n) hc_valid |-> hc_ready);

endmodule
