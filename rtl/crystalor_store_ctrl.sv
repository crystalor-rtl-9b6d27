// crystalor_store_ctrl: the store sequence that keeps leaf counters and the
// on-chip recovery tag consistent.
//
// One store at a time:
//  1. A store (st_valid) names a leaf node (st_addr), its plaintext
//     (st_data) and the current counter block of the node's split-counter
//     group (st_blk_old). The new block is computed (split_counter_inc), the
//     request is copied into the non-volatile redo register and the busy
//     flag (a one-bit non-volatile flag) is raised.
//  2. The encryption engine is asked to encrypt the leaf under the new nonce
//     (ae_*), and, in parallel,
//  3. the PXOR-Hash accelerator is asked for the incremental tag update of
//     block i = st_addr/K_SC + 1 from the old to the new block (hc_*).
//  4./5. When both have answered, in one cycle: the ciphertext entry enters
//     the write pending queue (wq_*), the new tag is written to the tag
//     cache and SRAM (tag_we), the busy flag drops, the root counter
//     advances (root_inc) and the new counters go to the tree engine (ctr_*).
// After a crash (rst_n) the busy flag and redo register survive; redo_req
// then replays steps 2-5 from the redo register and answers redo_done.
// Timing: at least 3 cycles from request to commit plus the slower of the
// encryption engine and the accelerator (13 cycles). The sequence follows
// the design; serving one store at a time, committing the counters to the
// tree engine at step 4 and replaying the tag update on redo are this
// design's choices.
module crystalor_store_ctrl
  import crystalor_pkg::*;
#(
  parameter int unsigned LEAF_W = 1024,
  parameter int unsigned ADDR_W = 40,
  parameter int unsigned IDX_W  = 40,
  localparam int unsigned WQ_W  = ADDR_W + 2 * BLK_W + ROOT_W + LEAF_W
) (
  input  logic                    clk,
  input  logic                    rst_n,      // crash / warm reset
  input  logic                    nv_rst_n,   // power-on reset of persistent state
  // store requests
  input  logic                    st_valid,
  output logic                    st_ready,
  input  logic [ADDR_W-1:0]       st_addr,
  input  logic [LEAF_W-1:0]       st_data,
  input  sc_block_t               st_blk_old,
  // redo after crash
  input  logic                    redo_req,
  output logic                    redo_done,
  output logic                    busy_flag,
  // authenticated encryption engine
  output logic                    ae_valid,
  input  logic                    ae_ready,
  output logic [ADDR_W-1:0]       ae_addr,
  output logic [LEAF_W-1:0]       ae_data,
  output sc_block_t               ae_blk,
  input  logic                    ae_rsp_valid,
  input  logic [LEAF_W-1:0]       ae_rsp_ct,
  input  blk_t                    ae_rsp_tag,
  // PXOR-Hash accelerator
  output logic                    hc_valid,
  input  logic                    hc_ready,
  output logic [IDX_W-1:0]        hc_idx,
  output blk_t                    hc_old,
  output blk_t                    hc_new,
  input  logic                    hr_valid,
  input  blk_t                    hr_tag,
  // recovery tag commit
  output logic                    tag_we,
  output blk_t                    tag_wdata,
  // write pending queue: {addr, counter block, AE tag, root, ciphertext}
  output logic                    wq_valid,
  input  logic                    wq_ready,
  output logic [WQ_W-1:0]         wq_data,
  // tree root and counter update towards the tree engine
  output logic                    root_inc,
  input  logic [ROOT_W-1:0]       root_next,
  output logic                    ctr_valid,
  output logic [ADDR_W-1:0]       ctr_addr,
  output sc_block_t               ctr_blk,
  output logic                    ctr_overflow
);

  localparam int unsigned SEL_W = $clog2(K_SC);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_COMMIT} state_e;
  state_e state;

  // Non-volatile redo register and busy flag.
  logic [ADDR_W-1:0] nv_addr;
  logic [LEAF_W-1:0] nv_data;
  sc_block_t         nv_old, nv_new;
  logic              nv_ovf;
  logic              busy_q;

  // Volatile progress of the current store.
  logic              ae_sent, ae_done, hc_sent, h_done, redo_q;
  logic [LEAF_W-1:0] ct_q;
  blk_t              aetag_q, newtag_q;

  sc_block_t inc_blk;
  logic      inc_ovf;

  split_counter_inc u_inc (
    .blk_in  (st_blk_old),
    .sel     (st_addr[SEL_W-1:0]),
    .blk_out (inc_blk),
    .overflow(inc_ovf)
  );

  logic accept, start_redo, commit;
  assign st_ready   = (state == S_IDLE) && !busy_q && !redo_req;
  assign accept     = st_valid && st_ready;
  assign start_redo = (state == S_IDLE) && busy_q && redo_req;
  assign commit     = (state == S_COMMIT) && wq_ready;

  always_ff @(posedge clk or negedge nv_rst_n) begin
    if (!nv_rst_n)   busy_q <= 1'b0;
    else if (accept) busy_q <= 1'b1;
    else if (commit) busy_q <= 1'b0;
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      nv_addr <= st_addr;
      nv_data <= st_data;
      nv_old  <= st_blk_old;
      nv_new  <= inc_blk;
      nv_ovf  <= inc_ovf;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      ae_sent <= 1'b0;
      ae_done <= 1'b0;
      hc_sent <= 1'b0;
      h_done  <= 1'b0;
      redo_q  <= 1'b0;
    end else begin
      case (state)
        S_IDLE: begin
          if (accept || start_redo) begin
            state   <= S_RUN;
            redo_q  <= start_redo;
            ae_sent <= 1'b0;
            ae_done <= 1'b0;
            hc_sent <= 1'b0;
            h_done  <= 1'b0;
          end
        end
        S_RUN: begin
          if (ae_valid && ae_ready) ae_sent <= 1'b1;
          if (hc_valid && hc_ready) hc_sent <= 1'b1;
          if (ae_sent && ae_rsp_valid) ae_done <= 1'b1;
          if (hc_sent && hr_valid)     h_done  <= 1'b1;
          if ((ae_done || (ae_sent && ae_rsp_valid)) && (h_done || (hc_sent && hr_valid)))
            state <= S_COMMIT;
        end
        S_COMMIT: begin
          if (wq_ready) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_RUN && ae_sent && ae_rsp_valid) begin
      ct_q    <= ae_rsp_ct;
      aetag_q <= ae_rsp_tag;
    end
    if (state == S_RUN && hc_sent && hr_valid) newtag_q <= hr_tag;
  end

  assign busy_flag = busy_q;

  assign ae_valid = (state == S_RUN) && !ae_sent;
  assign ae_addr  = nv_addr;
  assign ae_data  = nv_data;
  assign ae_blk   = nv_new;

  assign hc_valid = (state == S_RUN) && !hc_sent;
  assign hc_idx   = IDX_W'(nv_addr >> SEL_W) + 1'b1;
  assign hc_old   = nv_old;
  assign hc_new   = nv_new;

  assign wq_valid  = (state == S_COMMIT);
  assign wq_data   = {nv_addr, nv_new, aetag_q, root_next, ct_q};
  assign tag_we    = commit;
  assign tag_wdata = newtag_q;
  assign root_inc  = commit;
  assign redo_done = commit && redo_q;

  assign ctr_valid    = commit;
  assign ctr_addr     = nv_addr;
  assign ctr_blk      = nv_new;
  assign ctr_overflow = nv_ovf;

  // The busy flag is set exactly while a store is between acceptance and
  // its commit (or interrupted by a crash).
  assert property (@(posedge clk) disable iff (!rst_n || !nv_rst_n)
                   (state != S_IDLE) |-> busy_q);

endmodule
