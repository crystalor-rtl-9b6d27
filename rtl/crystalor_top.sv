// crystalor_top: recoverable memory encryption support (the recovery-tag
// hardware and its control) next to an authentication-tree memory engine.
//
// The tree engine (authenticated encryption of leaves, MACs of intermediate
// nodes) and main memory are outside this module; it connects to them
// through the ae_* (encrypt a leaf), ctr_* (new leaf counters), mem_wr_*
// (write pending queue drain), rd_* (metadata reads during recovery) and
// nw_* (new tree nodes during recovery) ports. Inside:
//   secure_sram            K, L = E_K(0) and the recovery tag T (384 bits)
//   recovery_tag_cache     128-bit copy of T beside the accelerator
//   pxor_hash_accel        PXOR-Hash over a pipelined AES-128
//   crystalor_store_ctrl   store sequence with busy flag and redo register
//   wpq                    8-entry write pending queue (persistent)
//   tree_root_reg          on-chip root counter
//   crystalor_recovery_ctrl  redo, new tree construction, tag check
// Configuration (cfg_*): writing the key word also computes L = E_K(0) with
// the accelerator and stores it; writing the tag word sets the tag of a
// freshly initialised memory. Reads of the leaf data are not involved: they
// need no Crystalor action.
// Resets: rst_n is the crash/warm reset of volatile state; nv_rst_n clears
// the persistent state (busy flag, queue, root) at first power-on. The SRAM
// is never cleared by a reset.
// The block set and connections follow the design's architecture; the port
// protocols, the configuration sequence and the arbitration of the
// accelerator (recovery, then L generation, then stores) are this design's.
module crystalor_top
  import crystalor_pkg::*;
#(
  parameter int unsigned LEAF_W    = 1024,  // leaf node (AE) length in bits
  parameter int unsigned ADDR_W    = 40,    // leaf node index width
  parameter int unsigned IDX_W     = 40,    // PXOR-Hash block index width
  parameter int unsigned BETA      = 128,   // tree arity
  parameter int unsigned DEPTH     = 5,     // tree depth
  parameter int unsigned WPQ_DEPTH = 8,
  localparam int unsigned LVL_W    = $clog2(DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 nv_rst_n,
  // configuration of K and T
  input  logic                 cfg_valid,
  output logic                 cfg_ready,
  input  sram_word_e           cfg_word,
  input  blk_t                 cfg_data,
  // store requests
  input  logic                 st_valid,
  output logic                 st_ready,
  input  logic [ADDR_W-1:0]    st_addr,
  input  logic [LEAF_W-1:0]    st_data,
  input  sc_block_t            st_blk_old,
  // authenticated encryption engine
  output logic                 ae_valid,
  input  logic                 ae_ready,
  output logic [ADDR_W-1:0]    ae_addr,
  output logic [LEAF_W-1:0]    ae_data,
  output sc_block_t            ae_blk,
  input  logic                 ae_rsp_valid,
  input  logic [LEAF_W-1:0]    ae_rsp_ct,
  input  blk_t                 ae_rsp_tag,
  // new leaf counters for the tree engine
  output logic                 ctr_valid,
  output logic [ADDR_W-1:0]    ctr_addr,
  output sc_block_t            ctr_blk,
  output logic                 ctr_overflow,
  // write pending queue to memory
  output logic                 mem_wr_valid,
  input  logic                 mem_wr_ready,
  output logic [ADDR_W-1:0]    mem_wr_addr,
  output sc_block_t            mem_wr_blk,
  output blk_t                 mem_wr_tag,
  output logic [ROOT_W-1:0]    mem_wr_root,
  output logic [LEAF_W-1:0]    mem_wr_ct,
  // recovery
  input  logic                 rec_start,
  output logic                 rec_active,
  output logic                 rec_done,
  output logic                 rec_ok,
  output logic                 rec_err,
  output logic                 rec_ctr_overflow,
  output logic                 rd_valid,
  input  logic                 rd_ready,
  output logic [LVL_W-1:0]     rd_level,
  output logic [IDX_W-1:0]     rd_index,
  input  logic                 rsp_valid,
  input  sc_block_t            rsp_blk,
  output logic                 nw_valid,
  output logic [LVL_W-1:0]     nw_level,
  output logic [IDX_W-1:0]     nw_index,
  output sc_block_t            nw_blk,
  // status
  output logic                 busy_flag,
  output logic [L_MA-1:0]      root_major,
  output logic [L_MI-1:0]      root_minor,
  output logic [$clog2(WPQ_DEPTH+1)-1:0] wpq_count
);

  localparam int unsigned WQ_W = ADDR_W + 2 * BLK_W + ROOT_W + LEAF_W;

  // ------------------------------------------------------------ SRAM, cache
  logic       sram_we;
  sram_word_e sram_waddr;
  blk_t       sram_wdata, key, l_val, sram_tag;
  logic       cache_we;
  blk_t       cache_wdata, tag_cached;
  logic       tag_cached_valid;
  logic       st_tag_we;
  blk_t       st_tag_wdata;

  // ------------------------------------------------------------ L generation
  typedef enum logic [1:0] {G_IDLE, G_ISSUE, G_WAIT} gen_e;
  gen_e gstate;
  logic cfg_fire;
  logic l_valid;
  blk_t l_out;

  assign cfg_ready = (gstate == G_IDLE) && !busy_flag && !rec_active && st_ready;
  assign cfg_fire  = cfg_valid && cfg_ready;

  // SRAM write port: tag commit, then L, then configuration (never together).
  always_comb begin
    sram_we    = 1'b0;
    sram_waddr = SR_TAG;
    sram_wdata = cache_wdata;
    if (cache_we) begin
      sram_we = 1'b1;
    end else if (l_valid && gstate == G_WAIT) begin
      sram_we    = 1'b1;
      sram_waddr = SR_L;
      sram_wdata = l_out;
    end else if (cfg_fire) begin
      sram_we    = 1'b1;
      sram_waddr = cfg_word;
      sram_wdata = cfg_data;
    end
  end

  secure_sram u_sram (
    .clk  (clk),
    .we   (sram_we),
    .waddr(sram_waddr),
    .wdata(sram_wdata),
    .key  (key),
    .l_val(l_val),
    .tag  (sram_tag)
  );

  recovery_tag_cache u_cache (
    .clk       (clk),
    .rst_n     (rst_n),
    .sram_tag  (sram_tag),
    .upd_valid (st_tag_we),
    .upd_tag   (st_tag_wdata),
    .invalidate(cfg_fire && cfg_word == SR_TAG),
    .tag       (tag_cached),
    .tag_valid (tag_cached_valid),
    .sram_we   (cache_we),
    .sram_wdata(cache_wdata)
  );

  // ------------------------------------------------------------ accelerator
  logic             hcmd_valid, hcmd_ready;
  hash_op_e         hcmd_op;
  logic [IDX_W-1:0] hcmd_idx;
  blk_t             hcmd_old, hcmd_new;
  logic             hcmd_first, hcmd_last;
  logic             upd_valid, tg_valid;
  blk_t             upd_delta, upd_tag, tg_tag;

  // store controller side
  logic             s_hc_valid;
  logic [IDX_W-1:0] s_hc_idx;
  blk_t             s_hc_old, s_hc_new;
  // recovery side
  logic             r_hc_valid, r_hash_own, r_hc_first, r_hc_last;
  logic [IDX_W-1:0] r_hc_idx;
  blk_t             r_hc_blk;

  always_comb begin
    hcmd_first = 1'b0;
    hcmd_last  = 1'b0;
    if (r_hash_own) begin
      hcmd_valid = r_hc_valid;
      hcmd_op    = HOP_STREAM;
      hcmd_idx   = r_hc_idx;
      hcmd_old   = r_hc_blk;
      hcmd_new   = '0;
      hcmd_first = r_hc_first;
      hcmd_last  = r_hc_last;
    end else if (gstate == G_ISSUE) begin
      hcmd_valid = 1'b1;
      hcmd_op    = HOP_GEN_L;
      hcmd_idx   = '0;
      hcmd_old   = '0;
      hcmd_new   = '0;
    end else begin
      hcmd_valid = s_hc_valid && tag_cached_valid;
      hcmd_op    = HOP_UPDATE;
      hcmd_idx   = s_hc_idx;
      hcmd_old   = s_hc_old;
      hcmd_new   = s_hc_new;
    end
  end

  pxor_hash_accel #(.IDX_W(IDX_W)) u_hash (
    .clk      (clk),
    .rst_n    (rst_n),
    .key      (key),
    .l_val    (l_val),
    .tag_in   (tag_cached),
    .cmd_valid(hcmd_valid),
    .cmd_ready(hcmd_ready),
    .cmd_op   (hcmd_op),
    .cmd_idx  (hcmd_idx),
    .cmd_old  (hcmd_old),
    .cmd_new  (hcmd_new),
    .cmd_first(hcmd_first),
    .cmd_last (hcmd_last),
    .upd_valid(upd_valid),
    .upd_delta(upd_delta),
    .upd_tag  (upd_tag),
    .tg_valid (tg_valid),
    .tg_tag   (tg_tag),
    .l_valid  (l_valid),
    .l_out    (l_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gstate <= G_IDLE;
    else begin
      case (gstate)
        G_IDLE:  if (cfg_fire && cfg_word == SR_KEY) gstate <= G_ISSUE;
        G_ISSUE: if (!r_hash_own && hcmd_ready) gstate <= G_WAIT;
        G_WAIT:  if (l_valid) gstate <= G_IDLE;
        default: gstate <= G_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ store path
  logic            redo_req, redo_done;
  logic            wq_valid, wq_ready;
  logic [WQ_W-1:0] wq_data, wq_out;
  logic            root_inc, root_load;
  logic [ROOT_W-1:0] root_next;
  logic [L_MA-1:0] rl_major;
  logic [L_MI-1:0] rl_minor;
  logic            wpq_empty, wpq_full;
  logic            st_ready_c;

  crystalor_store_ctrl #(.LEAF_W(LEAF_W), .ADDR_W(ADDR_W), .IDX_W(IDX_W)) u_store (
    .clk         (clk),
    .rst_n       (rst_n),
    .nv_rst_n    (nv_rst_n),
    .st_valid    (st_valid && !rec_active && gstate == G_IDLE),
    .st_ready    (st_ready_c),
    .st_addr     (st_addr),
    .st_data     (st_data),
    .st_blk_old  (st_blk_old),
    .redo_req    (redo_req),
    .redo_done   (redo_done),
    .busy_flag   (busy_flag),
    .ae_valid    (ae_valid),
    .ae_ready    (ae_ready),
    .ae_addr     (ae_addr),
    .ae_data     (ae_data),
    .ae_blk      (ae_blk),
    .ae_rsp_valid(ae_rsp_valid),
    .ae_rsp_ct   (ae_rsp_ct),
    .ae_rsp_tag  (ae_rsp_tag),
    .hc_valid    (s_hc_valid),
    .hc_ready    (hcmd_ready && !r_hash_own && gstate != G_ISSUE && tag_cached_valid),
    .hc_idx      (s_hc_idx),
    .hc_old      (s_hc_old),
    .hc_new      (s_hc_new),
    .hr_valid    (upd_valid),
    .hr_tag      (upd_tag),
    .tag_we      (st_tag_we),
    .tag_wdata   (st_tag_wdata),
    .wq_valid    (wq_valid),
    .wq_ready    (wq_ready),
    .wq_data     (wq_data),
    .root_inc    (root_inc),
    .root_next   (root_next),
    .ctr_valid   (ctr_valid),
    .ctr_addr    (ctr_addr),
    .ctr_blk     (ctr_blk),
    .ctr_overflow(ctr_overflow)
  );

  assign st_ready = st_ready_c && !rec_active && gstate == G_IDLE;

  wpq #(.W(WQ_W), .DEPTH(WPQ_DEPTH)) u_wpq (
    .clk       (clk),
    .nv_rst_n  (nv_rst_n),
    .push_valid(wq_valid),
    .push_ready(wq_ready),
    .push_data (wq_data),
    .pop_valid (mem_wr_valid),
    .pop_ready (mem_wr_ready),
    .pop_data  (wq_out),
    .empty     (wpq_empty),
    .full      (wpq_full),
    .count     (wpq_count)
  );

  assign {mem_wr_addr, mem_wr_blk, mem_wr_tag, mem_wr_root, mem_wr_ct} = wq_out;

  tree_root_reg u_root (
    .clk       (clk),
    .nv_rst_n  (nv_rst_n),
    .inc       (root_inc),
    .load      (root_load),
    .load_major(rl_major),
    .load_minor(rl_minor),
    .root_major(root_major),
    .root_minor(root_minor),
    .root_next (root_next)
  );

  // ------------------------------------------------------------ recovery
  crystalor_recovery_ctrl #(.BETA(BETA), .DEPTH(DEPTH), .IDX_W(IDX_W)) u_rec (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (rec_start),
    .active      (rec_active),
    .hash_own    (r_hash_own),
    .done        (rec_done),
    .rec_ok      (rec_ok),
    .rec_err     (rec_err),
    .ctr_overflow(rec_ctr_overflow),
    .busy_flag   (busy_flag),
    .redo_req    (redo_req),
    .redo_done   (redo_done),
    .wpq_empty   (wpq_empty),
    .rd_valid    (rd_valid),
    .rd_ready    (rd_ready),
    .rd_level    (rd_level),
    .rd_index    (rd_index),
    .rsp_valid   (rsp_valid),
    .rsp_blk     (rsp_blk),
    .nw_valid    (nw_valid),
    .nw_level    (nw_level),
    .nw_index    (nw_index),
    .nw_blk      (nw_blk),
    .root_load   (root_load),
    .root_major  (rl_major),
    .root_minor  (rl_minor),
    .hc_valid    (r_hc_valid),
    .hc_ready    (hcmd_ready),
    .hc_idx      (r_hc_idx),
    .hc_blk      (r_hc_blk),
    .hc_first    (r_hc_first),
    .hc_last     (r_hc_last),
    .tg_valid    (tg_valid),
    .tg_tag      (tg_tag),
    .tag_ref     (sram_tag)
  );

endmodule
