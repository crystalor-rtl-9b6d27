// pxor_hash_accel: PXOR-Hash accelerator for the on-chip recovery tag.
//
// PXOR-Hash is T = XOR_i E_K(i*L ^ D[i]) with L = E_K(0). The accelerator
// masks a block with i*L (gf128_mul_idx) in an issue stage and sends it into
// one fully pipelined AES-128 core (aes128_enc_pipe, 11 cycles). It offers
// three operations on a valid/ready command port:
//   HOP_UPDATE  incremental update of block i from old D[i] to new D'[i]:
//               issues E(iL^D[i]) and E(iL^D'[i]) on consecutive cycles and
//               returns delta = E(iL^D[i]) ^ E(iL^D'[i]) and the new tag
//               tag_in ^ delta (Equation (2) of the construction). An update
//               occupies the port for two cycles; several updates may be in
//               flight, results come back in order.
//   HOP_STREAM  one term of a full TagGen (rate 1: one block per cycle). The
//               terms of a stream marked first..last are XOR-accumulated and
//               the finished tag is returned on tg_valid/tg_tag.
//   HOP_GEN_L   computes L = E_K(0), returned on l_valid/l_out.
// Timing: an update result appears 13 cycles after its command is accepted
// (issue stage, second issue cycle, 11 AES stages); a stream tag appears 12
// cycles after its last block is accepted. The accelerator has no output back
// pressure: results are single-cycle pulses.
// The PXOR-Hash equations and the pipelined AES follow the design; the
// command encoding, the two-cycle issue of an update and the in-order
// result pulses are this design's choices.
module pxor_hash_accel
  import crystalor_pkg::*;
#(
  parameter int unsigned IDX_W = 40
) (
  input  logic             clk,
  input  logic             rst_n,
  input  blk_t             key,        // K from the secure SRAM
  input  blk_t             l_val,      // L from the secure SRAM
  input  blk_t             tag_in,     // current recovery tag (tag cache)
  // command
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  hash_op_e         cmd_op,
  input  logic [IDX_W-1:0] cmd_idx,    // block index i, 1-based
  input  blk_t             cmd_old,    // D[i] (update) or the streamed block
  input  blk_t             cmd_new,    // D'[i] (update only)
  input  logic             cmd_first,  // stream: first block of a TagGen
  input  logic             cmd_last,   // stream: last block of a TagGen
  // results
  output logic             upd_valid,
  output blk_t             upd_delta,
  output blk_t             upd_tag,
  output logic             tg_valid,
  output blk_t             tg_tag,
  output logic             l_valid,
  output blk_t             l_out
);

  typedef struct packed {
    hash_op_e op;
    logic     second;   // second AES call of an update
    logic     first;
    logic     last;
  } side_t;

  // ---------------------------------------------------------------- issue
  logic             s1_valid, s1_second;
  hash_op_e         s1_op;
  logic             s1_first, s1_last;
  blk_t             s1_a, s1_b;
  logic             s1_adv;
  blk_t             mask;

  gf128_mul_idx #(.IDX_W(IDX_W)) u_mask (.idx(cmd_idx), .l_in(l_val), .mask(mask));

  // The issue stage is free after this cycle unless it holds the first half
  // of an update.
  assign s1_adv    = s1_valid && (s1_op != HOP_UPDATE || s1_second);
  assign cmd_ready = !s1_valid || s1_adv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_second <= 1'b0;
    end else if (cmd_valid && cmd_ready) begin
      s1_valid  <= 1'b1;
      s1_second <= 1'b0;
    end else if (s1_adv) begin
      s1_valid  <= 1'b0;
    end else if (s1_valid) begin
      s1_second <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (cmd_valid && cmd_ready) begin
      s1_op    <= cmd_op;
      s1_first <= cmd_first;
      s1_last  <= cmd_last;
      s1_a     <= (cmd_op == HOP_GEN_L) ? '0 : (mask ^ cmd_old);
      s1_b     <= mask ^ cmd_new;
    end
  end

  // ---------------------------------------------------------------- AES
  side_t aes_in_side, aes_out_side;
  logic  aes_out_valid;
  blk_t  aes_out;

  assign aes_in_side = '{op: s1_op, second: s1_second, first: s1_first, last: s1_last};

  aes128_enc_pipe #(.SIDE_W($bits(side_t))) u_aes (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s1_valid),
    .in_key   (key),
    .in_blk   ((s1_op == HOP_UPDATE && s1_second) ? s1_b : s1_a),
    .in_side  (aes_in_side),
    .out_valid(aes_out_valid),
    .out_blk  (aes_out),
    .out_side (aes_out_side)
  );

  // ---------------------------------------------------------------- collect
  blk_t held;    // E(iL ^ D[i]) waiting for its partner
  blk_t acc;     // running TagGen sum
  blk_t acc_next;

  assign acc_next = (aes_out_side.first ? '0 : acc) ^ aes_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd_valid <= 1'b0;
      tg_valid  <= 1'b0;
      l_valid   <= 1'b0;
      acc       <= '0;
    end else begin
      upd_valid <= aes_out_valid && aes_out_side.op == HOP_UPDATE && aes_out_side.second;
      tg_valid  <= aes_out_valid && aes_out_side.op == HOP_STREAM && aes_out_side.last;
      l_valid   <= aes_out_valid && aes_out_side.op == HOP_GEN_L;
      if (aes_out_valid && aes_out_side.op == HOP_STREAM) acc <= acc_next;
    end
  end

  always_ff @(posedge clk) begin
    if (aes_out_valid && aes_out_side.op == HOP_UPDATE && !aes_out_side.second)
      held <= aes_out;
    if (aes_out_valid && aes_out_side.op == HOP_UPDATE && aes_out_side.second)
      upd_delta <= held ^ aes_out;
    if (aes_out_valid && aes_out_side.op == HOP_STREAM && aes_out_side.last)
      tg_tag <= acc_next;
    if (aes_out_valid && aes_out_side.op == HOP_GEN_L)
      l_out <= aes_out;
  end

  assign upd_tag = tag_in ^ upd_delta;

endmodule
