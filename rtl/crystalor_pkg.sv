// crystalor_pkg: types and constants shared by the recovery-tag hardware.
//
// A split-counter (SC) block groups K_SC leaf nodes that share one major
// counter; each node has its own L_MI-bit minor counter. The block is also
// one 128-bit PXOR-Hash input D[i] = major || minor[0] || ... || minor[K_SC-1].
// The major counter occupies a 64-bit field of which L_MA = 56 bits count;
// the top 8 bits are always zero. The 56/8/8 split is the typical SC setting
// the design is evaluated with; padding the major counter to 64 bits so that
// the block fills exactly one AES block is this design's choice.
package crystalor_pkg;

  localparam int unsigned BLK_W      = 128;              // AES block length n
  localparam int unsigned L_MA       = 56;               // major counter bits
  localparam int unsigned L_MI       = 8;                // minor counter bits
  localparam int unsigned K_SC       = 8;                // nodes per major counter
  localparam int unsigned MA_FIELD_W = BLK_W - K_SC * L_MI;  // 64
  localparam int unsigned ROOT_W     = L_MA + L_MI;      // root nonce counter, 64

  typedef logic [BLK_W-1:0] blk_t;

  typedef struct packed {
    logic [MA_FIELD_W-1:0]        major;
    logic [0:K_SC-1][L_MI-1:0]    minor;   // minor[0] sits next to the major
  } sc_block_t;

  // Operations of the PXOR-Hash accelerator.
  typedef enum logic [1:0] {
    HOP_UPDATE = 2'd0,   // two AES calls: E(iL^old) ^ E(iL^new)
    HOP_STREAM = 2'd1,   // one AES call, accumulated into a full TagGen
    HOP_GEN_L  = 2'd2    // L = E_K(0)
  } hash_op_e;

  // Words of the secure on-chip SRAM.
  typedef enum logic [1:0] {
    SR_KEY = 2'd0,       // PXOR-Hash key K
    SR_L   = 2'd1,       // L = E_K(0)
    SR_TAG = 2'd2        // recovery tag T
  } sram_word_e;

endpackage
