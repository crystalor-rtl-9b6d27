// tree_root_reg: the on-chip root nonce counter of the authentication tree.
//
// The root is the only tree node kept on chip; it is the root of trust
// against replay. During nominal operation every store advances it by one
// (inc): its L_MI-bit minor part counts up and, on overflow, clears while the
// L_MA-bit major part increments. root_next is the value it will take after
// the next increment; the store path records it in the write pending queue
// entry next to the data. After a recovery the controller loads the root
// counters of the new tree (load). The register is only cleared by the
// power-on reset of the persistent state (nv_rst_n), never by a crash reset.
// The root register follows the design; the increment-per-store and the
// persistent reset are this design's choices.
module tree_root_reg
  import crystalor_pkg::*;
(
  input  logic              clk,
  input  logic              nv_rst_n,
  input  logic              inc,
  input  logic              load,
  input  logic [L_MA-1:0]   load_major,
  input  logic [L_MI-1:0]   load_minor,
  output logic [L_MA-1:0]   root_major,
  output logic [L_MI-1:0]   root_minor,
  output logic [ROOT_W-1:0] root_next
);

  logic [L_MA-1:0] nx_major;
  logic [L_MI-1:0] nx_minor;

  always_comb begin
    nx_minor = root_minor + 1'b1;
    nx_major = (&root_minor) ? root_major + 1'b1 : root_major;
  end

  assign root_next = {nx_major, nx_minor};

  always_ff @(posedge clk or negedge nv_rst_n) begin
    if (!nv_rst_n) begin
      root_major <= '0;
      root_minor <= '0;
    end else if (load) begin
      root_major <= load_major;
      root_minor <= load_minor;
    end else if (inc) begin
      root_major <= nx_major;
      root_minor <= nx_minor;
    end
  end

endmodule
