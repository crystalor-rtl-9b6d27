// gf128_mul_idx: input mask i*L of PXOR-Hash.
//
// The i-th PXOR-Hash input block is masked with i*L, the product in GF(2^128)
// of the block index i (read as a polynomial, bit j = coefficient of x^j) and
// the secret L = E_K(0). The product is the XOR of x^j*L over the set bits of
// i, where x^j*L is L doubled j times (shift left, fold the carry back with
// 0x87, i.e. modulo x^128 + x^7 + x^2 + x + 1, the polynomial used by PMAC
// and GCM). Purely combinational; IDX_W sets how many index bits take part.
// The field multiplication by i follows the design; the reduction
// polynomial and bit order are this design's choice.
module gf128_mul_idx #(
  parameter int unsigned IDX_W = 40
) (
  input  logic [IDX_W-1:0] idx,
  input  logic [127:0]     l_in,
  output logic [127:0]     mask
);

  always_comb begin
    logic [127:0] p;
    mask = '0;
    p    = l_in;
    for (int j = 0; j < IDX_W; j++) begin
      if (idx[j]) mask = mask ^ p;
      p = {p[126:0], 1'b0} ^ (p[127] ? 128'h87 : 128'h0);
    end
  end

endmodule
