// gf128_mul_idx: input mask i*L of PXOR-Hash.
//
// PXOR-Hash masks the i-th input block with i*L, the product of the block
// index i and L = E_K(0) in GF(2^128). The index is short, so the product is
// built as the xor of L*x^j over the set bits j of i, with L*x^j formed by
// repeated doubling (shift left, reduce by x^128 = x^7 + x^2 + x + 1).
// Purely combinational. The field polynomial and the bit order (bit 127 is
// the coefficient of x^127) are this design's choice; the source design only
// says the product is taken in F_2^128.
module gf128_mul_idx
  import crystalor_pkg::*;
#(
  parameter int unsigned IDX_W = 33
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
      p = gf128_double(p);
    end
  end

endmodule
