// des_pc1: key permutation PK_1(Y) (permuted choice 1).
//
// Selects 56 of the 64 external key bits and drops the eight parity bits
// (DES bits 8, 16, ..., 64, the least significant bit of each byte). The upper
// 28 bits of the result initialise the C register, the lower 28 the D register
// of the key schedule. Combinational wiring, standard PC-1 table.
module des_pc1
  import des_pkg::*;
(
  input  block_t      key,  // external 64-bit key Y
  output logic [55:0] cd    // {C0, D0}
);
  always_comb begin
    for (int i = 0; i < 56; i++) cd[55-i] = key[64-PC1_TBL[i]];
  end
endmodule
