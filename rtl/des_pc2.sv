// des_pc2: key permutation PK_2(Y') (permuted choice 2).
//
// Selects and transposes 48 of the 56 bits of the rotated {C_i, D_i} pair to
// form the round key K_i. Combinational wiring, standard PC-2 table.
module des_pc2
  import des_pkg::*;
(
  input  logic [55:0] cd,  // {C_i, D_i}
  output subkey_t     k    // K_i
);
  always_comb begin
    for (int i = 0; i < 48; i++) k[47-i] = cd[56-PC2_TBL[i]];
  end
endmodule
