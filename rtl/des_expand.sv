// des_expand: expansion P-box E(R_i).
//
// Spreads the 32-bit right half over 48 bits: each 4-bit group is flanked by
// the neighbouring bits of the adjacent groups (wrapping round at the ends),
// giving the eight 6-bit groups that meet the round key K_i and then the eight
// S-boxes. Combinational wiring, standard E table.
module des_expand
  import des_pkg::*;
(
  input  half_t   r,   // R_i
  output subkey_t e    // E(R_i) = R'_i
);
  always_comb begin
    for (int i = 0; i < 48; i++) e[47-i] = r[32-E_TBL[i]];
  end
endmodule
