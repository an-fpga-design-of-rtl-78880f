// des_ip_inv: inverse initial permutation IP^-1(Z) of the DES data path.
//
// Transposes the 64-bit pre-output block {R16, L16} (the halves swapped after
// the last round) into the output block with the standard IP^-1 table. Pure
// wiring, combinational. The standard table is used unchanged.
module des_ip_inv
  import des_pkg::*;
(
  input  block_t z,   // {R16, L16}
  output block_t y    // ciphertext (or recovered plaintext)
);
  always_comb begin
    for (int i = 0; i < 64; i++) y[63-i] = z[64-FP_TBL[i]];
  end
endmodule
