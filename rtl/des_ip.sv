// des_ip: initial permutation IP(X) of the DES data path.
//
// Transposes the 64-bit input block with the standard IP table; the upper 32
// bits of the result are L, the lower 32 bits R, the two halves that are loaded
// into the round registers. Pure wiring, no logic and no timing of its own.
// The design places IP between the data input and the L/R registers as the
// document's block diagram does; the table itself is the DES standard's.
module des_ip
  import des_pkg::*;
(
  input  block_t x,   // plaintext (or ciphertext for the decryption unit)
  output block_t y    // {L, R}
);
  always_comb begin
    for (int i = 0; i < 64; i++) y[63-i] = x[64-IP_TBL[i]];
  end
endmodule
