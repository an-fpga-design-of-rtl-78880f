// des_pbox: transposition P(F'_i) of the S-box output.
//
// Reorders the 32 S-box output bits with the standard P table before they are
// added (exclusive or) to L_i. Combinational wiring.
module des_pbox
  import des_pkg::*;
(
  input  half_t s,   // S-box output
  output half_t p    // f(R_i, K_i)
);
  always_comb begin
    for (int i = 0; i < 32; i++) p[31-i] = s[32-P_TBL[i]];
  end
endmodule
