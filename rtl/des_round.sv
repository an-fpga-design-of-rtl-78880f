// des_round: one DES iteration, combinational.
//
// Computes R' = L xor P(S(E(R) xor K)) and L' = R, the path of the original design's
// block diagram from the R_i register through E, the key addition, the S-boxes
// and P to the addition with L_i. The unit registers the result once per
// clock, so one use of this block is one of the 16 iterations.
module des_round
  import des_pkg::*;
(
  input  half_t   l,       // L_i
  input  half_t   r,       // R_i
  input  subkey_t k,       // K_i
  output half_t   l_next,  // L_{i+1} = R_i
  output half_t   r_next   // R_{i+1} = L_i xor f(R_i, K_i)
);
  subkey_t e, x;
  half_t   s, f;

  des_expand u_e (.r(r), .e(e));
  assign x = e ^ k;
  des_sbox   u_s (.f(x), .s(s));
  des_pbox   u_p (.s(s), .p(f));

  assign l_next = r;
  assign r_next = l ^ f;
endmodule
