// des_sbox: the eight DES substitution boxes S(F_i).
//
// The 48-bit input E(R_i) xor K_i is cut into eight 6-bit groups, most
// significant first. Group j goes to box S(j+1): its outer bits b1 and b6 pick
// the row, the inner bits b2..b5 the column, and the selected 4-bit entry is
// the box's output. The eight outputs form the 32-bit result, S1 on top. The
// boxes are combinational look-up tables holding the standard DES contents.
module des_sbox
  import des_pkg::*;
(
  input  subkey_t f,   // F_i = E(R_i) xor K_i
  output half_t   s    // F'_i
);
  always_comb begin
    for (int j = 0; j < 8; j++) begin
      logic [5:0] g;
      g = f[47-6*j -: 6];
      s[31-4*j -: 4] = SBOX_TBL[j][{g[5], g[0], g[4:1]}];
    end
  end
endmodule
