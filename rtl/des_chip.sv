// des_chip: DES chip with separate encryption and decryption units.
//
// Two iterative DES units share one clock and reset, as in the original design's
// chip: the encryption unit enciphers D_ie under K_e onto D_oe, the decryption
// unit deciphers D_id under K_d onto D_od. The units are independent; a link
// such as the original design's loop-back test (D_oe fed to D_id) is made outside.
// Each unit processes one 64-bit block per 16 clocks; the result appears 16
// clocks after the block is taken.
//
// Port names follow the original design's pinout. The per-unit valid/ready signals
// are not in that pinout: they are this design's choice, since the original design
// does not say how a block is framed at the pins. The block width is the full
// DES width of 64 bits; the original design's prototype ran a 16-bit reduction whose
// tables it does not give.
module des_chip
  import des_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  // encryption unit
  input  block_t d_ie,        // data input for encryption
  input  block_t k_e,         // key for encryption
  input  logic   ie_valid,
  output logic   ie_ready,
  output block_t d_oe,        // data output of encryption
  output logic   oe_valid,
  // decryption unit
  input  block_t d_id,        // data input for decryption
  input  block_t k_d,         // key for decryption
  input  logic   id_valid,
  output logic   id_ready,
  output block_t d_od,        // data output of decryption
  output logic   od_valid
);
  des_unit #(.DECRYPT(1'b0)) u_enc (
    .clk, .reset, .in_valid(ie_valid), .in_ready(ie_ready), .din(d_ie), .key(k_e),
    .out_valid(oe_valid), .dout(d_oe)
  );

  des_unit #(.DECRYPT(1'b1)) u_dec (
    .clk, .reset, .in_valid(id_valid), .in_ready(id_ready), .din(d_id), .key(k_d),
    .out_valid(od_valid), .dout(d_od)
  );
endmodule
