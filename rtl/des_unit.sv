// des_unit: iterative DES encryption or decryption unit.
//
// One round stage is reused 16 times, one iteration per clock, as in the
// document's loop design. An accepted block passes IP into the L/R registers
// while the key passes PK_1 into the C/D registers. In each of the next 16
// clocks the round (E, key addition, S, P, addition to L) updates L/R with the
// key the schedule produces for that iteration. In the 16th iteration the
// round's result, halves swapped, goes through IP^-1 straight into the output
// register, and a new block may be loaded at that same edge.
//
// DECRYPT selects the key order: 0 uses K1..K16 (encipherment), 1 uses
// K16..K1 (decipherment); everything else is shared, as the original design states.
//
// Interface and timing: din/key are taken when in_valid && in_ready. dout is
// valid and out_valid pulses 16 clocks after that edge; dout holds until the
// next result. Back to back, one 64-bit block is produced every 16 clocks, i.e.
// 4 bits per clock. The handshake and the synchronous active-high reset are
// this design's choices.
module des_unit
  import des_pkg::*;
#(
  parameter bit DECRYPT = 1'b0
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t din,        // plaintext X (ciphertext when DECRYPT)
  input  block_t key,        // cryptographic key Y
  output logic   out_valid,
  output block_t dout        // ciphertext Z' (plaintext when DECRYPT)
);
  logic    load, busy, last;
  round_t  round;
  block_t  ip_out, fp_out;
  half_t   l_q, r_q, l_next, r_next;
  subkey_t k;

  des_loop_ctrl u_ctrl (
    .clk, .reset, .in_valid, .in_ready, .load, .busy, .round, .last, .out_valid
  );

  des_key_schedule #(.DECRYPT(DECRYPT)) u_ks (
    .clk, .reset, .load, .key, .step(busy), .round, .k
  );

  des_ip    u_ip  (.x(din), .y(ip_out));
  des_round u_rnd (.l(l_q), .r(r_q), .k(k), .l_next, .r_next);
  des_ip_inv u_fp (.z({r_next, l_next}), .y(fp_out));

  always_ff @(posedge clk) begin
    if (reset) begin
      l_q  <= '0;
      r_q  <= '0;
      dout <= '0;
    end else begin
      if (load) begin
        l_q <= ip_out[63:32];
        r_q <= ip_out[31:0];
      end else if (busy) begin
        l_q <= l_next;
        r_q <= r_next;
      end
      if (last) dout <= fp_out;
    end
  end
endmodule
