// des_key_schedule: C_i/D_i key registers and round-key generation.
//
// On `load` the external key passes through PK_1 (PC-1) into the two 28-bit
// registers C and D. In every iteration (`step`) both halves are rotated by
// the amount the DES schedule gives for that round, the rotated pair is
// written back and, in the same cycle, PK_2 (PC-2) selects the 48-bit round
// key K from it. The rotation sits in front of PC-2, so the key of round 1 is
// ready in the first iteration cycle after the load.
//
// DECRYPT = 0 rotates left by 1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1 and delivers
// K1..K16. DECRYPT = 1 delivers the same keys in reverse order, as the
// document asks of decipherment: it rotates right by 0,1,2,2,2,2,2,2,1,2,2,2,
// 2,2,2,1. That works because the left rotations of a full schedule add up to
// 28, so C16/D16 equal C0/D0 and K16 can be taken straight after the load.
// Rotating right instead of storing the 16 keys is this design's choice.
//
// Interface: `round` is the index (0..15) of the iteration being executed
// while `step` is high; `k` is valid combinationally in that cycle. `load`
// has priority over `step`. Synchronous, active-high reset clears C and D.
module des_key_schedule
  import des_pkg::*;
#(
  parameter bit DECRYPT = 1'b0
) (
  input  logic    clk,
  input  logic    reset,
  input  logic    load,   // take a new external key
  input  block_t  key,    // external 64-bit key Y (parity bits ignored)
  input  logic    step,   // one iteration: rotate C/D and produce k
  input  round_t  round,  // iteration index 0..15
  output subkey_t k       // round key for this iteration
);
  kreg_t       c_q, d_q, c_rot, d_rot;
  logic [55:0] cd0;
  logic [1:0]  amt;   // rotation amount, 0..2

  des_pc1 u_pc1 (.key(key), .cd(cd0));

  always_comb begin
    if (!DECRYPT)
      amt = 2'(SHIFT_TBL[round]);
    else
      amt = (round == '0) ? 2'd0 : 2'(SHIFT_TBL[round_t'(4'd0 - round)]);  // index 16 - round
    c_rot = c_q;
    d_rot = d_q;
    for (int n = 0; n < 2; n++) begin
      if (2'(n) < amt) begin
        if (!DECRYPT) begin
          c_rot = {c_rot[26:0], c_rot[27]};
          d_rot = {d_rot[26:0], d_rot[27]};
        end else begin
          c_rot = {c_rot[0], c_rot[27:1]};
          d_rot = {d_rot[0], d_rot[27:1]};
        end
      end
    end
  end

  des_pc2 u_pc2 (.cd({c_rot, d_rot}), .k(k));

  always_ff @(posedge clk) begin
    if (reset) begin
      c_q <= '0;
      d_q <= '0;
    end else if (load) begin
      c_q <= cd0[55:28];
      d_q <= cd0[27:0];
    end else if (step) begin
      c_q <= c_rot;
      d_q <= d_rot;
    end
  end
endmodule
