# Iterative DES encryption/decryption chip

This is a small hardware implementation of the Data Encryption Standard (DES).
DES turns a 64-bit block into a 64-bit block under a 56-bit key in 16 rounds.
A fully unrolled datapath would need 16 copies of the round logic. Here a
single round stage is built once and used in a loop: the round registers `L`
and `R` pass through it once per clock. A small loop controller counts the 16
iterations. A key schedule built from two rotating 28-bit registers delivers
the matching round key every clock. Decryption uses the same datapath, with
only the key order reversed.

The chip holds two such units side by side on one clock. One enciphers and one
deciphers, so a link can encrypt at one end and decrypt at the other. The units
can also be chained in a loop-back test: data goes into the encryption unit,
that unit's output goes into the decryption unit, and the result is compared
with the original data.

## One unit: the round loop

```
             din (64)                      key (64)
               |                              |
             [IP]                          [PC-1]
               |                              |
        +----> L | R  registers         C | D registers <---+
        |      |   |                      |   |             |
        |      |  [E] 32->48            rotate by the       |
        |      |   |                    schedule (comb.)----+
        |      |  XOR <------------------ [PC-2] = K_i
        |      |   |
        |      |  [S1..S8] 48->32
        |      |   |
        |      |  [P]
        |      |   |
        |     XOR<-+            R' = L xor P(S(E(R) xor K)),  L' = R
        |      |
        +--- {L', R'}  (iterations 1..15)
               |
     iteration 16: {R', L'} -> [IP^-1] -> dout register
```

* `des_ip`, `des_ip_inv`, `des_expand`, `des_pbox`, `des_pc1` and `des_pc2` are
  wiring only. Each copies its standard DES table from `des_pkg`.
* `des_sbox` holds the eight 6-to-4 S-boxes as combinational lookup tables.
  The two outer bits of each 6-bit group pick the row. The four inner bits pick
  the column.
* `des_round` is one whole Feistel round. It contains no registers.
* `des_unit` holds the `L`/`R` registers and the output register. It connects
  the loop controller, the key schedule and the round.

After the 16th round the two halves are swapped, as in DES. That last round's
result does not go back into `L`/`R`. It passes straight through `IP^-1` into
the output register. So `L`/`R` are free at that same clock edge, and a new
block can be loaded.

## Key schedule in both directions

This is the subtle part of the design. `des_key_schedule` loads
`PC-1(key)` into `C` and `D`. In each iteration it rotates both registers by the
amount DES gives for that round, writes the rotated value back, and feeds it
through `PC-2` in the same clock. The rotation sits in front of `PC-2`, so `K1`
is available in the first clock after the load. No extra cycle is needed to
set up the key.

Decryption needs `K16` first, then `K15`, and so on down to `K1`. DES rotates
left by 1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1 over the 16 rounds. That adds up to 28
positions, one full turn of a 28-bit register, so `C16`/`D16` equal `C0`/`D0`.
The decrypting schedule (`DECRYPT = 1`) therefore does this:

* It uses the freshly loaded `C0`/`D0` for the first iteration (`K16`).
* It then rotates right by 1,2,2,2,2,2,2,1,2,2,2,2,2,2,1, undoing the
  encryption rotations in reverse order.

The 16 keys are never stored. Both directions cost the same: two 28-bit
registers and a rotate-by-0/1/2 multiplexer.

The key's parity bits (the least significant bit of each byte) are dropped by
`PC-1`. They are not checked.

## Loop control and timing

`des_loop_ctrl` holds a `busy` flag and a 4-bit iteration counter. A block
(data and key together) is accepted when both of these hold:

* `in_valid` is high;
* `in_ready` is high, which happens when the unit is idle or in its 16th
  iteration.

```
edge   0        1     2    ...   16              17 ...
       load     it.1  it.2       it.16 + output  (next block's it.1 if
       IP->L/R                   register,       loaded at edge 16)
       PC-1->CD                  next load allowed
                                 out_valid high in the following cycle
```

* Latency: `dout` and a one-cycle `out_valid` pulse appear 16 clocks after the
  edge that took the block. `dout` then holds until the next result.
* Throughput: blocks presented back to back are taken every 16 clocks with no
  gap. That is one 64-bit block per 16 clocks, or 4 bits per clock per unit.
  At 8 MHz that is 32 Mbit/s.
* Reset is synchronous and active high. It clears all registers and leaves the
  unit idle.

Two assertions in `des_loop_ctrl` check two rules:

* a block is never loaded in the middle of another block;
* `out_valid` always follows the 16th iteration.

## The chip (`des_chip`, top level)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk`, `reset` | in | 1 | common clock, synchronous reset |
| `d_ie`, `k_e` | in | 64 | data and key for encryption |
| `ie_valid` / `ie_ready` | in / out | 1 | handshake of the encryption input |
| `d_oe`, `oe_valid` | out | 64, 1 | ciphertext and its strobe |
| `d_id`, `k_d` | in | 64 | data and key for decryption |
| `id_valid` / `id_ready` | in / out | 1 | handshake of the decryption input |
| `d_od`, `od_valid` | out | 64, 1 | recovered plaintext and its strobe |

The data and key names follow the pinout of the original chip. The two units
are independent, and nothing links them inside the chip. For the loop-back
test, wire `d_oe`→`d_id`, `oe_valid`→`id_valid` and the same key to `k_e` and
`k_d` outside the chip. `id_ready` is always high when such a block arrives.

## Departures from the original prototype

* **Block width.** The design was described for the full 64-bit DES, and that
  is what is built. The original test chip was cut down to 16-bit blocks so it
  would fit in a Xilinx XC4003 FPGA. The tables of that 16-bit variant (its E,
  P, S-box and key selections) were never published, so it is not
  reproduced.
  The 64-bit version uses 380 flip-flops. That is more than an XC4003 holds.
* **DES tables.** The tables in `des_pkg` are those of the DES standard
  (FIPS 46). They are confirmed by the known-answer vectors in the
  testbenches.
* **Own choices:**
  * the valid/ready handshake and the `out_valid` strobe, since the original
    pinout has only data, key, clock and reset;
  * 64-bit parallel data and key ports;
  * data and key taken together for every block;
  * the synchronous reset;
  * one iteration per clock. This matches the original figures: a 33.5 ns
    minimum clock period gave 29.9 Mbit/s with 16-bit blocks, which is one bit
    per clock, or 16 clocks per block;
  * the plaintext and key input registers folded into the `L/R` and `C/D`
    registers;
  * decryption keys produced by rotating right instead of storing all 16 keys.
* **Not modelled:** the FPGA mapping itself, pin multiplexing, and the serial
  host interface of the prototype.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` at the end.

* Permutations (`tb_des_ip`, `tb_des_ip_inv`, `tb_des_expand`, `tb_des_pbox`,
  `tb_des_pc1`, `tb_des_pc2`):
  * values from the standard's worked example (key `133457799BBCDFF1`,
    plaintext `0123456789ABCDEF`);
  * bijectivity;
  * `IP^-1(IP(x)) = x`;
  * for `E`, the rule it is built from;
  * for `P`, its inverse mapping;
  * parity and unused bits that must have no effect.
* `tb_des_sbox` checks the worked example and the corner entries. It also
  checks that every row of every box is a permutation of 0..15.
* `tb_des_round` checks the first round of the worked example and the Feistel
  inverse. It also checks that `f` does not depend on `L`.
* `tb_des_key_schedule` checks `K1`, `K2`, `K3` and `K16` of the example. For
  random keys it compares every key with a reference built from cumulative
  rotations, and checks that decryption gives exactly the reversed sequence.
* `tb_des_loop_ctrl` compares every signal, every cycle, with a reference
  model under random traffic.
* `tb_des_unit` runs known answers and back-to-back streams in both
  directions. It also checks latency, interval and that `dout` holds.
* `tb_des_chip` runs the whole chip at full size with these tests:
  * nine published known-answer vectors, in both directions;
  * the iterated test: `X0 = 9474B8E8C73BCA7D`, alternately encrypted and
    decrypted under its own value, must reach `1B1A2DDB4C642438` after 16
    steps;
  * the loop-back stream: 300 random blocks, each with a new random key.

  It counts loads into an idle unit, loads overlapped with the 16th
  iteration, key changes, and results of each unit. It fails if any of these
  never happened.

Running a testbench with Verilator 5, from the top folder:

```
verilator --binary --timing --assert -Irtl rtl/des_pkg.sv tb/tb_des_chip.sv \
          --top-module tb_des_chip -o sim && ./obj_dir/sim
```

Swap in another `tb/tb_*.sv` and its module name for the other tests. The
package `rtl/des_pkg.sv` must come first. `-Irtl` lets Verilator find the other
modules by name.

## Changing the design

* The tables and per-round rotations live in `rtl/des_pkg.sv`. Every
  permutation module is a loop over its table.
* `DECRYPT` on `des_unit` and `des_key_schedule` selects the direction.
* Three changes each touch one module:
  * pipelining the round: split `des_round`;
  * a different handshake: change `des_loop_ctrl`;
  * two rounds per clock: chain two `des_round` instances in `des_unit` and
    give the key schedule two outputs.
