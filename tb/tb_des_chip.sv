// tb_des_chip: end-to-end test of the DES chip at its default (full) size.
//
// 1. Known-answer tests: published DES test vectors are enciphered by the
//    encryption unit and the expected ciphertexts deciphered by the decryption
//    unit, each block offered to an idle unit. Latency is checked (16 clocks).
// 2. Iterated test: X0 = 9474B8E8C73BCA7D, X(i+1) = E(Xi, key Xi) for even i and
//    D(Xi, key Xi) for odd i; X16 must be 1B1A2DDB4C642438.
// 3. Loop-back stream, the original design's own test: blocks with random data and a
//    new random key each are streamed back to back into the encryption unit,
//    its output is fed straight into the decryption unit, and every recovered
//    block must equal the original. One block per 16 clocks is checked.
// Counted mechanisms: loads into an idle unit, loads overlapped with the 16th
// iteration, key changes between blocks, and results of each unit.
module tb_des_chip;
  import des_pkg::*;

  localparam int NSTREAM = 300;

  logic   clk = 1'b0, reset = 1'b1;
  block_t d_ie, k_e, d_oe, d_id_tb, k_d_tb, d_id, k_d, d_od;
  logic   ie_valid, ie_ready, oe_valid, id_valid_tb, id_valid, id_ready, od_valid;
  logic   loopback;

  des_chip dut (
    .clk, .reset,
    .d_ie, .k_e, .ie_valid, .ie_ready, .d_oe, .oe_valid,
    .d_id, .k_d, .id_valid, .id_ready, .d_od, .od_valid
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // loop-back wiring and stream bookkeeping
  block_t s_data [NSTREAM];
  block_t s_key  [NSTREAM];
  int     dec_idx = 0, out_idx = 0;
  assign d_id     = loopback ? d_oe     : d_id_tb;
  assign id_valid = loopback ? oe_valid : id_valid_tb;
  assign k_d      = loopback ? s_key[dec_idx < NSTREAM ? dec_idx : 0] : k_d_tb;

  // mechanism counters
  int n_idle_load = 0, n_overlap_load = 0, n_key_change = 0, n_enc_out = 0, n_dec_out = 0;
  block_t last_ke = '0;
  always @(posedge clk) if (!reset) begin
    if (ie_valid && ie_ready) begin
      if (dut.u_enc.busy) n_overlap_load++; else n_idle_load++;
      if (k_e != last_ke) n_key_change++;
      last_ke <= k_e;
    end
    if (id_valid && id_ready) begin
      if (dut.u_dec.busy) n_overlap_load++; else n_idle_load++;
      if (loopback) dec_idx <= dec_idx + 1;
    end
    if (oe_valid) n_enc_out++;
    if (od_valid) n_dec_out++;
  end

  task automatic check(input string what, input block_t got, input block_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  // one block through the encryption (dec=0) or decryption (dec=1) unit
  task automatic run1(input bit dec, input block_t x, input block_t k, output block_t y);
    longint unsigned t0;
    if (!dec) begin
      while (!ie_ready) @(posedge clk);
      d_ie = x; k_e = k; ie_valid = 1'b1;
      @(posedge clk); t0 = cycle; #1 ie_valid = 1'b0;
      do @(posedge clk); while (!oe_valid);
      y = d_oe;
    end else begin
      while (!id_ready) @(posedge clk);
      d_id_tb = x; k_d_tb = k; id_valid_tb = 1'b1;
      @(posedge clk); t0 = cycle; #1 id_valid_tb = 1'b0;
      do @(posedge clk); while (!od_valid);
      y = d_od;
    end
    // out_valid is seen in the cycle after the 16th iteration edge
    checks++;
    if (cycle - t0 != 17) begin
      failures++;
      $display("FAIL latency %0d clocks, expected 16", cycle - t0 - 1);
    end
    #1;
  endtask

  // published DES known answers: key, plaintext, ciphertext
  localparam int NKAT = 9;
  localparam block_t KAT [NKAT][3] = '{
    '{64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h85E813540F0AB405},
    '{64'h0E329232EA6D0D73, 64'h8787878787878787, 64'h0000000000000000},
    '{64'h0000000000000000, 64'h0000000000000000, 64'h8CA64DE9C1B123A7},
    '{64'hFFFFFFFFFFFFFFFF, 64'hFFFFFFFFFFFFFFFF, 64'h7359B2163E4EDC58},
    '{64'h3000000000000000, 64'h1000000000000001, 64'h958E6E627A05557B},
    '{64'h1111111111111111, 64'h1111111111111111, 64'hF40379AB9E0EC533},
    '{64'h0123456789ABCDEF, 64'h1111111111111111, 64'h17668DFC7292532D},
    '{64'h1111111111111111, 64'h0123456789ABCDEF, 64'h8A5AE1F81AB8F2DD},
    '{64'hFEDCBA9876543210, 64'h0123456789ABCDEF, 64'hED39D950FA74BCC4}
  };

  initial begin : watchdog
    repeat (NSTREAM * 16 + 5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t y, x;
    longint unsigned t_prev;
    ie_valid = 0; id_valid_tb = 0; loopback = 0;
    d_ie = '0; k_e = '0; d_id_tb = '0; k_d_tb = '0;
    repeat (3) @(posedge clk);
    #1 reset = 0;

    // 1. known answers
    foreach (KAT[i]) begin
      run1(1'b0, KAT[i][1], KAT[i][0], y);
      check($sformatf("KAT %0d encrypt", i), y, KAT[i][2]);
      run1(1'b1, KAT[i][2], KAT[i][0], y);
      check($sformatf("KAT %0d decrypt", i), y, KAT[i][1]);
    end

    // 2. iterated encrypt/decrypt chain
    x = 64'h9474B8E8C73BCA7D;
    for (int i = 0; i < 16; i++) begin
      run1(i[0], x, x, y);
      x = y;
    end
    check("iterated chain X16", x, 64'h1B1A2DDB4C642438);

    // 3. loop-back stream, back to back
    foreach (s_data[i]) begin
      s_data[i] = {$urandom, $urandom};
      s_key[i]  = {$urandom, $urandom};
    end
    @(posedge clk); #1 loopback = 1;
    fork
      begin : feed
        for (int i = 0; i < NSTREAM; i++) begin
          d_ie = s_data[i]; k_e = s_key[i]; ie_valid = 1'b1;
          do @(posedge clk); while (!ie_ready);
          #1;
        end
        ie_valid = 1'b0;
      end
      begin : drain
        t_prev = 0;
        while (out_idx < NSTREAM) begin
          @(posedge clk);
          if (od_valid) begin
            check($sformatf("loop-back block %0d", out_idx), d_od, s_data[out_idx]);
            if (out_idx > 0) begin
              checks++;
              if (cycle - t_prev != 16) begin
                failures++;
                $display("FAIL block interval %0d clocks, expected 16", cycle - t_prev);
              end
            end
            t_prev = cycle;
            out_idx++;
          end
        end
      end
    join
    repeat (2) @(posedge clk);

    $display("mechanisms: idle_load=%0d overlap_load=%0d key_change=%0d enc_out=%0d dec_out=%0d",
             n_idle_load, n_overlap_load, n_key_change, n_enc_out, n_dec_out);
    checks += 5;
    if (n_idle_load == 0)    begin failures++; $display("FAIL no load into an idle unit"); end
    if (n_overlap_load == 0) begin failures++; $display("FAIL no load overlapped with round 16"); end
    if (n_key_change == 0)   begin failures++; $display("FAIL no key change"); end
    if (n_enc_out == 0)      begin failures++; $display("FAIL no encryption result"); end
    if (n_dec_out == 0)      begin failures++; $display("FAIL no decryption result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
