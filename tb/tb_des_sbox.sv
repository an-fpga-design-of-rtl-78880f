// tb_des_sbox: checks the eight S-boxes.
// Worked-example value (S of 6117BA866527 = 5C82B597), corner entries of
// each box, and the defining property that each of the four rows of every box
// is a permutation of 0..15, tested by sweeping all 64 inputs of each box.
module tb_des_sbox;
  import des_pkg::*;
  subkey_t f;
  half_t s;
  int checks = 0, failures = 0;

  des_sbox dut (.f(f), .s(s));

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // first entry (input 000000) and last entry (input 111111) of S1..S8
  localparam logic [3:0] FIRST [8] = '{14, 15, 10,  7,  2, 12,  4, 13};
  localparam logic [3:0] LAST  [8] = '{13,  9, 12, 14,  3, 13, 12, 11};

  initial begin
    f = 48'h6117BA866527; #1 chk("S known", s, 32'h5C82B597);
    f = '0; #1 chk("all first entries", s,
      {FIRST[0], FIRST[1], FIRST[2], FIRST[3], FIRST[4], FIRST[5], FIRST[6], FIRST[7]});
    f = '1; #1 chk("all last entries", s,
      {LAST[0], LAST[1], LAST[2], LAST[3], LAST[4], LAST[5], LAST[6], LAST[7]});
    for (int b = 0; b < 8; b++) begin
      for (int row = 0; row < 4; row++) begin
        logic [15:0] seen;
        seen = '0;
        for (int col = 0; col < 16; col++) begin
          logic [5:0] g;
          g = {row[1], col[3:0], row[0]};
          f = 48'(g) << (42 - 6*b); #1;
          seen[s[31 - 4*b -: 4]] = 1'b1;
          // the other seven boxes see input 0
          for (int o = 0; o < 8; o++)
            if (o != b && s[31 - 4*o -: 4] != FIRST[o]) begin
              failures++; $display("FAIL box %0d disturbed by box %0d input", o + 1, b + 1);
            end
        end
        chk($sformatf("S%0d row %0d is a permutation", b + 1, row), 32'(seen), 32'hFFFF);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
