// tb_des_round: checks one DES round.
// Worked-example first round (L0, R0, K1 -> R1 = EF4A6544), L' = R, and the
// Feistel inverse: applying the round to the swapped outputs with the same key
// gives back the swapped inputs, f = R' xor L does not depend on L, and a
// change of one key bit changes the result, for random values.
module tb_des_round;
  import des_pkg::*;
  half_t l, r, ln, rn, l2, r2, f0;
  subkey_t k;
  int checks = 0, failures = 0;

  des_round dut (.l(l),  .r(r),  .k(k), .l_next(ln), .r_next(rn));
  des_round inv (.l(rn), .r(ln), .k(k), .l_next(l2), .r_next(r2));

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

  initial begin
    l = 32'hCC00CCFF; r = 32'hF0AAF0AA; k = 48'h1B02EFFC7072; #1;
    chk("round 1 R", rn, 32'hEF4A6544);
    chk("round 1 L", ln, 32'hF0AAF0AA);
    // f of the example: P(S(E(R0) xor K1)) = 234AA9BB, so with L = 0 R' = f
    l = '0; #1 chk("f known", rn, 32'h234AA9BB);
    repeat (300) begin
      l = $urandom; r = $urandom; k = {$urandom, 16'($urandom)}; #1;
      chk("L' = R", ln, r);
      chk("inverse round L", r2, l);
      chk("inverse round R", l2, r);
      f0 = rn ^ l;
      l = $urandom; #1 chk("f independent of L", rn ^ l, f0);
      k ^= 48'd1 << ($urandom % 48); #1;
      checks++;
      if ((rn ^ l) == f0) begin failures++; $display("FAIL key bit without effect"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
