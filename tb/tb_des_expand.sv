// tb_des_expand: checks the expansion E.
// The reference is the rule behind the E table, not the table: 6-bit group j
// (j = 0..7, most significant first) is input bits 4j .. 4j+5 in DES numbering
// taken cyclically, i.e. the 4-bit group j with the last bit of group j-1 in
// front and the first bit of group j+1 behind. Plus the worked example value.
module tb_des_expand;
  import des_pkg::*;
  half_t r;
  subkey_t e, ref_e;
  int checks = 0, failures = 0;

  des_expand dut (.r(r), .e(e));

  // DES bit n (1..32) of r, cyclic
  function automatic logic rb(input half_t v, input int n);
    int m = ((n - 1 + 32) % 32) + 1;
    return v[32 - m];
  endfunction

  task automatic chk(input string what, input logic [47:0] got, input logic [47:0] exp);
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
    r = 32'hF0AAF0AA; #1 chk("E known", e, 48'h7A15557A1555);
    repeat (300) begin
      r = $urandom; #1;
      for (int j = 0; j < 8; j++)
        for (int b = 0; b < 6; b++)
          ref_e[47 - 6*j - b] = rb(r, 4*j + b);
      chk("E rule", e, ref_e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
