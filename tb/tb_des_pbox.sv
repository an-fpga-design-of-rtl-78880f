// tb_des_pbox: checks the transposition P.
// Worked-example value (P of 5C82B597), the
// destination of every single input bit, written as the inverse of the P
// table (input bit n goes to output position DEST[n-1]), and bijectivity.
module tb_des_pbox;
  import des_pkg::*;
  half_t s, p;
  int checks = 0, failures = 0;

  des_pbox dut (.s(s), .p(p));

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

  localparam int DEST [32] = '{
     9, 17, 23, 31, 13, 28,  2, 18, 24, 16, 30,  6, 26, 20, 10,  1,
     8, 14, 25,  3,  4, 29, 11, 19, 32, 12, 22,  7,  5, 27, 15, 21
  };

  initial begin
    half_t acc;
    s = 32'h5C82B597; #1 chk("P known", p, 32'h234AA9BB);
    acc = '0;
    for (int j = 0; j < 32; j++) begin
      s = 32'd1 << j; #1;
      chk("one-hot stays one-hot", 32'($countones(p)), 32'd1);
      acc |= p;
    end
    chk("all outputs reached", acc, '1);
    for (int n = 1; n <= 32; n++) begin
      s = 32'd1 << (32 - n); #1;
      chk($sformatf("bit %0d destination", n), p, 32'd1 << (32 - DEST[n-1]));
    end
    // P moves S-box bit 16 to position 1 and bit 1 to position 9
    s = 32'h00010000; #1 chk("bit 16 -> 1", p, 32'h80000000);
    s = 32'h80000000; #1 chk("bit 1 -> 9", p, 32'h00800000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
