// tb_des_pc1: checks permuted choice 1.
// Worked-example value (PC-1 of 133457799BBCDFF1), independence from the
// eight parity bits (least significant bit of each byte), and that each of the
// other 56 bits reaches exactly one distinct output bit.
module tb_des_pc1;
  import des_pkg::*;
  block_t key;
  logic [55:0] cd, base, acc;
  int checks = 0, failures = 0;

  des_pc1 dut (.key(key), .cd(cd));

  task automatic chk(input string what, input logic [55:0] got, input logic [55:0] exp);
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
    key = 64'h133457799BBCDFF1; #1 chk("PC-1 known", cd, 56'hF0CCAAF556678F);
    repeat (50) begin
      key = {$urandom, $urandom}; #1 base = cd;
      key ^= {$urandom, $urandom} & 64'h0101010101010101; #1;
      chk("parity bits ignored", cd, base);
    end
    acc = '0;
    for (int j = 0; j < 64; j++) begin
      key = 64'd1 << j; #1;
      if (j % 8 == 0) chk("parity bit dropped", cd, '0);
      else begin
        chk("key bit kept once", 56'($countones(cd)), 56'd1);
        acc |= cd;
      end
    end
    chk("all outputs reached", acc, '1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
