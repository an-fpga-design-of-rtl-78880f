// tb_des_pc2: checks permuted choice 2.
// Worked-example round keys: K1 from C1/D1 and K16 from C16/D16 (= C0/D0) of
// key 133457799BBCDFF1; the eight unused positions 9, 18, 22, 25, 35, 38, 43,
// 54 have no effect and every other position reaches one distinct key bit.
module tb_des_pc2;
  import des_pkg::*;
  logic [55:0] cd;
  subkey_t k, acc;
  int checks = 0, failures = 0;

  des_pc2 dut (.cd(cd), .k(k));

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
    cd = {28'hE19955F, 28'hAACCF1E}; #1 chk("K1 known", k, 48'h1B02EFFC7072);
    cd = {28'hF0CCAAF, 28'h556678F}; #1 chk("K16 known", k, 48'hCB3D8B0E17F5);
    acc = '0;
    for (int n = 1; n <= 56; n++) begin
      cd = 56'd1 << (56 - n); #1;
      if (n inside {9, 18, 22, 25, 35, 38, 43, 54}) chk($sformatf("bit %0d unused", n), k, '0);
      else begin
        chk($sformatf("bit %0d used once", n), 48'($countones(k)), 48'd1);
        acc |= k;
      end
    end
    chk("all key bits reached", acc, '1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
