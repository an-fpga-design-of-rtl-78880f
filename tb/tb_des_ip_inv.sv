// tb_des_ip_inv: checks the inverse initial permutation IP^-1.
// Known value from the standard's worked example, bijectivity, and random
// round trips IP^-1(IP(x)) = x through an IP instance.
module tb_des_ip_inv;
  import des_pkg::*;
  block_t x, m, y;
  int checks = 0, failures = 0;

  des_ip     fwd (.x(x), .y(m));
  des_ip_inv dut (.z(m), .y(y));

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
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
    block_t acc;
    // drive the IP^-1 input through a known IP image
    x = 64'h85E813540F0AB405; #1 chk("IP^-1 known", y, 64'h85E813540F0AB405);
    force m = 64'h0A4CD99543423234; #1 chk("IP^-1 of pre-output", y, 64'h85E813540F0AB405);
    force m = 64'hCC00CCFFF0AAF0AA; #1 chk("IP^-1 of IP(M)", y, 64'h0123456789ABCDEF);
    acc = '0;
    for (int j = 0; j < 64; j++) begin
      force m = 64'd1 << j; #1;
      chk("one-hot stays one-hot", 64'($countones(y)), 64'd1);
      acc |= y;
    end
    chk("all outputs reached", acc, '1);
    release m;
    repeat (200) begin
      x = {$urandom, $urandom}; #1;
      chk("IP^-1(IP(x)) = x", y, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
