// tb_des_ip: checks the initial permutation IP.
// Known values from the standard's worked example (IP of 0123456789ABCDEF and
// of the final pre-output block), a bijectivity check (every single input bit
// lands on exactly one distinct output bit) and random round trips through an
// IP^-1 instance.
module tb_des_ip;
  import des_pkg::*;
  block_t x, y, z;
  int checks = 0, failures = 0;

  des_ip     dut (.x(x), .y(y));
  des_ip_inv inv (.z(y), .y(z));

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
    x = 64'h0123456789ABCDEF; #1 chk("IP known", y, 64'hCC00CCFFF0AAF0AA);
    x = 64'h85E813540F0AB405; #1 chk("IP known 2", y, 64'h0A4CD99543423234);
    acc = '0;
    for (int j = 0; j < 64; j++) begin
      x = 64'd1 << j; #1;
      chk("one-hot stays one-hot", 64'($countones(y)), 64'd1);
      acc |= y;
    end
    chk("all outputs reached", acc, '1);
    repeat (200) begin
      x = {$urandom, $urandom}; #1;
      chk("IP^-1(IP(x)) = x", z, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
