// tb_des_unit: checks the iterative DES unit in both configurations.
// An encrypting unit (DECRYPT = 0) and a decrypting unit (DECRYPT = 1) are
// tested separately with published known answers. Then random blocks with
// random keys are streamed back to back into the encrypting unit; each
// ciphertext is later deciphered by the decrypting unit and must give the
// plaintext back. Checked besides the data: result 16 clocks after the block
// is taken, one result every 16 clocks when streaming, and dout holding its
// value between results.
module tb_des_unit;
  import des_pkg::*;

  localparam int N = 60;

  logic   clk = 1'b0, reset = 1'b1;
  logic   ev, er, eov, dv, dr, dov;
  block_t ed, ek, eo, dd, dk, dq;

  des_unit #(.DECRYPT(1'b0)) u_e (.clk, .reset, .in_valid(ev), .in_ready(er), .din(ed), .key(ek),
                                  .out_valid(eov), .dout(eo));
  des_unit #(.DECRYPT(1'b1)) u_d (.clk, .reset, .in_valid(dv), .in_ready(dr), .din(dd), .key(dk),
                                  .out_valid(dov), .dout(dq));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin : watchdog
    repeat (40 * N + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream n blocks back to back into one unit and collect the results
  task automatic stream(input bit dec, input block_t x [N], input block_t k [N], output block_t y [N]);
    int t_acc [N];
    int got = 0, t_prev = 0, i = 0;
    fork
      begin
        for (i = 0; i < N; i++) begin
          if (!dec) begin ed = x[i]; ek = k[i]; ev = 1'b1; end
          else      begin dd = x[i]; dk = k[i]; dv = 1'b1; end
          do @(posedge clk); while (!(dec ? dr : er));
          t_acc[i] = cycle;
          #1;
        end
        ev = 1'b0; dv = 1'b0;
      end
      begin
        while (got < N) begin
          @(posedge clk);
          if (dec ? dov : eov) begin
            y[got] = dec ? dq : eo;
            chk("latency 16", 64'(cycle - t_acc[got]), 64'd17);
            if (got > 0) chk("interval 16", 64'(cycle - t_prev), 64'd16);
            t_prev = cycle;
            got++;
            @(posedge clk);
            chk("dout holds", dec ? dq : eo, y[got - 1]);
          end
        end
      end
    join
  endtask

  initial begin
    block_t x [N], k [N], c [N], p [N];
    ev = 0; dv = 0; ed = '0; ek = '0; dd = '0; dk = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;

    // known answers, one block each
    foreach (x[i]) begin x[i] = '0; k[i] = '0; end
    x[0] = 64'h0123456789ABCDEF; k[0] = 64'h133457799BBCDFF1;
    x[1] = 64'h8787878787878787; k[1] = 64'h0E329232EA6D0D73;
    x[2] = 64'h0123456789ABCDEF; k[2] = 64'hFEDCBA9876543210;
    for (int i = 3; i < N; i++) begin x[i] = {$urandom, $urandom}; k[i] = {$urandom, $urandom}; end
    stream(1'b0, x, k, c);
    chk("KAT 0 encrypt", c[0], 64'h85E813540F0AB405);
    chk("KAT 1 encrypt", c[1], 64'h0000000000000000);
    chk("KAT 2 encrypt", c[2], 64'hED39D950FA74BCC4);
    repeat (5) @(posedge clk);
    #1 stream(1'b1, c, k, p);
    for (int i = 0; i < N; i++) chk($sformatf("decrypt block %0d", i), p[i], x[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
