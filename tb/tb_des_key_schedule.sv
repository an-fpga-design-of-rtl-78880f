// tb_des_key_schedule: checks the round-key generator in both directions.
// An encrypting and a decrypting instance load the same key and step through
// the 16 iterations together. Checked: the worked-example keys K1, K2, K3 and
// K16 of key 133457799BBCDFF1; for random keys every encryption key against a
// reference built from cumulative rotations (1,2,4,6,8,10,12,14,15,17,19,21,
// 23,25,27,28) of C0/D0 through separate PC-1/PC-2 instances; the decrypting
// instance delivering the same keys in reverse order; and that a key change
// between blocks takes effect.
module tb_des_key_schedule;
  import des_pkg::*;

  logic clk = 1'b0, reset = 1'b1, load, step;
  block_t key;
  round_t round;
  subkey_t k_enc, k_dec, k_ref;
  logic [55:0] cd0;
  logic [27:0] c_ref, d_ref;

  des_key_schedule #(.DECRYPT(1'b0)) u_enc (.clk, .reset, .load, .key, .step, .round, .k(k_enc));
  des_key_schedule #(.DECRYPT(1'b1)) u_dec (.clk, .reset, .load, .key, .step, .round, .k(k_dec));
  des_pc1 ref_pc1 (.key(key), .cd(cd0));
  des_pc2 ref_pc2 (.cd({c_ref, d_ref}), .k(k_ref));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int CUM [16] = '{1, 2, 4, 6, 8, 10, 12, 14, 15, 17, 19, 21, 23, 25, 27, 28};

  function automatic logic [27:0] rotl(input logic [27:0] v, input int n);
    logic [55:0] w = {v, v};
    return w[55 - n -: 28];
  endfunction

  task automatic chk(input string what, input logic [47:0] got, input logic [47:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // load a key, then run 16 iterations; returns both key sequences
  task automatic run(input block_t kk, output subkey_t ke [16], output subkey_t kd [16]);
    logic [55:0] c0d0;
    key = kk; load = 1'b1; step = 1'b0; round = '0;
    #1 c0d0 = cd0;
    @(posedge clk); #1 load = 1'b0;
    key = {$urandom, $urandom};   // key input is only read at the load
    for (int i = 0; i < 16; i++) begin
      step = 1'b1; round = round_t'(i);
      c_ref = rotl(c0d0[55:28], CUM[i]);
      d_ref = rotl(c0d0[27:0],  CUM[i]);
      #1 ke[i] = k_enc; kd[i] = k_dec;
      chk($sformatf("enc K%0d reference", i + 1), k_enc, k_ref);
      @(posedge clk); #1;
    end
    step = 1'b0;
  endtask

  initial begin
    subkey_t ke [16], kd [16];
    load = 0; step = 0; round = '0; key = '0; c_ref = '0; d_ref = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;

    run(64'h133457799BBCDFF1, ke, kd);
    chk("K1 known",  ke[0],  48'h1B02EFFC7072);
    chk("K2 known",  ke[1],  48'h79AED9DBC9E5);
    chk("K3 known",  ke[2],  48'h55FC8A42CF99);
    chk("K16 known", ke[15], 48'hCB3D8B0E17F5);
    for (int i = 0; i < 16; i++) chk($sformatf("dec key %0d", i), kd[i], ke[15 - i]);

    repeat (40) begin
      run({$urandom, $urandom}, ke, kd);
      for (int i = 0; i < 16; i++) chk($sformatf("dec key %0d", i), kd[i], ke[15 - i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
