// tb_des_loop_ctrl: checks the iteration sequencing.
// A random in_valid pattern is offered. The testbench keeps its own model of
// the expected state (idle, or busy in iteration n) and checks every cycle:
// in_ready, load, busy, round, last and out_valid. It also checks that each
// accepted block gives out_valid exactly 16 clocks later and that blocks
// offered back to back are taken every 16 clocks.
module tb_des_loop_ctrl;
  import des_pkg::*;

  logic clk = 1'b0, reset = 1'b1, in_valid, in_ready, load, busy, last, out_valid;
  round_t round;

  des_loop_ctrl dut (.clk, .reset, .in_valid, .in_ready, .load, .busy, .round, .last, .out_valid);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL cycle %0d %s: got %0d exp %0d", cyc, what, got, exp); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  int  m_n = -1;          // -1 idle, else current iteration
  bit  m_ov = 0;
  int  load_cyc [$];
  int  last_load = -100, n_b2b = 0, n_out = 0;

  initial begin
    bit exp_ready, exp_last;
    in_valid = 0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    for (cyc = 0; cyc < 3000; cyc++) begin
      // mostly long bursts of valid, sometimes gaps
      in_valid = (cyc % 400 < 300) ? 1'b1 : ($urandom % 8 == 0);
      #1;
      exp_last  = (m_n == 15);
      exp_ready = (m_n == -1) || exp_last;
      chk("busy", busy, m_n != -1);
      if (m_n != -1) chk("round", round, m_n);
      chk("last", last, exp_last);
      chk("in_ready", in_ready, exp_ready);
      chk("load", load, in_valid && exp_ready);
      chk("out_valid", out_valid, m_ov);
      if (out_valid) begin
        n_out++;
        checks++;
        // load seen in cycle c is taken at the edge ending it; out_valid is
        // high in cycle c + 17, i.e. 16 clocks after that edge
        if (load_cyc.size() == 0 || cyc - load_cyc.pop_front() != 17) begin
          failures++; $display("FAIL out_valid not 16 clocks after its load");
        end
      end
      // advance model at the clock edge
      m_ov = exp_last;
      if (in_valid && exp_ready) begin
        if (cyc - last_load == 16) n_b2b++;
        last_load = cyc;
        load_cyc.push_back(cyc);
        m_n = 0;
      end else if (m_n == 15) m_n = -1;
      else if (m_n != -1) m_n++;
      @(posedge clk); #1;
    end
    checks++;
    if (n_b2b == 0 || n_out == 0) begin failures++; $display("FAIL no back-to-back blocks seen"); end
    $display("back-to-back loads %0d, results %0d", n_b2b, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
