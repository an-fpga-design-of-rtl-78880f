// des_loop_ctrl: loop control of the iterative DES unit.
//
// The original design reduces the 16 DES rounds to one round stage used in a loop
// and names a loop control box that steps it; this block is that control. A
// 4-bit counter holds the index of the current iteration while `busy` is set.
// A new block is accepted (`load`) when `in_valid` is high and the unit is idle
// or in its 16th iteration, so blocks presented back to back are processed one
// per 16 clocks with no idle cycle. `out_valid` is a one-cycle pulse in the
// clock after the 16th iteration, when the unit's output register holds the
// result. Latency from the accepting edge to `out_valid`: 16 clocks.
// The valid/ready handshake and the synchronous active-high reset are this
// design's choices; the original design specifies neither.
module des_loop_ctrl
  import des_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   in_valid,  // a block (and key) is offered
  output logic   in_ready,  // the block is taken at this edge if in_valid
  output logic   load,      // in_valid && in_ready: load L/R and C/D
  output logic   busy,      // an iteration is executed in this cycle
  output round_t round,     // index 0..15 of that iteration
  output logic   last,      // this is the 16th iteration
  output logic   out_valid  // the output register was written at the last edge
);
  logic busy_q;
  round_t round_q;

  assign busy     = busy_q;
  assign round    = round_q;
  assign last     = busy_q && (round_q == round_t'(ROUNDS - 1));
  assign in_ready = !busy_q || last;
  assign load     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (reset) begin
      busy_q    <= 1'b0;
      round_q   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= last;
      if (load) begin
        busy_q  <= 1'b1;
        round_q <= '0;
      end else if (busy_q) begin
        if (last) busy_q <= 1'b0;
        round_q <= round_q + 1'b1;
      end
    end
  end

  // The counter only runs while busy and a load never lands mid-block.
  a_no_mid_load: assert property (@(posedge clk) disable iff (reset)
    load |-> (!busy_q || last));
  a_valid_after_last: assert property (@(posedge clk) disable iff (reset)
    last |=> out_valid);
endmodule
