// phase_ctrl: phase shift between two waveform generators through their stall bits.
//
// Two identical generators run in lock-step. Holding phase_inc stalls
// generator A, so B gets one clock ahead per stalled clock; holding phase_dec
// stalls generator B and takes clocks back. The signed phase multiplier counts
// the net number of clocks A has been held back; the phase shift in time is
// phase_mult times the clock period (10 ns at 100 MHz). If both inputs are high
// phase_inc wins. Stalls are registered: a stall reaches a generator one clock
// after the input is seen, and phase_mult changes on the same edge as the stall
// it accounts for.
//
// The mechanism (stall generator A to increase, generator B to decrease, phase =
// stalled clocks x clock period) follows the original design; the registered
// outputs, the priority and the counter width are this design's choices.
module phase_ctrl #(
  parameter int unsigned PHASE_W = 32
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      phase_inc,
  input  logic                      phase_dec,
  output logic                      stall_a,
  output logic                      stall_b,
  output logic signed [PHASE_W-1:0] phase_mult
);
  always_ff @(posedge clk) begin
    if (rst) begin
      stall_a    <= 1'b0;
      stall_b    <= 1'b0;
      phase_mult <= '0;
    end else begin
      stall_a <= phase_inc;
      stall_b <= phase_dec & ~phase_inc;
      if (phase_inc)      phase_mult <= phase_mult + 1'b1;
      else if (phase_dec) phase_mult <= phase_mult - 1'b1;
    end
  end

  // A and B are never held together.
  assert property (@(posedge clk) disable iff (rst) !(stall_a && stall_b));
endmodule
