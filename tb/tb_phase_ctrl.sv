// tb_phase_ctrl: checks phase_ctrl against a reference count of stalled clocks.
//
// Random phase_inc / phase_dec patterns are applied; every clock the stall
// outputs must equal the inputs of the previous clock (inc priority) and the
// phase multiplier must equal the number of A-stalls minus B-stalls so far.
`timescale 1ns/1ps
module tb_phase_ctrl;
  logic clk = 0, rst = 1, phase_inc = 0, phase_dec = 0;
  logic stall_a, stall_b;
  logic signed [31:0] phase_mult;
  int checks = 0, failures = 0;
  int ref_mult = 0;
  logic exp_a = 0, exp_b = 0;

  phase_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      // hold each pattern for a few clocks
      if (i % 7 == 0) begin
        phase_inc = ($urandom % 3) == 0;
        phase_dec = ($urandom % 3) == 0;
      end
      @(posedge clk); #1;
      exp_a = phase_inc;
      exp_b = phase_dec & ~phase_inc;
      if (phase_inc) ref_mult++; else if (phase_dec) ref_mult--;
      check(stall_a == exp_a && stall_b == exp_b, $sformatf("stalls at %0d", i));
      check(phase_mult == ref_mult, $sformatf("phase_mult %0d vs %0d", phase_mult, ref_mult));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
