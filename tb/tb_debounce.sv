// tb_debounce: bounces shorter than DELAY must not reach the output; a level
// held for DELAY clocks must appear DELAY + 2 clocks after it was applied.
`timescale 1ns/1ps
module tb_debounce;
  localparam int D = 20;
  logic clk = 0, rst = 1, noisy = 0, clean;
  int checks = 0, failures = 0;
  debounce #(.DELAY(D)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  int changes = 0;
  logic prev = 0;
  always @(posedge clk) begin if (!rst && clean != prev) changes++; prev <= clean; end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // bounces of 1..D-3 clocks
    for (int w = 1; w < D - 2; w++) begin
      noisy = 1; repeat (w) @(negedge clk);
      noisy = 0; repeat (3) @(negedge clk);
    end
    repeat (D + 5) @(negedge clk);
    check(changes == 0 && clean == 0, "short bounces filtered");
    // clean press
    noisy = 1;
    for (int t = 1; t <= D + 4; t++) begin
      @(negedge clk);
      if (t == D + 1) check(clean == 0, "not yet at DELAY+1");
      if (t == D + 2) check(clean == 1, $sformatf("press seen after %0d clocks", t));
    end
    // clean release
    noisy = 0;
    repeat (D + 3) @(negedge clk);
    check(clean == 0, "release seen");
    check(changes == 2, $sformatf("%0d output changes", changes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
