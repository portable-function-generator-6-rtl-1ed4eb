// tb_dac_parallel: a model of a dual parallel DAC (data latched into the
// selected channel on the rising edge of wr_n) checks that each channel's
// output follows its input, that the channels never mix, and that each channel
// is refreshed once per 12 clocks.
`timescale 1ns/1ps
module tb_dac_parallel;
  logic clk = 0, rst = 1;
  logic [7:0] ch_a = 0, ch_b = 0, dac_data;
  logic dac_sel, dac_wr_n, update;
  int checks = 0, failures = 0;
  dac_parallel dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  logic [7:0] out_a = 0, out_b = 0;
  int writes_a = 0, writes_b = 0;
  always @(posedge dac_wr_n) if (!rst) begin
    if (dac_sel) begin out_b = dac_data; writes_b++; end
    else begin out_a = dac_data; writes_a++; end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 50; i++) begin
      ch_a = 8'($urandom); ch_b = 8'($urandom);
      repeat (30) @(negedge clk);
      check(out_a == ch_a, $sformatf("channel A %0d vs %0d", out_a, ch_a));
      check(out_b == ch_b, $sformatf("channel B %0d vs %0d", out_b, ch_b));
    end
    writes_a = 0; writes_b = 0;
    repeat (1200) @(negedge clk);
    check(writes_a == 100 && writes_b == 100,
          $sformatf("refresh count A %0d B %0d in 1200 clocks", writes_a, writes_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
