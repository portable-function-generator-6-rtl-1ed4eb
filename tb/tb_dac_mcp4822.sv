// tb_dac_mcp4822: a model of the DAC's serial input checks the driver.
//
// The model shifts sdi in on every rising sck edge while cs_n is low and, on
// the falling edge of ldac_n, latches the 12-bit code into the output register
// the A/B bit selects. The bench sends random codes to both channels and checks
// the received 16-bit words (A/B, 0, GA=1, SHDN=1, code), that exactly 16 bits
// arrive per frame, that ldac_n pulses only after cs_n is high, that sck never
// runs faster than 20 MHz at a 100 MHz clock, that busy covers the transfer,
// and the transfer length in clocks.
`timescale 1ns/1ps
module tb_dac_mcp4822;
  logic clk = 0, rst = 1, send = 0, chan = 0;
  logic [11:0] din = 0;
  logic busy, done, cs_n, sck, sdi, ldac_n;
  int checks = 0, failures = 0;
  dac_mcp4822 dut (.*);
  always #5 clk = ~clk;   // 100 MHz

  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  // DAC model
  logic [15:0] shreg;
  int nbits = 0;
  logic [11:0] out_a = 0, out_b = 0;
  logic [15:0] last_word;
  realtime last_rise = 0, min_period = 1e9;
  always @(posedge sck) if (!cs_n) begin
    shreg = {shreg[14:0], sdi};
    nbits++;
    if (last_rise > 0 && $realtime - last_rise < min_period) min_period = $realtime - last_rise;
    last_rise = $realtime;
  end
  always @(negedge cs_n) begin nbits = 0; last_rise = 0; end
  always @(posedge cs_n) if (!rst) last_word = shreg;
  always @(negedge ldac_n) begin
    if (!cs_n) begin failures++; $display("FAIL: ldac while cs low"); end
    if (last_word[15]) out_b = last_word[11:0]; else out_a = last_word[11:0];
  end

  task automatic write(input logic c, input logic [11:0] v);
    int cyc;
    @(negedge clk);
    while (busy) @(negedge clk);
    chan = c; din = v; send = 1;
    @(negedge clk) send = 0;
    check(busy, "busy during transfer");
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 2 + 32 * 3 + 5 + 3, $sformatf("transfer took %0d clocks", cyc));
    check(nbits == 16, $sformatf("%0d bits in frame", nbits));
    check(last_word == {c, 1'b0, 1'b1, 1'b1, v}, $sformatf("word %h", last_word));
    check((c ? out_b : out_a) == v, "output register updated");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    write(0, 12'b1100_1100_1100);
    write(1, 12'h123);
    repeat (20) write($urandom % 2, 12'($urandom));
    check(min_period >= 50.0, $sformatf("sck period %0t ns below 50 ns", min_period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
