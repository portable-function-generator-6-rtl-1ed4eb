// tb_buffer_fill: checks the sampling window against a known sample stream.
//
// The sample stream is a sawtooth of period 300 whose first 5 samples are
// zero: f(k) = (k mod 300 < 5) ? 0 : k mod 300. A window that starts on the
// last zero before the rise must therefore hold f(4 + i) at position i. The
// bench checks that the copy waits for 'ready', that exactly 1024 writes with
// addresses 0..1023 in order and the expected data reach the external port,
// that wr_ready pulses once per window and only after the last write, and that
// a second window is captured after the hold pause. Sample and data clocks are
// unrelated (10 ns and 15.4 ns).
`timescale 1ns/1ps
module tb_buffer_fill;
  localparam int N = 1024;
  logic wave_clk = 0, data_clk = 0;
  logic wave_rst = 1, data_rst = 1;
  logic [9:0] sample = 0;
  logic ready = 0;
  logic wr_ready, buf_we, capturing;
  logic [9:0] buf_addr, buf_data;
  int checks = 0, failures = 0;

  buffer_fill dut (.*);

  always #5   wave_clk = ~wave_clk;
  always #7.7 data_clk = ~data_clk;

  int k = 7;   // start inside a rising ramp so the first period is skipped
  always @(posedge wave_clk) begin
    k <= k + 1;
    sample <= ((k % 300) < 5) ? 10'd0 : 10'(k % 300);
  end

  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  int writes, bad_addr, bad_data, pulses;
  logic [9:0] mem [N];
  bit monitor_on = 0;
  always @(posedge data_clk) if (monitor_on) begin
    if (buf_we) begin
      if (buf_addr != 10'(writes)) bad_addr++;
      if (buf_data != 10'((((4 + writes) % 300) < 5) ? 0 : ((4 + writes) % 300))) bad_data++;
      mem[buf_addr] <= buf_data;
      writes++;
    end
    if (wr_ready) begin
      pulses++;
      check(writes == N, $sformatf("wr_ready after %0d writes", writes));
    end
  end

  initial begin
    writes = 0; bad_addr = 0; bad_data = 0; pulses = 0;
    repeat (3) @(posedge data_clk);
    wave_rst = 0; data_rst = 0;
    @(posedge data_clk); #1 monitor_on = 1;
    // window fills in ~1300 sample clocks; hold 'ready' low well beyond that
    repeat (2000) @(posedge data_clk);
    check(writes == 0, "no copy while ready is low");
    ready = 1;
    wait (pulses == 1);
    check(writes == N, $sformatf("first window writes %0d", writes));
    check(bad_addr == 0, $sformatf("address order errors %0d", bad_addr));
    check(bad_data == 0, $sformatf("data errors %0d", bad_data));
    check(mem[0] == 0 && mem[1] == 5 && mem[2] == 6, "window starts on the rise");
    // second window
    writes = 0;
    wait (pulses == 2);
    check(writes == N, $sformatf("second window writes %0d", writes));
    check(bad_addr == 0 && bad_data == 0, "second window content");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #500_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
