// tb_galvo_scan: fills a window through the snooped write port and checks the
// points sent to a modelled serial DAC (busy for 40 clocks after each send).
//
// Expected, from the module's contract: point i has x = i*4095/99 on channel A
// and y = sample[floor(i*1024/100)] * 16 on channel B, points are visited in
// order 0..99 and then again from 0, consecutive points start at least
// POINT_CYCLES clocks apart, and sends only happen while the DAC is idle.
`timescale 1ns/1ps
module tb_galvo_scan;
  localparam int PC = 120;
  logic clk = 0, rst = 1;
  logic buf_we = 0;
  logic [9:0] buf_addr = 0, buf_data = 0;
  logic dac_send, dac_chan, dac_busy;
  logic [11:0] dac_din;
  logic [6:0] point_idx;
  int checks = 0, failures = 0;
  galvo_scan #(.POINT_CYCLES(PC)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  function automatic int sample_at(input int a);
    return (a * 7 + 3) % 256;
  endfunction

  // DAC driver model
  int busy_cnt = 0;
  bit send_while_busy = 0;
  assign dac_busy = busy_cnt > 0;
  int sends_chan [$], sends_val [$];
  longint send_time [$];
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (dac_send) begin
      if (dac_busy) send_while_busy = 1;
      sends_chan.push_back(dac_chan); sends_val.push_back(dac_din); send_time.push_back(cyc);
      busy_cnt <= 40;
    end else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // fill the window
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); buf_we = 1; buf_addr = 10'(a); buf_data = 10'(sample_at(a));
    end
    @(negedge clk); buf_we = 0;
    sends_chan.delete(); sends_val.delete(); send_time.delete();
    // wait for the scan to return to point 0, then record 130 points
    wait (point_idx == 99);
    wait (point_idx == 0);
    sends_chan.delete(); sends_val.delete(); send_time.delete();
    wait (point_idx == 30 && dac_busy == 0);
    repeat (100 * (PC + 20)) @(negedge clk);
    begin
      int bad_x, bad_y, bad_gap, n;
      bad_x = 0; bad_y = 0; bad_gap = 0;
      n = sends_val.size() / 2;
      check(n >= 120, $sformatf("%0d points recorded", n));
      for (int k = 0; k < n; k++) begin
        int i;
        i = k % 100;
        if (sends_chan[2*k] != 0 || sends_val[2*k] != (i * 4095) / 99) bad_x++;
        if (sends_chan[2*k+1] != 1 || sends_val[2*k+1] != sample_at((i * 1024) / 100) * 16) bad_y++;
        if (k > 0 && send_time[2*k] - send_time[2*k-2] < PC) bad_gap++;
      end
      check(bad_x == 0, $sformatf("x positions wrong: %0d", bad_x));
      check(bad_y == 0, $sformatf("y positions wrong: %0d", bad_y));
      check(bad_gap == 0, $sformatf("points closer than POINT_CYCLES: %0d", bad_gap));
    end
    check(!send_while_busy, "no send while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
