// tb_xvga: checks the XGA raster timing at full size.
//
// Over two whole frames (2 x 806 lines of 1344 clocks) the bench follows the
// counters and checks, clock by clock: hcount steps 0..1343 and wraps, vcount
// steps at each wrap and wraps after 805; hsync is low exactly for hcount
// 1048..1183, vsync exactly for vcount 777..782, blank exactly outside the
// 1024x768 visible area; and the sync pulses have the right periods.
`timescale 1ns/1ps
module tb_xvga;
  logic vclk = 0, rst = 1;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic hsync, vsync, blank;
  int checks = 0, failures = 0;

  xvga dut (.*);
  always #7.692 vclk = ~vclk;

  initial begin
    int eh, ev, bad_cnt, bad_sync, bad_blank, hs_lows, vs_lows;
    repeat (3) @(negedge vclk);
    rst = 0;
    @(negedge vclk);
    eh = 1; ev = 0;
    bad_cnt = 0; bad_sync = 0; bad_blank = 0; hs_lows = 0; vs_lows = 0;
    for (int n = 0; n < 2 * 1344 * 806; n++) begin
      if (hcount != 11'(eh) || vcount != 10'(ev)) bad_cnt++;
      if (hsync != !(eh >= 1048 && eh < 1184)) bad_sync++;
      if (vsync != !(ev >= 777 && ev < 783)) bad_sync++;
      if (blank != (eh >= 1024 || ev >= 768)) bad_blank++;
      if (!hsync) hs_lows++;
      if (!vsync) vs_lows++;
      eh++;
      if (eh == 1344) begin eh = 0; ev = (ev + 1) % 806; end
      @(negedge vclk);
    end
    checks++; if (bad_cnt != 0)  begin failures++; $display("FAIL: counters wrong %0d times", bad_cnt); end
    checks++; if (bad_sync != 0) begin failures++; $display("FAIL: sync wrong %0d times", bad_sync); end
    checks++; if (bad_blank != 0) begin failures++; $display("FAIL: blank wrong %0d times", bad_blank); end
    checks++; if (hs_lows != 2 * 806 * 136) begin failures++; $display("FAIL: hsync low %0d clocks", hs_lows); end
    checks++; if (vs_lows != 2 * 6 * 1344) begin failures++; $display("FAIL: vsync low %0d clocks", vs_lows); end
    // reset in mid-frame restarts at the origin
    @(negedge vclk) rst = 1;
    @(negedge vclk) rst = 0;
    checks++; if (hcount != 0 || vcount != 0) begin failures++; $display("FAIL: reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #40_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
