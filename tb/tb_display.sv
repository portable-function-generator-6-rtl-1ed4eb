// tb_display: checks the display subsystem on a small raster.
//
// The display runs with a 160x64 visible raster (200x72 clocks per frame) and
// a waveform-buffer model with a registered read port. The bench keeps its own
// copy of the frame buffer from the observed write port and checks:
//   * the reset clear writes every pixel once with 0;
//   * after draw_req, a clear and then a trace in which every column x holds
//     the point (x, 32 - sample[x]) and no lit pixel lies outside the span of
//     the neighbouring points; 'ready' drops during the redraw and returns;
//   * line pixels are written only while vsync is low;
//   * one whole frame of rgb output, located from hsync/vsync alone, matches
//     the frame buffer ORed with the dotted grid away from the text and border,
//     shows the top border and
//     has text in the readout area;
//   * a second redraw with a new window removes the old trace.
`timescale 1ns/1ps
module tb_display;
  localparam int HA = 160, HSS = 168, HSE = 180, HT = 200;
  localparam int VA = 64, VSS = 65, VSE = 69, VT = 72;
  localparam int YB = VA / 2;

  logic vclk = 0, rst = 1, draw_req = 0;
  logic btn_right = 0, btn_left = 0, btn_up = 0, btn_down = 0;
  logic [19:0] freq = 20'd12345;
  logic [8:0]  amp = 9'd254;
  logic [6:0]  duty_cycle = 7'd50;
  logic [9:0]  buf_addr, buf_data;
  logic ready;
  logic [11:0] rgb;
  logic hsync, vsync;
  logic fb_we, fb_din;
  logic [19:0] fb_addr;
  int checks = 0, failures = 0;
  // the overlay's dotted background grid (every 128 columns and 96 rows)
  function automatic bit grid_px(input int x, input int y);
    return (x % 128 == 0 && y % 4 == 0) || (y % 96 == 0 && x % 4 == 0);
  endfunction


  display #(
    .H_ACTIVE(HA), .H_SYNC_START(HSS), .H_SYNC_END(HSE), .H_TOTAL(HT),
    .V_ACTIVE(VA), .V_SYNC_START(VSS), .V_SYNC_END(VSE), .V_TOTAL(VT)
  ) dut (.*);
  always #7.692 vclk = ~vclk;

  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  // waveform buffer model
  logic [9:0] wmem [1024];
  always @(posedge vclk) buf_data <= wmem[buf_addr];

  // frame buffer shadow from the write port
  bit shadow [HA * VA];
  int clear_writes [HA * VA];
  bit line_wr_q = 0;
  int bad_line_time = 0, n_line = 0;
  always @(posedge vclk) begin
    if (line_wr_q && vsync) bad_line_time++;   // vsync output lags the internal one by a clock
    line_wr_q <= 0;
    if (!rst && fb_we && fb_addr < 20'(HA * VA)) begin
      shadow[fb_addr] = fb_din;
      if (!fb_din) clear_writes[fb_addr]++;
      else begin line_wr_q <= 1; n_line++; end
    end
  end

  function automatic int y_pt(input int x);
    int s;
    s = int'(wmem[x]);
    return (s >= YB) ? 0 : YB - s;
  endfunction

  task automatic check_trace(input string what);
    int bad;
    bad = 0;
    for (int x = 0; x < HA; x++) begin
      int yc, lo, hi, yn;
      yc = y_pt(x); lo = yc; hi = yc;
      if (x > 0)      begin yn = y_pt(x - 1); if (yn < lo) lo = yn; if (yn > hi) hi = yn; end
      if (x < HA - 1) begin yn = y_pt(x + 1); if (yn < lo) lo = yn; if (yn > hi) hi = yn; end
      if (!shadow[yc * HA + x]) bad++;
      for (int y = 0; y < VA; y++) if (shadow[y * HA + x] && (y < lo || y > hi)) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d wrong pixels", what, bad));
  endtask

  task automatic redraw();
    int to;
    foreach (clear_writes[i]) clear_writes[i] = 0;
    @(negedge vclk) draw_req = 1;
    @(negedge vclk) draw_req = 0;
    @(negedge vclk);
    check(!ready, "not ready while redrawing");
    to = 0;
    while (!ready && to < 500_000) begin @(negedge vclk); to++; end
    check(ready, "redraw finished");
    begin
      int bad; bad = 0;
      foreach (clear_writes[i]) if (clear_writes[i] != 1) bad++;
      check(bad == 0, $sformatf("clear before drawing missed %0d pixels", bad));
    end
  endtask

  // frame grabber from the sync outputs
  bit frame [VA][HA];
  bit grab = 0, done_grab = 0, seen_vs = 0;
  int gx = 0, gy = 0;
  logic ghs_q = 1, gvs_q = 1;
  always @(negedge vclk) begin
    if (ghs_q && !hsync) gx = HSS;
    if (gvs_q && !vsync) begin gy = VSS; gx = 0; seen_vs = 1; end
    ghs_q = hsync; gvs_q = vsync;
    if (grab && seen_vs && gx < HA && gy < VA) frame[gy][gx] = (rgb != 0);
    if (grab && seen_vs && gx == HA - 1 && gy == VA - 1) begin grab = 0; done_grab = 1; end
    gx++;
    if (gx == HT) begin gx = 0; gy = (gy + 1) % VT; end
  end

  initial begin
    foreach (wmem[i]) wmem[i] = 10'(16 + 12 * $sin(real'(i) / 9.0));
    repeat (3) @(negedge vclk);
    rst = 0;
    while (!ready) @(negedge vclk);
    begin
      int bad; bad = 0;
      foreach (clear_writes[i]) if (clear_writes[i] != 1) bad++;
      check(bad == 0, $sformatf("reset clear missed %0d pixels", bad));
    end
    redraw();
    check_trace("first trace");
    // a frame of video
    @(negedge vclk) grab = 1;
    while (!done_grab) @(negedge vclk);
    begin
      int bad, lit, border;
      bad = 0; lit = 0; border = 0;
      for (int y = 1; y < VA; y++) for (int x = 125; x < HA; x++) if (frame[y][x] != (shadow[y * HA + x] | grid_px(x, y))) bad++;
      for (int y = 8; y < 46; y++) for (int x = 8; x < 120; x++) if (frame[y][x]) lit++;
      for (int x = 0; x < HA; x++) if (frame[0][x]) border++;
      check(bad == 0, $sformatf("video differs from the frame buffer in %0d pixels", bad));
      check(lit > 60, $sformatf("text pixels %0d", lit));
      check(border == HA, "top border");
    end
    // new window: the old trace must be gone
    foreach (wmem[i]) wmem[i] = 10'($urandom % 40);
    redraw();
    check_trace("second trace");
    check(n_line > 0, "line pixels written");
    check(bad_line_time == 0, $sformatf("%0d line pixels written outside vsync", bad_line_time));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #50_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
