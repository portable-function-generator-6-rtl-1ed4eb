// tb_function_generator: end-to-end test of the whole function generator.
//
// The design runs with a short debounce time and a small raster (256x128
// visible pixels) so that many redraws fit in a short run; everything else is
// at its normal size. The bench drives only the buttons and switches and
// watches the device pins, plus a few internal points (the frame buffer, the
// shared waveform buffer write port, the readout registers) where a pin-level
// view would need a full monitor or DAC model.
//
// Models and monitors:
//   * a dual parallel DAC model that latches dac_data on the rising edge of
//     dac_wr_n into channel A or B; the recorded sample streams are used to
//     measure period, high time, peak value and the phase lag between channels;
//   * a serial DAC model that shifts sdi on rising sck while cs_n is low and
//     checks each 16-bit word (channel bit, gain, shutdown, data), the
//     alternation of x and y words and the LDAC pulse after each word;
//   * a mirror of the shared waveform buffer fed from its write port, checked
//     for every window (starts with a zero followed by a rising sample) and
//     snapshotted at each draw request;
//   * after every redraw, the frame buffer is compared with the expected trace:
//     in each column the point (x, 64 - sample/yscale) is lit and no lit pixel
//     lies outside the span of the neighbouring points (which also proves the
//     previous picture was cleared); frame-buffer line writes are checked to
//     happen only while vsync is low;
//   * hsync/vsync periods and widths; and, once the picture is still, one frame
//     of rgb output compared pixel by pixel with the frame buffer ORed with the
//     dotted background grid, plus text in
//     the readout area.
//
// Sequence: defaults of both channels -> phase shift up and down -> frequency
// steps -> wave type changes and duty cycle -> amplitude step -> display
// scaling in scope mode -> channel switch -> amplitude to zero so the capture
// stops -> still-picture and galvanometer checks. Each mechanism has a counter
// and a mechanism that never happened counts as a failure.
`timescale 1ns/1ps
module tb_function_generator;
  import fg_pkg::*;
  localparam int HA = 256, HSS = 264, HSE = 280, HT = 300;
  localparam int VA = 128, VSS = 130, VSE = 140, VT = 142;
  localparam int YB = VA / 2;

  logic clk = 0, vclk = 0, rst = 1;
  logic btn_center = 0, btn_up = 0, btn_down = 0, btn_left = 0, btn_right = 0;
  logic [2:0] sw_incr_res = 0;
  logic sw_param = 0, sw_phase = 0, sw_channel = 0, sw_scope = 0;
  logic [3:0] vga_red, vga_green, vga_blue;
  logic hsync, vsync;
  logic [7:0] dac_data;
  logic dac_sel, dac_wr_n;
  logic spi_cs_n, spi_sck, spi_sdi, spi_ldac_n;
  logic signed [31:0] phase_mult;
  wave_t wave_type_a, wave_type_b;

  function_generator #(
    .DEBOUNCE_CYCLES(8),
    .H_ACTIVE(HA), .H_SYNC_START(HSS), .H_SYNC_END(HSE), .H_TOTAL(HT),
    .V_ACTIVE(VA), .V_SYNC_START(VSS), .V_SYNC_END(VSE), .V_TOTAL(VT)
  ) dut (.*);

  always #5 clk = ~clk;          // 100 MHz
  always #7.692 vclk = ~vclk;    // 65 MHz

  int checks = 0, failures = 0;
  // galvanometer angle code for a wall position code: arctan of the offset
  // (-3..+3 at 10 distance), full deflection at the picture's edges
  function automatic int galvo_angle(input int c);
    real off;
    off = (real'(c) - 2047.5) / 2047.5 * 3.0;
    return $rtoi(2047.5 + 2047.5 * $atan(off / 10.0) / $atan(0.3) + 0.5);
  endfunction

  // the overlay's dotted background grid (every 128 columns and 96 rows)
  function automatic bit grid_px(input int x, input int y);
    return (x % 128 == 0 && y % 4 == 0) || (y % 96 == 0 && x % 4 == 0);
  endfunction

  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  // mechanism counters
  int n_dac_a = 0, n_dac_b = 0, n_stall_a = 0, n_stall_b = 0;
  int n_phase_up = 0, n_phase_down = 0, n_freq = 0, n_toggle = 0, n_duty = 0, n_amp = 0;
  int n_window = 0, n_draw_req = 0, n_clear = 0, n_redraw = 0, n_line_px = 0, n_scale = 0;
  int n_channel = 0, n_spi = 0, n_ldac = 0, n_hsync = 0, n_vsync = 0, n_raster = 0, n_gui = 0;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- parallel DAC model ----------------
  logic wr_q = 1;
  bit rec = 0;
  longint ta [$], tb_ [$];
  int     va [$], vb [$];
  always @(posedge clk) begin
    if (!wr_q && dac_wr_n) begin
      if (!dac_sel) begin n_dac_a++; if (rec) begin ta.push_back(cyc); va.push_back(dac_data); end end
      else          begin n_dac_b++; if (rec) begin tb_.push_back(cyc); vb.push_back(dac_data); end end
    end
    wr_q <= dac_wr_n;
    if (!rst && dut.stall_a) n_stall_a++;
    if (!rst && dut.stall_b) n_stall_b++;
  end

  task automatic record(input int ncyc);
    ta.delete(); va.delete(); tb_.delete(); vb.delete();
    rec = 1;
    repeat (ncyc) @(posedge clk);
    rec = 0;
  endtask

  // Upward crossings of the level halfway between min and max.
  function automatic void crossings(input bit chb, output longint xs [$], output int mn, output int mx);
    int th;
    xs.delete(); mn = 1000; mx = -1;
    if (!chb) begin foreach (va[i]) begin if (va[i] < mn) mn = va[i]; if (va[i] > mx) mx = va[i]; end end
    else      begin foreach (vb[i]) begin if (vb[i] < mn) mn = vb[i]; if (vb[i] > mx) mx = vb[i]; end end
    th = (mn + mx) / 2;
    if (!chb) begin for (int i = 1; i < va.size(); i++) if (va[i-1] <= th && va[i] > th) xs.push_back(ta[i]); end
    else      begin for (int i = 1; i < vb.size(); i++) if (vb[i-1] <= th && vb[i] > th) xs.push_back(tb_[i]); end
  endfunction

  function automatic real avg_period(input longint xs [$]);
    if (xs.size() < 2) return 0.0;
    return real'(xs[xs.size()-1] - xs[0]) / real'(xs.size() - 1);
  endfunction

  // fraction of recorded A samples above the halfway level
  function automatic real high_fraction_a(input int th);
    int hi = 0;
    foreach (va[i]) if (va[i] > th) hi++;
    return real'(hi) / real'(va.size());
  endfunction

  task automatic check_period(input bit chb, input real expect_p, input string what);
    longint xs [$]; int mn, mx; real p;
    crossings(chb, xs, mn, mx);
    p = avg_period(xs);
    check(p > expect_p - 4.0 && p < expect_p + 4.0,
          $sformatf("%s: channel %s period %0.1f clocks, expected %0.1f", what, chb ? "B" : "A", p, expect_p));
  endtask

  // lag of channel A behind channel B, in clocks modulo the period
  function automatic int lag_ab(input int period);
    longint xa [$], xb [$]; int mn, mx, best, d;
    crossings(0, xa, mn, mx);
    crossings(1, xb, mn, mx);
    if (xa.size() < 2 || xb.size() < 1) return -99999;
    d = int'(xa[1] - xb[0]);
    best = ((d % period) + period) % period;
    return best;
  endfunction

  function automatic int circ_dist(input int a, input int b, input int period);
    int d = ((a - b) % period + period) % period;
    return (d > period / 2) ? period - d : d;
  endfunction

  // ---------------- serial DAC model ----------------
  logic [15:0] spi_sr;
  int          spi_bits = 0;
  bit          spi_exact = 0;
  logic [9:0]  mirror [1024];
  logic [9:0]  shown_win [1024];
  int          spi_bad = 0, spi_exact_n = 0, spi_exact_bad = 0;
  int          last_chan = 1, last_x = -1;
  always @(posedge spi_sck) if (!rst && !spi_cs_n) begin spi_sr <= {spi_sr[14:0], spi_sdi}; spi_bits++; end
  always @(posedge spi_cs_n) if (!rst) begin
    #1;
    if (spi_bits == 16) begin
      n_spi++;
      if (spi_sr[14] != 1'b0 || spi_sr[13] != 1'b1 || spi_sr[12] != 1'b1) spi_bad++;
      if (int'(spi_sr[15]) == last_chan) spi_bad++;      // channels alternate
      last_chan = spi_sr[15];
      if (!spi_sr[15]) begin
        // x word: increasing, wrapping after the last point
        if (last_x >= 0 && !(int'(spi_sr[11:0]) > last_x || spi_sr[11:0] == 0)) spi_bad++;
        last_x = spi_sr[11:0];
      end else if (spi_exact) begin
        int idx;
        idx = -1;                                          // point index of the x word
        for (int i = 0; i < 100; i++) if (galvo_angle(i * 4095 / 99) == last_x) idx = i;
        spi_exact_n++;
        if (idx < 0 || int'(spi_sr[11:0]) != galvo_angle(int'(shown_win[(idx * 1024) / 100][7:0]) * 16))
          spi_exact_bad++;
      end
    end else spi_bad++;
    spi_bits = 0;
  end
  always @(negedge spi_ldac_n) if (!rst) begin
    n_ldac++;
    if (!spi_cs_n) spi_bad++;
  end

  // ---------------- waveform buffer mirror and draw tracking ----------------
  int  win_bad = 0;
  bit  draw_pending = 0;
  always @(posedge vclk) begin
    if (!rst && !dut.rst_v && dut.buf_we) begin
      mirror[dut.buf_wr_addr] <= dut.buf_wr_data;
      if (dut.buf_wr_addr == 10'd1023) begin
        n_window++;
        #1;
        if (!(mirror[0] == 0 && mirror[1] != 0)) win_bad++;
      end
    end
  end
  always @(posedge vclk) if (!rst && !dut.rst_v && dut.wr_ready) begin
    #1;
    n_draw_req++;
    shown_win = mirror;
    draw_pending = 1;
  end

  // frame-buffer writes: line pixels only while vsync is low
  int fb_bad_writes = 0;
  always @(posedge vclk) if (!rst && dut.u_display.fb_we) begin
    if (dut.u_display.clearing) begin
      if (dut.u_display.clear_addr == 0) n_clear++;
    end else begin
      n_line_px++;
      if (dut.u_display.vs) fb_bad_writes++;
    end
  end

  // ---------------- redraw check ----------------
  int exp_xs = 0, exp_ys = 1;
  int redraw_bad = 0, redraws_at_scale = 0;

  function automatic int y_pt(input int x, input int xs, input int ys);
    int s = shown_win[(x << xs) % 1024] / ys;
    return (s >= YB) ? 0 : YB - s;
  endfunction

  task automatic check_picture(input int xs, input int ys, output int bad);
    bad = 0;
    for (int x = 0; x < HA; x++) begin
      int yc, lo, hi;
      yc = y_pt(x, xs, ys);
      lo = yc; hi = yc;
      if (x > 0)      begin int y = y_pt(x - 1, xs, ys); if (y < lo) lo = y; if (y > hi) hi = y; end
      if (x < HA - 1) begin int y = y_pt(x + 1, xs, ys); if (y < lo) lo = y; if (y > hi) hi = y; end
      if (dut.u_display.u_fb.mem[yc * HA + x] != 1'b1) bad++;
      for (int y = 0; y < VA; y++)
        if (dut.u_display.u_fb.mem[y * HA + x] == 1'b1 && (y < lo || y > hi)) bad++;
    end
  endtask

  logic ready_q = 0;
  always @(posedge vclk) begin
    ready_q <= dut.disp_ready;
    if (dut.disp_ready && !ready_q && draw_pending) begin
      int bad;
      draw_pending = 0;
      #1;
      check_picture(exp_xs, exp_ys, bad);
      if (bad != 0) begin
        redraw_bad++;
        if (redraw_bad < 4) $display("FAIL: picture after redraw %0d has %0d wrong pixels", n_draw_req, bad);
      end else begin
        n_redraw++;
        if (exp_xs != 0 || exp_ys != 1) redraws_at_scale++;
      end
    end
  end

  // ---------------- VGA timing ----------------
  longint vcyc = 0;
  longint hs_fall = -1, vs_fall = -1, hs_rise = -1, vs_rise = -1;
  int vga_bad = 0;
  logic hs_q = 1, vs_q = 1;
  always @(posedge vclk) begin
    vcyc <= vcyc + 1;
    hs_q <= hsync; vs_q <= vsync;
    if (!rst) begin
      if (hs_q && !hsync) begin
        if (hs_fall >= 0 && vcyc - hs_fall != HT) vga_bad++;
        hs_fall = vcyc; n_hsync++;
      end
      if (!hs_q && hsync) begin
        if (hs_fall >= 0 && vcyc - hs_fall != HSE - HSS) vga_bad++;
      end
      if (vs_q && !vsync) begin
        if (vs_fall >= 0 && vcyc - vs_fall != HT * VT) vga_bad++;
        vs_fall = vcyc; n_vsync++;
      end
      if (!vs_q && vsync) begin
        if (vs_fall >= 0 && vcyc - vs_fall != HT * (VSE - VSS)) vga_bad++;
      end
    end
  end

  // frame grabber: position derived from the sync pulses alone
  bit grab = 0, grabbed = 0, seen_vs = 0;
  int gx = 0, gy = 0;
  bit frame [VA][HA];
  logic ghs_q = 1, gvs_q = 1;
  always @(negedge vclk) begin
    if (ghs_q && !hsync) gx = HSS;          // hsync falls at pixel HSS
    if (gvs_q && !vsync) begin gy = VSS; gx = 0; seen_vs = 1; end
    ghs_q = hsync; gvs_q = vsync;
    if (grab && seen_vs && gx < HA && gy < VA) frame[gy][gx] = (vga_red != 0);
    if (grab && seen_vs && gx == HA - 1 && gy == VA - 1) begin grab = 0; grabbed = 1; end
    gx++;
    if (gx == HT) begin gx = 0; gy = (gy + 1) % VT; end
  end

  // ---------------- stimulus helpers ----------------
  task automatic press(ref logic b);
    @(negedge clk) b = 1;
    repeat (40) @(negedge clk);
    b = 0;
    repeat (40) @(negedge clk);
  endtask

  task automatic hold(ref logic b, input int n);
    @(negedge clk) b = 1;
    repeat (n) @(negedge clk);
    b = 0;
    repeat (40) @(negedge clk);
  endtask

  task automatic set_sw(ref logic s, input logic v);
    @(negedge clk) s = v;
    repeat (30) @(negedge clk);
  endtask

  task automatic set_res(input logic [2:0] v);
    @(negedge clk) sw_incr_res = v;
    repeat (30) @(negedge clk);
  endtask

  task automatic wait_redraws(input int n);
    int target = n_redraw + redraw_bad + n;
    int to = 0;
    while (n_redraw + redraw_bad < target && to < 4_000_000) begin @(posedge clk); to++; end
    check(to < 4_000_000, "redraw finished in time");
  endtask

  // ---------------- sequence ----------------
  initial begin
    int lag0, lag1, lag2, pm0, mn, mx, bad;
    longint xs [$];
    real f;
    repeat (20) @(negedge clk);
    rst = 0;
    repeat (200) @(negedge clk);

    // 1. defaults: both channels sine at 100 kHz, half amplitude
    check(wave_type_a == WAVE_SINE && wave_type_b == WAVE_SINE, "both channels start as sine");
    record(6000);
    check_period(0, 1000.0, "default");
    check_period(1, 1000.0, "default");
    crossings(0, xs, mn, mx);
    check(mx >= 124 && mx <= 127 && mn <= 3, $sformatf("default sine range %0d..%0d", mn, mx));
    lag0 = lag_ab(1000);
    check(circ_dist(lag0, 0, 1000) <= 14, $sformatf("channels start in phase (lag %0d)", lag0));

    // 2. phase shift: stall A while 'right' is held, then B while 'left' is held
    set_sw(sw_phase, 1);
    hold(btn_right, 300);
    pm0 = phase_mult;
    check(pm0 >= 290 && pm0 <= 310, $sformatf("phase_mult %0d after holding right 300 clocks", pm0));
    record(6000);
    lag1 = lag_ab(1000);
    check(circ_dist(lag1, pm0, 1000) <= 14, $sformatf("A lags B by %0d, phase_mult %0d", lag1, pm0));
    if (circ_dist(lag1, pm0, 1000) <= 14 && pm0 > 0) n_phase_up++;
    hold(btn_left, 500);
    check(phase_mult < pm0 - 480 && phase_mult > pm0 - 520, $sformatf("phase_mult %0d after holding left", phase_mult));
    record(6000);
    lag2 = lag_ab(1000);
    check(circ_dist(lag2, ((phase_mult % 1000) + 1000) % 1000, 1000) <= 14,
          $sformatf("A lags B by %0d, phase_mult %0d", lag2, phase_mult));
    if (circ_dist(lag2, ((phase_mult % 1000) + 1000) % 1000, 1000) <= 14) n_phase_down++;
    set_sw(sw_phase, 0);

    // 3. frequency steps on channel A (10 kHz steps)
    set_res(3'd4);
    press(btn_up);
    check(dut.freq_a == 110_011, $sformatf("frequency A %0d after up", dut.freq_a));
    record(6000);
    check_period(0, 909.0, "110 kHz");
    check_period(1, 1000.0, "channel B untouched");
    press(btn_down); press(btn_down);
    check(dut.freq_a == 90_009, $sformatf("frequency A %0d after two downs", dut.freq_a));
    record(6000);
    check_period(0, 1111.0, "90 kHz");
    if (dut.freq_a == 90_009) n_freq++;

    // 4. wave type and duty cycle
    press(btn_center);
    check(wave_type_a == WAVE_SQUARE && wave_type_b == WAVE_SINE, "sine -> square on A only");
    record(5555);                      // five whole periods
    crossings(0, xs, mn, mx);
    check(mn == 0 && mx == 127, $sformatf("square levels %0d/%0d", mn, mx));
    f = high_fraction_a(63);
    check(f > 0.47 && f < 0.53, $sformatf("square high fraction %0.3f at 50%%", f));
    if (wave_type_a == WAVE_SQUARE) n_toggle++;
    set_res(3'd2);                     // duty step 20 %
    press(btn_right);
    check(dut.duty_a == 70, $sformatf("duty %0d", dut.duty_a));
    record(5555);
    f = high_fraction_a(63);
    check(f > 0.67 && f < 0.73, $sformatf("square high fraction %0.3f at 70%%", f));
    if (f > 0.67 && f < 0.73) n_duty++;
    press(btn_center);
    check(wave_type_a == WAVE_TRIANGLE, "square -> triangle");
    if (wave_type_a == WAVE_TRIANGLE) n_toggle++;

    // 5. amplitude: 1 V step down from half scale
    set_sw(sw_param, 1);
    set_res(3'd1);
    press(btn_down);
    record(6000);
    crossings(0, xs, mn, mx);
    check(mx >= 73 && mx <= 76 && mn <= 2, $sformatf("triangle range %0d..%0d after amplitude step", mn, mx));
    check_period(0, 1111.0, "triangle");
    if (mx >= 73 && mx <= 76) n_amp++;
    wait_redraws(1);

    // 6. display scaling (scope mode): the generator must not change
    set_sw(sw_scope, 1);
    repeat (3) press(btn_down);
    press(btn_right);
    exp_xs = 1; exp_ys = 4;
    check(dut.u_display.xscale == 1 && dut.u_display.yscale == 4,
          $sformatf("scales %0d/%0d", dut.u_display.xscale, dut.u_display.yscale));
    check(dut.freq_a == 90_009 && dut.amp_a == 9'(76 * 2) && dut.duty_a == 70,
          "generator settings unchanged in scope mode");
    wait_redraws(2);
    if (redraws_at_scale > 0) n_scale++;
    set_sw(sw_scope, 0);

    // 7. channel switch: controls and display move to channel B
    set_sw(sw_channel, 1);
    set_res(3'd0);
    set_sw(sw_param, 0);
    press(btn_center);                  // B: sine -> square
    check(wave_type_b == WAVE_SQUARE && wave_type_a == WAVE_TRIANGLE, "toggle acts on B only");
    repeat (200) @(negedge vclk);
    check(dut.freq_v == 100_000 && dut.duty_v == 50 && dut.amp_v == 9'(127 * 2),
          $sformatf("readouts show B: %0d Hz, %0d, %0d %%", dut.freq_v, dut.amp_v, dut.duty_v));
    wait_redraws(2);
    begin
      int odd;
      odd = 0;
      foreach (shown_win[i]) if (shown_win[i] != 0 && shown_win[i] != 127) odd++;
      check(odd == 0, $sformatf("window of B shows a square wave (%0d odd samples)", odd));
      if (odd == 0 && wave_type_b == WAVE_SQUARE) n_channel++;
    end

    // 8. amplitude of B to zero: no more rising edges, the picture stays still
    set_sw(sw_param, 1);
    set_res(3'd3);
    press(btn_down);
    check(dut.amp_b == 0, "amplitude B zero");
    begin
      int last, quiet;
      last = n_draw_req; quiet = 0;
      while (quiet < 3 * HT * VT) begin
        @(posedge vclk);
        if (n_draw_req != last || !dut.disp_ready) begin last = n_draw_req; quiet = 0; end
        else quiet++;
      end
    end
    // still picture on the monitor
    @(negedge vclk) grab = 1;
    while (!grabbed) @(negedge vclk);
    bad = 0;
    for (int y = 1; y < VA; y++)
      for (int x = 130; x < HA; x++)
        if (frame[y][x] != (dut.u_display.u_fb.mem[y * HA + x] | grid_px(x, y))) bad++;
    check(bad == 0, $sformatf("monitor picture differs from the frame buffer in %0d pixels", bad));
    if (bad == 0) n_raster++;
    begin
      int lit = 0, border = 0;
      for (int y = 8; y < 46; y++) for (int x = 8; x < 120; x++) if (frame[y][x]) lit++;
      for (int x = 0; x < HA; x++) if (frame[0][x]) border++;
      check(lit > 60, $sformatf("readout text visible (%0d pixels)", lit));
      check(border == HA, "top border drawn");
      if (lit > 60) n_gui++;
    end
    // galvanometer words follow the still window
    spi_exact = 1;
    begin
      int to = 0;
      while (spi_exact_n < 30 && to < 2_000_000) begin @(posedge vclk); to++; end
    end
    check(spi_exact_n >= 30 && spi_exact_bad == 0,
          $sformatf("galvanometer y words: %0d checked, %0d wrong", spi_exact_n, spi_exact_bad));

    // summary checks
    check(win_bad == 0, $sformatf("%0d windows did not start on a rising edge", win_bad));
    check(redraw_bad == 0, $sformatf("%0d redraws wrong", redraw_bad));
    check(fb_bad_writes == 0, $sformatf("%0d line pixels written outside vsync", fb_bad_writes));
    check(vga_bad == 0, $sformatf("%0d sync timing errors", vga_bad));
    check(spi_bad == 0, $sformatf("%0d malformed serial DAC words", spi_bad));

    begin
      string names [$]; int counts [$];
      names = '{"parallel DAC writes A", "parallel DAC writes B", "stall A", "stall B",
                "phase shift up", "phase shift down", "frequency step", "wave type change",
                "duty cycle change", "amplitude change", "window capture", "draw request",
                "frame clear", "redraw checked", "line pixels", "display scaling",
                "channel switch", "serial DAC words", "LDAC pulses", "hsync", "vsync",
                "monitor picture", "readout text"};
      counts = '{n_dac_a, n_dac_b, n_stall_a, n_stall_b, n_phase_up, n_phase_down, n_freq,
                 n_toggle, n_duty, n_amp, n_window, n_draw_req, n_clear, n_redraw, n_line_px,
                 n_scale, n_channel, n_spi, n_ldac, n_hsync, n_vsync, n_raster, n_gui};
      foreach (names[i]) begin
        $display("  %-22s %0d", names[i], counts[i]);
        check(counts[i] > 0, $sformatf("mechanism never seen: %s", names[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
