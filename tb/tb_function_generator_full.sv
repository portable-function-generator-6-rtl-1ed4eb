// tb_function_generator_full: the whole design at its real size.
//
// The function generator is instantiated with its default parameters: the
// full 1024x768 XGA raster (1344x806 clocks per frame at 65 MHz), the 786,432-
// pixel frame buffer, the 1024-sample window and the 10 ms button debounce.
// The bench checks:
//   * hsync and vsync periods and pulse widths of the XGA timing;
//   * the reset clear of the whole frame buffer, then a window capture, a draw
//     request and a redraw whose picture matches the window: in every column
//     the point (x, 384 - sample) is lit and no lit pixel lies outside the span
//     of the neighbouring points; line pixels are written only while vsync is
//     low;
//   * both waveform channels on the parallel DAC at the reset setting (sine,
//     100 kHz, half amplitude);
//   * one real-length button press (12 ms, longer than the debounce time) that
//     raises channel A's frequency by 10 kHz, measured on the DAC output;
//   * well-formed serial DAC words for the galvanometer.
// Every mechanism has a counter, and one that never happened is a failure.
`timescale 1ns/1ps
module tb_function_generator_full;
  import fg_pkg::*;
  localparam int HA = 1024, HSS = 1048, HSE = 1184, HT = 1344;
  localparam int VA = 768, VSS = 777, VSE = 783, VT = 806;
  localparam int YB = VA / 2;

  logic clk = 0, vclk = 0, rst = 1;
  logic btn_center = 0, btn_up = 0, btn_down = 0, btn_left = 0, btn_right = 0;
  logic [2:0] sw_incr_res = 3'd4;
  logic sw_param = 0, sw_phase = 0, sw_channel = 0, sw_scope = 0;
  logic [3:0] vga_red, vga_green, vga_blue;
  logic hsync, vsync;
  logic [7:0] dac_data;
  logic dac_sel, dac_wr_n;
  logic spi_cs_n, spi_sck, spi_sdi, spi_ldac_n;
  logic signed [31:0] phase_mult;
  wave_t wave_type_a, wave_type_b;

  function_generator dut (.*);

  always #5 clk = ~clk;          // 100 MHz
  always #7.692 vclk = ~vclk;    // 65 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  int n_dac_a = 0, n_dac_b = 0, n_window = 0, n_draw_req = 0, n_clear = 0, n_redraw = 0;
  int n_line_px = 0, n_freq = 0, n_spi = 0, n_hsync = 0, n_vsync = 0;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- parallel DAC model ----------------
  logic wr_q = 1;
  bit rec = 0;
  longint ta [$], tb_ [$];
  int     va [$], vb [$];
  always @(posedge clk) begin
    if (!wr_q && dac_wr_n) begin
      if (!dac_sel) begin n_dac_a++; if (rec) begin ta.push_back(cyc); va.push_back(int'(dac_data)); end end
      else          begin n_dac_b++; if (rec) begin tb_.push_back(cyc); vb.push_back(int'(dac_data)); end end
    end
    wr_q <= dac_wr_n;
  end

  task automatic record(input int ncyc);
    ta.delete(); va.delete(); tb_.delete(); vb.delete();
    rec = 1;
    repeat (ncyc) @(posedge clk);
    rec = 0;
  endtask

  // average distance between upward crossings of the halfway level
  function automatic real period_of(input bit chb, output int mn, output int mx);
    longint first, last; int n, th;
    mn = 1000; mx = -1; n = 0; first = 0; last = 0;
    if (!chb) begin foreach (va[i]) begin if (va[i] < mn) mn = va[i]; if (va[i] > mx) mx = va[i]; end end
    else      begin foreach (vb[i]) begin if (vb[i] < mn) mn = vb[i]; if (vb[i] > mx) mx = vb[i]; end end
    th = (mn + mx) / 2;
    if (!chb) begin
      for (int i = 1; i < va.size(); i++) if (va[i-1] <= th && va[i] > th) begin
        if (n == 0) first = ta[i]; last = ta[i]; n++;
      end
    end else begin
      for (int i = 1; i < vb.size(); i++) if (vb[i-1] <= th && vb[i] > th) begin
        if (n == 0) first = tb_[i]; last = tb_[i]; n++;
      end
    end
    return (n < 2) ? 0.0 : real'(last - first) / real'(n - 1);
  endfunction

  // ---------------- serial DAC words ----------------
  logic [15:0] spi_sr;
  int spi_bits = 0, spi_bad = 0;
  always @(posedge spi_sck) if (!rst && !spi_cs_n) begin spi_sr <= {spi_sr[14:0], spi_sdi}; spi_bits++; end
  always @(posedge spi_cs_n) if (!rst) begin
    #1;
    if (spi_bits == 16 && spi_sr[14:12] == 3'b011) n_spi++;
    else spi_bad++;
    spi_bits = 0;
  end

  // ---------------- window mirror, draw tracking ----------------
  logic [9:0] mirror [1024];
  logic [9:0] shown_win [1024];
  int win_bad = 0;
  bit draw_pending = 0;
  always @(posedge vclk) if (!rst && !dut.rst_v && dut.buf_we) begin
    mirror[dut.buf_wr_addr] <= dut.buf_wr_data;
    if (dut.buf_wr_addr == 10'd1023) begin
      n_window++;
      #1;
      if (!(mirror[0] == 0 && mirror[1] != 0)) win_bad++;
    end
  end
  always @(posedge vclk) if (!rst && !dut.rst_v && dut.wr_ready) begin
    #1;
    n_draw_req++;
    shown_win = mirror;
    draw_pending = 1;
  end

  int fb_bad_writes = 0;
  always @(posedge vclk) if (!rst && !dut.rst_v && dut.u_display.fb_we) begin
    if (dut.u_display.clearing) begin
      if (dut.u_display.clear_addr == 0) n_clear++;
    end else begin
      n_line_px++;
      if (dut.u_display.vs) fb_bad_writes++;
    end
  end

  function automatic int y_pt(input int x);
    int s;
    s = int'(shown_win[x % 1024]);
    return (s >= YB) ? 0 : YB - s;
  endfunction

  int redraw_bad = 0;
  logic ready_q = 0;
  always @(posedge vclk) begin
    ready_q <= dut.disp_ready;
    if (dut.disp_ready && !ready_q && draw_pending) begin
      int bad;
      draw_pending = 0;
      #1;
      bad = 0;
      for (int x = 0; x < HA; x++) begin
        int yc, lo, hi, yn;
        yc = y_pt(x); lo = yc; hi = yc;
        if (x > 0)      begin yn = y_pt(x - 1); if (yn < lo) lo = yn; if (yn > hi) hi = yn; end
        if (x < HA - 1) begin yn = y_pt(x + 1); if (yn < lo) lo = yn; if (yn > hi) hi = yn; end
        if (dut.u_display.u_fb.mem[yc * HA + x] != 1'b1) bad++;
        for (int y = 0; y < VA; y++)
          if (dut.u_display.u_fb.mem[y * HA + x] == 1'b1 && (y < lo || y > hi)) bad++;
      end
      if (bad == 0) n_redraw++;
      else begin redraw_bad++; $display("FAIL: picture has %0d wrong pixels", bad); end
    end
  end

  // ---------------- XGA timing ----------------
  longint vcyc = 0, hs_fall = -1, vs_fall = -1;
  int vga_bad = 0;
  logic hs_q = 1, vs_q = 1;
  always @(posedge vclk) begin
    vcyc <= vcyc + 1;
    hs_q <= hsync; vs_q <= vsync;
    if (!rst) begin
      if (hs_q && !hsync) begin
        if (hs_fall >= 0 && vcyc - hs_fall != longint'(HT)) vga_bad++;
        hs_fall = vcyc; n_hsync++;
      end
      if (!hs_q && hsync && hs_fall >= 0 && vcyc - hs_fall != longint'(HSE - HSS)) vga_bad++;
      if (vs_q && !vsync) begin
        if (vs_fall >= 0 && vcyc - vs_fall != longint'(HT * VT)) vga_bad++;
        vs_fall = vcyc; n_vsync++;
      end
      if (!vs_q && vsync && vs_fall >= 0 && vcyc - vs_fall != longint'(HT * (VSE - VSS))) vga_bad++;
    end
  end

  initial begin
    int mn, mx, to;
    real p;
    repeat (20) @(negedge clk);
    rst = 0;

    // reset setting on the DAC outputs
    record(6000);
    p = period_of(0, mn, mx);
    check(p > 996.0 && p < 1004.0, $sformatf("channel A period %0.1f", p));
    check(mx >= 124 && mx <= 127 && mn <= 3, $sformatf("channel A range %0d..%0d", mn, mx));
    p = period_of(1, mn, mx);
    check(p > 996.0 && p < 1004.0, $sformatf("channel B period %0.1f", p));

    // first capture and redraw at full size
    to = 0;
    while (n_redraw + redraw_bad == 0 && to < 20_000_000) begin @(posedge clk); to++; end
    check(n_redraw == 1 && redraw_bad == 0, "first full-size redraw is correct");

    // one real button press: +10 kHz on channel A
    @(negedge clk) btn_up = 1;
    repeat (1_200_000) @(negedge clk);
    btn_up = 0;
    repeat (1_100_000) @(negedge clk);
    check(dut.freq_a == 110_011, $sformatf("frequency A %0d after a 12 ms press", dut.freq_a));
    record(6000);
    p = period_of(0, mn, mx);
    check(p > 905.0 && p < 913.0, $sformatf("channel A period %0.1f at 110 kHz", p));
    p = period_of(1, mn, mx);
    check(p > 996.0 && p < 1004.0, $sformatf("channel B period %0.1f unchanged", p));
    if (dut.freq_a == 110_011 && p > 996.0 && p < 1004.0) n_freq++;

    // another redraw (of the new frequency) must also match
    to = 0;
    begin
      int target;
      target = n_redraw + redraw_bad + 1;
      while (n_redraw + redraw_bad < target && to < 20_000_000) begin @(posedge clk); to++; end
    end
    check(to < 20_000_000, "second redraw finished");

    check(win_bad == 0, $sformatf("%0d windows did not start on a rising edge", win_bad));
    check(redraw_bad == 0, $sformatf("%0d redraws wrong", redraw_bad));
    check(fb_bad_writes == 0, $sformatf("%0d line pixels written outside vsync", fb_bad_writes));
    check(vga_bad == 0, $sformatf("%0d XGA timing errors", vga_bad));
    check(spi_bad == 0, $sformatf("%0d malformed serial DAC words", spi_bad));
    begin
      string names [$]; int counts [$];
      names  = '{"parallel DAC writes A", "parallel DAC writes B", "window capture", "draw request",
                 "frame clear", "redraw checked", "line pixels", "frequency step",
                 "serial DAC words", "hsync", "vsync"};
      counts = '{n_dac_a, n_dac_b, n_window, n_draw_req, n_clear, n_redraw, n_line_px, n_freq,
                 n_spi, n_hsync, n_vsync};
      foreach (names[i]) begin
        $display("  %-22s %0d", names[i], counts[i]);
        check(counts[i] > 0, $sformatf("mechanism never seen: %s", names[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #600_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
