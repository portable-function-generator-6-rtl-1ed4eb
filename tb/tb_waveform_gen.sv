// tb_waveform_gen: self-checking testbench for waveform_gen.
//
// Checks the reset values, then for each wave type the period (distance
// between rising edges, which must equal the period multiplier), the peak and
// floor values, the square-wave high time (P*duty/100 clocks), the triangle's
// rise length and monotonic sides, and the sine's symmetry. It then exercises
// the frequency, amplitude and duty controls (including clamping at the range
// limits) and the stall input, comparing against values computed here from the
// control rules rather than read from the design.
`timescale 1ns/1ps
module tb_waveform_gen;
  import fg_pkg::*;

  logic clk = 0;
  logic rst = 1;
  logic stall = 0, toggle_wave = 0, param = 0, up = 0, down = 0, left = 0, right = 0;
  logic [2:0] incr_res = 0;
  logic [9:0]  waveform;
  logic [19:0] frequency;
  logic [8:0]  amplitude;
  logic [6:0]  duty_cycle;
  wave_t       wave_type;

  int checks = 0, failures = 0;

  waveform_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic press(ref logic b);
    @(negedge clk) b = 1;
    repeat (2) @(negedge clk);
    b = 0;
    repeat (4) @(negedge clk);
  endtask

  // Wait for a rising edge (0 -> nonzero), then record one or more periods.
  int rise_gap, hi_count, maxv, minv, first_max_at;
  bit rise_mono, fall_mono;
  task automatic measure(input int p);
    int prev, t, v, last_v;
    prev = -1;
    // find first rising edge
    forever begin
      @(posedge clk); #1;
      if (prev == 0 && waveform != 0) break;
      prev = waveform;
    end
    hi_count = 0; maxv = 0; minv = 1 << 20; first_max_at = -1;
    rise_mono = 1; fall_mono = 1; last_v = waveform;
    rise_gap = -1;
    prev = waveform;
    for (t = 1; t < 4 * p + 4; t++) begin
      @(posedge clk); #1;
      v = waveform;
      if (prev == 0 && v != 0) begin rise_gap = t; break; end
      if (v > maxv) begin maxv = v; first_max_at = t; end
      if (v < minv) minv = v;
      prev = v;
    end
  endtask

  task automatic measure_levels(input int p);
    int v;
    hi_count = 0; maxv = 0; minv = 1 << 20; first_max_at = -1;
    rise_mono = 1; fall_mono = 1;
    // align to the start of a period (rising edge)
    begin
      int prev; prev = -1;
      forever begin
        @(posedge clk); #1;
        if (prev == 0 && waveform != 0) break;
        prev = waveform;
      end
    end
    begin
      int last;
      last = waveform;
      if (waveform != 0) hi_count++;
      maxv = waveform; minv = waveform; first_max_at = 0;
      for (int t = 1; t < p; t++) begin
        @(posedge clk); #1;
        v = waveform;
        if (v != 0) hi_count++;
        if (v > maxv) begin maxv = v; first_max_at = t; end
        if (v < minv) minv = v;
        if (first_max_at == t && v < last) rise_mono = 0;
        if (first_max_at >= 0 && v > last && t > first_max_at) fall_mono = 0;
        last = v;
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);

    // ---- reset values ----
    check(wave_type == WAVE_SINE, "reset wave type is sine");
    check(frequency == 20'd100_000, $sformatf("reset frequency %0d", frequency));
    check(amplitude == 9'd254, $sformatf("reset amplitude %0d", amplitude));
    check(duty_cycle == 7'd50, "reset duty 50");

    // ---- sine: period 1000, peak 127 (= 255*127/255), floor 0 ----
    measure(1000);
    check(rise_gap == 1000, $sformatf("sine period %0d", rise_gap));
    measure_levels(1000);
    check(maxv == 127, $sformatf("sine peak %0d", maxv));
    check(minv == 0, $sformatf("sine floor %0d", minv));

    // ---- square ----
    press(toggle_wave);
    check(wave_type == WAVE_SQUARE, "toggle -> square");
    measure(1000);
    check(rise_gap == 1000, $sformatf("square period %0d", rise_gap));
    measure_levels(1000);
    check(hi_count == 500, $sformatf("square high time %0d", hi_count));
    check(maxv == 127 && minv == 0, "square levels");

    // duty +5 %
    incr_res = 0;
    press(right);
    check(duty_cycle == 7'd55, $sformatf("duty 55, got %0d", duty_cycle));
    measure_levels(1000);
    check(hi_count == 550, $sformatf("square high time at 55%% %0d", hi_count));
    // duty -50 % clamps at 1 %
    incr_res = 3;
    press(left);
    check(duty_cycle == 7'd5, $sformatf("duty 5, got %0d", duty_cycle));
    press(left);
    check(duty_cycle == 7'd1, $sformatf("duty clamps at 1, got %0d", duty_cycle));
    measure_levels(1000);
    check(hi_count == 10, $sformatf("square high time at 1%% %0d", hi_count));
    press(right); press(right); press(right);
    check(duty_cycle == 7'd100, $sformatf("duty clamps at 100, got %0d", duty_cycle));
    incr_res = 3; press(left);
    check(duty_cycle == 7'd50, "duty back to 50");

    // ---- triangle ----
    press(toggle_wave);
    check(wave_type == WAVE_TRIANGLE, "toggle -> triangle");
    measure(1000);
    check(rise_gap == 1000, $sformatf("triangle period %0d", rise_gap));
    measure_levels(1000);
    check(maxv == 127, $sformatf("triangle peak %0d", maxv));
    check(minv == 0, $sformatf("triangle floor %0d", minv));
    check(first_max_at >= 495 && first_max_at <= 500,
          $sformatf("triangle peak position %0d (expect ~499)", first_max_at));
    check(fall_mono, "triangle falls monotonically");
    press(toggle_wave);
    check(wave_type == WAVE_SINE, "toggle wraps to sine");
    press(toggle_wave);

    // ---- amplitude: 1 V step = 51 of 255 ----
    param = 1; incr_res = 1;
    press(up);
    check(amplitude == 9'(2 * (127 + 51)), $sformatf("amp after +1V %0d", amplitude));
    measure_levels(1000);
    check(maxv == 178, $sformatf("square peak after +1V %0d", maxv));
    incr_res = 3;
    press(up);
    check(amplitude == 9'd510, $sformatf("amp clamps at full scale %0d", amplitude));
    press(down); press(down); press(down);
    check(amplitude == 9'd0, $sformatf("amp clamps at 0 %0d", amplitude));
    incr_res = 0;
    press(up);  // 0.2 V = 10 counts
    check(amplitude == 9'd20, $sformatf("amp after +0.2V %0d", amplitude));
    incr_res = 2;
    press(up);  // 1.5 V = 77 counts -> 87
    check(amplitude == 9'd174, $sformatf("amp after +1.5V %0d", amplitude));
    incr_res = 1; press(up); // 138
    check(amplitude == 9'd276, $sformatf("amp after +1V %0d", amplitude));

    // ---- frequency: +100 kHz from 100 kHz -> 200 kHz, P = 500 ----
    param = 0; incr_res = 5;
    press(up);
    check(frequency == 20'd200_000, $sformatf("freq +100k %0d", frequency));
    measure(500);
    check(rise_gap == 500, $sformatf("period at 200 kHz %0d", rise_gap));
    // +1 kHz from 200 kHz: 201 kHz -> P = 497 -> 201207 Hz
    incr_res = 3;
    press(up);
    check(frequency == 20'(100_000_000 / (100_000_000 / 201_000)),
          $sformatf("freq +1k %0d", frequency));
    // up to the 1 MHz clamp
    incr_res = 5;
    repeat (12) press(up);
    check(frequency == 20'd1_000_000, $sformatf("freq clamps at 1 MHz %0d", frequency));
    measure(100);
    check(rise_gap == 100, $sformatf("period at 1 MHz %0d", rise_gap));
    // -100 kHz -> 900 kHz -> P = 111
    press(down);
    check(frequency == 20'(100_000_000 / 111), $sformatf("freq -100k %0d", frequency));
    // -10 Hz steps at the 1 kHz floor: set to low frequency with -100 kHz then -1 kHz
    repeat (9) press(down);          // 900k -> ... stays >= 100k
    incr_res = 4; repeat (12) press(down);
    incr_res = 3; repeat (12) press(down);
    check(frequency == 20'd1_000, $sformatf("freq clamps at 1 kHz %0d", frequency));

    // ---- stall freezes the generator ----
    incr_res = 5; repeat (2) press(up);  // back to a short period
    begin
      logic [9:0] held;
      logic [19:0] f0;
      @(negedge clk);
      stall = 1;
      @(negedge clk);
      held = waveform;
      f0 = frequency;
      repeat (20) begin
        @(negedge clk);
        check(waveform == held, "stall holds waveform");
      end
      up = 1; @(negedge clk); up = 0; @(negedge clk);
      check(frequency == f0, "buttons ignored while stalled");
      stall = 0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
