// tb_display_fsm: checks the drawing state machine with a modelled waveform
// buffer and a modelled line drawer that stays busy for a random time.
//
// With a reduced screen (N_POINTS = 32 points, a 200-pixel frame buffer) the
// bench checks: the reset clear sweeps every frame-buffer address once; a
// draw request clears again and then issues exactly N_POINTS-1 segments
// (k, y_k)-(k+1, y_(k+1)) with y_k = 384 - sample[k * 2**xscale] / yscale,
// each only while the drawer is ready; 'ready' returns at the end; and the
// scale buttons change xscale / yscale with their limits.
`timescale 1ns/1ps
module tb_display_fsm;
  localparam int NP = 32, FBD = 200;
  logic clk = 0, rst = 1, draw_req = 0;
  logic btn_right = 0, btn_left = 0, btn_up = 0, btn_down = 0;
  logic [9:0] buf_addr, buf_data;
  logic clearing, draw_line, line_ready, ready;
  logic [19:0] clear_addr;
  logic [10:0] x0, x1;
  logic [9:0] y0, y1;
  logic [3:0] xscale;
  logic [5:0] yscale;
  int checks = 0, failures = 0;

  display_fsm #(.N_POINTS(NP), .FB_DEPTH(FBD)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  // waveform buffer model: registered read
  logic [9:0] wmem [1024];
  initial foreach (wmem[i]) wmem[i] = 10'((i * 37 + 11) % 300);
  always @(posedge clk) buf_data <= wmem[buf_addr];

  // line drawer model
  int busy = 0;
  int seg_x0 [$], seg_y0 [$], seg_x1 [$], seg_y1 [$];
  bit early_pulse = 0;
  always @(posedge clk) begin
    if (rst) begin line_ready <= 1; busy = 0; end
    else if (draw_line) begin
      if (!line_ready) early_pulse = 1;
      seg_x0.push_back(x0); seg_y0.push_back(y0); seg_x1.push_back(x1); seg_y1.push_back(y1);
      line_ready <= 0;
      busy = 1 + $urandom % 6;
    end else if (busy > 0) begin
      busy--;
      if (busy == 0) line_ready <= 1;
    end
  end

  // clear sweep monitor
  int clear_hits [FBD];
  always @(posedge clk) if (!rst && clearing && clear_addr < FBD) clear_hits[clear_addr]++;

  function automatic int y_of(input int k, input int xs, input int ys);
    return 384 - wmem[(k << xs) % 1024] / ys;
  endfunction

  task automatic redraw_and_check(input int xs, input int ys);
    int to;
    seg_x0.delete(); seg_y0.delete(); seg_x1.delete(); seg_y1.delete();
    foreach (clear_hits[i]) clear_hits[i] = 0;
    @(negedge clk) draw_req = 1;
    @(negedge clk) draw_req = 0;
    check(!ready, "busy after draw request");
    to = 0;
    while (!ready && to < 100000) begin @(negedge clk); to++; end
    begin
      int bad;
      bad = 0;
      foreach (clear_hits[i]) if (clear_hits[i] != 1) bad++;
      check(bad == 0, $sformatf("clear before drawing: %0d addresses not cleared once", bad));
    end
    check(seg_x0.size() == NP - 1, $sformatf("segments %0d", seg_x0.size()));
    begin
      int bad;
      bad = 0;
      foreach (seg_x0[k]) begin
        if (seg_x0[k] != k || seg_x1[k] != k + 1) bad++;
        if (seg_y0[k] != y_of(k, xs, ys) || seg_y1[k] != y_of(k + 1, xs, ys)) bad++;
      end
      check(bad == 0, $sformatf("segment coordinates wrong in %0d places (xscale %0d yscale %0d)", bad, xs, ys));
    end
    check(!early_pulse, "draw_line only while the drawer is ready");
  endtask

  task automatic press(ref logic b);
    @(negedge clk) b = 1;
    @(negedge clk) b = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // reset clear
    while (!ready) @(negedge clk);
    begin
      int bad; bad = 0;
      foreach (clear_hits[i]) if (clear_hits[i] != 1) bad++;
      check(bad == 0, "reset clear covers the frame buffer once");
    end
    check(xscale == 0 && yscale == 1, "reset scales");
    redraw_and_check(0, 1);
    press(btn_right); press(btn_right);
    check(xscale == 2, $sformatf("xscale %0d", xscale));
    press(btn_down); press(btn_down);
    check(yscale == 3, $sformatf("yscale %0d", yscale));
    redraw_and_check(2, 3);
    repeat (12) press(btn_right);
    check(xscale == 9, "xscale limit");
    repeat (5) press(btn_up);
    check(yscale == 1, "yscale limit");
    press(btn_left);
    redraw_and_check(8, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
