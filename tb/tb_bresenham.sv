// tb_bresenham: checks drawn segments against the ideal geometric line.
//
// Segments in all eight directions plus random ones are drawn while step_en
// toggles at random. For every segment the bench checks, independently of the
// algorithm's internals: the pixel count is max(|dx|,|dy|) + 1; both end points
// are written; consecutive pixels are 8-neighbours moving monotonically along
// both axes; every pixel lies within half a pixel of the ideal line, measured
// along the minor axis; pixels are written only in clocks following an enabled
// clock; and ready returns after the last pixel.
`timescale 1ns/1ps
module tb_bresenham;
  logic clk = 0, rst = 1, step_en = 0, draw_line = 0;
  logic [10:0] x0, x1, x_addr;
  logic [9:0]  y0, y1, y_addr;
  logic ready, write_enable;
  int checks = 0, failures = 0;

  bresenham dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  // random enable
  always @(negedge clk) step_en <= ($urandom % 4) != 0;

  logic en_q = 0;
  always @(posedge clk) begin
    if (!rst && write_enable && !en_q) begin
      failures++; $display("FAIL: pixel written without enable");
    end
    en_q <= step_en;
  end

  int px [$], py [$];
  always @(posedge clk) if (write_enable) begin px.push_back(x_addr); py.push_back(y_addr); end

  task automatic draw(input int ax, input int ay, input int bx, input int by);
    int n, adx, ady, cycles;
    bit ok_conn, ok_dist, has_a, has_b;
    px.delete(); py.delete();
    @(negedge clk);
    check(ready, "ready before draw");
    x0 = 11'(ax); y0 = 10'(ay); x1 = 11'(bx); y1 = 10'(by);
    draw_line = 1;
    @(negedge clk);
    draw_line = 0;
    cycles = 0;
    while (!ready && cycles < 20000) begin @(negedge clk); cycles++; end
    @(negedge clk);
    adx = (bx > ax) ? bx - ax : ax - bx;
    ady = (by > ay) ? by - ay : ay - by;
    n = (adx > ady) ? adx : ady;
    check(px.size() == n + 1, $sformatf("(%0d,%0d)-(%0d,%0d): %0d pixels, expected %0d",
                                         ax, ay, bx, by, px.size(), n + 1));
    has_a = 0; has_b = 0; ok_conn = 1; ok_dist = 1;
    foreach (px[i]) begin
      real t, ideal, d;
      if (px[i] == ax && py[i] == ay) has_a = 1;
      if (px[i] == bx && py[i] == by) has_b = 1;
      if (i > 0) begin
        int ddx, ddy;
        ddx = px[i] - px[i-1]; ddy = py[i] - py[i-1];
        if (ddx < 0 || ddx > 1 || ddy > 1 || ddy < -1 || (ddx == 0 && ddy == 0)) ok_conn = 0;
        if ((by > ay && ax <= bx) || (by < ay && ax > bx)) begin if (ddy < 0) ok_conn = 0; end
        else if (by != ay) begin if (ddy > 0) ok_conn = 0; end
      end
      if (adx >= ady && adx > 0) begin
        ideal = ay + real'(px[i] - ax) * real'(by - ay) / real'(bx - ax);
        d = ideal - real'(py[i]);
      end else if (ady > 0) begin
        ideal = ax + real'(py[i] - ay) * real'(bx - ax) / real'(by - ay);
        d = ideal - real'(px[i]);
      end else d = 0.0;
      if (d > 0.5001 || d < -0.5001) ok_dist = 0;
    end
    check(has_a && has_b, "both end points written");
    check(ok_conn, "pixels are connected and monotonic");
    check(ok_dist, "pixels within half a pixel of the line");
  endtask

  initial begin
    x0 = 0; y0 = 0; x1 = 0; y1 = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // eight directions from (500,400)
    draw(500, 400, 560, 400);
    draw(500, 400, 560, 370);
    draw(500, 400, 500, 340);
    draw(500, 400, 470, 340);
    draw(500, 400, 440, 400);
    draw(500, 400, 440, 430);
    draw(500, 400, 500, 460);
    draw(500, 400, 530, 460);
    draw(10, 10, 10, 10);      // single point
    draw(0, 767, 1023, 0);     // full diagonal
    repeat (40) draw($urandom % 1024, $urandom % 768, $urandom % 1024, $urandom % 768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
