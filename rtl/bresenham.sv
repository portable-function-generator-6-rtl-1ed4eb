// bresenham: draws a straight line segment into the frame buffer.
//
// When ready is high, a one-clock draw_line pulse loads the end points
// (x0, y0) and (x1, y1). The segment is always walked from its left end, so
// the end points are swapped if x0 > x1. The walk is Bresenham's integer
// algorithm for all slopes: with dx = |x1-x0|, dy = -|y1-y0| and a running
// error err = dx + dy, each step writes the current pixel and then moves in x
// when 2*err >= dy and in y when 2*err <= dx, updating err, until the far end
// point has been written. Both end points are written; a segment of length
// max(dx, |dy|) writes max(dx, |dy|) + 1 pixels.
//
// The walk advances only in clocks where step_en is high (the display allows
// writes only while the monitor is in vertical sync); each advancing clock
// writes one pixel: write_enable is high with the pixel on x_addr / y_addr.
// ready drops on the clock after draw_line and rises again on the clock after
// the last pixel is written.
//
// From the original design: the algorithm, the left-to-right ordering, the
// coordinate widths (11-bit x, 10-bit y), the draw_line / done handshake and
// writing only during vertical sync. This design's own choice: the symmetric
// all-octant error form with one pixel per enabled clock.
module bresenham #(
  parameter int unsigned X_W = 11,
  parameter int unsigned Y_W = 10
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           step_en,
  input  logic           draw_line,
  input  logic [X_W-1:0] x0,
  input  logic [Y_W-1:0] y0,
  input  logic [X_W-1:0] x1,
  input  logic [Y_W-1:0] y1,
  output logic           ready,
  output logic [X_W-1:0] x_addr,
  output logic [Y_W-1:0] y_addr,
  output logic           write_enable
);
  localparam int unsigned E_W = X_W + 3;  // signed error range

  typedef enum logic {IDLE, DRAW} state_t;
  state_t state;

  logic [X_W-1:0] x, xe;
  logic [Y_W-1:0] y, ye;
  logic           y_down;
  logic signed [E_W-1:0] dx, dy, err, e2;

  assign e2 = err <<< 1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= IDLE;
      ready        <= 1'b1;
      write_enable <= 1'b0;
      x_addr       <= '0;
      y_addr       <= '0;
      x <= '0; y <= '0; xe <= '0; ye <= '0;
      dx <= '0; dy <= '0; err <= '0; y_down <= 1'b0;
    end else begin
      write_enable <= 1'b0;
      unique case (state)
        IDLE: if (draw_line) begin
          logic [X_W-1:0] ax, bx;
          logic [Y_W-1:0] ay, by;
          logic signed [E_W-1:0] ddx, ddy;
          if (x0 > x1) begin ax = x1; ay = y1; bx = x0; by = y0; end
          else         begin ax = x0; ay = y0; bx = x1; by = y1; end
          ddx = E_W'(bx) - E_W'(ax);
          ddy = (by > ay) ? -(E_W'(by) - E_W'(ay)) : -(E_W'(ay) - E_W'(by));
          x      <= ax;  y  <= ay;
          xe     <= bx;  ye <= by;
          y_down <= (by < ay);
          dx     <= ddx;
          dy     <= ddy;
          err    <= ddx + ddy;
          ready  <= 1'b0;
          state  <= DRAW;
        end
        DRAW: if (step_en) begin
          write_enable <= 1'b1;
          x_addr       <= x;
          y_addr       <= y;
          if (x == xe && y == ye) begin
            ready <= 1'b1;
            state <= IDLE;
          end else begin
            logic signed [E_W-1:0] err_n;
            err_n = err;
            if (e2 >= dy) begin
              err_n = err_n + dy;
              x <= x + 1'b1;
            end
            if (e2 <= dx) begin
              err_n = err_n + dx;
              y <= y_down ? y - 1'b1 : y + 1'b1;
            end
            err <= err_n;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
