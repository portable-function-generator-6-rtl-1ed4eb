// display_fsm: the drawing state machine of the display.
//
// After reset it clears the frame buffer (one pixel per clock, all FB_DEPTH
// pixels) and then waits in IDLE, where 'ready' tells the sampling window that
// the shared waveform buffer may be refilled. A draw_req pulse (a new window
// has been loaded) starts a redraw: the frame buffer is cleared again, then
// the waveform is turned into N_POINTS-1 line segments. Point k has
// x = k and y = Y_BASE - sample/yscale (clamped at 0), where the sample is read
// from the waveform buffer at address k * 2**xscale (modulo the buffer size),
// so a larger xscale shows more of the window and a larger yscale a flatter
// wave. For each segment the machine loads (x0,y0)-(x1,y1), pulses draw_line,
// waits until the line drawer is ready again, then shifts the end point to the
// start point and fetches the next sample, until x1 reaches N_POINTS-1.
//
// In IDLE the scale buttons act once per press: right/left raise/lower xscale
// (0..MAX_XSCALE), down/up raise/lower yscale (1..63).
//
// Timing: waveform-buffer reads take one clock (address out, data back on the
// following clock). draw_line is a one-clock pulse and the machine waits one
// extra clock before looking at line_ready, which the drawer drops on the clock
// after the pulse. The clear takes FB_DEPTH clocks; each segment costs five
// clocks plus the drawer's time.
//
// From the original design: clear-then-draw on a draw request, feeding point
// pairs to the line drawer with a ready/done handshake, y = centre - sample/
// yscale, the address step 2**xscale and the scale controls. This design's own
// choices: the state encoding, the clamping and the button edge detection.
module display_fsm #(
  parameter int unsigned SAMPLE_W    = 10,
  parameter int unsigned BUF_ADDR_W  = 10,
  parameter int unsigned N_POINTS    = 1024,       // screen width in points
  parameter int unsigned Y_BASE      = 384,        // screen centre line
  parameter int unsigned FB_DEPTH    = 1024 * 768,
  parameter int unsigned FB_ADDR_W   = 20,
  parameter int unsigned MAX_XSCALE  = 9
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  draw_req,
  input  logic                  btn_right,
  input  logic                  btn_left,
  input  logic                  btn_up,
  input  logic                  btn_down,
  // waveform buffer read port
  output logic [BUF_ADDR_W-1:0] buf_addr,
  input  logic [SAMPLE_W-1:0]   buf_data,
  // frame buffer clearing
  output logic                  clearing,
  output logic [FB_ADDR_W-1:0]  clear_addr,
  // line drawer
  output logic                  draw_line,
  output logic [10:0]           x0,
  output logic [9:0]            y0,
  output logic [10:0]           x1,
  output logic [9:0]            y1,
  input  logic                  line_ready,
  // status
  output logic                  ready,
  output logic [3:0]            xscale,
  output logic [5:0]            yscale
);
  typedef enum logic [3:0] {
    CLEAR, IDLE, FETCH0, LATCH0, FETCH1, LATCH1, SEND, ARM, WAIT_LINE
  } state_t;
  state_t state;

  logic pending;
  logic right_q, left_q, up_q, down_q;

  // y coordinate of a sample
  logic [SAMPLE_W-1:0] scaled;
  logic [9:0]          y_of_data;
  assign scaled    = buf_data / SAMPLE_W'(yscale);
  assign y_of_data = (32'(scaled) >= Y_BASE) ? 10'd0 : 10'(Y_BASE - 32'(scaled));

  logic [BUF_ADDR_W-1:0] addr_step;
  assign addr_step = BUF_ADDR_W'(1) << xscale;

  assign ready    = (state == IDLE);
  assign clearing = (state == CLEAR);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= CLEAR;
      pending    <= 1'b0;
      clear_addr <= '0;
      buf_addr   <= '0;
      draw_line  <= 1'b0;
      x0 <= '0; y0 <= '0; x1 <= '0; y1 <= '0;
      xscale     <= '0;
      yscale     <= 6'd1;
      right_q <= 1'b0; left_q <= 1'b0; up_q <= 1'b0; down_q <= 1'b0;
    end else begin
      draw_line <= 1'b0;
      right_q <= btn_right; left_q <= btn_left; up_q <= btn_up; down_q <= btn_down;
      if (draw_req) pending <= 1'b1;

      unique case (state)
        CLEAR: begin
          clear_addr <= clear_addr + 1'b1;
          if (clear_addr == FB_ADDR_W'(FB_DEPTH - 1)) begin
            clear_addr <= '0;
            if (pending) begin
              pending  <= 1'b0;
              buf_addr <= '0;
              state    <= FETCH0;
            end else begin
              state <= IDLE;
            end
          end
        end
        IDLE: begin
          if (draw_req || pending) begin
            state <= CLEAR;   // clear, then draw the new window
          end else if (btn_right && !right_q) begin
            if (xscale < 4'(MAX_XSCALE)) xscale <= xscale + 1'b1;
          end else if (btn_left && !left_q) begin
            if (xscale != 0) xscale <= xscale - 1'b1;
          end else if (btn_up && !up_q) begin
            if (yscale > 6'd1) yscale <= yscale - 1'b1;
          end else if (btn_down && !down_q) begin
            if (yscale != 6'd63) yscale <= yscale + 1'b1;
          end
        end
        FETCH0: state <= LATCH0;        // buffer read in flight
        LATCH0: begin
          x0       <= '0;
          y0       <= y_of_data;
          x1       <= '0;
          buf_addr <= buf_addr + addr_step;
          state    <= FETCH1;
        end
        FETCH1: state <= LATCH1;
        LATCH1: begin
          x1    <= x1 + 1'b1;
          y1    <= y_of_data;
          state <= SEND;
        end
        SEND: if (line_ready) begin
          draw_line <= 1'b1;
          state     <= ARM;
        end
        ARM: state <= WAIT_LINE;        // drawer drops ready now
        WAIT_LINE: if (line_ready) begin
          if (x1 == 11'(N_POINTS - 1)) begin
            state <= IDLE;
          end else begin
            x0       <= x1;
            y0       <= y1;
            buf_addr <= buf_addr + addr_step;
            state    <= FETCH1;
          end
        end
        default: state <= CLEAR;
      endcase
    end
  end
endmodule
