// display: VGA display of the captured waveform with a text overlay.
//
// Two layers make up the picture. The lower layer is a 1-bit-per-pixel frame
// buffer into which the drawing state machine (display_fsm) and the line
// drawer (bresenham) render the waveform from the shared waveform buffer; the
// upper layer is the GUI overlay (readouts and border), computed on the fly
// from hcount/vcount. A pixel is white when either layer lights it and the
// beam is in the visible area.
//
// The frame buffer has one port, shared by three users in this order of
// priority: the clearing sweep of the drawing machine; the line drawer, which
// may only write while vsync is low (the monitor is not being drawn); and the
// raster scan, which reads pixel vcount*1024 + hcount at all other times.
// While the buffer is being cleared the waveform layer is shown as dark.
//
// Timing: everything runs on the 65 MHz pixel clock. The frame buffer read
// takes one clock, so the overlay, blank and both sync signals are delayed by
// one register to stay aligned with it; rgb, hsync and vsync are therefore one
// clock behind the internal raster counters. 'ready' is high while the drawing
// machine is idle and the waveform buffer may be rewritten; draw_req starts a
// clear-and-redraw.
//
// The current scale values of the drawing machine are internal to it; they are
// not drawn on the screen, so the xscale/yscale nets here are left unused.
//
// The structure (VGA timing, single frame buffer written only during vertical
// sync, line drawer, drawing state machine, GUI overlay) follows the original
// design. The parameters of the raster may be reduced for simulation.
module display #(
  parameter int unsigned SAMPLE_W     = 10,
  parameter int unsigned BUF_ADDR_W   = 10,
  parameter int unsigned H_ACTIVE     = 1024,
  parameter int unsigned H_SYNC_START = 1048,
  parameter int unsigned H_SYNC_END   = 1184,
  parameter int unsigned H_TOTAL      = 1344,
  parameter int unsigned V_ACTIVE     = 768,
  parameter int unsigned V_SYNC_START = 777,
  parameter int unsigned V_SYNC_END   = 783,
  parameter int unsigned V_TOTAL      = 806
) (
  input  logic                  vclk,
  input  logic                  rst,
  input  logic                  draw_req,
  input  logic                  btn_right,
  input  logic                  btn_left,
  input  logic                  btn_up,
  input  logic                  btn_down,
  input  logic [19:0]           freq,
  input  logic [8:0]            amp,
  input  logic [6:0]            duty_cycle,
  output logic [BUF_ADDR_W-1:0] buf_addr,
  input  logic [SAMPLE_W-1:0]   buf_data,
  output logic                  ready,
  output logic [11:0]           rgb,
  output logic                  hsync,
  output logic                  vsync,
  // observation of the frame buffer write port (for test and debug)
  output logic                  fb_we,
  output logic [19:0]           fb_addr,
  output logic                  fb_din
);
  localparam int unsigned FB_DEPTH = H_ACTIVE * V_ACTIVE;

  // ---------------- raster ----------------
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hs, vs, blank;

  xvga #(
    .H_ACTIVE(H_ACTIVE), .H_SYNC_START(H_SYNC_START), .H_SYNC_END(H_SYNC_END), .H_TOTAL(H_TOTAL),
    .V_ACTIVE(V_ACTIVE), .V_SYNC_START(V_SYNC_START), .V_SYNC_END(V_SYNC_END), .V_TOTAL(V_TOTAL)
  ) u_xvga (
    .vclk(vclk), .rst(rst), .hcount(hcount), .vcount(vcount),
    .hsync(hs), .vsync(vs), .blank(blank)
  );

  // ---------------- drawing ----------------
  logic        clearing;
  logic [19:0] clear_addr;
  logic        draw_line, line_ready, line_we;
  logic [10:0] x0, x1, line_x;
  logic [9:0]  y0, y1, line_y;
  logic [3:0]  xscale;
  logic [5:0]  yscale;

  display_fsm #(
    .SAMPLE_W(SAMPLE_W), .BUF_ADDR_W(BUF_ADDR_W), .N_POINTS(H_ACTIVE),
    .Y_BASE(V_ACTIVE / 2), .FB_DEPTH(FB_DEPTH), .FB_ADDR_W(20)
  ) u_fsm (
    .clk(vclk), .rst(rst), .draw_req(draw_req),
    .btn_right(btn_right), .btn_left(btn_left), .btn_up(btn_up), .btn_down(btn_down),
    .buf_addr(buf_addr), .buf_data(buf_data),
    .clearing(clearing), .clear_addr(clear_addr),
    .draw_line(draw_line), .x0(x0), .y0(y0), .x1(x1), .y1(y1), .line_ready(line_ready),
    .ready(ready), .xscale(xscale), .yscale(yscale)
  );

  bresenham u_line (
    .clk(vclk), .rst(rst), .step_en(!vs), .draw_line(draw_line),
    .x0(x0), .y0(y0), .x1(x1), .y1(y1),
    .ready(line_ready), .x_addr(line_x), .y_addr(line_y), .write_enable(line_we)
  );

  // ---------------- frame buffer port ----------------
  logic fb_dout;
  always_comb begin
    if (clearing) begin
      fb_we   = 1'b1;
      fb_addr = clear_addr;
      fb_din  = 1'b0;
    end else if (!vs) begin
      fb_we   = line_we;
      fb_addr = 20'(32'(line_y) * H_ACTIVE + 32'(line_x));
      fb_din  = 1'b1;
    end else begin
      fb_we   = 1'b0;
      fb_addr = blank ? 20'd0 : 20'(32'(vcount) * H_ACTIVE + 32'(hcount));
      fb_din  = 1'b0;
    end
  end

  frame_buffer #(.DEPTH(FB_DEPTH), .ADDR_W(20)) u_fb (
    .clk(vclk), .we(fb_we), .addr(fb_addr), .din(fb_din), .dout(fb_dout)
  );

  // ---------------- overlay and output ----------------
  logic gui_px;
  gui u_gui (
    .hcount(hcount), .vcount(vcount), .freq(freq), .amp(amp),
    .duty_cycle(duty_cycle), .pixel(gui_px)
  );

  logic gui_q, blank_q, wave_ok_q;
  always_ff @(posedge vclk) begin
    if (rst) begin
      gui_q     <= 1'b0;
      blank_q   <= 1'b1;
      wave_ok_q <= 1'b0;
      hsync     <= 1'b1;
      vsync     <= 1'b1;
    end else begin
      gui_q     <= gui_px;
      blank_q   <= blank;
      wave_ok_q <= !clearing && vs;   // the read this clock was a raster read
      hsync     <= hs;
      vsync     <= vs;
    end
  end

  assign rgb = {12{!blank_q && (gui_q || (wave_ok_q && fb_dout))}};
endmodule
