// galvo_scan: turns the captured waveform into points for a laser galvanometer.
//
// A galvanometer mirror cannot follow a 1024-pixel trace, so the display path's
// sampling window is reduced to POINTS points that the laser is swept between.
// The module watches the writes that fill the shared waveform buffer and keeps
// the samples at addresses floor(i * 2**BUF_ADDR_W / POINTS), i = 0..POINTS-1,
// in a small point memory. It then visits the points in order, forever: for
// point i it sends the horizontal position x = i * 4095 / (POINTS-1) to DAC
// channel A and the vertical position (the sample scaled to 12 bits) to channel
// B of the serial DAC driver, and waits until POINT_CYCLES clocks have passed
// since the start of the point before moving on, which caps the update rate
// at the mirrors' speed (about 30 kHz with the defaults at 65 MHz).
//
// Interface to the DAC driver: 'send' is a one-clock pulse given only while
// dac_busy is low; the driver raises busy on the next clock. Positions are
// linear in x and y: the correction for the beam angle (arctan of the offset
// over the wall distance) is left to a table outside this module.
//
// Only the low AMP_W bits of a sample are significant (the generators make
// 8-bit samples in a 10-bit field), so the upper bits of buf_data are unused.
//
// Reducing 1024 samples to 100 points and driving the mirrors through the
// MCP4822 follow the original design's proposal; the point spacing, the linear
// mapping and the update pacing are this design's choices.
module galvo_scan #(
  parameter int unsigned POINTS       = 100,
  parameter int unsigned BUF_ADDR_W   = 10,
  parameter int unsigned SAMPLE_W     = 10,
  parameter int unsigned AMP_W        = 8,      // significant sample bits
  parameter int unsigned POINT_CYCLES = 2167    // 65 MHz / 30 kHz
) (
  input  logic                  clk,
  input  logic                  rst,
  // snooped waveform-buffer write port
  input  logic                  buf_we,
  input  logic [BUF_ADDR_W-1:0] buf_addr,
  input  logic [SAMPLE_W-1:0]   buf_data,
  // serial DAC driver
  output logic                  dac_send,
  output logic                  dac_chan,
  output logic [11:0]           dac_din,
  input  logic                  dac_busy,
  // status
  output logic [$clog2(POINTS)-1:0] point_idx
);
  localparam int unsigned PI_W = $clog2(POINTS);
  localparam int unsigned DEPTH = 1 << BUF_ADDR_W;

  logic [AMP_W-1:0] pts [POINTS];

  // ---------------- point capture ----------------
  logic [PI_W-1:0] cap_i;
  logic [31:0]     cap_target;
  assign cap_target = (32'(cap_i) * DEPTH) / POINTS;

  always_ff @(posedge clk) begin
    if (rst) begin
      cap_i <= '0;
    end else if (buf_we) begin
      if (buf_addr == '0) begin
        pts[0] <= buf_data[AMP_W-1:0];
        cap_i  <= PI_W'(1);
      end else if (32'(cap_i) < POINTS && 32'(buf_addr) == cap_target) begin
        pts[cap_i] <= buf_data[AMP_W-1:0];
        cap_i      <= cap_i + 1'b1;
      end
    end
  end

  // ---------------- playback ----------------
  typedef enum logic [2:0] {SEND_X, WAIT_X, SEND_Y, WAIT_Y, DWELL} state_t;
  state_t state;
  logic [$clog2(POINT_CYCLES + 1)-1:0] timer;
  logic [11:0] x_pos, y_pos;

  assign x_pos = 12'((32'(point_idx) * 4095) / (POINTS - 1));
  assign y_pos = 12'(32'(pts[point_idx]) << (12 - AMP_W));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= SEND_X;
      point_idx <= '0;
      timer     <= '0;
      dac_send  <= 1'b0;
      dac_chan  <= 1'b0;
      dac_din   <= '0;
    end else begin
      dac_send <= 1'b0;
      if (timer != ($bits(timer))'(POINT_CYCLES)) timer <= timer + 1'b1;
      unique case (state)
        SEND_X: if (!dac_busy) begin
          dac_send <= 1'b1;
          dac_chan <= 1'b0;
          dac_din  <= x_pos;
          state    <= WAIT_X;
        end
        WAIT_X: state <= SEND_Y;          // driver raises busy now
        SEND_Y: if (!dac_busy) begin
          dac_send <= 1'b1;
          dac_chan <= 1'b1;
          dac_din  <= y_pos;
          state    <= WAIT_Y;
        end
        WAIT_Y: state <= DWELL;
        DWELL: if (!dac_busy && timer >= ($bits(timer))'(POINT_CYCLES - 1)) begin
          timer     <= '0;
          point_idx <= (32'(point_idx) == POINTS - 1) ? '0 : point_idx + 1'b1;
          state     <= SEND_X;
        end
        default: state <= SEND_X;
      endcase
    end
  end
endmodule
