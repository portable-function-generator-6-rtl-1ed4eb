// galvo_map: converts wall positions into galvanometer angles for the DAC.
//
// The laser leaves the two mirrors, which are taken as one point source,
// DISTANCE away from the wall. A spot at offset d from the centre of the
// picture needs a beam angle of arctan(d / DISTANCE), so equal steps on the
// wall need ever smaller steps in angle towards the edges. The module holds
// this mapping as a ROM with one entry per CODE_W-bit position code:
//   d(c)     = (c - M) / M * HALF_SPAN,          M = (2**CODE_W - 1) / 2
//   entry(c) = round(M + M * arctan(d(c) / DISTANCE) / arctan(HALF_SPAN / DISTANCE))
// Code 0 and the all-ones code are the picture's edges at -HALF_SPAN and
// +HALF_SPAN, where the galvanometer is at full deflection. The table is
// computed at elaboration time from this formula. One table serves both
// mirrors, because the two axes are sent to the DAC one after the other.
//
// Interface: it sits between the point sequencer and the serial DAC driver
// and passes their send/chan/din handshake through one register stage. A
// 'in_send' pulse with a position in 'in_pos' leaves as a 'dac_send' pulse one
// clock later, with the table entry on 'dac_din' and the channel unchanged.
// 'in_busy' is the DAC's busy signal, extended over the clock in which a word
// is in this stage, so the sequencer never sees the DAC as free while a word
// is on its way to it.
//
// The mapping (a point source at a distance from the wall, arctan of offset
// over distance, stored in block RAM) follows the original design, as do the
// default numbers: a wall 10 ft away and a picture reaching 3 ft from its
// centre. Scaling full deflection to the picture's edge, the rounding and the
// single shared table are this design's choices.
module galvo_map #(
  parameter int unsigned CODE_W    = 12,
  parameter real         DISTANCE  = 10.0,  // mirrors to wall, any length unit
  parameter real         HALF_SPAN = 3.0    // centre to edge of the picture, same unit
) (
  input  logic              clk,
  input  logic              rst,
  // from the point sequencer
  input  logic              in_send,
  input  logic              in_chan,
  input  logic [CODE_W-1:0] in_pos,
  output logic              in_busy,
  // to the serial DAC driver
  output logic              dac_send,
  output logic              dac_chan,
  output logic [CODE_W-1:0] dac_din,
  input  logic              dac_busy
);
  localparam int unsigned DEPTH = 1 << CODE_W;

  function automatic logic [CODE_W-1:0] angle_entry(int unsigned c);
    real mid, d, r;
    int  v;
    mid = real'(DEPTH - 1) / 2.0;
    d   = (real'(c) - mid) / mid * HALF_SPAN;
    r   = mid + mid * $atan(d / DISTANCE) / $atan(HALF_SPAN / DISTANCE);
    v   = $rtoi(r + 0.5);
    if (v > int'(DEPTH - 1)) v = int'(DEPTH - 1);
    if (v < 0) v = 0;
    return CODE_W'(v);
  endfunction

  logic [CODE_W-1:0] rom [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) rom[i] = angle_entry(i);
  end

  // table read (block RAM style, no reset)
  always_ff @(posedge clk) dac_din <= rom[in_pos];

  always_ff @(posedge clk) begin
    if (rst) begin
      dac_send <= 1'b0;
      dac_chan <= 1'b0;
    end else begin
      dac_send <= in_send;
      if (in_send) dac_chan <= in_chan;
    end
  end

  assign in_busy = dac_busy || dac_send;
endmodule
