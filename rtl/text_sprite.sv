// text_sprite: draws one character sprite at a fixed screen position.
//
// Given the current beam position (hcount, vcount), the sprite's top-left
// corner (x, y) and a character code, pixel is 1 when the beam is inside the
// WIDTH x HEIGHT sprite box (8 x 11) and the glyph has a lit pixel there. The
// glyphs are 5 x 7 dot-matrix characters placed one column in from the left
// and two rows down inside the box, so neighbouring sprites on a 10-pixel
// pitch and 12-line rows never touch. Codes are those of fg_pkg::char_t; an
// unknown code or CH_BLANK draws nothing. Purely combinational: pixel is valid
// in the same cycle as hcount/vcount.
//
// The per-character sprite instance, the 8 x 11 box and the hcount/vcount
// interface follow the original design; the glyph shapes are this design's.
module text_sprite
  import fg_pkg::*;
#(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned HEIGHT = 11
) (
  input  logic [10:0] x,
  input  logic [9:0]  y,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [4:0]  character,
  output logic        pixel
);
  localparam int GX = 1;  // glyph column offset in the box
  localparam int GY = 2;  // glyph row offset in the box

  // 5x7 glyph, row 0 first, leftmost column in the MSB of each 5-bit row.
  function automatic logic [34:0] glyph_of(input logic [4:0] c);
    logic [34:0] glyph;
    case (c)
      5'd0 : glyph = 35'b01110_10001_10011_10101_11001_10001_01110; // 0
      5'd1 : glyph = 35'b00100_01100_00100_00100_00100_00100_01110; // 1
      5'd2 : glyph = 35'b01110_10001_00001_00010_00100_01000_11111; // 2
      5'd3 : glyph = 35'b11111_00010_00100_00010_00001_10001_01110; // 3
      5'd4 : glyph = 35'b00010_00110_01010_10010_11111_00010_00010; // 4
      5'd5 : glyph = 35'b11111_10000_11110_00001_00001_10001_01110; // 5
      5'd6 : glyph = 35'b00110_01000_10000_11110_10001_10001_01110; // 6
      5'd7 : glyph = 35'b11111_00001_00010_00100_01000_01000_01000; // 7
      5'd8 : glyph = 35'b01110_10001_10001_01110_10001_10001_01110; // 8
      5'd9 : glyph = 35'b01110_10001_10001_01111_00001_00010_01100; // 9
      5'd10: glyph = 35'b11111_10000_10000_11110_10000_10000_10000; // F
      5'd11: glyph = 35'b11111_10000_10000_11110_10000_10000_11111; // E
      5'd12: glyph = 35'b01110_10001_10001_11111_10001_10001_10001; // A
      5'd13: glyph = 35'b11110_10001_10001_10001_10001_10001_11110; // D
      5'd14: glyph = 35'b10001_10001_10001_11111_10001_10001_10001; // H
      5'd15: glyph = 35'b10001_11011_10101_10101_10001_10001_10001; // M
      5'd16: glyph = 35'b10001_10010_10100_11000_10100_10010_10001; // K
      5'd17: glyph = 35'b10001_10001_10001_10001_10001_01010_00100; // V
      5'd18: glyph = 35'b00000_00000_00000_00000_00000_01100_01100; // .
      5'd19: glyph = 35'b00000_00000_11010_10101_10101_10001_10001; // m
      5'd20: glyph = 35'b00000_01100_01100_00000_01100_01100_00000; // :
      5'd21: glyph = 35'b00000_00000_11111_00010_00100_01000_11111; // z
      5'd23: glyph = 35'b11000_11001_00010_00100_01000_10011_00011; // %
      default: glyph = '0; // blank
    endcase
    return glyph;
  endfunction

  logic        in_box;
  logic [10:0] xoff;
  logic [9:0]  yoff;
  logic [34:0] g;
  int          col, row;

  always_comb begin
    in_box = (hcount >= x) && (hcount < x + 11'(WIDTH)) &&
             (vcount >= y) && (vcount < y + 10'(HEIGHT));
    xoff   = hcount - x;
    yoff   = vcount - y;
    g      = glyph_of(character);
    col    = int'(xoff) - GX;
    row    = int'(yoff) - GY;
    pixel  = 1'b0;
    if (in_box && col >= 0 && col < 5 && row >= 0 && row < 7)
      pixel = g[34 - (row * 5 + col)];
  end
endmodule
