// gui: the overlay layer of the display (readouts, background grid, border).
//
// For the beam position (hcount, vcount) the module says whether the pixel
// belongs to the overlay. The overlay has three text lines in the top-left
// corner, a one-pixel border around the 1024 x 768 screen and a dotted
// background grid with a vertical line every GRID_X columns and a horizontal
// line every GRID_Y rows, lit on every GRID_DOT-th pixel (8 x 8 divisions by
// default, like an oscilloscope graticule):
//   line 1 (y = LINE1): "F:" and the frequency, formatted by freq_logic
//   line 2 (y = LINE2): "A:" and the amplitude, formatted by amp_logic
//   line 3 (y = LINE3): "D:" and the duty cycle in percent
// Every character is its own text_sprite instance on a COL-pixel pitch; the
// numbers reach the readout logic through bcd converters. Purely
// combinational: pixel is valid in the same cycle as hcount/vcount.
//
// The layout (column pitch 10, lines at 10, 22, 34), the sprite-per-character
// structure and the BCD -> readout logic -> sprite chain follow the original
// design, as does the grid itself; the grid spacing and dotting, the border
// and the '%' sign are this design's.
module gui
  import fg_pkg::*;
#(
  parameter int unsigned COL   = 10,
  parameter int unsigned LINE1 = 10,
  parameter int unsigned LINE2 = 22,
  parameter int unsigned LINE3 = 34,
  // background grid: 8 x 8 divisions of the 1024 x 768 screen, dotted
  parameter int unsigned GRID_X   = 128,
  parameter int unsigned GRID_Y   = 96,
  parameter int unsigned GRID_DOT = 4
) (
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [19:0] freq,        // Hz
  input  logic [8:0]  amp,         // 10 mV units
  input  logic [6:0]  duty_cycle,  // percent
  output logic        pixel
);
  localparam int unsigned NCH = 2 + READOUT_CHARS;  // label, ':', readout

  // ---------------- readout text ----------------
  logic [27:0] f_digits, a_digits;
  logic [11:0] d_digits;
  char_t       f_chars [READOUT_CHARS];
  char_t       a_chars [READOUT_CHARS];
  char_t       d_chars [READOUT_CHARS];

  bcd u_bcd_f (.number(freq),                  .digits(f_digits));
  bcd u_bcd_a (.number({11'd0, amp}),          .digits(a_digits));
  bcd #(.IN_W(7), .DIGITS(3)) u_bcd_d (.number(duty_cycle), .digits(d_digits));

  freq_logic u_freq (.number(freq),         .digits(f_digits), .chars(f_chars));
  amp_logic  u_amp  (.number({11'd0, amp}), .digits(a_digits), .chars(a_chars));

  always_comb begin
    for (int i = 0; i < READOUT_CHARS; i++) d_chars[i] = CH_BLANK;
    if (duty_cycle >= 7'd100) begin
      d_chars[0] = char_t'({1'b0, d_digits[11:8]});
      d_chars[1] = char_t'({1'b0, d_digits[7:4]});
      d_chars[2] = char_t'({1'b0, d_digits[3:0]});
      d_chars[3] = CH_PCT;
    end else if (duty_cycle >= 7'd10) begin
      d_chars[0] = char_t'({1'b0, d_digits[7:4]});
      d_chars[1] = char_t'({1'b0, d_digits[3:0]});
      d_chars[2] = CH_PCT;
    end else begin
      d_chars[0] = char_t'({1'b0, d_digits[3:0]});
      d_chars[1] = CH_PCT;
    end
  end

  // ---------------- sprites ----------------
  logic [4:0] line_chars [3][NCH];
  always_comb begin
    line_chars[0][0] = CH_F;
    line_chars[1][0] = CH_A;
    line_chars[2][0] = CH_D;
    for (int l = 0; l < 3; l++) line_chars[l][1] = CH_COLON;
    for (int i = 0; i < READOUT_CHARS; i++) begin
      line_chars[0][2 + i] = f_chars[i];
      line_chars[1][2 + i] = a_chars[i];
      line_chars[2][2 + i] = d_chars[i];
    end
  end

  localparam int unsigned LINE_Y [3] = '{LINE1, LINE2, LINE3};
  logic [NCH-1:0] pix [3];

  for (genvar l = 0; l < 3; l++) begin : g_line
    for (genvar c = 0; c < NCH; c++) begin : g_char
      text_sprite u_char (
        .x        (11'(COL * (c + 1))),
        .y        (10'(LINE_Y[l])),
        .hcount   (hcount),
        .vcount   (vcount),
        .character(line_chars[l][c]),
        .pixel    (pix[l][c])
      );
    end
  end

  logic border;
  assign border = (hcount == 11'd0) || (hcount == 11'(SCREEN_W - 1)) ||
                  (vcount == 10'd0) || (vcount == 10'(SCREEN_H - 1));


  // ---------------- background grid ----------------
  // A vertical grid line every GRID_X columns and a horizontal one every
  // GRID_Y rows, each lit only on every GRID_DOT-th pixel along its length so
  // that the trace stays readable where it crosses the grid.
  logic grid;
  assign grid = ((32'(hcount) % GRID_X == 0) && (32'(vcount) % GRID_DOT == 0)) ||
                ((32'(vcount) % GRID_Y == 0) && (32'(hcount) % GRID_DOT == 0));

  assign pixel = border || grid || (|pix[0]) || (|pix[1]) || (|pix[2]);
endmodule
