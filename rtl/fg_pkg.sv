// fg_pkg: types and constants shared by the function generator.
//
// Holds the wave-type encoding, the character codes of the on-screen text
// sprites, and the screen geometry of the 1024x768 display. The character
// code numbering (digits 0-9, then letters and symbols, 22 = blank) follows the
// original design; the separate 'H' and 'z' codes are this design's choice so
// that "Hz" can be drawn with two ordinary 8-pixel-wide sprites.
package fg_pkg;

  // Wave types, cycled in this order by the wave-type button.
  typedef enum logic [1:0] {
    WAVE_SQUARE   = 2'd0,
    WAVE_TRIANGLE = 2'd1,
    WAVE_SINE     = 2'd2
  } wave_t;

  // Character codes understood by text_sprite (5 bits, as in the readout path).
  typedef enum logic [4:0] {
    CH_0 = 5'd0,  CH_1 = 5'd1,  CH_2 = 5'd2,  CH_3 = 5'd3,  CH_4 = 5'd4,
    CH_5 = 5'd5,  CH_6 = 5'd6,  CH_7 = 5'd7,  CH_8 = 5'd8,  CH_9 = 5'd9,
    CH_F = 5'd10, CH_E = 5'd11, CH_A = 5'd12, CH_D = 5'd13, CH_H = 5'd14,
    CH_M = 5'd15, CH_K = 5'd16, CH_V = 5'd17, CH_DOT = 5'd18, CH_m = 5'd19,
    CH_COLON = 5'd20, CH_z = 5'd21, CH_BLANK = 5'd22, CH_PCT = 5'd23
  } char_t;

  // Display geometry (XGA, 1024x768 at 60 Hz).
  localparam int unsigned SCREEN_W = 1024;
  localparam int unsigned SCREEN_H = 768;

  // System clock of the waveform generator, in Hz (period multiplier 1 = 10 ns).
  localparam int unsigned SYS_CLK_HZ = 100_000_000;

  // Number of readout character slots per text line.
  localparam int unsigned READOUT_CHARS = 8;

endpackage
