// freq_logic: formats a frequency for the on-screen readout.
//
// Takes the frequency in Hz (20 bits) and its seven BCD digits and chooses the
// most readable form, as a row of READOUT_CHARS character codes (slot 0 is the
// leftmost), blank-padded on the right:
//        f < 1 kHz        "nnnHz"    (leading zeros blanked)
//   1 kHz <= f < 10 kHz    "n.nnKHz"
//  10 kHz <= f < 100 kHz   "nn.nKHz"
// 100 kHz <= f < 1 MHz     "nnnKHz"
//            f >= 1 MHz    "n.nnMHz"
// Digits below the shown precision are truncated, not rounded. Purely
// combinational.
//
// The choice of unit by magnitude and the "1.00KHz" style follow the original
// design; the exact layouts above are this design's.
module freq_logic
  import fg_pkg::*;
(
  input  logic [19:0] number,
  input  logic [27:0] digits,            // BCD, ones in [3:0]
  output char_t       chars [READOUT_CHARS]
);
  function automatic char_t dg(input logic [27:0] d, input int k);
    return char_t'({1'b0, d[4*k +: 4]});
  endfunction

  int n;  // next free slot in the Hz layout

  always_comb begin
    n = 0;
    for (int i = 0; i < READOUT_CHARS; i++) chars[i] = CH_BLANK;
    if (number < 20'd1_000) begin
      if (number >= 20'd100) begin chars[n] = dg(digits, 2); n++; end
      if (number >= 20'd10)  begin chars[n] = dg(digits, 1); n++; end
      chars[n] = dg(digits, 0); n++;
      chars[n] = CH_H; n++;
      chars[n] = CH_z;
    end else if (number < 20'd10_000) begin
      chars[0] = dg(digits, 3); chars[1] = CH_DOT; chars[2] = dg(digits, 2);
      chars[3] = dg(digits, 1); chars[4] = CH_K;   chars[5] = CH_H; chars[6] = CH_z;
    end else if (number < 20'd100_000) begin
      chars[0] = dg(digits, 4); chars[1] = dg(digits, 3); chars[2] = CH_DOT;
      chars[3] = dg(digits, 2); chars[4] = CH_K;   chars[5] = CH_H; chars[6] = CH_z;
    end else if (number < 20'd1_000_000) begin
      chars[0] = dg(digits, 5); chars[1] = dg(digits, 4); chars[2] = dg(digits, 3);
      chars[3] = CH_K; chars[4] = CH_H; chars[5] = CH_z;
    end else begin
      chars[0] = dg(digits, 6); chars[1] = CH_DOT; chars[2] = dg(digits, 5);
      chars[3] = dg(digits, 4); chars[4] = CH_M;   chars[5] = CH_H; chars[6] = CH_z;
    end
  end
endmodule
