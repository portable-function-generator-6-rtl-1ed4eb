// amp_logic: formats an amplitude for the on-screen readout.
//
// Takes the amplitude in units of 10 mV (20 bits) and its seven BCD digits and
// produces a row of READOUT_CHARS character codes (slot 0 leftmost),
// blank-padded on the right:
//            a < 10 V    "n.nnV"   (e.g. 123 -> "1.23V")
//   10 V <= a < 100 V    "nn.nV"
//           a >= 100 V   "nnnV"
// Purely combinational.
//
// Volts with two decimals ("1.23V") follow the original design; the 10 mV
// input unit is the one the original gives for the readout path, and the
// layouts above are this design's.
module amp_logic
  import fg_pkg::*;
(
  input  logic [19:0] number,
  input  logic [27:0] digits,
  output char_t       chars [READOUT_CHARS]
);
  function automatic char_t dg(input logic [27:0] d, input int k);
    return char_t'({1'b0, d[4*k +: 4]});
  endfunction

  always_comb begin
    for (int i = 0; i < READOUT_CHARS; i++) chars[i] = CH_BLANK;
    if (number < 20'd1_000) begin
      chars[0] = dg(digits, 2); chars[1] = CH_DOT; chars[2] = dg(digits, 1);
      chars[3] = dg(digits, 0); chars[4] = CH_V;
    end else if (number < 20'd10_000) begin
      chars[0] = dg(digits, 3); chars[1] = dg(digits, 2); chars[2] = CH_DOT;
      chars[3] = dg(digits, 1); chars[4] = CH_V;
    end else begin
      chars[0] = dg(digits, 4); chars[1] = dg(digits, 3); chars[2] = dg(digits, 2);
      chars[3] = CH_V;
    end
  end
endmodule
