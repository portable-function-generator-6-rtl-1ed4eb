// bcd: binary to binary-coded-decimal conversion by double dabble.
//
// A 20-bit number (0..1,048,575) is converted to seven BCD digits, millions
// down to ones. The conversion is the shift-and-add-3 algorithm: the number is
// shifted left one bit at a time into a field of 4-bit digits, and before each
// shift every digit that is 5 or more has 3 added to it so that the following
// doubling carries correctly into the next digit. Purely combinational (the
// loop unrolls into 20 rows of digit adjusters); outputs follow the input in
// the same cycle.
//
// The algorithm and the 20-bit / 7-digit range follow the original design.
module bcd #(
  parameter int unsigned IN_W   = 20,
  parameter int unsigned DIGITS = 7
) (
  input  logic [IN_W-1:0]       number,
  output logic [DIGITS*4-1:0]   digits   // digit 0 (ones) in bits [3:0]
);
  logic [DIGITS*4+IN_W-1:0] sh;

  always_comb begin
    sh = '0;
    sh[IN_W-1:0] = number;
    for (int i = 0; i < IN_W; i++) begin
      for (int d = 0; d < DIGITS; d++)
        if (sh[IN_W + 4*d +: 4] >= 4'd5) sh[IN_W + 4*d +: 4] = sh[IN_W + 4*d +: 4] + 4'd3;
      sh = sh << 1;
    end
    digits = sh[IN_W +: DIGITS*4];
  end
endmodule
