// tb_gui: checks the overlay at chosen pixels: the screen border, the grid
// dots and gaps, the "F", "A"
// and "D" labels, the first readout digit of each line, an empty area, and that
// a changed frequency changes the readout (100 kHz -> "100KHz",
// 2 kHz -> "2.00KHz"). Expected pixels follow from the sprite layout (10-pixel
// column pitch, lines at y = 10, 22, 34, glyph offset (1, 2) in the box) and
// the 5x7 glyph rows of the characters involved.
`timescale 1ns/1ps
module tb_gui;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic [19:0] freq = 20'd100_000;
  logic [8:0]  amp = 9'd254;
  logic [6:0]  duty_cycle = 7'd50;
  logic        pixel;
  int checks = 0, failures = 0;
  gui dut (.*);

  task automatic expect_px(input int hx, input int vy, input bit e, input string what);
    hcount = 11'(hx); vcount = 10'(vy); #1;
    checks++;
    if (pixel !== e) begin failures++; $display("FAIL: %s at (%0d,%0d) = %0b", what, hx, vy, pixel); end
  endtask

  initial begin
    // border
    expect_px(0, 300, 1, "left border");
    expect_px(1023, 300, 1, "right border");
    expect_px(500, 0, 1, "top border");
    expect_px(500, 767, 1, "bottom border");
    expect_px(500, 400, 0, "empty screen");
    // dotted grid: vertical lines at x = 128k lit where y % 4 == 0,
    // horizontal lines at y = 96k lit where x % 4 == 0
    expect_px(128, 400, 1, "vertical grid dot");
    expect_px(128, 401, 0, "vertical grid gap");
    expect_px(896, 100, 1, "last vertical grid line");
    expect_px(500, 96, 1, "horizontal grid dot");
    expect_px(501, 96, 0, "horizontal grid gap");
    expect_px(500, 672, 1, "last horizontal grid line");
    expect_px(129, 97, 0, "next to a grid crossing");
    // 'F' at x=10,y=10: glyph row 0 is 11111 -> (11..15, 12) lit
    expect_px(11, 12, 1, "F top bar");
    expect_px(15, 12, 1, "F top bar end");
    expect_px(15, 14, 0, "F open side");
    // 'A' at x=10,y=22: row 0 = 01110 -> (11,24) dark, (12,24) lit
    expect_px(11, 24, 0, "A row0 col0");
    expect_px(12, 24, 1, "A row0 col1");
    // 'D' at x=10,y=34: row 0 = 11110
    expect_px(11, 36, 1, "D row0 col0");
    expect_px(15, 36, 0, "D row0 col4");
    // ':' at x=20: row 1 = 01100 -> (22,13) lit
    expect_px(22, 13, 1, "colon");
    // frequency 100 kHz: slot 0 (x=30) is '1': row 0 = 00100 -> (33,12) lit, (31,12) dark
    expect_px(33, 12, 1, "freq '1'");
    expect_px(31, 12, 0, "freq '1' dark");
    // slot 3 (x=60) is 'K': row 0 = 10001 -> (61,12) and (65,12) lit
    expect_px(61, 12, 1, "freq 'K'");
    expect_px(63, 12, 0, "freq 'K' middle");
    // 2 kHz -> "2.00KHz": slot 0 '2' row0 01110: (31,12) dark (32,12) lit; slot 1 '.'
    freq = 20'd2_000;
    expect_px(32, 12, 1, "freq '2'");
    expect_px(41, 12, 0, "'.' row 0 dark");
    expect_px(42, 17, 1, "'.' row 5 lit");
    // amplitude 2.54V: slot 0 '2', slot 4 'V' row 6 = 00100 -> (73, 30)
    expect_px(73, 30, 1, "amp 'V' tip");
    // duty 50 -> "50%": slot 0 '5' row0 11111 -> (31..35,36)
    expect_px(31, 36, 1, "duty '5'");
    expect_px(35, 36, 1, "duty '5' end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
