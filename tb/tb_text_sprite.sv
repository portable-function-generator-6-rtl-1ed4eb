// tb_text_sprite: renders sprites at a fixed position and compares them with
// bitmaps written out here by hand. Checks that nothing is drawn outside the
// 8 x 11 box, that the glyph sits one column right and two rows down in the
// box, and that the blank code draws nothing.
`timescale 1ns/1ps
module tb_text_sprite;
  logic [10:0] x = 11'd100, hcount;
  logic [9:0]  y = 10'd50,  vcount;
  logic [4:0]  character;
  logic        pixel;
  int checks = 0, failures = 0;
  text_sprite dut (.*);

  // expected 8x11 box pictures ('#' lit)
  string zero_pic [11] = '{
    "........", "........",
    ".-###---", ".#---#--", ".#--##--", ".#-#-#--", ".##--#--", ".#---#--", ".-###---",
    "........", "........"};
  string colon_pic [11] = '{
    "........", "........",
    "........", "..##....", "..##....", "........", "..##....", "..##....", "........",
    "........", "........"};

  task automatic compare(input logic [4:0] c, input string pic [11], input string name);
    int bad;
    bad = 0;
    character = c;
    for (int r = -3; r < 14; r++)
      for (int col = -3; col < 11; col++) begin
        bit exp;
        hcount = 11'(100 + col);
        vcount = 10'(50 + r);
        #1;
        exp = (r >= 0 && r < 11 && col >= 0 && col < 8) ? (pic[r][col] == "#") : 1'b0;
        if (pixel != exp) bad++;
      end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL: sprite %s, %0d pixels wrong", name, bad); end
  endtask

  initial begin
    compare(5'd0, zero_pic, "0");
    compare(5'd20, colon_pic, ":");
    begin
      string blank [11];
      foreach (blank[i]) blank[i] = "........";
      compare(5'd22, blank, "blank");
      compare(5'd31, blank, "unknown code");
    end
    // a different position moves the sprite
    x = 11'd7; y = 10'd3; character = 5'd20;
    hcount = 11'd9; vcount = 10'd6; #1;
    checks++; if (pixel != 1'b1) begin failures++; $display("FAIL: moved sprite"); end
    hcount = 11'd109; vcount = 10'd56; #1;
    checks++; if (pixel != 1'b0) begin failures++; $display("FAIL: old position still lit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
