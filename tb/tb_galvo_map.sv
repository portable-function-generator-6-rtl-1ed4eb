// tb_galvo_map: checks the position-to-angle table of the galvanometer path.
//
// Every one of the 4096 position codes is sent through the block with a random
// channel, and the word that reaches the DAC side one clock later is compared
// (one check per code) with an independent model: the beam angle
// arctan(offset / 10) for an offset from -3 to +3 across the code range,
// rescaled so that the picture's edges are the DAC's end codes. Also checked:
//   * the send pulse is delayed by exactly one clock and the channel follows;
//   * busy towards the sequencer is high in the clock a word is passing and
//     whenever the DAC is busy;
//   * the end codes and the centre of the picture, the table is monotonic, and
//     a step on the wall near the centre needs more angle than one at the edge;
//   * the example of a 3 ft offset at 10 ft distance is an angle of
//     arctan(0.3), about 16.7 degrees.
`timescale 1ns/1ps
module tb_galvo_map;
  logic        clk = 0, rst = 1;
  logic        in_send = 0, in_chan = 0, in_busy;
  logic [11:0] in_pos = '0;
  logic        dac_send, dac_chan, dac_busy = 0;
  logic [11:0] dac_din;

  galvo_map dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  // independent model: offset in feet, angle in radians, scaled to 12 bits
  function automatic int model(input int c);
    real off, ang, full;
    off  = (real'(c) - 2047.5) / 2047.5 * 3.0;
    ang  = $atan(off / 10.0);
    full = $atan(3.0 / 10.0);
    return $rtoi(2047.5 + 2047.5 * ang / full + 0.5);
  endfunction

  int got [4096];

  initial begin
    int bad_val, bad_hs;
    bit ch;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!dac_send && !in_busy, "idle after reset");

    bad_val = 0; bad_hs = 0;
    for (int c = 0; c < 4096; c++) begin
      ch = 1'($urandom);
      in_send = 1; in_chan = ch; in_pos = 12'(c);
      @(negedge clk);
      in_send = 0;
      if (!(dac_send && dac_chan == ch && in_busy)) bad_hs++;
      got[c] = int'(dac_din);
      checks++;
      if (int'(dac_din) != model(c)) begin
        bad_val++; failures++;
        if (bad_val < 5) $display("FAIL: code %0d -> %0d, expected %0d", c, dac_din, model(c));
      end
      @(negedge clk);
      if (dac_send || in_busy) bad_hs++;
    end
    check(bad_hs == 0, $sformatf("%0d handshake errors", bad_hs));

    begin
      int nonmono;
      nonmono = 0;
      for (int c = 1; c < 4096; c++) if (got[c] < got[c-1]) nonmono++;
      check(nonmono == 0, "table is monotonic");
    end
    check(got[0] == 0 && got[4095] == 4095, "picture edges at full deflection");
    check(got[2047] >= 2046 && got[2048] <= 2049, "centre stays at the centre");
    check(got[2148] - got[1948] > got[4095] - got[3895],
          "centre step needs more angle than an edge step");
    begin
      real deg;
      deg = $atan(0.3) * 180.0 / 3.14159265358979;
      check(deg > 16.0 && deg < 17.0, $sformatf("3 ft at 10 ft is %0.2f degrees", deg));
    end

    // DAC busy passes through
    dac_busy = 1; #1;
    check(in_busy, "DAC busy reaches the sequencer");
    dac_busy = 0; #1;
    check(!in_busy, "busy released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
