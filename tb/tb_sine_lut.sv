// tb_sine_lut: checks every entry of the sine table.
//
// Each of the 1024 addresses is read in random order and compared (one check
// per entry), one clock after the address, with min(255, round(128 + 128*sin(2*pi*i/1024))). The
// four quarter points (128, 255, 128, 0) and the symmetry of the table
// (entry i + entry i+512 = 256, except where the top is clipped to 255) are
// checked on their own.
`timescale 1ns/1ps
module tb_sine_lut;
  logic clk = 0;
  logic [9:0] addr = 0;
  logic [7:0] data;
  int checks = 0, failures = 0;

  sine_lut dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  function automatic int expected(input int i);
    real v;
    int  r;
    v = 128.0 + 128.0 * $sin(2.0 * 3.14159265358979 * real'(i) / 1024.0);
    r = int'($floor(v + 0.5));
    return (r > 255) ? 255 : r;
  endfunction

  int table_out [1024];

  initial begin
    int order [1024];
    int bad;
    foreach (order[i]) order[i] = i;
    for (int i = 1023; i > 0; i--) begin
      int j, t;
      j = $urandom % (i + 1);
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
    bad = 0;
    foreach (order[k]) begin
      @(negedge clk) addr = 10'(order[k]);
      @(negedge clk);
      table_out[order[k]] = data;
      checks++;
      if (data != 8'(expected(order[k]))) begin
        bad++; failures++;
        if (bad < 5) $display("FAIL: entry %0d = %0d, expected %0d", order[k], data, expected(order[k]));
      end
    end
    check(table_out[0] == 128 && table_out[256] == 255 && table_out[512] == 128 && table_out[768] == 0,
          "quarter points 128/255/128/0");
    bad = 0;
    for (int i = 0; i < 512; i++) begin
      int s;
      s = table_out[i] + table_out[i + 512];
      if (!(s == 256 || (s == 255 && (table_out[i] == 255 || table_out[i + 512] == 255)))) bad++;
    end
    check(bad == 0, $sformatf("half-period symmetry broken at %0d entries", bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
