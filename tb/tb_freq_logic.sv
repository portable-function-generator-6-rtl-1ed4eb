// tb_freq_logic: checks the frequency readout text for values in every range
// against strings built here with $sformatf (truncating division).
`timescale 1ns/1ps
module tb_freq_logic;
  import fg_pkg::*;
  `include "tb_readout_util.svh"
  logic [19:0] number;
  logic [27:0] digits;
  char_t       chars [READOUT_CHARS];
  int checks = 0, failures = 0;
  freq_logic dut (.*);

  function automatic string expected(input int unsigned f);
    if (f < 1000)    return $sformatf("%0dHz", f);
    if (f < 10000)   return $sformatf("%0d.%02dKHz", f / 1000, (f % 1000) / 10);
    if (f < 100000)  return $sformatf("%0d.%0dKHz", f / 1000, (f % 1000) / 100);
    if (f < 1000000) return $sformatf("%0dKHz", f / 1000);
    return $sformatf("%0d.%02dMHz", f / 1000000, (f % 1000000) / 10000);
  endfunction

  task automatic try(input int unsigned f);
    string got;
    number = 20'(f); digits = dec_digits(f);
    #1;
    got = "";
    for (int i = 0; i < READOUT_CHARS; i++) got = {got, char_str(chars[i])};
    checks++;
    if (got != expected(f)) begin
      failures++; $display("FAIL: %0d -> '%s' expected '%s'", f, got, expected(f));
    end
  endtask

  initial begin
    try(0); try(7); try(42); try(999); try(1000); try(1234); try(9999); try(10000);
    try(12345); try(99999); try(100000); try(201207); try(999999); try(1000000);
    repeat (500) try($urandom % 1_048_576);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
