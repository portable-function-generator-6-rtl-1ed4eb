// tb_amp_logic: checks the amplitude readout text (10 mV units) for values in every range
// against strings built here with $sformatf (truncating division).
`timescale 1ns/1ps
module tb_amp_logic;
  import fg_pkg::*;
  `include "tb_readout_util.svh"
  logic [19:0] number;
  logic [27:0] digits;
  char_t       chars [READOUT_CHARS];
  int checks = 0, failures = 0;
  amp_logic dut (.*);

  function automatic string expected(input int unsigned a);
    if (a < 1000)  return $sformatf("%0d.%02dV", a / 100, a % 100);
    if (a < 10000) return $sformatf("%0d.%0dV", a / 100, (a % 100) / 10);
    return $sformatf("%0dV", a / 100);
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
    try(0); try(5); try(20); try(123); try(254); try(510); try(999); try(1000); try(4321); try(10000);
    repeat (500) try($urandom % 100_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
