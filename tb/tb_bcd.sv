// tb_bcd: compares bcd against digits computed with division and modulo,
// for the corner values and 2000 random 20-bit numbers.
`timescale 1ns/1ps
module tb_bcd;
  logic [19:0] number;
  logic [27:0] digits;
  int checks = 0, failures = 0;
  bcd dut (.*);

  task automatic try(input int unsigned n);
    int unsigned p;
    number = 20'(n);
    #1;
    p = 1;
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (digits[4*k +: 4] != 4'((n / p) % 10)) begin
        failures++;
        $display("FAIL: %0d digit %0d = %0d", n, k, digits[4*k +: 4]);
      end
      p *= 10;
    end
  endtask

  initial begin
    try(0); try(9); try(10); try(99); try(100); try(999_999); try(1_000_000); try(1_048_575);
    repeat (2000) try($urandom % (1 << 20));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
