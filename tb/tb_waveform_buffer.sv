// tb_waveform_buffer: checks the shared waveform buffer against a model.
//
// Random writes and reads go on at the same time for many clocks; every read
// returns, one clock after its address, the model's contents before that
// clock's write (reading the address being written gives the old value).
`timescale 1ns/1ps
module tb_waveform_buffer;
  logic clk = 0, we = 0;
  logic [9:0] wr_addr = 0, rd_addr = 0, wr_data = 0, rd_data;
  int checks = 0, failures = 0;

  waveform_buffer dut (.*);
  always #5 clk = ~clk;

  logic [9:0] model [1024];
  int bad = 0, reads = 0, same_addr = 0;

  initial begin
    // fill, so that every address has a known value
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk) we = 1; wr_addr = 10'(i); wr_data = 10'($urandom);
      model[i] = wr_data;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 20000; n++) begin
      logic [9:0] exp_v;
      @(negedge clk);
      we = ($urandom % 2) == 1;
      wr_addr = 10'($urandom);
      wr_data = 10'($urandom);
      rd_addr = (($urandom % 8) == 0) ? wr_addr : 10'($urandom);
      exp_v = model[rd_addr];
      if (we && rd_addr == wr_addr) same_addr++;
      @(posedge clk);
      if (we) model[wr_addr] = wr_data;
      #1;
      reads++;
      checks++;
      if (rd_data != exp_v) begin
        bad++; failures++;
        if (bad < 5) $display("FAIL: read %0d at %0d, expected %0d", rd_data, rd_addr, exp_v);
      end
    end
    checks++; if (reads != 20000 || same_addr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
