// tb_frame_buffer: checks the one-bit frame buffer at its full size.
//
// The 786,432-pixel memory (the default size) is used through its single
// port: random writes and reads are compared with a model, with the read
// value of a clock being the old contents of the address (read before write).
// Addresses at and above the depth are ignored on write and read as 0.
`timescale 1ns/1ps
module tb_frame_buffer;
  localparam int DEPTH = 1024 * 768;
  logic clk = 0, we = 0, din = 0, dout;
  logic [19:0] addr = 0;
  int checks = 0, failures = 0;

  frame_buffer dut (.*);
  always #5 clk = ~clk;

  bit model [int];
  int bad = 0, out_of_range = 0;

  function automatic bit model_rd(input int a);
    if (a >= DEPTH) return 1'b0;
    return model.exists(a) ? model[a] : 1'b0;
  endfunction

  initial begin
    // clear the addresses that will be used (a small pool, so reads hit writes)
    int pool [256];
    foreach (pool[i]) pool[i] = (i < 8) ? DEPTH - 4 + i : int'($urandom % DEPTH);
    foreach (pool[i]) begin
      @(negedge clk) we = 1; addr = 20'(pool[i]); din = 0;
      if (pool[i] < DEPTH) model[pool[i]] = 0;
    end
    for (int n = 0; n < 20000; n++) begin
      bit exp_v;
      @(negedge clk);
      we = ($urandom % 2) == 1;
      addr = 20'(pool[$urandom % 256]);
      din = 1'($urandom);
      exp_v = model_rd(addr);
      if (addr >= DEPTH) out_of_range++;
      @(posedge clk);
      if (we && addr < DEPTH) model[addr] = din;
      #1;
      checks++;
      if (dout != exp_v) begin
        bad++; failures++;
        if (bad < 5) $display("FAIL: read %0d at %0d, expected %0d", dout, addr, exp_v);
      end
    end
    checks++; if (out_of_range == 0) failures++;
    // the last pixel of the screen and the first beyond it
    @(negedge clk) we = 1; addr = 20'(DEPTH - 1); din = 1;
    @(negedge clk) we = 1; addr = 20'(DEPTH); din = 1;
    @(negedge clk) we = 0; addr = 20'(DEPTH - 1);
    @(negedge clk) checks++; if (dout != 1'b1) begin failures++; $display("FAIL: last pixel"); end
    addr = 20'(DEPTH);
    @(negedge clk) checks++; if (dout != 1'b0) begin failures++; $display("FAIL: beyond the end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
