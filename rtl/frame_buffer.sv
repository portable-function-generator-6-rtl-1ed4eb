// frame_buffer: one bit per pixel of the 1024 x 768 screen (786,432 bits).
//
// A single-port block RAM: on each clock, addr selects a pixel; when we is
// high din is written there, and dout returns the pixel stored at addr one
// clock later (read-before-write). Pixel (x, y) lives at y*1024 + x.
//
// The 1-bit width and the depth of one entry per displayed pixel follow the
// original design; the read-before-write behaviour is this design's choice.
module frame_buffer #(
  parameter int unsigned DEPTH  = 1024 * 768,
  parameter int unsigned ADDR_W = 20
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic              din,
  output logic              dout
);
  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && addr < ADDR_W'(DEPTH)) mem[addr] <= din;
    dout <= (addr < ADDR_W'(DEPTH)) ? mem[addr] : 1'b0;
  end
endmodule
