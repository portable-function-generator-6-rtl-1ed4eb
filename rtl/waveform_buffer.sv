// waveform_buffer: the memory shared by the sampling window and the display.
//
// Holds one captured window of 2**ADDR_W samples. The sampling window writes
// it through the write port; the display's drawing state machine reads it
// through the read port. Both ports use the same clock (the pixel clock); the
// read data appears one clock after rd_addr (registered read).
//
// The depth (1024 samples, 10-bit address) follows the original design; the
// separate read and write ports are this design's choice (the original shares
// one port between writer and reader).
module waveform_buffer #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 10
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data
);
  logic [DATA_W-1:0] mem [1 << ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
