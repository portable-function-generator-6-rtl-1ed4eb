// sine_lut: 1024-entry, 8-bit sine table with a registered read port.
//
// Entry i holds min(255, round(128 + 128*sin(2*pi*i/1024))), i.e. one full
// period of an offset sine spanning 0..255, as in the original design's table
// (1024 samples, 8 bits). The table is computed at elaboration time from that
// formula rather than loaded from a file. The read is synchronous, like a block
// RAM: data appears on the clock edge after addr is presented (1-cycle latency).
module sine_lut #(
  parameter int unsigned ADDR_W = 10,   // 2**ADDR_W samples per period
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);
  localparam int unsigned DEPTH = 1 << ADDR_W;
  localparam real         PI    = 3.14159265358979323846;

  function automatic logic [DATA_W-1:0] sine_entry(int unsigned i);
    real half, v;
    int  r;
    half = real'(1 << (DATA_W - 1));
    v    = half + half * $sin(2.0 * PI * real'(i) / real'(DEPTH));
    r    = $rtoi(v + 0.5);
    if (r > (1 << DATA_W) - 1) r = (1 << DATA_W) - 1;
    if (r < 0) r = 0;
    return DATA_W'(r);
  endfunction

  logic [DATA_W-1:0] rom [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) rom[i] = sine_entry(i);
  end

  always_ff @(posedge clk) data <= rom[addr];

endmodule
