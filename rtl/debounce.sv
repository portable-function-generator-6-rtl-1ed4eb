// debounce: synchronises and debounces a push button or switch.
//
// The raw input passes through a two-flop synchroniser; the clean output
// follows it only after the synchronised level has differed from the output
// for DELAY consecutive clocks, so contact bounce shorter than that never
// reaches the logic. The output changes DELAY + 2 clocks after a clean edge.
//
// The original design debounces every button and switch but does not describe
// the debouncer; this counter-based one, and its 10 ms default at 100 MHz, are
// this design's choices.
module debounce #(
  parameter int unsigned DELAY = 1_000_000
) (
  input  logic clk,
  input  logic rst,
  input  logic noisy,
  output logic clean
);
  logic [1:0] sync;
  logic [$clog2(DELAY + 1)-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync  <= '0;
      count <= '0;
      clean <= 1'b0;
    end else begin
      sync <= {sync[0], noisy};
      if (sync[1] == clean) begin
        count <= '0;
      end else if (count == ($bits(count))'(DELAY - 1)) begin
        count <= '0;
        clean <= sync[1];
      end else begin
        count <= count + 1'b1;
      end
    end
  end
endmodule
