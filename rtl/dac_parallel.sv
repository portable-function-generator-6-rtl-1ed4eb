// dac_parallel: drives a dual-channel parallel-input DAC with both waveforms.
//
// The two output channels share one DATA_W-bit data bus, a channel select and
// an active-low write strobe, as on a dual 8-bit parallel DAC. The driver
// alternates between the channels: each write cycle takes WRITE_CYCLES clocks,
// in which it puts the channel's newest sample and the select on the bus in
// the first clock, holds wr_n low for the next WR_LOW clocks (the DAC takes
// the data on the rising edge of wr_n) and keeps the bus stable for the rest.
// Each channel is thus refreshed every 2*WRITE_CYCLES clocks (every 120 ns at
// 100 MHz with the defaults, i.e. at 8.3 MHz, well above the 1 MHz update rate
// needed for 100 samples per period of a 10 kHz wave). 'update' pulses for one
// clock each time a channel's write completes.
//
// Two 8-bit DACs and the 6-clock write cycle follow the original design; the
// alternation between channels and the strobe placement are this design's.
module dac_parallel #(
  parameter int unsigned DATA_W       = 8,
  parameter int unsigned WRITE_CYCLES = 6,
  parameter int unsigned WR_LOW       = 3
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] ch_a,
  input  logic [DATA_W-1:0] ch_b,
  output logic [DATA_W-1:0] dac_data,
  output logic              dac_sel,    // 0 = channel A, 1 = channel B
  output logic              dac_wr_n,
  output logic              update
);
  logic [$clog2(WRITE_CYCLES)-1:0] phase;
  logic                            chan;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase    <= '0;
      chan     <= 1'b0;
      dac_data <= '0;
      dac_sel  <= 1'b0;
      dac_wr_n <= 1'b1;
      update   <= 1'b0;
    end else begin
      update <= 1'b0;
      if (phase == '0) begin
        dac_data <= chan ? ch_b : ch_a;
        dac_sel  <= chan;
      end
      dac_wr_n <= !(phase >= ($bits(phase))'(1) && phase <= ($bits(phase))'(WR_LOW));
      if (phase == ($bits(phase))'(WR_LOW + 1)) update <= 1'b1;
      if (phase == ($bits(phase))'(WRITE_CYCLES - 1)) begin
        phase <= '0;
        chan  <= ~chan;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end
endmodule
