// dac_mcp4822: SPI write driver for the MCP4822 dual 12-bit DAC.
//
// A one-clock 'send' pulse while 'busy' is low captures a 16-bit command word
//   bit 15  A/B select (chan: 0 = DAC A, 1 = DAC B)
//   bit 14  don't care, sent as 0
//   bit 13  GA, gain select, sent as 1 (gain x1)
//   bit 12  SHDN, sent as 1 (output active)
//   bits 11..0  the 12-bit code din
// and shifts it out MSB first in SPI mode 0,0: cs_n goes low, sdi changes while
// sck is low and the DAC samples it on the rising sck edge; each sck half
// period lasts SCK_HALF clocks. After the 16th bit cs_n returns high; one clock
// later ldac_n is pulsed low for LDAC_CYCLES clocks to move the word to the output,
// and busy falls. 'done' pulses for one clock at the end. A whole transfer
// takes 2 + 32*SCK_HALF + LDAC_CYCLES + 3 clocks.
//
// The word layout, the MSB-first 16-bit transfer and the latch pulse after the
// transfer follow the original design and the MCP4822 write command. The sck
// divider (default 100 MHz / 6 = 16.7 MHz, within the DAC's 20 MHz limit) and
// the chip-select handling are this design's choices.
module dac_mcp4822 #(
  parameter int unsigned SCK_HALF    = 3,
  parameter int unsigned LDAC_CYCLES = 5
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        send,
  input  logic        chan,
  input  logic [11:0] din,
  output logic        busy,
  output logic        done,
  output logic        cs_n,
  output logic        sck,
  output logic        sdi,
  output logic        ldac_n
);
  typedef enum logic [2:0] {IDLE, SETUP, SHIFT, CS_HIGH, LDAC_LOW, LATCH, FINISH} state_t;
  state_t state;

  logic [15:0] word;
  logic [4:0]  bits_left;
  logic [$clog2(SCK_HALF + LDAC_CYCLES + 1)-1:0] tick;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      busy      <= 1'b0;
      done      <= 1'b0;
      cs_n      <= 1'b1;
      sck       <= 1'b0;
      sdi       <= 1'b0;
      ldac_n    <= 1'b1;
      word      <= '0;
      bits_left <= '0;
      tick      <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (send) begin
          word      <= {chan, 1'b0, 1'b1, 1'b1, din};
          busy      <= 1'b1;
          cs_n      <= 1'b0;
          bits_left <= 5'd16;
          state     <= SETUP;
        end
        SETUP: begin                       // present next bit, sck low
          sdi   <= word[15];
          word  <= word << 1;
          sck   <= 1'b0;
          tick  <= '0;
          state <= SHIFT;
        end
        SHIFT: begin
          tick <= tick + 1'b1;
          if (tick == ($bits(tick))'(SCK_HALF - 1)) sck <= 1'b1;   // DAC samples sdi
          if (tick == ($bits(tick))'(2 * SCK_HALF - 1)) begin
            sck       <= 1'b0;
            bits_left <= bits_left - 1'b1;
            if (bits_left == 5'd1) begin
              state <= CS_HIGH;
            end else begin
              sdi  <= word[15];
              word <= word << 1;
              tick <= '0;
            end
          end
        end
        CS_HIGH: begin
          cs_n  <= 1'b1;
          state <= LDAC_LOW;
        end
        LDAC_LOW: begin                    // latch one clock after cs_n rises
          ldac_n <= 1'b0;
          tick   <= '0;
          state  <= LATCH;
        end
        LATCH: begin
          tick <= tick + 1'b1;
          if (tick == ($bits(tick))'(LDAC_CYCLES - 1)) begin
            ldac_n <= 1'b1;
            state  <= FINISH;
          end
        end
        FINISH: begin
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
