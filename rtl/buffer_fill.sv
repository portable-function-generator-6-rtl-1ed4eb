// buffer_fill: the sampling window. Captures one screen's worth of samples.
//
// The module takes the real-time sample stream (one sample per wave_clk) and
// stores 2**ADDR_W consecutive samples that start at the beginning of a rising
// waveform: it waits for a zero sample, then for the first non-zero sample
// after it, so that every window begins on a rising edge. The window is kept in
// an internal dual-clock block RAM and then copied, in the data_clk domain, to
// an external memory (the shared waveform buffer), after which wr_ready pulses
// for one data_clk to tell the reader that a new window is loaded.
//
// Two state machines do this, one per clock:
//   capture (wave_clk): WAIT_ZERO -> CHECK_RISE -> COLLECT -> FULL
//   copy    (data_clk): IDLE -> WAIT_READY -> COPY -> ANNOUNCE -> HOLD -> RELEASE
// They see each other only through two levels, 'full' and 'copied', each
// passed through a two-flop synchroniser (a four-phase handshake). The copy
// starts only while 'ready' (the reader is idle) is high, and after the copy a
// HOLD_CYCLES pause gives the reader time before the next window is taken.
//
// Window element 0 is the last zero sample before the rise. The external write
// port is registered: buf_we/buf_addr/buf_data form one write per data_clk,
// addresses 0..2**ADDR_W-1 in order. wave_rst and data_rst are synchronous
// resets in their own clock domains.
//
// From the original design: the 1024-sample window, the start on a rising
// waveform, the internal BRAM, the two state machines on two clocks, the copy
// to external memory with a ready signal, and the 200-cycle pause. This design's
// own choices: the synchronised handshake between the two machines (instead of
// reading the other machine's state directly) and a true dual-clock RAM.
module buffer_fill #(
  parameter int unsigned ADDR_W      = 10,   // 1024-sample window
  parameter int unsigned SAMPLE_W    = 10,
  parameter int unsigned HOLD_CYCLES = 200
) (
  // capture side
  input  logic                wave_clk,
  input  logic                wave_rst,
  input  logic [SAMPLE_W-1:0] sample,
  // copy side
  input  logic                data_clk,
  input  logic                data_rst,
  input  logic                ready,      // reader may accept a new window
  output logic                wr_ready,   // one-cycle pulse: window copied
  output logic                buf_we,
  output logic [ADDR_W-1:0]   buf_addr,
  output logic [SAMPLE_W-1:0] buf_data,
  output logic                capturing   // capture machine is collecting (wave_clk)
);
  localparam int unsigned DEPTH = 1 << ADDR_W;

  typedef enum logic [1:0] {WAIT_ZERO, CHECK_RISE, COLLECT, FULL} cap_t;
  typedef enum logic [2:0] {IDLE, WAIT_READY, COPY, ANNOUNCE, HOLD, RELEASE} copy_t;

  logic [SAMPLE_W-1:0] window [DEPTH];

  // ---------------- capture machine (wave_clk) ----------------
  cap_t              cap_state;
  logic [ADDR_W-1:0] cap_idx;
  logic              full;
  logic [1:0]        copied_sync;
  logic              copied;

  always_ff @(posedge wave_clk) begin
    if (wave_rst) copied_sync <= '0;
    else          copied_sync <= {copied_sync[0], copied};
  end

  always_ff @(posedge wave_clk) begin
    if (wave_rst) begin
      cap_state <= WAIT_ZERO;
      cap_idx   <= '0;
      full      <= 1'b0;
    end else begin
      unique case (cap_state)
        WAIT_ZERO: if (sample == '0) begin
          cap_state <= CHECK_RISE;
          cap_idx   <= ADDR_W'(1);
        end
        CHECK_RISE: if (sample != '0) begin
          cap_state <= COLLECT;
          cap_idx   <= cap_idx + 1'b1;
        end
        COLLECT: begin
          cap_idx <= cap_idx + 1'b1;
          if (cap_idx == ADDR_W'(DEPTH - 1)) begin
            cap_state <= FULL;
            full      <= 1'b1;
          end
        end
        FULL: begin
          if (copied_sync[1]) full <= 1'b0;
          if (!full && !copied_sync[1]) cap_state <= WAIT_ZERO;
        end
        default: cap_state <= WAIT_ZERO;
      endcase
    end
  end

  // Window write: in WAIT_ZERO / CHECK_RISE the latest zero goes to entry 0.
  always_ff @(posedge wave_clk) begin
    unique case (cap_state)
      WAIT_ZERO:  if (sample == '0) window[0] <= sample;
      CHECK_RISE: window[(sample == '0) ? ADDR_W'(0) : cap_idx] <= sample;
      COLLECT:    window[cap_idx] <= sample;
      default: ;
    endcase
  end

  assign capturing = (cap_state == COLLECT);

  // ---------------- copy machine (data_clk) ----------------
  copy_t               copy_state;
  logic [1:0]          full_sync;
  logic [ADDR_W-1:0]   rd_addr;
  logic                rd_valid;
  logic [ADDR_W-1:0]   rd_addr_q;
  logic [SAMPLE_W-1:0] rd_data;
  logic [$clog2(HOLD_CYCLES + 1)-1:0] hold_cnt;

  always_ff @(posedge data_clk) begin
    if (data_rst) full_sync <= '0;
    else          full_sync <= {full_sync[0], full};
  end

  always_ff @(posedge data_clk) rd_data <= window[rd_addr];

  always_ff @(posedge data_clk) begin
    if (data_rst) begin
      copy_state <= IDLE;
      copied     <= 1'b0;
      rd_addr    <= '0;
      rd_valid   <= 1'b0;
      rd_addr_q  <= '0;
      wr_ready   <= 1'b0;
      buf_we     <= 1'b0;
      buf_addr   <= '0;
      buf_data   <= '0;
      hold_cnt   <= '0;
    end else begin
      wr_ready <= 1'b0;
      // Read pipeline: address -> RAM (1 clk) -> external write port.
      rd_valid  <= (copy_state == COPY);
      rd_addr_q <= rd_addr;
      buf_we    <= rd_valid;
      buf_addr  <= rd_addr_q;
      buf_data  <= rd_data;

      unique case (copy_state)
        IDLE: if (full_sync[1]) copy_state <= WAIT_READY;
        WAIT_READY: if (ready) begin
          copy_state <= COPY;
          rd_addr    <= '0;
        end
        COPY: begin
          rd_addr <= rd_addr + 1'b1;
          if (rd_addr == ADDR_W'(DEPTH - 1)) copy_state <= ANNOUNCE;
        end
        ANNOUNCE: if (!rd_valid && !buf_we) begin
          // last write has left the pipeline
          wr_ready   <= 1'b1;
          hold_cnt   <= '0;
          copy_state <= HOLD;
        end
        HOLD: begin
          hold_cnt <= hold_cnt + 1'b1;
          if (hold_cnt == ($bits(hold_cnt))'(HOLD_CYCLES)) begin
            copied     <= 1'b1;
            copy_state <= RELEASE;
          end
        end
        RELEASE: if (!full_sync[1]) begin
          copied     <= 1'b0;
          copy_state <= IDLE;
        end
        default: copy_state <= IDLE;
      endcase
    end
  end

endmodule
