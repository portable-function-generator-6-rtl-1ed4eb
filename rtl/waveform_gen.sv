// waveform_gen: real-time square / triangle / sine sample generator.
//
// One sample is produced per clock. The wave period is held as a period
// multiplier P, the number of clocks in one period (100 MHz clock: P = 100 is
// 1 MHz, P = 100_000 is 1 kHz). A counter runs 0..P-1 and:
//   * square:   sample = height while count < D, else 0, with D = P*duty/100;
//   * triangle: a fixed-point accumulator with 8 fractional bits climbs by
//               step_up = (height<<8)/D up to the peak at count D, then falls by
//               step_down = (height<<8)/(P-D); the fraction is dropped on output;
//   * sine:     a table index with 14 fractional bits advances by
//               skip = (1024<<14)/P per clock; the 8-bit table value is scaled
//               by height/255.
// Whenever amplitude, frequency or duty cycle change, D, the two step sizes and
// the sine skip are recomputed in the next clock and the period restarts.
//
// User controls are level inputs; each acts once on its rising edge. up/down
// change frequency (param = 0) or amplitude (param = 1); left/right lower/raise
// the duty cycle; toggle_wave cycles square -> triangle -> sine. incr_res
// selects the step: frequency +-1 Hz, 10 Hz ... 100 kHz (0..5); amplitude about
// 0.2 V, 1 V, 1.5 V, 2.5 V of a 5 V full scale (0..3); duty 5, 10, 20, 50 %.
// New presses on several buttons in one clock are served in the priority
// up, down, left, right. A frequency step converts P to a frequency in units of
// the step, adds or subtracts one unit, and converts back, clamped to
// [MIN_PERIOD, MAX_PERIOD].
//
// stall = 1 freezes the whole generator for that clock (no sample, no counter
// advance, no control handling); a second generator can thus be delayed by a
// whole number of clocks to create a phase shift.
//
// Outputs: waveform (sample, zero-extended to SAMPLE_W), frequency in Hz,
// amplitude in units of about 10 mV (top 8 bits of the height shifted left by
// one), duty cycle in percent and the current wave type. All are registered;
// the sine path adds one clock of table latency.
//
// From the original design: the period multiplier, the 1 MHz..1 kHz range, the
// reset values (half amplitude, 50 % duty, P = 1000, sine), the 8 and 14
// fractional bits, the step sets and the stall mechanism. This design's own
// choices: an active-high synchronous reset, per-button edge detection, the
// amplitude steps derived from the stated voltages, and 32-bit arithmetic.
module waveform_gen
  import fg_pkg::*;
#(
  parameter int unsigned AMP_W       = 8,        // amplitude resolution (8..12)
  parameter int unsigned SAMPLE_W    = 10,       // width of the sample output
  parameter int unsigned CLK_HZ      = SYS_CLK_HZ,
  parameter int unsigned MIN_PERIOD  = 100,      // 1 MHz at 100 MHz
  parameter int unsigned MAX_PERIOD  = 100_000,  // 1 kHz at 100 MHz
  parameter int unsigned INIT_PERIOD = 1_000     // 100 kHz at reset
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                stall,
  input  logic                toggle_wave,
  input  logic [2:0]          incr_res,
  input  logic                param,      // 0: up/down = frequency, 1: amplitude
  input  logic                up,
  input  logic                down,
  input  logic                left,
  input  logic                right,
  output logic [SAMPLE_W-1:0] waveform,
  output logic [19:0]         frequency,  // Hz
  output logic [8:0]          amplitude,  // ~10 mV units
  output logic [6:0]          duty_cycle, // percent
  output wave_t               wave_type
);
  localparam logic [31:0] MAX_H = 32'((1 << AMP_W) - 1);
  // Amplitude steps: 0.2 V, 1 V, 1.5 V, 2.5 V out of 5 V full scale.
  localparam logic [31:0] AMP_STEP0 = (MAX_H * 4  + 50) / 100;
  localparam logic [31:0] AMP_STEP1 = (MAX_H * 20 + 50) / 100;
  localparam logic [31:0] AMP_STEP2 = (MAX_H * 30 + 50) / 100;
  localparam logic [31:0] AMP_STEP3 = (MAX_H * 50 + 50) / 100;

  // ---------------- state ----------------
  logic [31:0]      period;       // period multiplier P
  logic [AMP_W-1:0] height;       // peak amplitude
  logic [6:0]       duty;
  logic             recalc;

  logic [31:0]      duty_max;     // D
  logic [31:0]      step_up, step_down;
  logic [31:0]      tri_acc;      // triangle height, 8 fractional bits
  logic [31:0]      count;        // position within the period
  logic [23:0]      sine_idx;     // table index, 14 fractional bits
  logic [23:0]      sine_skip;

  logic toggle_q, up_q, down_q, left_q, right_q;

  // Sine table: index [23:14] addresses the 1024 entries.
  logic [7:0] sine_out;
  sine_lut #(.ADDR_W(10), .DATA_W(8)) u_sine (
    .clk (clk),
    .addr(sine_idx[23:14]),
    .data(sine_out)
  );

  // ---------------- control arithmetic ----------------
  function automatic logic [31:0] pow10(input logic [2:0] r);
    case (r)
      3'd0: return 32'd1;
      3'd1: return 32'd10;
      3'd2: return 32'd100;
      3'd3: return 32'd1_000;
      3'd4: return 32'd10_000;
      default: return 32'd100_000;
    endcase
  endfunction

  function automatic logic [31:0] clamp_period(input logic [31:0] p);
    if (p < MIN_PERIOD) return MIN_PERIOD;
    if (p > MAX_PERIOD) return MAX_PERIOD;
    return p;
  endfunction

  logic [31:0] freq_now, res_unit, n_units, freq_up, freq_down;
  logic [31:0] period_up, period_down;
  always_comb begin
    freq_now  = CLK_HZ / period;
    res_unit  = pow10(incr_res);
    n_units   = freq_now / res_unit;
    freq_up   = (n_units + 1) * res_unit;
    freq_down = (n_units > 1) ? (n_units - 1) * res_unit : freq_now;
    period_up   = clamp_period(CLK_HZ / freq_up);
    period_down = clamp_period(CLK_HZ / freq_down);
  end

  logic [31:0] amp_step;
  logic [6:0]  duty_step;
  always_comb begin
    case (incr_res[1:0])
      2'd0: begin amp_step = AMP_STEP0; duty_step = 7'd5;  end
      2'd1: begin amp_step = AMP_STEP1; duty_step = 7'd10; end
      2'd2: begin amp_step = AMP_STEP2; duty_step = 7'd20; end
      default: begin amp_step = AMP_STEP3; duty_step = 7'd50; end
    endcase
  end

  logic [AMP_W-1:0] height_up, height_down;
  logic [6:0]       duty_up, duty_down;
  always_comb begin
    height_up   = (32'(height) + amp_step > MAX_H) ? AMP_W'(MAX_H) : AMP_W'(32'(height) + amp_step);
    height_down = (32'(height) < amp_step) ? '0 : AMP_W'(32'(height) - amp_step);
    duty_up     = (8'(duty) + 8'(duty_step) > 8'd100) ? 7'd100 : duty + duty_step;
    duty_down   = (duty <= duty_step) ? 7'd1 : duty - duty_step;
  end

  // Per-period constants recomputed after a change.
  logic [31:0] d_calc, up_calc, down_calc, peak_fx;
  logic [23:0] skip_calc;
  always_comb begin
    d_calc    = (period * 32'(duty)) / 32'd100;
    peak_fx   = 32'(height) << 8;
    up_calc   = (d_calc == 0) ? peak_fx : peak_fx / d_calc;
    down_calc = (period == d_calc) ? peak_fx : peak_fx / (period - d_calc);
    skip_calc = 24'((32'd1024 << 14) / period);
  end

  // ---------------- main sequential process ----------------
  logic new_toggle, new_up, new_down, new_left, new_right;
  assign new_toggle = toggle_wave & ~toggle_q;
  assign new_up     = up    & ~up_q;
  assign new_down   = down  & ~down_q;
  assign new_left   = left  & ~left_q;
  assign new_right  = right & ~right_q;

  logic [31:0] next_count;
  assign next_count = (count + 1 < period) ? count + 1 : 32'd0;

  logic [31:0] tri_next_up, tri_next_down;
  assign tri_next_up   = (tri_acc + step_up > peak_fx) ? peak_fx : tri_acc + step_up;
  assign tri_next_down = (tri_acc < step_down) ? 32'd0 : tri_acc - step_down;

  always_ff @(posedge clk) begin
    if (rst) begin
      period     <= INIT_PERIOD;
      height     <= AMP_W'(MAX_H >> 1);
      duty       <= 7'd50;
      wave_type  <= WAVE_SINE;
      recalc     <= 1'b1;
      duty_max   <= '0;
      step_up    <= '0;
      step_down  <= '0;
      tri_acc    <= '0;
      count      <= '0;
      sine_idx   <= '0;
      sine_skip  <= '0;
      waveform   <= '0;
      frequency  <= '0;
      amplitude  <= '0;
      duty_cycle <= 7'd50;
      toggle_q   <= 1'b0;
      up_q       <= 1'b0;
      down_q     <= 1'b0;
      left_q     <= 1'b0;
      right_q    <= 1'b0;
    end else if (!stall) begin
      toggle_q <= toggle_wave;
      up_q     <= up;
      down_q   <= down;
      left_q   <= left;
      right_q  <= right;

      frequency  <= 20'(CLK_HZ / period);
      amplitude  <= 9'({height[AMP_W-1 -: 8], 1'b0});
      duty_cycle <= duty;

      if (new_toggle)
        wave_type <= (wave_type == WAVE_SINE) ? WAVE_SQUARE : wave_t'(wave_type + 2'd1);

      if (new_up) begin
        if (param) height <= AMP_W'(height_up);
        else       period <= period_up;
        recalc <= 1'b1;
      end else if (new_down) begin
        if (param) height <= AMP_W'(height_down);
        else       period <= period_down;
        recalc <= 1'b1;
      end else if (new_left) begin
        duty   <= duty_down;
        recalc <= 1'b1;
      end else if (new_right) begin
        duty   <= duty_up;
        recalc <= 1'b1;
      end

      if (recalc) begin
        // Recompute per-period constants and restart the period.
        if (!(new_up | new_down | new_left | new_right)) recalc <= 1'b0;
        duty_max  <= d_calc;
        step_up   <= up_calc;
        step_down <= down_calc;
        sine_skip <= skip_calc;
        count     <= '0;
        tri_acc   <= '0;
        sine_idx  <= '0;
      end else begin
        count <= next_count;
        unique case (wave_type)
          WAVE_SQUARE: begin
            waveform <= (count < duty_max) ? SAMPLE_W'(height) : '0;
          end
          WAVE_TRIANGLE: begin
            if (count == 0) begin
              waveform <= '0;
              tri_acc  <= step_up;
            end else if (count < duty_max) begin
              waveform <= SAMPLE_W'(tri_acc >> 8);
              tri_acc  <= tri_next_up;
            end else if (count == duty_max) begin
              waveform <= SAMPLE_W'(height);
              tri_acc  <= peak_fx;
            end else begin
              waveform <= SAMPLE_W'(tri_next_down >> 8);
              tri_acc  <= tri_next_down;
            end
          end
          default: begin // WAVE_SINE
            sine_idx <= (next_count == 0) ? 24'd0 : sine_idx + sine_skip;
            waveform <= SAMPLE_W'((32'(sine_out) * 32'(height)) / 32'd255);
          end
        endcase
      end
    end
  end

endmodule
