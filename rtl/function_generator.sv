// function_generator: dual-channel function generator with a VGA scope view.
//
// Two waveform generators (channels A and B) run on the 100 MHz system clock
// and produce square, triangle or sine samples in real time. Both channels go
// to a dual parallel DAC. The selected channel also feeds the sampling window
// (buffer_fill), which catches 1024 samples starting on a rising edge and
// copies them into the shared waveform buffer in the 65 MHz pixel-clock
// domain; the display then clears its frame buffer and draws the window as
// line segments, with frequency, amplitude and duty-cycle readouts on top.
// The same window, reduced to 100 points, is sent to a serial dual DAC that
// steers a laser galvanometer (galvo_scan picks the points, galvo_map turns
// wall positions into mirror angles, dac_mcp4822 sends them).
//
// Phase shift: the generators are identical and start together; phase_ctrl
// stalls A (to increase) or B (to decrease) one clock at a time while the
// corresponding button is held, so B leads A by phase_mult clocks (x 10 ns).
//
// User interface (all inputs debounced, DEBOUNCE_CYCLES system clocks):
//   btn_center           cycle the wave type of the selected channel
//   btn_up / btn_down    frequency (sw_param = 0) or amplitude (sw_param = 1)
//   btn_left / btn_right duty cycle down / up, or, with sw_phase = 1, phase
//                        shift down / up
//   sw_incr_res          step size (see waveform_gen)
//   sw_channel           0: controls and display on channel A, 1: channel B
//   sw_scope             1: the four arrow buttons scale the display instead
//                        (right/left: more/less of the window, down/up: flatter
//                        / taller trace)
//
// Clocks and reset: clk is the 100 MHz system clock and vclk the 65 MHz pixel
// clock; both come from outside (a clock generator). rst is synchronised into
// each domain. The readout values cross to the pixel domain through two
// registers; they change only on a button press, so a rare one-frame glitch in
// a readout digit is the worst case. The scale buttons cross through two-flop
// synchronisers.
//
// From the original design: the block structure and data flow, the clock
// frequencies, the stall-based phase shift and the button/switch functions
// (the assignment of functions to particular switches is this design's).
module function_generator
  import fg_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000,  // 10 ms at 100 MHz
  // XGA raster (1024x768 at 65 MHz); may be reduced for simulation
  parameter int unsigned H_ACTIVE        = 1024,
  parameter int unsigned H_SYNC_START    = 1048,
  parameter int unsigned H_SYNC_END      = 1184,
  parameter int unsigned H_TOTAL         = 1344,
  parameter int unsigned V_ACTIVE        = 768,
  parameter int unsigned V_SYNC_START    = 777,
  parameter int unsigned V_SYNC_END      = 783,
  parameter int unsigned V_TOTAL         = 806
) (
  input  logic       clk,
  input  logic       vclk,
  input  logic       rst,
  input  logic       btn_center,
  input  logic       btn_up,
  input  logic       btn_down,
  input  logic       btn_left,
  input  logic       btn_right,
  input  logic [2:0] sw_incr_res,
  input  logic       sw_param,
  input  logic       sw_phase,
  input  logic       sw_channel,
  input  logic       sw_scope,
  // VGA
  output logic [3:0] vga_red,
  output logic [3:0] vga_green,
  output logic [3:0] vga_blue,
  output logic       hsync,
  output logic       vsync,
  // dual parallel DAC (waveform outputs)
  output logic [7:0] dac_data,
  output logic       dac_sel,
  output logic       dac_wr_n,
  // serial DAC (galvanometer positions)
  output logic       spi_cs_n,
  output logic       spi_sck,
  output logic       spi_sdi,
  output logic       spi_ldac_n,
  // status
  output logic signed [31:0] phase_mult,
  output wave_t      wave_type_a,
  output wave_t      wave_type_b
);
  localparam int unsigned SAMPLE_W = 10;

  // ---------------- resets ----------------
  logic [1:0] rst_c_sync, rst_v_sync;
  logic       rst_c, rst_v;
  always_ff @(posedge clk)  rst_c_sync <= {rst_c_sync[0], rst};
  always_ff @(posedge vclk) rst_v_sync <= {rst_v_sync[0], rst};
  assign rst_c = rst_c_sync[1];
  assign rst_v = rst_v_sync[1];

  // ---------------- debounced controls ----------------
  localparam int unsigned NCTL = 12;
  logic [NCTL-1:0] raw_ctl, ctl;
  assign raw_ctl = {btn_center, btn_up, btn_down, btn_left, btn_right,
                    sw_incr_res, sw_param, sw_phase, sw_channel, sw_scope};
  for (genvar i = 0; i < NCTL; i++) begin : g_db
    debounce #(.DELAY(DEBOUNCE_CYCLES)) u_db (
      .clk(clk), .rst(rst_c), .noisy(raw_ctl[i]), .clean(ctl[i])
    );
  end

  logic       center, up, down, left, right, param, phase_mode, channel, scope;
  logic [2:0] incr_res;
  assign {center, up, down, left, right, incr_res, param, phase_mode, channel, scope} = ctl;

  // Button routing
  logic gen_up, gen_down, gen_left, gen_right;
  logic ph_inc, ph_dec;
  logic sc_right, sc_left, sc_up, sc_down;
  always_comb begin
    gen_up    = !scope && up;
    gen_down  = !scope && down;
    gen_left  = !scope && !phase_mode && left;
    gen_right = !scope && !phase_mode && right;
    ph_inc    = !scope && phase_mode && right;
    ph_dec    = !scope && phase_mode && left;
    sc_right  = scope && right;
    sc_left   = scope && left;
    sc_up     = scope && up;
    sc_down   = scope && down;
  end

  // ---------------- phase shift ----------------
  logic stall_a, stall_b;
  phase_ctrl u_phase (
    .clk(clk), .rst(rst_c), .phase_inc(ph_inc), .phase_dec(ph_dec),
    .stall_a(stall_a), .stall_b(stall_b), .phase_mult(phase_mult)
  );

  // ---------------- waveform generators ----------------
  logic [SAMPLE_W-1:0] wave_a, wave_b;
  logic [19:0] freq_a, freq_b;
  logic [8:0]  amp_a, amp_b;
  logic [6:0]  duty_a, duty_b;

  waveform_gen #(.SAMPLE_W(SAMPLE_W)) u_gen_a (
    .clk(clk), .rst(rst_c), .stall(stall_a),
    .toggle_wave(!channel && center), .incr_res(incr_res), .param(param),
    .up(!channel && gen_up), .down(!channel && gen_down),
    .left(!channel && gen_left), .right(!channel && gen_right),
    .waveform(wave_a), .frequency(freq_a), .amplitude(amp_a),
    .duty_cycle(duty_a), .wave_type(wave_type_a)
  );

  waveform_gen #(.SAMPLE_W(SAMPLE_W)) u_gen_b (
    .clk(clk), .rst(rst_c), .stall(stall_b),
    .toggle_wave(channel && center), .incr_res(incr_res), .param(param),
    .up(channel && gen_up), .down(channel && gen_down),
    .left(channel && gen_left), .right(channel && gen_right),
    .waveform(wave_b), .frequency(freq_b), .amplitude(amp_b),
    .duty_cycle(duty_b), .wave_type(wave_type_b)
  );

  // ---------------- waveform DAC ----------------
  dac_parallel #(.DATA_W(8)) u_dac (
    .clk(clk), .rst(rst_c), .ch_a(wave_a[7:0]), .ch_b(wave_b[7:0]),
    .dac_data(dac_data), .dac_sel(dac_sel), .dac_wr_n(dac_wr_n), .update()
  );

  // ---------------- sampling window ----------------
  logic [SAMPLE_W-1:0] sel_sample;
  always_ff @(posedge clk) sel_sample <= channel ? wave_b : wave_a;

  logic                wr_ready, buf_we, disp_ready;
  logic [9:0]          buf_wr_addr, buf_rd_addr;
  logic [SAMPLE_W-1:0] buf_wr_data, buf_rd_data;

  buffer_fill #(.ADDR_W(10), .SAMPLE_W(SAMPLE_W)) u_window (
    .wave_clk(clk), .wave_rst(rst_c), .sample(sel_sample),
    .data_clk(vclk), .data_rst(rst_v), .ready(disp_ready),
    .wr_ready(wr_ready), .buf_we(buf_we), .buf_addr(buf_wr_addr), .buf_data(buf_wr_data),
    .capturing()
  );

  waveform_buffer #(.ADDR_W(10), .DATA_W(SAMPLE_W)) u_wbuf (
    .clk(vclk), .we(buf_we), .wr_addr(buf_wr_addr), .wr_data(buf_wr_data),
    .rd_addr(buf_rd_addr), .rd_data(buf_rd_data)
  );

  // ---------------- readouts into the pixel domain ----------------
  logic [19:0] freq_c, freq_v1, freq_v;
  logic [8:0]  amp_c, amp_v1, amp_v;
  logic [6:0]  duty_c, duty_v1, duty_v;
  always_ff @(posedge clk) begin
    freq_c <= channel ? freq_b : freq_a;
    amp_c  <= channel ? amp_b  : amp_a;
    duty_c <= channel ? duty_b : duty_a;
  end
  always_ff @(posedge vclk) begin
    freq_v1 <= freq_c;  freq_v <= freq_v1;
    amp_v1  <= amp_c;   amp_v  <= amp_v1;
    duty_v1 <= duty_c;  duty_v <= duty_v1;
  end

  logic [3:0] sc_v1, sc_v;
  always_ff @(posedge vclk) begin
    sc_v1 <= {sc_right, sc_left, sc_up, sc_down};
    sc_v  <= sc_v1;
  end

  // ---------------- display ----------------
  logic [11:0] rgb;
  display #(
    .SAMPLE_W(SAMPLE_W), .BUF_ADDR_W(10),
    .H_ACTIVE(H_ACTIVE), .H_SYNC_START(H_SYNC_START), .H_SYNC_END(H_SYNC_END), .H_TOTAL(H_TOTAL),
    .V_ACTIVE(V_ACTIVE), .V_SYNC_START(V_SYNC_START), .V_SYNC_END(V_SYNC_END), .V_TOTAL(V_TOTAL)
  ) u_display (
    .vclk(vclk), .rst(rst_v), .draw_req(wr_ready),
    .btn_right(sc_v[3]), .btn_left(sc_v[2]), .btn_up(sc_v[1]), .btn_down(sc_v[0]),
    .freq(freq_v), .amp(amp_v), .duty_cycle(duty_v),
    .buf_addr(buf_rd_addr), .buf_data(buf_rd_data), .ready(disp_ready),
    .rgb(rgb), .hsync(hsync), .vsync(vsync),
    .fb_we(), .fb_addr(), .fb_din()
  );
  assign vga_red   = rgb[11:8];
  assign vga_green = rgb[7:4];
  assign vga_blue  = rgb[3:0];

  // ---------------- galvanometer output ----------------
  logic        g_send, g_chan, g_busy, m_send, m_chan, m_busy;
  logic [11:0] g_din, m_din;
  galvo_scan #(.BUF_ADDR_W(10), .SAMPLE_W(SAMPLE_W)) u_galvo (
    .clk(vclk), .rst(rst_v),
    .buf_we(buf_we), .buf_addr(buf_wr_addr), .buf_data(buf_wr_data),
    .dac_send(g_send), .dac_chan(g_chan), .dac_din(g_din), .dac_busy(g_busy),
    .point_idx()
  );

  // wall position -> mirror angle
  galvo_map u_galvo_map (
    .clk(vclk), .rst(rst_v),
    .in_send(g_send), .in_chan(g_chan), .in_pos(g_din), .in_busy(g_busy),
    .dac_send(m_send), .dac_chan(m_chan), .dac_din(m_din), .dac_busy(m_busy)
  );

  dac_mcp4822 #(.SCK_HALF(2)) u_spi_dac (
    .clk(vclk), .rst(rst_v), .send(m_send), .chan(m_chan), .din(m_din),
    .busy(m_busy), .done(), .cs_n(spi_cs_n), .sck(spi_sck), .sdi(spi_sdi),
    .ldac_n(spi_ldac_n)
  );
endmodule
