// xvga: XGA (1024 x 768, 60 Hz) raster timing generator.
//
// Runs from the 65 MHz pixel clock. hcount counts 0..H_TOTAL-1 pixels of a
// line and vcount 0..V_TOTAL-1 lines of a frame. Both sync pulses are active
// low: hsync is low for hcount in [H_SYNC_START, H_SYNC_END), vsync is low for
// vcount in [V_SYNC_START, V_SYNC_END). blank is high outside the
// H_ACTIVE x V_ACTIVE picture. All outputs are registered and mutually
// aligned: hsync, vsync and blank describe the pixel given by hcount/vcount in
// the same cycle.
//
// The totals and sync positions (1344 clocks per line with sync from pixel
// 1048 to 1183, 806 lines per frame with sync on lines 777 to 782) are those of
// the original design's XGA timing; the parameters allow a smaller raster for
// simulation.
module xvga #(
  parameter int unsigned H_ACTIVE     = 1024,
  parameter int unsigned H_SYNC_START = 1048,
  parameter int unsigned H_SYNC_END   = 1184,
  parameter int unsigned H_TOTAL      = 1344,
  parameter int unsigned V_ACTIVE     = 768,
  parameter int unsigned V_SYNC_START = 777,
  parameter int unsigned V_SYNC_END   = 783,
  parameter int unsigned V_TOTAL      = 806
) (
  input  logic        vclk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,   // active low
  output logic        vsync,   // active low
  output logic        blank
);
  logic [10:0] h_next;
  logic [9:0]  v_next;

  always_comb begin
    h_next = (hcount == 11'(H_TOTAL - 1)) ? 11'd0 : hcount + 11'd1;
    v_next = vcount;
    if (hcount == 11'(H_TOTAL - 1))
      v_next = (vcount == 10'(V_TOTAL - 1)) ? 10'd0 : vcount + 10'd1;
  end

  always_ff @(posedge vclk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= h_next;
      vcount <= v_next;
      hsync  <= !(h_next >= 11'(H_SYNC_START) && h_next < 11'(H_SYNC_END));
      vsync  <= !(v_next >= 10'(V_SYNC_START) && v_next < 10'(V_SYNC_END));
      blank  <= (h_next >= 11'(H_ACTIVE)) || (v_next >= 10'(V_ACTIVE));
    end
  end
endmodule
