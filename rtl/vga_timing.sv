// VGA raster timing for 1024x768 at 60 Hz (65 MHz pixel clock).
//
// Horizontal and vertical counters produce the pixel coordinate, the
// display-enable, and the two sync pulses. Defaults are the standard VESA
// XGA timing: 1024 + 24 front porch + 136 sync + 160 back porch = 1344
// clocks per line, 768 + 3 + 6 + 29 = 806 lines per frame, both syncs
// active low. The resolution and pixel clock follow the design description;
// the porch and sync values are the VESA standard's. vblank_start pulses
// for one clock at the first blanked line, when the display logic refreshes
// its memories. All outputs are registered-counter based (no extra delay).
module vga_timing #(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_FP     = 24,
  parameter int unsigned H_SYNC   = 136,
  parameter int unsigned H_BP     = 160,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_FP     = 3,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_BP     = 29
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [10:0] x,
  output logic [9:0]  y,
  output logic        de,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic        vblank_start
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [10:0] hc;
  logic [9:0]  vc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hc <= '0;
      vc <= '0;
    end else if (hc == 11'(H_TOTAL - 1)) begin
      hc <= '0;
      vc <= (vc == 10'(V_TOTAL - 1)) ? '0 : vc + 1'b1;
    end else begin
      hc <= hc + 1'b1;
    end
  end

  assign x            = hc;
  assign y            = vc;
  assign de           = (hc < 11'(H_ACTIVE)) && (vc < 10'(V_ACTIVE));
  assign hsync_n      = !((hc >= 11'(H_ACTIVE + H_FP)) && (hc < 11'(H_ACTIVE + H_FP + H_SYNC)));
  assign vsync_n      = !((vc >= 10'(V_ACTIVE + V_FP)) && (vc < 10'(V_ACTIVE + V_FP + V_SYNC)));
  assign vblank_start = (hc == '0) && (vc == 10'(V_ACTIVE));
endmodule
