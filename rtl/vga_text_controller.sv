// VGA text-mode overlay: character cells from a text RAM, pixels from a font
// ROM.
//
// The screen is a grid of 8x16 character cells. For each pixel (x, y) the
// cell_addr address (y/16)*COLS + x/8 goes to the text RAM; two clocks later its
// ASCII code, together with the glyph row y%16, addresses the font ROM; two
// clocks after that the 8-pixel row arrives and bit 7 - x%8 is the pixel.
// Both memories take two clocks, so the low coordinate bits used in the
// second lookup and in the final bit select are delayed by 2 and by 4 clocks
// to stay aligned with the data. Without that alignment a character shows
// pieces of its neighbours. The raster signals (x, y, de, syncs) leave
// delayed by the same LAT = 4 clocks, so text_on lines up with them.
// The RAM-then-ROM structure and the 2-clock memory latency follow the
// design description; the cell_addr grid and widths are this design's.
module vga_text_controller #(
  parameter int unsigned COLS = 128,
  parameter int unsigned ROWS = 48
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // raster in
  input  logic [10:0]                   x,
  input  logic [9:0]                    y,
  input  logic                          de,
  input  logic                          hsync_n,
  input  logic                          vsync_n,
  // text RAM write port
  input  logic                          we,
  input  logic [$clog2(COLS*ROWS)-1:0]  waddr,
  input  logic [7:0]                    wdata,
  // raster out, LAT clocks later
  output logic                          text_on,
  output logic [10:0]                   x_d,
  output logic [9:0]                    y_d,
  output logic                          de_d,
  output logic                          hsync_n_d,
  output logic                          vsync_n_d
);
  localparam int unsigned LAT = 4;
  localparam int unsigned AW  = $clog2(COLS*ROWS);

  // Stage 0: cell_addr address.
  logic [AW-1:0] cell_addr;
  logic [7:0]    code;
  logic [7:0]    glyph_row;
  logic [3:0]    grow_d2;
  always_comb begin
    if (y[9:4] < 6'(ROWS) && x[10:3] < 8'(COLS))
      cell_addr = AW'(y[9:4]) * AW'(COLS) + AW'(x[10:3]);
    else
      cell_addr = '0;
  end

  text_ram #(.COLS(COLS), .ROWS(ROWS)) u_ram (
    .clk, .we, .waddr, .wdata, .raddr(cell_addr), .rdata(code)
  );

  // Raster delay line: index k holds the value k clocks after the input.
  logic [10:0] x_q  [1:LAT];
  logic [9:0]  y_q  [1:LAT];
  logic        de_q [1:LAT];
  logic        hs_q [1:LAT];
  logic        vs_q [1:LAT];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k <= LAT; k++) begin
        x_q[k] <= '0; y_q[k] <= '0; de_q[k] <= 1'b0; hs_q[k] <= 1'b1; vs_q[k] <= 1'b1;
      end
    end else begin
      x_q[1] <= x; y_q[1] <= y; de_q[1] <= de; hs_q[1] <= hsync_n; vs_q[1] <= vsync_n;
      for (int k = 2; k <= LAT; k++) begin
        x_q[k] <= x_q[k-1]; y_q[k] <= y_q[k-1]; de_q[k] <= de_q[k-1];
        hs_q[k] <= hs_q[k-1]; vs_q[k] <= vs_q[k-1];
      end
    end
  end

  // Stage 2: glyph row address from the code and the row delayed by 2.
  assign grow_d2 = y_q[2][3:0];
  font_rom u_rom (
    .clk, .addr({code[6:0], grow_d2}), .data(glyph_row)
  );

  // Stage 4: pixel select with the column delayed by 4.
  assign text_on   = de_q[LAT] && glyph_row[3'd7 - x_q[LAT][2:0]];
  assign x_d       = x_q[LAT];
  assign y_d       = y_q[LAT];
  assign de_d      = de_q[LAT];
  assign hsync_n_d = hs_q[LAT];
  assign vsync_n_d = vs_q[LAT];
endmodule
