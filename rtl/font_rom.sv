// Character generator ROM: 128 glyphs of 8x16 pixels (16384 bits).
//
// Address = {ASCII code (7 bits), glyph row (4 bits)}; data = the 8 pixels
// of that row, bit 7 leftmost. The table is loaded from a hex file, one byte
// per line. The set is 7-bit ASCII with code 0x7F (DEL, never displayed)
// replaced by a degree sign; this design's table holds glyphs only for the
// characters the readout uses (digits, F, T, H, z, C, K, = . - : ? and the
// degree sign), drawn as 5x7 dot patterns with doubled rows; all other
// codes are blank. A read takes two clocks (address register, data
// register), as in the design description.
module font_rom #(
  parameter string FONT_FILE = "rtl/font_rom.hex"
) (
  input  logic        clk,
  input  logic [10:0] addr,
  output logic [7:0]  data
);
  logic [7:0]  rom [2048];
  logic [10:0] addr_q;

  initial $readmemh(FONT_FILE, rom);

  always_ff @(posedge clk) begin
    addr_q <= addr;
    data   <= rom[addr_q];
  end
endmodule
