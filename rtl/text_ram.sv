// Text RAM of the VGA text overlay: one ASCII code per character cell.
//
// COLS x ROWS cells (128 x 48 = 6144 for 8x16 glyphs on 1024x768), one byte
// each, held in a simple dual-port RAM: port A writes (from the readout
// formatter), port B reads for the raster. A read takes two clocks, as in
// the design description: the address is registered, then the data.
// The RAM starts filled with spaces. Sizes are this design's choice.
module text_ram #(
  parameter int unsigned COLS = 128,
  parameter int unsigned ROWS = 48
) (
  input  logic                              clk,
  input  logic                              we,
  input  logic [$clog2(COLS*ROWS)-1:0]      waddr,
  input  logic [7:0]                        wdata,
  input  logic [$clog2(COLS*ROWS)-1:0]      raddr,
  output logic [7:0]                        rdata
);
  localparam int unsigned CELLS = COLS * ROWS;

  logic [7:0] mem [CELLS];
  logic [$clog2(CELLS)-1:0] raddr_q;

  initial for (int i = 0; i < CELLS; i++) mem[i] = 8'h20;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    raddr_q <= raddr;
    rdata   <= mem[raddr_q];
  end
endmodule
