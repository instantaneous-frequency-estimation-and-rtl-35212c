// Temperature history plot: 64 horizontal segments across the screen.
//
// At every vblank_start the block reads the SEGS newest results from the
// temperature buffer (age 0 first, one read per clock, 2-clock read latency)
// and turns each into a screen row:
//   row = clamp(Y_ZERO - ((T_C * PX_PER_DEG) >>> 16), Y_TOP, Y_BOT)
// kept in a small register file. While the frame is drawn, the screen is
// cut into SEGS segments of H_ACTIVE/SEGS pixels (16 for 1024/64); the
// newest result is the rightmost segment. wave_on is high, one clock after
// the pixel coordinate, on the LINE_W rows of each valid segment's line.
// newest_temp/newest_valid give the latest result to the text readout.
// From the design description: 64 segments, read every refresh starting at
// the newest result. Scale, orientation and line width are this design's.
module waveform_display #(
  parameter int unsigned SEGS       = 64,
  parameter int unsigned SEG_W_LOG2 = 4,     // 16-pixel segments
  parameter int unsigned DEPTH      = 128,
  parameter int unsigned Y_TOP      = 160,
  parameter int unsigned Y_BOT      = 735,
  parameter int unsigned Y_ZERO     = 735,   // row of 0 degC
  parameter int unsigned PX_PER_DEG = 8,
  parameter int unsigned LINE_W     = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      vblank_start,
  // temperature buffer read port
  output logic [$clog2(DEPTH)-1:0]  r_age,
  input  logic [63:0]               r_data,
  input  logic [$clog2(DEPTH):0]    r_fill,
  // pixel side
  input  logic [10:0]               x,
  input  logic [9:0]                y,
  output logic                      wave_on,
  output logic signed [63:0]        newest_temp,
  output logic                      newest_valid
);
  localparam int unsigned SW = $clog2(SEGS);

  logic [9:0]  seg_row [SEGS];
  logic [SEGS-1:0] seg_ok;

  // ---- refresh sequencer: issue ages 0..SEGS-1, capture 2 clocks later ----
  logic          busy;
  logic [SW:0]   issue;
  logic [1:0]    vpipe;
  logic [SW-1:0] cap0, cap1;
  logic [$clog2(DEPTH):0] fill_l;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      issue <= '0;
      vpipe <= '0;
      cap0  <= '0;
      cap1  <= '0;
      fill_l <= '0;
    end else begin
      vpipe <= {vpipe[0], 1'b0};
      if (vblank_start && !busy) begin
        busy   <= 1'b1;
        issue  <= '0;
        fill_l <= r_fill;
      end else if (busy) begin
        if (issue < (SW+1)'(SEGS)) begin
          vpipe[0] <= 1'b1;
          cap0     <= SW'(issue);
          issue    <= issue + 1'b1;
        end else if (vpipe == '0) begin
          busy <= 1'b0;
        end
      end
      cap1 <= cap0;
    end
  end
  assign r_age = $clog2(DEPTH)'(issue);

  // Row of a temperature, clamped to the plot area.
  function automatic logic [9:0] temp_row(input logic signed [63:0] t);
    logic signed [63:0] r;
    r = $signed(64'(Y_ZERO)) - ((t * $signed(64'(PX_PER_DEG))) >>> 16);
    if (r < $signed(64'(Y_TOP))) return 10'(Y_TOP);
    if (r > $signed(64'(Y_BOT))) return 10'(Y_BOT);
    return 10'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seg_ok       <= '0;
      newest_temp  <= '0;
      newest_valid <= 1'b0;
    end else if (vpipe[1]) begin
      seg_row[cap1] <= temp_row(r_data);
      seg_ok[cap1]  <= (int'(cap1) < int'(fill_l));
      if (cap1 == '0) begin
        newest_temp  <= r_data;
        newest_valid <= (fill_l != '0);
      end
    end
  end

  // ---- pixel side: newest result at the right edge ----
  logic [SW-1:0] seg_of_x;
  logic [9:0]    row;
  assign seg_of_x = SW'(SEGS - 1) - SW'(x >> SEG_W_LOG2);
  assign row      = seg_row[seg_of_x];

  always_ff @(posedge clk) begin
    if (!rst_n) wave_on <= 1'b0;
    else wave_on <= seg_ok[seg_of_x] && (x < 11'(SEGS << SEG_W_LOG2)) &&
                    (y >= row) && (y < row + 10'(LINE_W));
  end
endmodule
