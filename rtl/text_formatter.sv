// Readout formatter: writes the frequency and temperature as text into the
// text RAM once per screen refresh.
//
// Two 16-character lines starting at cell (ROW0, COL0):
//   "F = ddddd.dd Hz "     frequency estimate, Q16.16 Hz
//   "T = sddd.ddoC   "     temperature, Q48.16 degC, o = degree sign (0x7F)
// Integer parts are printed with leading blanks; the fraction shows tenths
// and hundredths, truncated (h = (fraction * 100) >> 16). Temperatures are
// clamped to +-999.99; negative frequencies print as 0.
// Sequence, started by 'start' (vblank): 1 clock to latch and split the
// values, 5 clocks of four parallel divide-by-10 steps that peel off the
// digits, then 32 clocks writing one character per clock (we/waddr/wdata).
// Writing the values every refresh follows the design description; the
// layout, the number format and the sequencing are this design's choices.
module text_formatter #(
  parameter int unsigned COLS = 128,
  parameter int unsigned ROWS = 48,
  parameter int unsigned ROW0 = 2,
  parameter int unsigned COL0 = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic signed [31:0]            freq,      // Q16.16 Hz
  input  logic signed [63:0]            temp,      // Q48.16 degC
  output logic                          we,
  output logic [$clog2(COLS*ROWS)-1:0]  waddr,
  output logic [7:0]                    wdata,
  output logic                          busy
);
  localparam int unsigned AW = $clog2(COLS*ROWS);
  localparam logic [7:0] DEG = 8'h7f;

  typedef enum logic [1:0] {IDLE, DIGITS, WRITE} state_t;
  state_t state;

  logic [16:0] f_int;   // working values, consumed by /10
  logic [6:0]  f_hun;
  logic [9:0]  t_int;
  logic [6:0]  t_hun;
  logic        t_neg;
  // Digit registers, units first; each field shifts five digits in, the
  // unused upper ones are zero.
  logic [3:0]  f_dig [5];
  logic [3:0]  fh_dig [5];
  logic [3:0]  t_dig [5];
  logic [3:0]  th_dig [5];
  logic [2:0]  step;
  logic [4:0]  pos;

  // Split the inputs into sign, integer part and hundredths.
  logic [63:0] t_abs;
  logic [31:0] f_abs;
  assign t_abs = temp[63] ? 64'(-temp) : 64'(temp);
  assign f_abs = freq[31] ? 32'd0 : 32'(freq);

  // Character at a position of the two lines.
  function automatic logic [7:0] digit_or_blank(input logic [3:0] d, input logic blank);
    return blank ? 8'h20 : (8'h30 + 8'(d));
  endfunction

  logic [7:0] ch;
  always_comb begin
    logic [3:0] col;
    col = pos[3:0];
    ch  = 8'h20;
    if (!pos[4]) begin
      unique case (col)
        4'd0:  ch = "F";
        4'd2:  ch = "=";
        4'd4:  ch = digit_or_blank(f_dig[4], f_dig[4] == 0);
        4'd5:  ch = digit_or_blank(f_dig[3], f_dig[4] == 0 && f_dig[3] == 0);
        4'd6:  ch = digit_or_blank(f_dig[2], f_dig[4] == 0 && f_dig[3] == 0 && f_dig[2] == 0);
        4'd7:  ch = digit_or_blank(f_dig[1], f_dig[4] == 0 && f_dig[3] == 0 && f_dig[2] == 0 && f_dig[1] == 0);
        4'd8:  ch = digit_or_blank(f_dig[0], 1'b0);
        4'd9:  ch = ".";
        4'd10: ch = digit_or_blank(fh_dig[1], 1'b0);
        4'd11: ch = digit_or_blank(fh_dig[0], 1'b0);
        4'd13: ch = "H";
        4'd14: ch = "z";
        default: ch = 8'h20;
      endcase
    end else begin
      unique case (col)
        4'd0:  ch = "T";
        4'd2:  ch = "=";
        4'd4:  ch = t_neg ? "-" : 8'h20;
        4'd5:  ch = digit_or_blank(t_dig[2], t_dig[2] == 0);
        4'd6:  ch = digit_or_blank(t_dig[1], t_dig[2] == 0 && t_dig[1] == 0);
        4'd7:  ch = digit_or_blank(t_dig[0], 1'b0);
        4'd8:  ch = ".";
        4'd9:  ch = digit_or_blank(th_dig[1], 1'b0);
        4'd10: ch = digit_or_blank(th_dig[0], 1'b0);
        4'd11: ch = DEG;
        4'd12: ch = "C";
        default: ch = 8'h20;
      endcase
    end
  end

  assign busy = (state != IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      we    <= 1'b0;
      waddr <= '0;
      wdata <= '0;
      step  <= '0;
      pos   <= '0;
      f_int <= '0; f_hun <= '0; t_int <= '0; t_hun <= '0; t_neg <= 1'b0;
      for (int i = 0; i < 5; i++) begin
        f_dig[i] <= '0; fh_dig[i] <= '0; t_dig[i] <= '0; th_dig[i] <= '0;
      end
    end else begin
      we <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          f_int <= 17'(f_abs[31:16]);
          f_hun <= 7'((32'(f_abs[15:0]) * 32'd100) >> 16);
          if (t_abs[63:16] > 48'd999) begin
            t_int <= 10'd999;
            t_hun <= 7'd99;
          end else begin
            t_int <= 10'(t_abs[63:16]);
            t_hun <= 7'((32'(t_abs[15:0]) * 32'd100) >> 16);
          end
          t_neg <= temp[63];
          step  <= '0;
          state <= DIGITS;
        end
        DIGITS: begin
          for (int i = 0; i < 4; i++) begin
            f_dig[i]  <= f_dig[i+1];
            fh_dig[i] <= fh_dig[i+1];
            t_dig[i]  <= t_dig[i+1];
            th_dig[i] <= th_dig[i+1];
          end
          f_dig[4]  <= 4'(f_int % 17'd10);
          f_int     <= f_int / 17'd10;
          fh_dig[4] <= 4'(f_hun % 7'd10);
          f_hun     <= f_hun / 7'd10;
          t_dig[4]  <= 4'(t_int % 10'd10);
          t_int     <= t_int / 10'd10;
          th_dig[4] <= 4'(t_hun % 7'd10);
          t_hun     <= t_hun / 7'd10;
          step <= step + 1'b1;
          if (step == 3'd4) begin
            pos   <= '0;
            state <= WRITE;
          end
        end
        WRITE: begin
          we    <= 1'b1;
          waddr <= AW'((ROW0 + 32'(pos[4])) * COLS + COL0 + 32'(pos[3:0]));
          wdata <= ch;
          pos   <= pos + 1'b1;
          if (pos == 5'd31) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
