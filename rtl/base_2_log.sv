// Fast binary logarithm of an unsigned Q16.16 number (Turner's method).
//
// Normalisation: the operand is halved N times or doubled M times, one shift
// per clock, until it lies in [1, 2); the integer part of the result is then
// N - M (Eq. 7). Fraction: the normalised mantissa m is squared once per
// clock; if m^2 >= 2 the next fraction bit is 1 and m^2 is halved, otherwise
// the bit is 0 (Eqs. 5-6). After OUT_FRAC squarings the result
//   y = (N - M) + 0.b1 b2 b3 ...   (signed Q16.16, truncated)
// is complete. The mantissa is kept with 30 fraction bits so the rounding of
// the repeated squarings stays below one output LSB.
//
// The algorithm and its iterative nature follow the design description. The
// handshake is this design's: s_ready is high when idle; one operand at a
// time; m_valid pulses once per result. The latency depends on the operand:
// 2 + (N or M) + OUT_FRAC clocks, at most 2 + 16 + 16 = 34 for a Q16.16
// input, where the description reports 170 clocks for its own schedule.
// A zero operand gives m_err and the most negative result.
module base_2_log
  import iepe_pkg::*;
#(
  parameter int unsigned OUT_FRAC = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_valid,
  output logic        s_ready,
  input  logic [31:0] s_x,        // unsigned Q16.16
  output logic        m_valid,
  output q16_t        m_log2,     // signed Q16.16
  output logic        m_err
);
  localparam int unsigned MF = 30;         // mantissa fraction bits
  localparam int unsigned XW = 16 + MF + 2; // Q18.30 working register

  typedef enum logic [1:0] {IDLE, NORM, ITER} state_t;
  state_t state;

  logic [XW-1:0]          x;
  logic [MF+1:0]          mant;   // Q2.30, in [1, 2)
  logic signed [6:0]      expo;
  logic [OUT_FRAC-1:0]    frac;
  logic [$clog2(OUT_FRAC+1)-1:0] it;
  logic [2*MF+3:0]        sq;
  logic [MF+3:0]          sq_s;   // Q4.30

  assign s_ready = (state == IDLE);
  assign sq      = mant * mant;
  assign sq_s    = (MF+4)'(sq >> MF);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= IDLE;
      m_valid <= 1'b0;
      m_err   <= 1'b0;
      m_log2  <= '0;
      x       <= '0;
      mant    <= '0;
      expo    <= '0;
      frac    <= '0;
      it      <= '0;
    end else begin
      m_valid <= 1'b0;
      unique case (state)
        IDLE: if (s_valid) begin
          if (s_x == '0) begin
            m_valid <= 1'b1;
            m_err   <= 1'b1;
            m_log2  <= q16_t'(32'h8000_0000);
          end else begin
            x     <= XW'(s_x) << (MF - QF);
            expo  <= '0;
            state <= NORM;
          end
        end
        NORM: begin
          if (x[XW-1:MF+1] != '0) begin          // x >= 2: halve
            x    <= x >> 1;
            expo <= expo + 7'sd1;
          end else if (!x[MF]) begin             // x < 1: double
            x    <= x << 1;
            expo <= expo - 7'sd1;
          end else begin
            mant  <= x[MF+1:0];
            frac  <= '0;
            it    <= '0;
            state <= ITER;
          end
        end
        ITER: begin
          if (sq_s[MF+1]) begin                  // m^2 >= 2
            frac <= {frac[OUT_FRAC-2:0], 1'b1};
            mant <= (MF+2)'(sq_s >> 1);
          end else begin
            frac <= {frac[OUT_FRAC-2:0], 1'b0};
            mant <= (MF+2)'(sq_s);
          end
          it <= it + 1'b1;
          if (it == $bits(it)'(OUT_FRAC - 1)) begin
            m_valid <= 1'b1;
            m_err   <= 1'b0;
            m_log2  <= (q16_t'(expo) <<< QF) + (q16_t'({frac[OUT_FRAC-2:0], sq_s[MF+1]}) << (QF - OUT_FRAC));
            state   <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
