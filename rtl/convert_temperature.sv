// Thermistor temperature in kelvin from ln(R) (Eq. 3, beta model).
//
//   T = T0*beta / (T0 * ln(R/R0) + beta)
//
// ln(R/R0) is formed as ln(R) - ln(R0) with ln(R0) an elaboration-time
// constant. Pipeline (latency 41, as in the design description):
//   1. d   = ln(R) - ln(R0)
//   2. p   = T0 * d                      (Q16.16)
//   3. den = p + beta
//   4. checks; dividend = (T0*beta in Q16.16) << 16
//   5..40. 36-stage radix-2 divider, quotient = T in Q16.16
//   41. output: 64-bit unsigned kelvin value (Q48.16)
// The 64-bit output width follows the description; the quotient width of
// 36 bits (T below 2^20 K) is this design's choice. m_err marks a
// non-positive or out-of-range denominator or an error on the input; the
// output is then saturated.
module convert_temperature
  import iepe_pkg::*;
#(
  parameter real T0   = iepe_pkg::T0_K,
  parameter real BETA = iepe_pkg::BETA_K,
  parameter real R0   = iepe_pkg::R0_K
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_valid,
  input  q16_t  s_ln,
  input  logic  s_err,
  output logic  m_valid,
  output q48_t  m_temp_k,
  output logic  m_err
);
  localparam int unsigned QW = 36;
  localparam q16_t   LN_R0_Q = to_q16($ln(R0));
  localparam q16_t   T0_Q    = to_q16(T0);
  localparam q16_t   BETA_Q  = to_q16(BETA);
  localparam longint NUM_Q   = longint'(T0 * BETA * 65536.0);  // rounded
  localparam logic [63:0] DIVIDEND = 64'(NUM_Q) << QF;

  logic signed [32:0] d, den;
  logic signed [63:0] p_full;
  q16_t               p;
  logic               v1, v2, v3, v4, e1, e2, e3, e4;
  logic [31:0]        dvs;

  assign p_full = 64'(T0_Q) * 64'(d);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {v1, v2, v3, v4} <= '0;
    end else begin
      v1 <= s_valid; v2 <= v1; v3 <= v2; v4 <= v3;
    end
    e1  <= s_err; e2 <= e1; e3 <= e2;
    d   <= 33'(s_ln) - 33'(LN_R0_Q);
    p   <= q16_t'(p_full >>> QF);
    den <= 33'(p) + 33'(BETA_Q);
    // Denominator must be positive, fit 32 bits and keep the quotient in QW bits.
    e4  <= e3 || den <= 0 || den[32] || ((DIVIDEND >> QW) >= 64'(den));
    dvs <= (den <= 0) ? 32'd1 : den[31:0];
  end

  logic          dv_valid, dv_err;
  logic [QW-1:0] quo;
  logic [31:0]   rem;
  pipelined_divider #(.DW(64), .VW(32), .QW(QW), .TW(1)) u_div (
    .clk, .rst_n,
    .s_valid(v4), .s_dividend(DIVIDEND), .s_divisor(dvs), .s_tag(e4),
    .m_valid(dv_valid), .m_quotient(quo), .m_remainder(rem), .m_tag(dv_err)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_valid <= 1'b0; m_temp_k <= '0; m_err <= 1'b0;
    end else begin
      m_valid <= dv_valid;
      if (dv_valid) begin
        m_temp_k <= dv_err ? q48_t'({1'b0, {63{1'b1}}}) : q48_t'(quo);
        m_err    <= dv_err;
      end
    end
  end
endmodule
