// Natural logarithm from the binary logarithm (Eq. 8): ln x = log2(x) * ln 2.
//
// Changing the base is a multiplication by the constant 1/log2(e) = ln 2,
// held as an unsigned Q0.32 constant for precision. Three pipeline stages
// (latency 3, as in the design description): product, rounding shift back to
// Q16.16, output register. The error flag of the logarithm travels along.
module natural_logarithm
  import iepe_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_valid,
  input  q16_t  s_log2,
  input  logic  s_err,
  output logic  m_valid,
  output q16_t  m_ln,
  output logic  m_err
);
  // round(ln(2) * 2^32)
  localparam logic signed [64:0] LN2_Q032 = 65'sd2977044472;

  logic signed [64:0] prod;
  q16_t               rnd;
  logic               v1, v2, e1, e2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; m_valid <= 1'b0;
      e1 <= 1'b0; e2 <= 1'b0; m_err <= 1'b0;
      prod <= '0; rnd <= '0; m_ln <= '0;
    end else begin
      v1 <= s_valid; v2 <= v1; m_valid <= v2;
      e1 <= s_err;   e2 <= e1; m_err <= e2;
      prod <= 65'(s_log2) * LN2_Q032;
      rnd  <= q16_t'((prod + 65'sd2147483648) >>> 32);
      m_ln <= rnd;
    end
  end
endmodule
