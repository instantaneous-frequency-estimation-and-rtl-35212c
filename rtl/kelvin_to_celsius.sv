// Kelvin to Celsius (Eq. 9): T_C = T_K - 273.4, 64-bit signed Q48.16.
//
// The result stays 64 bits wide, as the divider produced it, to keep its
// precision. The offset 273.4 is the value the design description uses (the
// exact offset is 273.15; OFFSET can be changed). One register stage
// (latency 1, this design's choice); the error flag travels along.
module kelvin_to_celsius
  import iepe_pkg::*;
#(
  parameter real OFFSET = iepe_pkg::KELVIN_OFFSET
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_valid,
  input  q48_t  s_temp_k,
  input  logic  s_err,
  output logic  m_valid,
  output q48_t  m_temp_c,
  output logic  m_err
);
  localparam q48_t OFFSET_Q = q48_t'(to_q16(OFFSET));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_valid <= 1'b0; m_temp_c <= '0; m_err <= 1'b0;
    end else begin
      m_valid <= s_valid;
      if (s_valid) begin
        m_temp_c <= s_temp_k - OFFSET_Q;
        m_err    <= s_err;
      end
    end
  end
endmodule
