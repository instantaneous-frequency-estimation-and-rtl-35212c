// Amplifier voltage from the frequency estimate (inverse of Eq. 1).
//
// The sensor oscillator obeys F = (Vref - G*Vamp) / (4*Vpp*R1C1), so
//   Vamp = (Vref - F * 4*Vpp*R1C1) * (1/G).
// That is a multiplication by a constant, a subtraction and a division by a
// constant, done here as a three-stage pipeline (latency 3, as the design
// description gives):
//   1. p = F * K, with K = 4*Vpp*R1C1 held as an unsigned Q0.32 constant
//      (K is about 1e-4 s, far too small for Q16.16), result in Q16.16;
//   2. d = Vref - p;
//   3. Vamp = d * (1/G), with 1/G in Q16.16 (rounded).
// All values are signed Q16.16 volts/hertz. The circuit constants are
// parameters; their defaults are this design's example values.
module center_freq_2_voltage
  import iepe_pkg::*;
#(
  parameter real VREF = iepe_pkg::VREF_V,
  parameter real G    = iepe_pkg::GAIN_G,
  parameter real VPP  = iepe_pkg::VPP_V,
  parameter real R1C1 = iepe_pkg::R1C1_S
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_valid,
  input  q16_t  s_freq,
  output logic  m_valid,
  output q16_t  m_vamp
);
  localparam longint K_Q032   = longint'(4.0 * VPP * R1C1 * 4294967296.0);  // rounded
  localparam q16_t   VREF_Q   = to_q16(VREF);
  localparam q16_t   INV_G_Q  = to_q16(1.0 / G);

  logic signed [63:0] p_full;
  q16_t               p, d;
  logic               v1, v2;
  logic signed [63:0] v_full;

  assign p_full = 64'(s_freq) * K_Q032;
  assign v_full = 64'(d) * 64'(INV_G_Q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; m_valid <= 1'b0;
      p <= '0; d <= '0; m_vamp <= '0;
    end else begin
      v1 <= s_valid; v2 <= v1; m_valid <= v2;
      if (s_valid) p      <= q16_t'(p_full >>> 32);
      if (v1)      d      <= VREF_Q - p;
      if (v2)      m_vamp <= q16_t'(v_full >>> QF);
    end
  end
endmodule
