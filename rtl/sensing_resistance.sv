// Sensing-element resistance from the amplifier voltage (Eq. 2).
//
//   R = (Vcc*Rx + Vamp*(Ri + 2*Rx)) / (Vcc - Vamp*(Ri/Rx + 2))
//
// Ri, Rx and Vcc are circuit constants folded at elaboration into three
// Q16.16 constants C0 = Vcc*Rx, C2 = Ri + 2*Rx and C1 = Ri/Rx + 2, so the
// numerator and denominator each need one multiplication and one addition.
// Resistances are in kOhm (Q16.16 cannot hold ohms above 32 k). Pipeline:
//   1. p_num = Vamp*C2, p_den = Vamp*C1
//   2. num = C0 + p_num, den = Vcc - p_den
//   3. signs and magnitudes, overflow/zero-divisor check
//   4..35. 32-stage radix-2 divider: q = (|num| << 16) / |den|
//   36. sign applied
//   37. saturation to Q16.16, output
// Latency 37 clocks, one input per clock, as in the design description.
// m_err flags a zero divisor or a quotient outside Q16.16 (output then
// saturated), or a negative resistance (not physical, output kept).
module sensing_resistance
  import iepe_pkg::*;
#(
  parameter real VCC = iepe_pkg::VCC_V,
  parameter real RX  = iepe_pkg::RX_K,
  parameter real RI  = iepe_pkg::RI_K
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_valid,
  input  q16_t  s_vamp,
  output logic  m_valid,
  output q16_t  m_res,
  output logic  m_err
);
  localparam q16_t C0_Q  = to_q16(VCC * RX);
  localparam q16_t C2_Q  = to_q16(RI + 2.0 * RX);
  localparam q16_t C1_Q  = to_q16(RI / RX + 2.0);
  localparam q16_t VCC_Q = to_q16(VCC);

  // Stage 1: products.
  logic signed [63:0] pn_full, pd_full;
  q16_t               p_num, p_den;
  logic               v1;
  assign pn_full = 64'(s_vamp) * 64'(C2_Q);
  assign pd_full = 64'(s_vamp) * 64'(C1_Q);

  // Stage 2: sums (33 bits so nothing wraps).
  logic signed [32:0] num, den;
  logic               v2;

  // Stage 3: magnitudes and checks.
  logic [47:0] dvd;
  logic [31:0] dvs;
  logic        neg3, err3, v3;
  logic [32:0] num_abs, den_abs;
  assign num_abs = num[32] ? 33'(-num) : 33'(num);
  assign den_abs = den[32] ? 33'(-den) : 33'(den);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
    end else begin
      v1 <= s_valid; v2 <= v1; v3 <= v2;
    end
  end

  always_ff @(posedge clk) begin
    p_num <= q16_t'(pn_full >>> QF);
    p_den <= q16_t'(pd_full >>> QF);
    num   <= 33'(C0_Q) + 33'(p_num);
    den   <= 33'(VCC_Q) - 33'(p_den);
    neg3  <= num[32] ^ den[32];
    // Zero divisor, or quotient too large for the divider's 32 bits.
    err3  <= (den_abs == '0) || (den_abs[32]) || num_abs[32] ||
             ((num_abs >> QF) >= den_abs);
    dvd   <= {num_abs[31:0], 16'h0000};
    dvs   <= (den_abs == '0) ? 32'd1 : den_abs[31:0];
  end

  // Stages 4..35: divider; the tag carries {neg, err}.
  logic        dv_valid;
  logic [31:0] quo, rem;
  logic [1:0]  tag;
  pipelined_divider #(.DW(48), .VW(32), .QW(32), .TW(2)) u_div (
    .clk, .rst_n,
    .s_valid(v3), .s_dividend(dvd), .s_divisor(dvs), .s_tag({neg3, err3}),
    .m_valid(dv_valid), .m_quotient(quo), .m_remainder(rem), .m_tag(tag)
  );

  // Stage 36: signed quotient; stage 37: saturate and output.
  logic signed [33:0] q_s;
  logic               err36, v36;
  always_ff @(posedge clk) begin
    q_s   <= tag[1] ? -34'(quo) : 34'(quo);
    err36 <= tag[0];
    if (!rst_n) begin
      v36 <= 1'b0; m_valid <= 1'b0; m_res <= '0; m_err <= 1'b0;
    end else begin
      v36     <= dv_valid;
      m_valid <= v36;
      if (v36) begin
        if (err36 || q_s > 34'sh7fff_ffff) begin
          m_res <= (q_s < 0) ? q16_t'(32'h8000_0000) : q16_t'(32'h7fff_ffff);
          m_err <= 1'b1;
        end else if (q_s < -34'sh8000_0000) begin
          m_res <= q16_t'(32'h8000_0000);
          m_err <= 1'b1;
        end else begin
          m_res <= q16_t'(q_s);
          m_err <= (q_s < 0);
        end
      end
    end
  end
endmodule
