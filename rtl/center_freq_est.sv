// Frequency estimate from the spectral peak: F = PeakIndex * Fs / N_FFT.
//
// N_FFT is a power of two, so the division is a shift. Stage 1 multiplies the
// 16-bit peak index by the integer sample rate, stage 2 rescales the product
// into Q16.16 hertz: F_q16 = (index * FS_HZ) << (16 - N_LOG2). Latency 2 as
// in the design description. For the default 48 kHz / 32768 points one bin is
// 1.46 Hz.
// The result is exact; with these defaults it is a multiple of 96000 LSBs
// (1.46 Hz = 96000/65536), so its low 8 bits are always zero and synthesis
// ties them off.
module center_freq_est
  import iepe_pkg::*;
#(
  parameter int unsigned N_LOG2 = iepe_pkg::N_FFT_LOG2,
  parameter int unsigned FS     = iepe_pkg::FS_HZ
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_valid,
  input  logic [15:0] s_index,
  output logic        m_valid,
  output q16_t        m_freq
);
  logic [47:0] prod;
  logic        v1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; m_valid <= 1'b0; prod <= '0; m_freq <= '0;
    end else begin
      v1      <= s_valid;
      m_valid <= v1;
      if (s_valid) prod <= 48'(s_index) * 48'(FS);
      if (v1)      m_freq <= q16_t'((64'(prod) << QF) >> N_LOG2);
    end
  end
endmodule
