// Peak search over the first half of each magnitude spectrum.
//
// For a real input the spectrum is symmetric, so only bins 0 .. N/2-1
// (DC up to just below Fs/2) are examined. A bin counter, cleared by the
// stream's last flag, walks the frame; the largest magnitude and its index
// are kept (the first of equal maxima wins). One clock after bin N/2-1 is
// received, m_valid pulses with the 16-bit unsigned peak index: latency 1 as
// in the design description. Bins N/2 .. N-1 are ignored until 'last'.
module peak_search #(
  parameter int unsigned N_LOG2 = 15,
  parameter int unsigned MAG_W  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              s_valid,
  input  logic              s_last,
  input  logic [MAG_W-1:0]  s_mag,
  output logic              m_valid,
  output logic [15:0]       m_index,
  output logic [MAG_W-1:0]  m_peak_mag
);
  localparam int unsigned HALF = 1 << (N_LOG2 - 1);

  logic [N_LOG2-1:0] bin;
  logic [MAG_W-1:0]  best_mag;
  logic [15:0]       best_idx;
  logic [MAG_W-1:0]  cand_mag;
  logic [15:0]       cand_idx;

  // The running maximum including the current bin.
  always_comb begin
    if (bin == '0 || s_mag > best_mag) begin
      cand_mag = s_mag;
      cand_idx = 16'(bin);
    end else begin
      cand_mag = best_mag;
      cand_idx = best_idx;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bin        <= '0;
      best_mag   <= '0;
      best_idx   <= '0;
      m_valid    <= 1'b0;
      m_index    <= '0;
      m_peak_mag <= '0;
    end else begin
      m_valid <= 1'b0;
      if (s_valid) begin
        bin <= s_last ? '0 : bin + 1'b1;
        if (bin < N_LOG2'(HALF)) begin
          best_mag <= cand_mag;
          best_idx <= cand_idx;
        end
        if (bin == N_LOG2'(HALF - 1)) begin
          m_valid    <= 1'b1;
          m_index    <= cand_idx;
          m_peak_mag <= cand_mag;
        end
      end
    end
  end
endmodule
