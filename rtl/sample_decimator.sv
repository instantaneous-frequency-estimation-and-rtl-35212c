// Sample-rate decimator between the XADC and the band-pass filter.
//
// The on-chip ADC converts continuously at 961.54 kHz; the processing chain
// runs at 48 kHz. Every DECIM consecutive 12-bit unipolar conversions are
// summed (a first-order boxcar/CIC decimator, which also puts a null on each
// multiple of the output rate), the mid-scale offset is removed and the mean
// is scaled to a signed 16-bit sample with a constant reciprocal multiply:
//   y = ((sum - DECIM*2^(ADC_W-1)) * RECIP) >>> RECIP_SH,
//   RECIP = round(2^(RECIP_SH + 16 - ADC_W) / DECIM).
// The decimation itself is what the design description asks for; the boxcar
// averaging and the 16-bit output format are this design's choices.
//
// Interface: one conversion per s_valid pulse; one output per DECIM inputs,
// m_valid is a one-cycle pulse two cycles after the DECIM-th input.
module sample_decimator #(
  parameter int unsigned ADC_W    = 12,
  parameter int unsigned DECIM    = 20,  // 961.54 kHz / 20 = 48.08 kHz
  parameter int unsigned OUT_W    = 16,
  parameter int unsigned RECIP_SH = 20
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     s_valid,
  input  logic [ADC_W-1:0]         s_data,
  output logic                     m_valid,
  output logic signed [OUT_W-1:0]  m_data
);
  localparam int unsigned SUM_W = ADC_W + $clog2(DECIM) + 1;
  localparam longint RECIP = (longint'(1) << (RECIP_SH + OUT_W - ADC_W)) / longint'(DECIM)
                             + (((longint'(1) << (RECIP_SH + OUT_W - ADC_W)) % longint'(DECIM)) * 2 >= longint'(DECIM) ? 1 : 0);
  localparam longint OFFSET = longint'(DECIM) << (ADC_W - 1);

  logic [SUM_W-1:0]            acc;
  logic [$clog2(DECIM+1)-1:0]  cnt;
  logic signed [SUM_W:0]       centered;
  logic                        cen_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      cnt       <= '0;
      cen_valid <= 1'b0;
      centered  <= '0;
    end else begin
      cen_valid <= 1'b0;
      if (s_valid) begin
        if (cnt == $bits(cnt)'(DECIM - 1)) begin
          centered  <= $signed({1'b0, acc + SUM_W'(s_data)}) - (SUM_W+1)'(OFFSET);
          cen_valid <= 1'b1;
          acc       <= '0;
          cnt       <= '0;
        end else begin
          acc <= acc + SUM_W'(s_data);
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // Scale the centred sum to the output width and saturate.
  logic signed [SUM_W+40:0] scaled;
  assign scaled = (SUM_W+41)'(centered) * (SUM_W+41)'(RECIP) >>> RECIP_SH;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_data  <= '0;
    end else begin
      m_valid <= cen_valid;
      if (cen_valid) begin
        if (scaled > (SUM_W+41)'((longint'(1) << (OUT_W-1)) - 1))
          m_data <= {1'b0, {(OUT_W-1){1'b1}}};
        else if (scaled < -(SUM_W+41)'(longint'(1) << (OUT_W-1)))
          m_data <= {1'b1, {(OUT_W-1){1'b0}}};
        else
          m_data <= OUT_W'(scaled);
      end
    end
  end
endmodule
