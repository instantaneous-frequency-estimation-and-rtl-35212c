// Behavioural model of the on-chip ADC feeding the pipeline (testbench only).
//
// Every PERIOD clocks it delivers one 12-bit unipolar conversion (valid pulse
// plus data) of a sine tone of frequency freq_hz riding on mid-scale, with a
// little pseudo-random noise. The tone phase advances by freq_hz / FS_ADC
// per conversion, where FS_ADC = DECIM * 48 kHz is the nominal conversion
// rate the decimator expects, so the digital frequency seen after
// decimation is freq_hz / 48 kHz whatever PERIOD the simulation uses.
// PERIOD = 104 gives the real 961.54 kHz at 100 MHz.
module xadc_model #(
  parameter int  PERIOD = 104,
  parameter int  DECIM  = 20,
  parameter real AMPL   = 1200.0,
  parameter int  NOISE  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  real         freq_hz,
  output logic        valid,
  output logic [11:0] data
);
  real phase = 0.0;
  int  cnt = 0;

  always @(posedge clk) begin
    valid <= 1'b0;
    if (rst_n) begin
      if (cnt == PERIOD - 1) begin
        real v;
        cnt   <= 0;
        v     = 2048.0 + AMPL * $sin(2.0 * 3.141592653589793 * phase)
                + real'($urandom_range(0, 2 * NOISE)) - real'(NOISE);
        phase = phase + freq_hz / (48000.0 * DECIM);
        if (phase >= 1.0) phase = phase - 1.0;
        valid <= 1'b1;
        data  <= 12'($rtoi(v));
      end else begin
        cnt <= cnt + 1;
      end
    end
  end
endmodule
