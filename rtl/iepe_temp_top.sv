// Real-time frequency-to-temperature converter for an FM sensor on an IEPE
// line, with a VGA display.
//
// A sensing element (here an NTC thermistor) detunes an oscillator whose
// 8-19 kHz output rides on the IEPE two-wire line. This top connects:
//   100 MHz processing clock (clk_sys):
//     XADC samples -> sample_decimator (to 48 kHz) -> bandpass_fir
//     -> [FFT core, external: fft_s_* out, fft_m_* in]
//     -> square_and_sum -> magnitude_sqrt -> peak_search
//     -> center_freq_est (Hz) -> center_freq_2_voltage (Vamp)
//     -> sensing_resistance (kOhm) -> base_2_log -> natural_logarithm
//     -> convert_temperature (K) -> kelvin_to_celsius -> temperature_buffer
//   65 MHz pixel clock (clk_pix):
//     vga_timing -> vga_text_controller (text_ram + font_rom, 4 clocks)
//     -> waveform_display (1 clock) -> colour mux (1 clock) -> VGA pins
//     text_formatter refreshes the readout each frame from the frequency
//     (crossed by cdc_word_sync) and the newest buffered temperature.
// The ADC and the FFT core are vendor blocks outside this RTL: the ADC's
// conversion strobe and data enter as xadc_valid/xadc_data, the FFT input
// stream leaves on fft_s_* (real samples, 'last' every 2^N_FFT_LOG2 samples)
// and its natural-order output stream returns on fft_m_*.
// Every stage passes a valid pulse (AXI-stream style, no back-pressure); the
// only stages that can refuse data are the serial FIR and the iterative
// logarithm: a sample or result arriving while they are busy is dropped and
// counted (drop_count), which at the intended rates never happens. An FFT
// input sample refused by the core sets fft_overrun.
// Results flagged as errors (no physical resistance, or out of range) are
// reported on res_err but not stored in the buffer, so neither the plot nor
// the readout shows them. Results also appear on res_* for monitoring. VGA colour is 4 bits per
// channel; text is white, the temperature trace green, the plot black.
module iepe_temp_top
#(
  parameter int unsigned N_FFT_LOG2 = iepe_pkg::N_FFT_LOG2,
  parameter int unsigned DECIM      = 20,
  parameter int unsigned FIR_TAPS   = 128,
  parameter int unsigned FFT_W      = 32,
  parameter int unsigned BUF_DEPTH  = 128,
  parameter int unsigned SEGS       = 64
) (
  input  logic               clk_sys,
  input  logic               rst_sys_n,
  input  logic               clk_pix,
  input  logic               rst_pix_n,
  // XADC conversion results
  input  logic               xadc_valid,
  input  logic [11:0]        xadc_data,
  // to the FFT core (real input)
  output logic               fft_s_valid,
  output logic signed [15:0] fft_s_data,
  output logic               fft_s_last,
  input  logic               fft_s_ready,
  // from the FFT core
  input  logic               fft_m_valid,
  input  logic signed [FFT_W-1:0] fft_m_re,
  input  logic signed [FFT_W-1:0] fft_m_im,
  input  logic               fft_m_last,
  // results (clk_sys)
  output logic               res_peak_valid,
  output logic [15:0]        res_peak_index,
  output logic               res_freq_valid,
  output iepe_pkg::q16_t               res_freq,
  output logic               res_res_valid,
  output iepe_pkg::q16_t               res_res,
  output logic               res_temp_valid,
  output iepe_pkg::q48_t               res_temp_c,
  output logic               res_err,
  output logic               fft_overrun,
  output logic [15:0]        drop_count,
  // VGA
  output logic               vga_hsync_n,
  output logic               vga_vsync_n,
  output logic [3:0]         vga_r,
  output logic [3:0]         vga_g,
  output logic [3:0]         vga_b
);
  // ------------------------------------------------------------------
  // Sampling and filtering
  // ------------------------------------------------------------------
  logic               dec_valid, fir_ready, fir_valid;
  logic signed [15:0] dec_data, fir_data;

  sample_decimator #(.DECIM(DECIM)) u_dec (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .s_valid(xadc_valid), .s_data(xadc_data),
    .m_valid(dec_valid), .m_data(dec_data)
  );

  bandpass_fir #(.TAPS(FIR_TAPS)) u_fir (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .s_valid(dec_valid && fir_ready), .s_ready(fir_ready), .s_data(dec_data),
    .m_valid(fir_valid), .m_data(fir_data)
  );

  // Frame the filtered stream into FFT blocks (rectangular window, no overlap).
  logic [N_FFT_LOG2-1:0] frame_cnt;
  always_ff @(posedge clk_sys) begin
    if (!rst_sys_n) begin
      frame_cnt   <= '0;
      fft_s_valid <= 1'b0;
      fft_s_data  <= '0;
      fft_s_last  <= 1'b0;
      fft_overrun <= 1'b0;
    end else begin
      fft_s_valid <= fir_valid;
      if (fir_valid) begin
        fft_s_data <= fir_data;
        fft_s_last <= (frame_cnt == '1);
        frame_cnt  <= frame_cnt + 1'b1;
      end
      if (fft_s_valid && !fft_s_ready) fft_overrun <= 1'b1;
    end
  end

  // ------------------------------------------------------------------
  // Magnitude spectrum and peak
  // ------------------------------------------------------------------
  logic               pw_valid, pw_last, mg_valid, mg_last;
  logic [2*FFT_W-1:0] pw;
  logic [FFT_W-1:0]   mg, pk_mag;
  logic               pk_valid;
  logic [15:0]        pk_idx;

  square_and_sum #(.W(FFT_W)) u_sq (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .s_valid(fft_m_valid), .s_last(fft_m_last), .s_re(fft_m_re), .s_im(fft_m_im),
    .m_valid(pw_valid), .m_last(pw_last), .m_power(pw)
  );

  magnitude_sqrt #(.IN_W(2*FFT_W)) u_sqrt (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .s_valid(pw_valid), .s_last(pw_last), .s_power(pw),
    .m_valid(mg_valid), .m_last(mg_last), .m_mag(mg)
  );

  peak_search #(.N_LOG2(N_FFT_LOG2), .MAG_W(FFT_W)) u_peak (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .s_valid(mg_valid), .s_last(mg_last), .s_mag(mg),
    .m_valid(pk_valid), .m_index(pk_idx), .m_peak_mag(pk_mag)
  );

  // ------------------------------------------------------------------
  // Frequency -> voltage -> resistance -> temperature
  // ------------------------------------------------------------------
  logic  f_valid, v_valid, r_valid, r_err, l2_valid, l2_err, l2_ready;
  logic  ln_valid, ln_err, tk_valid, tk_err, tc_valid, tc_err;
  iepe_pkg::q16_t f_q, v_q, r_q, l2_q, ln_q;
  iepe_pkg::q48_t tk_q, tc_q;
  logic  r_err_hold;

  center_freq_est #(.N_LOG2(N_FFT_LOG2)) u_fest (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .s_valid(pk_valid), .s_index(pk_idx),
    .m_valid(f_valid), .m_freq(f_q)
  );

  center_freq_2_voltage u_f2v (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .s_valid(f_valid), .s_freq(f_q),
    .m_valid(v_valid), .m_vamp(v_q)
  );

  sensing_resistance u_res (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .s_valid(v_valid), .s_vamp(v_q),
    .m_valid(r_valid), .m_res(r_q), .m_err(r_err)
  );

  // A negative (error) resistance is passed to the logarithm as zero.
  base_2_log u_log2 (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .s_valid(r_valid && l2_ready), .s_ready(l2_ready),
    .s_x(r_q[31] ? 32'd0 : 32'(r_q)),
    .m_valid(l2_valid), .m_log2(l2_q), .m_err(l2_err)
  );

  always_ff @(posedge clk_sys) begin
    if (!rst_sys_n) r_err_hold <= 1'b0;
    else if (r_valid && l2_ready) r_err_hold <= r_err;
  end

  natural_logarithm u_ln (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .s_valid(l2_valid), .s_log2(l2_q), .s_err(l2_err || r_err_hold),
    .m_valid(ln_valid), .m_ln(ln_q), .m_err(ln_err)
  );

  convert_temperature u_temp (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .s_valid(ln_valid), .s_ln(ln_q), .s_err(ln_err),
    .m_valid(tk_valid), .m_temp_k(tk_q), .m_err(tk_err)
  );

  kelvin_to_celsius u_k2c (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .s_valid(tk_valid), .s_temp_k(tk_q), .s_err(tk_err),
    .m_valid(tc_valid), .m_temp_c(tc_q), .m_err(tc_err)
  );

  // Dropped data counter (FIR busy or logarithm busy).
  always_ff @(posedge clk_sys) begin
    if (!rst_sys_n) drop_count <= '0;
    else if ((dec_valid && !fir_ready) || (r_valid && !l2_ready))
      drop_count <= drop_count + 1'b1;
  end

  assign res_peak_valid = pk_valid;
  assign res_peak_index = pk_idx;
  assign res_freq_valid = f_valid;
  assign res_freq       = f_q;
  assign res_res_valid  = r_valid;
  assign res_res        = r_q;
  assign res_temp_valid = tc_valid;
  assign res_temp_c     = tc_q;
  assign res_err        = tc_err;

  // ------------------------------------------------------------------
  // Buffer and clock-domain crossing
  // ------------------------------------------------------------------
  localparam int unsigned BAW = $clog2(BUF_DEPTH);
  logic [BAW-1:0] buf_age;
  logic [63:0]    buf_data;
  logic [BAW:0]   buf_fill;

  temperature_buffer #(.DEPTH(BUF_DEPTH), .W(64)) u_buf (
    .clk_w(clk_sys), .rst_w_n(rst_sys_n), .w_valid(tc_valid && !tc_err), .w_data(tc_q),
    .clk_r(clk_pix), .rst_r_n(rst_pix_n), .r_age(buf_age), .r_data(buf_data), .r_fill(buf_fill)
  );

  logic        fpix_valid;
  logic [31:0] fpix;
  cdc_word_sync #(.W(32)) u_fsync (
    .clk_s(clk_sys), .rst_s_n(rst_sys_n), .s_valid(f_valid), .s_data(f_q),
    .clk_d(clk_pix), .rst_d_n(rst_pix_n), .d_valid(fpix_valid), .d_data(fpix)
  );

  // ------------------------------------------------------------------
  // Display
  // ------------------------------------------------------------------
  logic [10:0] px;
  logic [9:0]  py;
  logic        pde, phs, pvs, vbl;

  vga_timing u_vga (
    .clk(clk_pix), .rst_n(rst_pix_n),
    .x(px), .y(py), .de(pde), .hsync_n(phs), .vsync_n(pvs), .vblank_start(vbl)
  );

  localparam int unsigned COLS = 128, ROWS = 48;
  logic                          t_we, t_busy;
  logic [$clog2(COLS*ROWS)-1:0]  t_waddr;
  logic [7:0]                    t_wdata;
  logic                          text_on, de4, hs4, vs4;
  logic [10:0]                   x4;
  logic [9:0]                    y4;
  logic signed [63:0]            newest_t;
  logic                          newest_ok, wave_on;

  text_formatter #(.COLS(COLS), .ROWS(ROWS)) u_fmt (
    .clk(clk_pix), .rst_n(rst_pix_n), .start(vbl),
    .freq(fpix), .temp(newest_t),
    .we(t_we), .waddr(t_waddr), .wdata(t_wdata), .busy(t_busy)
  );

  vga_text_controller #(.COLS(COLS), .ROWS(ROWS)) u_text (
    .clk(clk_pix), .rst_n(rst_pix_n),
    .x(px), .y(py), .de(pde), .hsync_n(phs), .vsync_n(pvs),
    .we(t_we), .waddr(t_waddr), .wdata(t_wdata),
    .text_on(text_on), .x_d(x4), .y_d(y4), .de_d(de4), .hsync_n_d(hs4), .vsync_n_d(vs4)
  );

  waveform_display #(.SEGS(SEGS), .DEPTH(BUF_DEPTH)) u_wave (
    .clk(clk_pix), .rst_n(rst_pix_n), .vblank_start(vbl),
    .r_age(buf_age), .r_data(buf_data), .r_fill(buf_fill),
    .x(x4), .y(y4), .wave_on(wave_on),
    .newest_temp(newest_t), .newest_valid(newest_ok)
  );

  // Align text and raster with the 1-clock waveform stage, then colour.
  logic text5, de5, hs5, vs5;
  always_ff @(posedge clk_pix) begin
    if (!rst_pix_n) begin
      text5 <= 1'b0; de5 <= 1'b0; hs5 <= 1'b1; vs5 <= 1'b1;
      vga_hsync_n <= 1'b1; vga_vsync_n <= 1'b1;
      vga_r <= '0; vga_g <= '0; vga_b <= '0;
    end else begin
      text5 <= text_on; de5 <= de4; hs5 <= hs4; vs5 <= vs4;
      vga_hsync_n <= hs5;
      vga_vsync_n <= vs5;
      if (!de5) begin
        vga_r <= '0; vga_g <= '0; vga_b <= '0;
      end else if (text5) begin
        vga_r <= 4'hf; vga_g <= 4'hf; vga_b <= 4'hf;
      end else if (wave_on) begin
        vga_r <= 4'h0; vga_g <= 4'hf; vga_b <= 4'h0;
      end else begin
        vga_r <= 4'h0; vga_g <= 4'h0; vga_b <= 4'h0;
      end
    end
  end
endmodule
