// Full-size run of iepe_temp_top with every parameter at its default:
// 32768-point frames, decimation by 20, ADC converting every 104 clocks of
// 100 MHz (961.54 kHz), 128-tap filter, 128-entry buffer, XGA display.
// One complete operation: a 12 kHz tone fills one frame (about 0.68 s of
// simulated time); the behavioural FFT core returns its spectrum; the test
// checks the peak index (bin 8192 +- 1), the frequency (Q16.16, exactly
// index * 48000 / 32768), the temperature against the conversion chain
// evaluated here in floating point, that the result was stored in the
// buffer, and that after the next screen refresh the readout text in the
// text RAM shows it. The FFT model is given the documented latency of the
// core, 65060 clocks from last input to last output (32292 clocks of delay
// plus 32768 output clocks), and the test checks the clock counts through
// the spectrum and conversion stages: peak result 2+17+1 clocks after bin
// N/2-1 leaves the core, frequency 2 clocks after the peak, resistance 3+37
// clocks after the frequency, temperature (2 + normalising shifts + 16) +
// 3 + 41 + 1 clocks after the resistance.
module tb_iepe_temp_full;
  import iepe_pkg::*;
  logic clk_sys = 0, clk_pix = 0, rst_sys_n = 0, rst_pix_n = 0;
  always #5    clk_sys = ~clk_sys;
  always #7.69 clk_pix = ~clk_pix;

  real freq_hz = 12000.0;
  logic xadc_valid;
  logic [11:0] xadc_data;
  logic fft_s_valid, fft_s_last, fft_s_ready;
  logic signed [15:0] fft_s_data;
  logic fft_m_valid, fft_m_last;
  logic signed [31:0] fft_m_re, fft_m_im;
  logic res_peak_valid, res_freq_valid, res_res_valid, res_temp_valid, res_err, fft_overrun;
  logic [15:0] res_peak_index, drop_count;
  q16_t res_freq, res_res;
  q48_t res_temp_c;
  logic vga_hsync_n, vga_vsync_n;
  logic [3:0] vga_r, vga_g, vga_b;

  xadc_model #(.PERIOD(104), .DECIM(20)) u_adc (
    .clk(clk_sys), .rst_n(rst_sys_n), .freq_hz(freq_hz), .valid(xadc_valid), .data(xadc_data));

  fft_model #(.N_LOG2(15), .W(32), .LATENCY(65060 - 32768)) u_fft (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .s_valid(fft_s_valid), .s_data(fft_s_data), .s_last(fft_s_last), .s_ready(fft_s_ready),
    .m_valid(fft_m_valid), .m_re(fft_m_re), .m_im(fft_m_im), .m_last(fft_m_last));

  iepe_temp_top dut (.*);

  int checks = 0, failures = 0;
  int peak = -1;
  q16_t fq;
  q48_t tc;
  bit got_temp = 0;

  initial begin : watchdog
    #900ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0, t_last_in = -1, t_last_out = -1, t_half = -1, t_peak = -1, t_freq = -1, t_res = -1, t_temp = -1;
  q16_t rq;
  int nbin = 0;
  always @(posedge clk_sys) cyc <= cyc + 1;

  always @(negedge clk_sys) begin
    if (fft_s_valid && fft_s_last && t_last_in < 0) t_last_in = cyc;
    if (fft_m_valid) begin
      if (nbin == 16383 && t_half < 0) t_half = cyc;
      if (fft_m_last && t_last_out < 0) t_last_out = cyc;
      nbin++;
    end
    if (res_peak_valid && t_peak < 0) t_peak = cyc;
    if (res_freq_valid && t_freq < 0) t_freq = cyc;
    if (res_res_valid && t_res < 0) begin t_res = cyc; rq = res_res; end
    if (res_temp_valid && t_temp < 0) t_temp = cyc;
    if (res_peak_valid) peak = res_peak_index;
    if (res_freq_valid) fq = res_freq;
    if (res_temp_valid && !got_temp) begin tc = res_temp_c; got_temp = 1; end
  end

  initial begin
    real f, v, r, t, got;
    string g0, g1, l1;
    longint ta;
    int msb, shifts;
    repeat (4) @(posedge clk_pix);
    rst_sys_n = 1; rst_pix_n = 1;
    wait (got_temp);
    $display("first result after %0t: peak %0d, F = %f Hz, T = %f C", $time, peak,
             real'(fq) / 65536.0, real'(tc) / 65536.0);
    // the peak is known at mid-spectrum; the core's last bin leaves later
    wait (t_last_out >= 0);
    $display("clocks: last in -> last out %0d, bin N/2-1 -> peak %0d, peak -> F %0d, F -> R %0d",
             t_last_out - t_last_in, t_peak - t_half, t_freq - t_peak, t_res - t_freq);
    checks += 4;
    if (t_last_out - t_last_in != 65060) begin failures++; $display("FAIL FFT latency"); end
    if (t_peak - t_half != 2 + 17 + 1) begin failures++; $display("FAIL spectrum/peak latency"); end
    if (t_freq - t_peak != 2) begin failures++; $display("FAIL center_freq_est latency"); end
    if (t_res - t_freq != 3 + 37) begin failures++; $display("FAIL voltage/resistance latency"); end
    // logarithm: 2 + normalising shifts + 16 squarings; then 3 + 41 + 1
    msb = 0;
    for (int b = 0; b < 32; b++) if (rq[b]) msb = b;
    shifts = (msb >= 16) ? msb - 16 : 16 - msb;
    $display("clocks: R -> T %0d (%0d normalising shifts)", t_temp - t_res, shifts);
    checks++;
    if (t_temp - t_res != 2 + shifts + 16 + 3 + 41 + 1) begin failures++; $display("FAIL temperature latency"); end
    checks++;
    if (peak < 8191 || peak > 8193) begin failures++; $display("FAIL peak %0d", peak); end
    checks++;
    if (longint'(fq) != (longint'(peak) * 48000 * 65536) / 32768) begin failures++; $display("FAIL frequency"); end
    f = real'(peak) * 48000.0 / 32768.0;
    v = (2.5 - 1.0e-4 * f) / 2.0;
    r = (5.0 + 5.5 * v) / (5.0 - 5.5 * v);
    t = 298.15 * 4300.0 / (298.15 * $ln(r / 10.0) + 4300.0) - 273.4;
    got = real'(tc) / 65536.0;
    checks++;
    if (res_err || got - t > 0.05 || t - got > 0.05) begin failures++; $display("FAIL T %f expected %f", got, t); end
    // Stored, and shown after the next refresh.
    repeat (2) @(posedge dut.vbl);
    repeat (100) @(posedge clk_pix);
    checks++;
    if (dut.u_buf.r_fill != 1) begin failures++; $display("FAIL buffer fill %0d", dut.u_buf.r_fill); end
    ta = (tc < 0) ? -tc : tc;
    l1 = $sformatf("T = %s%3d.%02d%cC   ", (tc < 0) ? "-" : " ", int'(ta >>> 16),
                   int'(((ta & 64'hffff) * 100) >> 16), 8'h7f);
    g0 = ""; g1 = "";
    for (int c = 0; c < 16; c++) begin
      g0 = {g0, $sformatf("%c", dut.u_text.u_ram.mem[2 * 128 + 4 + c])};
      g1 = {g1, $sformatf("%c", dut.u_text.u_ram.mem[3 * 128 + 4 + c])};
    end
    $display("readout: '%s' / '%s'", g0, g1);
    checks += 2;
    if (g0 != $sformatf("F = %5d.%02d Hz ", int'(fq >>> 16), int'((longint'(fq[15:0]) * 100) >> 16))) begin
      failures++; $display("FAIL frequency readout");
    end
    if (g1 != l1) begin failures++; $display("FAIL temperature readout, expected '%s'", l1); end
    checks++;
    if (drop_count != 0 || fft_overrun) begin failures++; $display("FAIL drops/overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
