// End-to-end testbench of iepe_temp_top at a reduced transform size.
//
// A behavioural ADC produces a tone whose frequency steps through the
// 8-19 kHz band (and once below it, where the bridge equation has no
// positive solution); a behavioural FFT core closes the loop. The transform
// is 256 points (N_FFT_LOG2 = 8) and the ADC converts every 8 clocks so that
// many frames fit in a short run; every other parameter is at its default.
// Checked:
//  * each peak index lies within one bin of the tone that filled the frame;
//  * each temperature equals the conversion chain (Eqs. 1-3, 9) evaluated
//    here in floating point from the reported peak index (0.05 degC), and
//    the error flag is raised exactly when the bridge equation fails;
//  * the buffer wraps (more than 128 results) and reports a full fill;
//  * every VGA frame: each text pixel equals the font glyph of the text RAM
//    cell under it, and the trace has 32 green pixels per valid segment;
//  * after the last result the text RAM holds the expected readout lines.
// Mechanisms counted (each must occur): decimated samples, FFT frames, peak
// results, temperature results, error results, tone changes seen, buffer
// wrap, text refreshes, VGA frames checked. No sample may be dropped in
// normal operation; a final overload phase then converts on every clock
// (the FIR must drop and count samples) and withdraws the FFT core's ready
// (fft_overrun must be set).
module tb_iepe_temp_top;
  import iepe_pkg::*;
  localparam int NL      = 8;
  localparam int N       = 1 << NL;
  localparam int NFRAMES = 150;

  logic clk_sys = 0, clk_pix = 0, rst_sys_n = 0, rst_pix_n = 0;
  always #5    clk_sys = ~clk_sys;
  always #7.69 clk_pix = ~clk_pix;

  real freq_hz = 9000.0;
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

  // Overload controls: 'burst' makes the ADC convert on every clock (the FIR
  // cannot keep up), 'fft_block' withdraws the FFT core's ready.
  logic adc_valid_m, fft_ready_m;
  bit   burst = 0, fft_block = 0;
  assign xadc_valid  = adc_valid_m || burst;
  assign fft_s_ready = fft_ready_m && !fft_block;

  xadc_model #(.PERIOD(8), .DECIM(20)) u_adc (
    .clk(clk_sys), .rst_n(rst_sys_n), .freq_hz(freq_hz), .valid(adc_valid_m), .data(xadc_data));

  fft_model #(.N_LOG2(NL), .W(32), .LATENCY(40)) u_fft (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .s_valid(fft_s_valid), .s_data(fft_s_data), .s_last(fft_s_last), .s_ready(fft_ready_m),
    .m_valid(fft_m_valid), .m_re(fft_m_re), .m_im(fft_m_im), .m_last(fft_m_last));

  iepe_temp_top #(.N_FFT_LOG2(NL)) dut (.*);

  int checks = 0, failures = 0;
  int n_dec = 0, n_frames = 0, n_peaks = 0, n_temps = 0, n_err = 0, n_text = 0, n_vga = 0;
  int n_tone_changes = 0, n_wrap = 0, n_drops = 0, n_overrun = 0;

  initial begin : watchdog
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model of the conversion chain ----
  function automatic real chain_temp(input int idx, output bit err);
    real f, v, r;
    f = real'(idx) * 48000.0 / N;
    v = (2.5 - 4.0 * 1.0 * 25.0e-6 * f) / 2.0;
    r = (5.0 * 1.0 + v * (3.5 + 2.0)) / (5.0 - v * (3.5 / 1.0 + 2.0));
    err = (r <= 0.0);
    if (err) return 0.0;
    return 298.15 * 4300.0 / (298.15 * $ln(r / 10.0) + 4300.0) - 273.4;
  endfunction

  // ---- tone schedule, per FFT input frame ----
  real tones [] = '{9000.0, 11250.0, 14062.5, 16875.0, 18750.0, 6562.5, 12000.0, 8250.0};
  real frame_tone [$];
  bit  freeze = 0;
  int  freeze_frame = -10;
  always @(posedge clk_sys) begin
    if (dut.u_dec.m_valid) n_dec++;
    if (fft_s_valid && fft_s_last) begin
      n_frames++;
      frame_tone.push_back(freq_hz);
      // change tone every 9 frames until the final, steady stretch
      if (n_frames % 9 == 0 && !freeze) freq_hz = tones[(n_frames / 9) % tones.size()];
    end
  end

  // ---- peak and temperature checks ----
  int peak_q [$];
  int last_idx = -1;
  q16_t last_freq;
  q48_t last_temp;
  always @(negedge clk_sys) begin
    if (res_peak_valid && !burst) begin
      real tone; int eb;
      tone = frame_tone.pop_front();
      eb = $rtoi(tone * N / 48000.0 + 0.5);
      n_peaks++;
      checks++;
      // the frames around a tone change hold both tones: accept either
      if ((res_peak_index > eb + 1 || res_peak_index + 1 < eb) && n_peaks % 9 != 1 &&
          !(n_peaks > freeze_frame && n_peaks <= freeze_frame + 2)) begin
        failures++; $display("FAIL peak %0d expected bin %0d", res_peak_index, eb);
      end
      if (last_idx >= 0 && int'(res_peak_index) != last_idx) n_tone_changes++;
      last_idx = res_peak_index;
      peak_q.push_back(res_peak_index);
    end
    if (res_freq_valid) last_freq = res_freq;
    if (res_temp_valid && !burst) begin
      int idx; bit e; real t, got;
      idx = peak_q.pop_front();
      t = chain_temp(idx, e);
      got = real'(res_temp_c) / 65536.0;
      n_temps++;
      checks++;
      if (e) begin
        n_err++;
        if (!res_err) begin failures++; $display("FAIL no error flag, index %0d", idx); end
      end else begin
        last_temp = res_temp_c;
        if (res_err || got - t > 0.05 || t - got > 0.05) begin
          failures++; $display("FAIL temp %f expected %f (index %0d, err %b)", got, t, idx, res_err);
        end
      end
      if (!res_err && dut.u_buf.wptr == 8'(BUF_WRAP - 1)) n_wrap++;
    end
  end
  localparam int BUF_WRAP = 129;

  // ---- VGA output checks ----
  typedef struct packed { logic [10:0] x; logic [9:0] y; logic de; } rast_t;
  rast_t rq [$];
  logic [7:0] font [2048];
  int green, text_bad, fill_at_vbl;
  always @(posedge clk_pix) if (dut.vbl) n_text++;
  always @(negedge clk_pix) begin
    rast_t r;
    rq.push_back({dut.px, dut.py, dut.pde});
    if (rq.size() == 7) begin
      logic [7:0] c; logic t_exp;
      r = rq.pop_front();
      if (r.de) begin
        c = dut.u_text.u_ram.mem[(r.y / 16) * 128 + r.x / 8];
        t_exp = font[{c[6:0], r.y[3:0]}][7 - r.x[2:0]];
        if (t_exp && !(vga_r == 4'hf && vga_g == 4'hf && vga_b == 4'hf)) text_bad++;
        if (!t_exp && vga_r == 4'hf) text_bad++;
        if (vga_g == 4'hf && vga_r == 4'h0) green++;
      end
      if (r.x == 0 && r.y == 768) begin
        // a frame has just been drawn completely
        if (n_vga > 0) begin
          checks += 2;
          if (text_bad != 0) begin failures++; $display("FAIL %0d text pixels wrong", text_bad); end
          if (green != 32 * (fill_at_vbl > 64 ? 64 : fill_at_vbl)) begin
            failures++; $display("FAIL green pixels %0d for fill %0d", green, fill_at_vbl);
          end
        end
        n_vga++;
        green = 0; text_bad = 0;
        fill_at_vbl = dut.u_buf.r_fill;
      end
    end
  end

  function automatic string blanked(input int v, input int width);
    string s;
    s = $sformatf("%0d", v);
    while (s.len() < width) s = {" ", s};
    return s;
  endfunction

  initial begin
    string l0, l1, g0, g1;
    longint ta; int ti, th;
    $readmemh("rtl/font_rom.hex", font);
    repeat (4) @(posedge clk_pix);
    rst_sys_n = 1; rst_pix_n = 1;
    wait (n_temps >= NFRAMES);
    // Hold the tone, let the pipeline fill with it, then two refreshes later
    // the readout must show the last values.
    freeze = 1;
    freeze_frame = n_frames;
    freq_hz = 17250.0;
    wait (n_temps >= NFRAMES + 3);
    repeat (2) @(posedge dut.vbl);
    repeat (100) @(posedge clk_pix);
    l0 = $sformatf("F = %s.%02d Hz ", blanked(int'(last_freq >>> 16), 5),
                   int'((longint'(last_freq[15:0]) * 100) >> 16));
    ta = (last_temp < 0) ? -last_temp : last_temp;
    ti = int'(ta >>> 16); th = int'(((ta & 64'hffff) * 100) >> 16);
    l1 = $sformatf("T = %s%s.%02d%cC   ", (last_temp < 0) ? "-" : " ", blanked(ti, 3), th, 8'h7f);
    g0 = ""; g1 = "";
    for (int c = 0; c < 16; c++) begin
      g0 = {g0, $sformatf("%c", dut.u_text.u_ram.mem[2 * 128 + 4 + c])};
      g1 = {g1, $sformatf("%c", dut.u_text.u_ram.mem[3 * 128 + 4 + c])};
    end
    checks += 2;
    if (g0 != l0) begin failures++; $display("FAIL readout '%s' expected '%s'", g0, l0); end
    if (g1 != l1) begin failures++; $display("FAIL readout '%s' expected '%s'", g1, l1); end
    $display("readout: '%s' / '%s'", g0, g1);
    // mechanisms
    checks += 11;
    if (n_dec == 0)          begin failures++; $display("FAIL no decimated samples"); end
    if (n_frames == 0)       begin failures++; $display("FAIL no FFT frames"); end
    if (n_peaks == 0)        begin failures++; $display("FAIL no peaks"); end
    if (n_temps == 0)        begin failures++; $display("FAIL no temperatures"); end
    if (n_err == 0)          begin failures++; $display("FAIL error path never taken"); end
    if (n_tone_changes == 0) begin failures++; $display("FAIL no tone change seen"); end
    if (n_wrap == 0 || dut.u_buf.r_fill != 128) begin failures++; $display("FAIL buffer never wrapped"); end
    if (n_text < 2)          begin failures++; $display("FAIL no text refresh"); end
    if (n_vga < 2)           begin failures++; $display("FAIL no VGA frame checked"); end
    if (drop_count != 0)     begin failures++; $display("FAIL %0d samples dropped", drop_count); end
    if (fft_overrun)         begin failures++; $display("FAIL FFT overrun"); end
    // Overload: with a conversion every clock a decimated sample arrives every
    // 20 clocks, faster than the 130-clock FIR, so samples must be dropped
    // and counted; then the FFT core refuses one sample.
    burst = 1;
    repeat (4000) @(posedge clk_sys);
    n_drops = drop_count;
    burst = 0;
    fft_block = 1;
    do @(posedge clk_sys); while (!fft_s_valid);
    @(posedge clk_sys);
    fft_block = 0;
    n_overrun = fft_overrun;
    checks += 2;
    if (n_drops < 4000 / 130 - 2 || n_drops > 4000 / 20 + 2) begin
      failures++; $display("FAIL %0d drops during the overload", n_drops);
    end
    if (!fft_overrun) begin failures++; $display("FAIL FFT overrun not flagged"); end
    $display("drops=%0d fft_overrun=%0d", n_drops, n_overrun);
    $display("decimated=%0d frames=%0d peaks=%0d temps=%0d errors=%0d tone_changes=%0d wraps=%0d refreshes=%0d vga_frames=%0d",
             n_dec, n_frames, n_peaks, n_temps, n_err, n_tone_changes, n_wrap, n_text, n_vga);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
