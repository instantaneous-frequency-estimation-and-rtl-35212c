// Self-checking testbench of bandpass_fir: drives random samples, a full-scale
// step and tones, and compares every output with a convolution computed here
// from the same coefficient table; checks the TAPS+2 cycle latency and that
// an in-band 11 kHz tone passes while a 2 kHz tone is rejected.
module tb_bandpass_fir;
  localparam int TAPS = 128;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_ready;
  logic signed [15:0] s_data = 0;
  logic m_valid;
  logic signed [15:0] m_data;
  int checks = 0, failures = 0;
  logic signed [15:0] h [TAPS];
  int hist [TAPS];
  longint cyc = 0;

  bandpass_fir dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_out();
    longint acc = 0;
    for (int k = 0; k < TAPS; k++) acc += longint'(h[k]) * hist[k];
    acc = acc >>> 15;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  task automatic push(input int x, output int y);
    longint t0;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    while (!s_ready) @(posedge clk);
    s_data <= 16'(x); s_valid <= 1;
    @(posedge clk); t0 = cyc;
    s_valid <= 0;
    do @(posedge clk); while (!m_valid);
    y = m_data;
    checks++;
    if (cyc - t0 != TAPS + 3) begin
      failures++; $display("FAIL latency %0d", cyc - t0 - 1);
    end
  endtask

  real pk_in, pk_lo;
  initial begin
    int y, e;
    $readmemh("rtl/fir_coeffs.hex", h);
    foreach (hist[k]) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      int x;
      x = (n < 150) ? $signed(16'($urandom)) : ((n < 220) ? 32767 : -32768);
      push(x, y);
      e = ref_out();
      checks++;
      if (y != e) begin failures++; $display("FAIL n=%0d y=%0d exp=%0d", n, y, e); end
    end
    // Pass band and stop band: peak output for an 11 kHz and a 2 kHz tone.
    pk_in = 0; pk_lo = 0;
    for (int n = 0; n < 400; n++) begin
      push($rtoi(16000.0 * $sin(2.0 * 3.14159265 * 11000.0 * n / 48000.0)), y);
      if (n > TAPS && $itor(y) > pk_in) pk_in = y;
    end
    for (int n = 0; n < 400; n++) begin
      push($rtoi(16000.0 * $sin(2.0 * 3.14159265 * 2000.0 * n / 48000.0)), y);
      if (n > TAPS && $itor(y) > pk_lo) pk_lo = y;
    end
    checks++;
    if (pk_in < 14000.0 || pk_in > 18000.0) begin failures++; $display("FAIL passband peak %f", pk_in); end
    checks++;
    if (pk_lo > 500.0) begin failures++; $display("FAIL stopband peak %f", pk_lo); end
    $display("passband peak %0.1f stopband peak %0.1f", pk_in, pk_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
