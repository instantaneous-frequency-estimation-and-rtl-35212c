// Self-checking testbench of peak_search with a 64-point frame: random
// spectra with a planted maximum (sometimes in the mirrored upper half, which
// must be ignored, sometimes tied), index and magnitude compared with a scan
// done here, output exactly one clock after bin N/2-1, one result per frame.
module tb_peak_search;
  localparam int NL = 6, N = 1 << NL;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_last = 0;
  logic [31:0] s_mag = 0;
  logic m_valid;
  logic [15:0] m_index;
  logic [31:0] m_peak_mag;
  int checks = 0, failures = 0;

  peak_search #(.N_LOG2(NL)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor on the falling edge: sees the inputs taken at the next rising
  // edge and the outputs of the last one; a result must follow bin N/2-1
  // by exactly one clock.
  int results = 0, bin_cnt = 0, exp_idx = 0;
  logic [31:0] exp_mag;
  logic expect_next = 0;
  always @(negedge clk) begin
    if (m_valid) results++;
    if (expect_next) begin
      checks++;
      if (!m_valid || m_index != 16'(exp_idx) || m_peak_mag != exp_mag) begin
        failures++;
        $display("FAIL v=%b idx=%0d exp=%0d", m_valid, m_index, exp_idx);
      end
    end else if (m_valid) begin
      failures++; $display("FAIL unexpected result");
    end
    expect_next = 0;
    if (rst_n && s_valid) begin
      if (bin_cnt == N/2 - 1) expect_next = 1;
      bin_cnt = s_last ? 0 : bin_cnt + 1;
    end
  end

  initial begin
    logic [31:0] spec [N];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 200; f++) begin
      int best, pk;
      foreach (spec[i]) spec[i] = $urandom_range(0, 1000);
      pk = $urandom_range(0, N/2 - 1);
      spec[pk] = 5000 + f;
      if (f % 3 == 0) spec[N - 1 - pk] = 9000;       // larger mirror: ignored
      if (f % 5 == 0) spec[(pk + 7) % (N/2)] = 5000 + f; // tie
      best = 0;
      for (int i = 1; i < N/2; i++) if (spec[i] > spec[best]) best = i;
      for (int i = 0; i < N; i++) begin
        s_valid <= 1; s_mag <= spec[i]; s_last <= (i == N - 1);
        exp_idx = best; exp_mag = spec[best];
        @(posedge clk);
        if ($urandom_range(0, 3) == 0) begin
          s_valid <= 0; @(posedge clk);
        end
      end
    end
    s_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (results != 200) begin failures++; $display("FAIL %0d results", results); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
