// Self-checking testbench of center_freq_est: random peak indices, one per
// clock, each result compared with index*Fs/N_FFT in Q16.16 worked out here
// with integer arithmetic, and the 2-clock latency checked.
module tb_center_freq_est;
  import iepe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0;
  logic [15:0] s_index = 0;
  logic m_valid;
  q16_t m_freq;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint exp_q [$], t_q [$];

  center_freq_est dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor on the falling edge: inputs about to be taken, outputs settled.
  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (m_valid) begin
      longint e, t;
      e = exp_q.pop_front(); t = t_q.pop_front();
      checks++;
      if (longint'(m_freq) != e || cyc - t != 2) begin
        failures++;
        $display("FAIL freq %0d exp %0d latency %0d", m_freq, e, cyc - t);
      end
    end
    if (rst_n && s_valid) begin
      // F = idx * 48000 / 32768 Hz, times 2^16 for Q16.16
      exp_q.push_back((longint'(s_index) * 48000 * 65536) / 32768);
      t_q.push_back(cyc);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      s_valid <= ($urandom_range(0, 2) != 0);
      s_index <= (n < 3) ? 16'(n * 16383 / 2) : 16'($urandom_range(0, 16383));
    end
    @(posedge clk); s_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
