// Self-checking testbench of center_freq_2_voltage: random frequencies across
// and beyond the 8-19 kHz band, each result compared with
// Vamp = (Vref - 4*Vpp*R1C1*F)/G evaluated here in floating point
// (tolerance 4 LSB of Q16.16), and the 3-clock latency checked.
module tb_center_freq_2_voltage;
  import iepe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0;
  q16_t s_freq = 0;
  logic m_valid;
  q16_t m_vamp;
  int checks = 0, failures = 0;
  longint cyc = 0;
  real exp_q [$];
  longint t_q [$];

  center_freq_2_voltage dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (m_valid) begin
      real e, got; longint t;
      e = exp_q.pop_front(); t = t_q.pop_front();
      got = real'(m_vamp) / 65536.0;
      checks++;
      if (got - e > 4.0 / 65536.0 || e - got > 4.0 / 65536.0 || cyc - t != 3) begin
        failures++;
        $display("FAIL vamp %f exp %f latency %0d", got, e, cyc - t);
      end
    end
    if (rst_n && s_valid) begin
      exp_q.push_back((2.5 - 4.0 * 1.0 * 25.0e-6 * (real'(s_freq) / 65536.0)) / 2.0);
      t_q.push_back(cyc);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      s_valid <= ($urandom_range(0, 2) != 0);
      s_freq  <= q16_t'($urandom_range(0, 30000 * 65536 - 1));
    end
    @(posedge clk); s_valid <= 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
