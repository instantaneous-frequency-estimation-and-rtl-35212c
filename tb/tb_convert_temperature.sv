// Self-checking testbench of convert_temperature: random ln(R) values from a
// few ohms to hundreds of kOhm (R in kOhm), each result compared with the
// beta equation T = T0*beta/(T0*ln(R/R0)+beta) evaluated here with
// T0 = 298.15 K, beta = 4300 K, R0 = 10 kOhm; a denominator <= 0 must raise
// m_err; latency 41 checked.
module tb_convert_temperature;
  import iepe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_err = 0;
  q16_t s_ln = 0;
  logic m_valid, m_err;
  q48_t m_temp_k;
  int checks = 0, failures = 0, n_err = 0;
  longint cyc = 0;
  real exp_q [$];
  longint t_q [$];

  convert_temperature dut (.*);
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
      got = real'(m_temp_k) / 65536.0;
      checks++;
      if (cyc - t != 41) begin failures++; $display("FAIL latency %0d", cyc - t); end
      checks++;
      if (e < 0) begin
        n_err++;
        if (!m_err) begin failures++; $display("FAIL missing error flag"); end
      end else if (m_err || got - e > 0.01 || e - got > 0.01) begin
        failures++; $display("FAIL T %f exp %f", got, e);
      end
    end
    if (rst_n && s_valid) begin
      real den;
      den = 298.15 * (real'(s_ln) / 65536.0 - $ln(10.0)) + 4300.0;
      exp_q.push_back(den <= 0.0 ? -1.0 : 298.15 * 4300.0 / den);
      t_q.push_back(cyc);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      s_valid <= ($urandom_range(0, 2) != 0);
      if (n % 50 == 0) s_ln <= q16_t'(-20 * 65536);
      else s_ln <= q16_t'($urandom_range(0, 10 * 65536)) - q16_t'(4 * 65536);
    end
    @(posedge clk); s_valid <= 0;
    repeat (50) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_err == 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
