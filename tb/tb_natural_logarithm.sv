// Self-checking testbench of natural_logarithm: random signed Q16.16 binary
// logarithms, each result compared with log2 * ln(2) evaluated here
// (tolerance 1 LSB), error flag passed through, latency 3 checked.
module tb_natural_logarithm;
  import iepe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_err = 0;
  q16_t s_log2 = 0;
  logic m_valid, m_err;
  q16_t m_ln;
  int checks = 0, failures = 0;
  longint cyc = 0;
  real exp_q [$];
  logic err_q [$];
  longint t_q [$];

  natural_logarithm dut (.*);
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
      real e, got; longint t; logic ee;
      e = exp_q.pop_front(); t = t_q.pop_front(); ee = err_q.pop_front();
      got = real'(m_ln) / 65536.0;
      checks++;
      if (got - e > 1.0 / 65536.0 || e - got > 1.0 / 65536.0 || cyc - t != 3 || m_err != ee) begin
        failures++;
        $display("FAIL ln %f exp %f latency %0d", got, e, cyc - t);
      end
    end
    if (rst_n && s_valid) begin
      exp_q.push_back(real'(s_log2) / 65536.0 * 0.6931471805599453);
      err_q.push_back(s_err);
      t_q.push_back(cyc);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      s_valid <= ($urandom_range(0, 2) != 0);
      s_log2  <= q16_t'($urandom);
      s_err   <= ($urandom_range(0, 9) == 0);
    end
    @(posedge clk); s_valid <= 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
