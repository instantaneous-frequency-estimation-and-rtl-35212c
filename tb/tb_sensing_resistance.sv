// Self-checking testbench of sensing_resistance: random amplifier voltages
// over and beyond the working range (including a pole of Eq. 2 and negative
// results), each result compared with Eq. (2) evaluated here in floating
// point with Vcc = 5 V, Rx = 1 kOhm, Ri = 3.5 kOhm; the 37-clock latency and
// the error flag for out-of-range results are checked.
module tb_sensing_resistance;
  import iepe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0;
  q16_t s_vamp = 0;
  logic m_valid, m_err;
  q16_t m_res;
  int checks = 0, failures = 0, n_err = 0;
  longint cyc = 0;
  real exp_q [$];
  longint t_q [$];

  sensing_resistance dut (.*);
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
      real e, got, tol; longint t;
      e = exp_q.pop_front(); t = t_q.pop_front();
      got = real'(m_res) / 65536.0;
      tol = (e < 0 ? -e : e) * 2.0e-3 + 8.0 / 65536.0;
      checks++;
      if (cyc - t != 37) begin
        failures++; $display("FAIL latency %0d", cyc - t);
      end
      if (e > 0 && e < 32000.0) begin
        checks++;
        if (m_err || got - e > tol || e - got > tol) begin
          failures++; $display("FAIL R %f exp %f err %b", got, e, m_err);
        end
      end else begin
        checks++;
        n_err++;
        if (!m_err) begin failures++; $display("FAIL no error flag for R %f", e); end
      end
    end
    if (rst_n && s_valid) begin
      real v;
      v = real'(s_vamp) / 65536.0;
      exp_q.push_back((5.0 * 1.0 + v * (3.5 + 2.0)) / (5.0 - v * (3.5 + 2.0)));
      t_q.push_back(cyc);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      s_valid <= ($urandom_range(0, 2) != 0);
      if (n % 10 == 0) s_vamp <= q16_t'($urandom_range(0, 3 * 65536)) - q16_t'(65536);
      else s_vamp <= q16_t'($urandom_range(0, 58000));  // 0 .. 0.885 V
    end
    @(posedge clk); s_valid <= 0;
    repeat (40) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_err == 0) begin failures++; $display("FAIL missing results / no error case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
