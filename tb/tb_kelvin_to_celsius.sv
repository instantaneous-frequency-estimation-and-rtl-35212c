// Self-checking testbench of kelvin_to_celsius: random 64-bit kelvin values,
// result compared with T - 273.4 in Q48.16 computed here, latency 1 checked.
module tb_kelvin_to_celsius;
  import iepe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_err = 0;
  q48_t s_temp_k = 0;
  logic m_valid, m_err;
  q48_t m_temp_c;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint exp_q [$], t_q [$];

  kelvin_to_celsius dut (.*);
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
      longint e, t;
      e = exp_q.pop_front(); t = t_q.pop_front();
      checks++;
      if (m_temp_c != e || cyc - t != 1) begin
        failures++; $display("FAIL %0d exp %0d lat %0d", m_temp_c, e, cyc - t);
      end
    end
    if (rst_n && s_valid) begin
      // 273.4 * 65536 = 17917542.4, rounded to 17917542
      exp_q.push_back(longint'(s_temp_k) - 64'd17917542);
      t_q.push_back(cyc);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 1000; n++) begin
      @(posedge clk);
      s_valid  <= ($urandom_range(0, 2) != 0);
      s_temp_k <= (n % 2) ? q48_t'($urandom_range(0, 400 * 65536)) : q48_t'({$urandom, $urandom});
    end
    @(posedge clk); s_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
