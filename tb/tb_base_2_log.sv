// Self-checking testbench of base_2_log: operands from the smallest Q16.16
// value to the largest, plus exact powers of two and zero; each result is
// compared with log2 computed here in floating point (tolerance 2 LSB), the
// latency with 18 + (number of normalising shifts), and s_ready with the
// one-operand-at-a-time handshake.
module tb_base_2_log;
  import iepe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_ready;
  logic [31:0] s_x = 0;
  logic m_valid, m_err;
  q16_t m_log2;
  int checks = 0, failures = 0;

  base_2_log dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input logic [31:0] x);
    int lat, msb, shifts;
    real e, got;
    @(negedge clk);
    checks++;
    if (!s_ready) begin failures++; $display("FAIL not ready"); end
    s_x = x; s_valid = 1;
    @(negedge clk);
    s_valid = 0;
    lat = 1;
    while (!m_valid && lat < 100) begin @(negedge clk); lat++; end
    checks++;
    if (x == 0) begin
      if (!m_err || m_log2 != q16_t'(32'h8000_0000)) begin failures++; $display("FAIL zero operand"); end
    end else begin
      msb = 0;
      for (int b = 0; b < 32; b++) if (x[b]) msb = b;
      shifts = (msb >= 16) ? msb - 16 : 16 - msb;
      e = $ln(real'(x) / 65536.0) / $ln(2.0);
      got = real'(m_log2) / 65536.0;
      if (m_err || got - e > 2.0 / 65536.0 || e - got > 2.0 / 65536.0) begin
        failures++; $display("FAIL x=%h log2=%f exp=%f", x, got, e);
      end
      checks++;
      if (lat != 18 + shifts) begin failures++; $display("FAIL latency %0d exp %0d", lat, 18 + shifts); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run_one(0);
    for (int b = 0; b < 32; b++) run_one(32'd1 << b);
    run_one(32'hffff_ffff);
    run_one(32'd1);
    run_one(32'h0001_6a0a);   // ~sqrt(2)
    for (int n = 0; n < 2000; n++) run_one($urandom >> $urandom_range(0, 31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
