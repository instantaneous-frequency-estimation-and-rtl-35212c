// Self-checking testbench of sample_decimator: feeds random 12-bit
// conversions at irregular intervals and compares each output with the
// scaled mean of the last DECIM inputs, and the output latency (2 cycles).
module tb_sample_decimator;
  localparam int DECIM = 20;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0;
  logic [11:0] s_data = 0;
  logic m_valid;
  logic signed [15:0] m_data;
  int checks = 0, failures = 0;
  int sum, n, exp_q[$];
  longint cyc = 0, last_in_cyc, exp_cyc_q[$];

  sample_decimator dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && m_valid) begin
    int e;
    longint ec;
    e = exp_q.pop_front();
    ec = exp_cyc_q.pop_front();
    checks++;
    if (m_data > e + 1 || m_data < e - 1) begin
      failures++;
      $display("FAIL data %0d expected %0d", m_data, e);
    end
    checks++;
    if (cyc != ec) begin
      failures++;
      $display("FAIL latency: out at %0d expected %0d", cyc, ec);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    sum = 0; n = 0;
    for (int k = 0; k < 40 * DECIM; k++) begin
      @(posedge clk);
      s_valid <= 1;
      if (k < 2 * DECIM) s_data <= 12'hfff;
      else if (k < 4 * DECIM) s_data <= 12'h000;
      else s_data <= 12'($urandom_range(0, 4095));
      #1;
      sum += s_data; n++;
      if (n == DECIM) begin
        real m;
        m = (real'(sum) / DECIM - 2048.0) * 16.0;
        if (m > 32767.0) m = 32767.0;
        exp_q.push_back($rtoi(m));
        exp_cyc_q.push_back(cyc + 2);
        sum = 0; n = 0;
      end
      @(posedge clk);
      s_valid <= 0;
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
