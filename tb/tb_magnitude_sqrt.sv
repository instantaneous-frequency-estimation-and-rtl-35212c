// Self-checking testbench of magnitude_sqrt: streams random powers (and
// perfect squares, 0 and the maximum) one per clock and checks that each
// output r satisfies r^2 <= x < (r+1)^2, arriving exactly 17 clocks later
// with its valid and last flags.
module tb_magnitude_sqrt;
  localparam int LAT = 17;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_last = 0;
  logic [63:0] s_power = 0;
  logic m_valid, m_last;
  logic [31:0] m_mag;
  int checks = 0, failures = 0;
  logic [63:0] in_p [$];
  logic        in_v [$], in_l [$];

  magnitude_sqrt dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      logic [63:0] x; logic v, l;
      @(posedge clk);
      if (in_p.size() == LAT + 1) begin
        logic [63:0] p; logic ev, el; logic [64:0] r, r1;
        p = in_p.pop_front(); ev = in_v.pop_front(); el = in_l.pop_front();
        r = 65'(m_mag); r1 = r + 1;
        checks++;
        if (m_valid !== ev || m_last !== el ||
            (ev && !((r * r <= 65'(p)) && (r1 * r1 > 65'(p))))) begin
          failures++;
          $display("FAIL n=%0d x=%h root=%h v=%b/%b", n, p, m_mag, m_valid, ev);
        end
      end
      case (n % 6)
        0: x = 64'hffff_ffff_ffff_ffff;
        1: x = 0;
        2: begin logic [31:0] q; q = $urandom; x = 64'(q) * 64'(q); end
        3: begin logic [31:0] q; q = $urandom; x = 64'(q) * 64'(q) - 1; end
        default: x = {$urandom, $urandom} >> $urandom_range(0, 40);
      endcase
      v = ($urandom_range(0, 4) != 0);
      l = v && ($urandom_range(0, 9) == 0);
      s_power <= x; s_valid <= v; s_last <= l;
      in_p.push_back(x); in_v.push_back(v); in_l.push_back(l);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
