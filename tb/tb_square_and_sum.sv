// Self-checking testbench of square_and_sum: random and extreme bins, the
// result compared with re^2+im^2 computed here, and the 2-cycle latency of
// data, valid and last checked on every clock.
module tb_square_and_sum;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_last = 0;
  logic signed [31:0] s_re = 0, s_im = 0;
  logic m_valid, m_last;
  logic [63:0] m_power;
  int checks = 0, failures = 0;
  logic [63:0] exp_p [$];
  logic        exp_v [$], exp_l [$];

  square_and_sum dut (.*);
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
    for (int n = 0; n < 2000; n++) begin
      logic signed [31:0] re, im;
      logic v, l;
      @(posedge clk);
      // Compare what left the pipe with what entered 2 cycles before.
      if (exp_p.size() == 3) begin
        logic [63:0] p; logic ev, el;
        p = exp_p.pop_front(); ev = exp_v.pop_front(); el = exp_l.pop_front();
        checks++;
        if (m_valid !== ev || m_last !== el || (ev && m_power !== p)) begin
          failures++;
          $display("FAIL n=%0d v=%b/%b l=%b/%b p=%h/%h", n, m_valid, ev, m_last, el, m_power, p);
        end
      end
      case (n % 5)
        0: begin re = 32'h8000_0000; im = 32'h8000_0000; end
        1: begin re = 32'h7fff_ffff; im = -32'sd1; end
        default: begin re = $urandom; im = $urandom; end
      endcase
      v = ($urandom_range(0, 3) != 0);
      l = v && (n % 7 == 0);
      s_re <= re; s_im <= im; s_valid <= v; s_last <= l;
      exp_p.push_back(64'(longint'(re) * longint'(re)) + 64'(longint'(im) * longint'(im)));
      exp_v.push_back(v); exp_l.push_back(l);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
