// Self-checking testbench of waveform_display: a behavioural buffer (2-clock
// read by age) holds a known temperature history; after a vblank_start the
// block must read ages 0..63, and for every pixel of the screen wave_on
// (one clock after the coordinate) must match the plot computed here:
// segment s = 63 - x/16 shows the result of age s on rows
// clamp(735 - 8*T) .. +1. Run once with 20 results (partly empty plot) and
// once with a full buffer; newest_temp is checked as well.
module tb_waveform_display;
  logic clk = 0, rst_n = 0, vblank_start = 0;
  logic [6:0] r_age;
  logic [63:0] r_data;
  logic [7:0] r_fill = 0;
  logic [10:0] x = 0;
  logic [9:0] y = 0;
  logic wave_on, newest_valid;
  logic signed [63:0] newest_temp;
  int checks = 0, failures = 0;
  logic signed [63:0] hist [128];   // by age
  logic [6:0] age_q;
  logic [63:0] data_q;
  int reads = 0;

  waveform_display dut (.*);
  always #7.69 clk = ~clk;

  // Buffer model: address register then data register.
  always @(posedge clk) begin
    age_q  <= r_age;
    r_data <= hist[age_q];
  end

  initial begin : watchdog
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_row(input logic signed [63:0] t);
    real r;
    r = 735.0 - $floor(real'(t) * 8.0 / 65536.0);
    if (r < 160.0) r = 160.0;
    if (r > 735.0) r = 735.0;
    return int'(r);
  endfunction

  task automatic frame(input int fill);
    int bad;
    r_fill = 8'(fill);
    @(negedge clk); vblank_start = 1;
    @(negedge clk); vblank_start = 0;
    repeat (80) @(negedge clk);
    checks++;
    if (newest_valid != (fill > 0) || (fill > 0 && newest_temp != hist[0])) begin
      failures++; $display("FAIL newest");
    end
    bad = 0;
    for (int yy = 0; yy < 768; yy++) begin
      for (int xx = 0; xx < 1024; xx++) begin
        int s; logic e;
        x = 11'(xx); y = 10'(yy);
        @(negedge clk);
        s = 63 - xx / 16;
        e = (s < fill) && (yy >= exp_row(hist[s])) && (yy < exp_row(hist[s]) + 2);
        checks++;
        if (wave_on !== e) begin
          failures++;
          if (bad++ < 5) $display("FAIL x=%0d y=%0d on=%b exp=%b", xx, yy, wave_on, e);
        end
      end
    end
  endtask

  initial begin
    foreach (hist[i]) hist[i] = 64'sd65536 * $signed(64'($urandom_range(0, 90))) - 64'sd5 * 65536
                               + 64'($urandom_range(0, 65535));
    hist[3] = -64'sd100 * 65536;   // clamps at the bottom
    hist[5] = 64'sd200 * 65536;    // clamps at the top
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame(20);
    frame(128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
