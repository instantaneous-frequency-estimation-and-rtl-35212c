// Self-checking testbench of temperature_buffer with unrelated write
// (100 MHz) and read (65 MHz) clocks: writes results at random intervals,
// more than DEPTH in total so the buffer wraps, and after each burst reads
// every age back, comparing the data (two read clocks later) and the fill
// count with a model kept here.
module tb_temperature_buffer;
  localparam int DEPTH = 128;
  logic clk_w = 0, clk_r = 0, rst_w_n = 0, rst_r_n = 0;
  logic w_valid = 0;
  logic [63:0] w_data = 0;
  logic [6:0] r_age = 0;
  logic [63:0] r_data;
  logic [7:0] r_fill;
  int checks = 0, failures = 0;
  logic [63:0] hist [$];   // newest first

  temperature_buffer dut (.*);
  always #5 clk_w = ~clk_w;
  always #7.69 clk_r = ~clk_r;

  initial begin : watchdog
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_burst(input int n);
    for (int i = 0; i < n; i++) begin
      logic [63:0] d;
      d = {$urandom, $urandom};
      @(negedge clk_w); w_valid = 1; w_data = d;
      @(negedge clk_w); w_valid = 0;
      hist.push_front(d);
      repeat ($urandom_range(0, 5)) @(negedge clk_w);
    end
  endtask

  task automatic read_all();
    int fill;
    repeat (6) @(negedge clk_r);     // let the pointer cross
    fill = (hist.size() > DEPTH) ? DEPTH : hist.size();
    checks++;
    if (r_fill != 8'(fill)) begin failures++; $display("FAIL fill %0d exp %0d", r_fill, fill); end
    for (int a = 0; a < fill; a++) begin
      r_age = 7'(a);
      @(negedge clk_r); @(negedge clk_r);
      checks++;
      if (r_data !== hist[a]) begin failures++; $display("FAIL age %0d got %h exp %h", a, r_data, hist[a]); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk_r);
    rst_w_n = 1; rst_r_n = 1;
    repeat (3) @(negedge clk_r);
    checks++;
    if (r_fill != 0) begin failures++; $display("FAIL fill after reset"); end
    write_burst(1);   read_all();
    write_burst(40);  read_all();
    write_burst(100); read_all();   // wraps
    write_burst(150); read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
