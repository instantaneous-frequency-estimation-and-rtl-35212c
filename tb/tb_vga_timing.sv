// Self-checking testbench of vga_timing at the XGA defaults: over two frames
// it measures line length (1344), hsync position and width (1048, 136),
// frame length (806 lines), vsync position and width (771, 6), active area
// (1024 x 768 pixels per frame, x/y inside it) and one vblank_start per frame
// at line 768.
module tb_vga_timing;
  logic clk = 0, rst_n = 0;
  logic [10:0] x;
  logic [9:0] y;
  logic de, hsync_n, vsync_n, vblank_start;
  int checks = 0, failures = 0;

  vga_timing dut (.*);
  always #7.69 clk = ~clk;

  initial begin : watchdog
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (x=%0d y=%0d)", what, x, y); end
  endtask

  initial begin
    longint n, de_cnt, hs_cnt, vs_lines, vbl_cnt;
    int hs_start, prev_hs, prev_vs, vs_start;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Wait for the start of a frame.
    do @(negedge clk); while (!(x == 0 && y == 0));
    for (int f = 0; f < 2; f++) begin
      de_cnt = 0; hs_cnt = 0; vs_lines = 0; vbl_cnt = 0; hs_start = -1; vs_start = -1;
      prev_hs = 1; prev_vs = 1;
      for (n = 0; n < 1344 * 806; n++) begin
        if (de) begin de_cnt++; end
        if (de && (x >= 1024 || y >= 768)) check(0, "de outside active area");
        if (!hsync_n && y == 0) hs_cnt++;
        if (prev_hs && !hsync_n && y == 0) hs_start = x;
        if (!vsync_n && x == 0) vs_lines++;
        if (prev_vs && !vsync_n) vs_start = y;
        if (vblank_start) begin vbl_cnt++; check(y == 768 && x == 0, "vblank_start position"); end
        prev_hs = hsync_n; prev_vs = vsync_n;
        @(negedge clk);
      end
      check(x == 0 && y == 0, "frame length 1344 x 806");
      check(de_cnt == 1024 * 768, "active pixels");
      check(hs_cnt == 136, "hsync width");
      check(hs_start == 1048, "hsync start");
      check(vs_lines == 6, "vsync lines");
      check(vs_start == 771, "vsync start");
      check(vbl_cnt == 1, "one vblank_start");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
