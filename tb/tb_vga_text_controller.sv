// Self-checking testbench of vga_text_controller: writes random characters
// (from the glyphs the font holds) into random cells, then scans the top
// 8 character rows of a 1024-pixel raster and checks text_on for every
// pixel, four clocks after the coordinate, against a lookup done here in the
// same font table and a model of the text RAM; also checks that x, y, de and
// the syncs come out delayed by the same four clocks.
module tb_vga_text_controller;
  logic clk = 0, rst_n = 0;
  logic [10:0] x = 0;
  logic [9:0] y = 0;
  logic de = 0, hsync_n = 1, vsync_n = 1;
  logic we = 0;
  logic [12:0] waddr = 0;
  logic [7:0] wdata = 0;
  logic text_on, de_d, hsync_n_d, vsync_n_d;
  logic [10:0] x_d;
  logic [9:0] y_d;
  int checks = 0, failures = 0;
  logic [7:0] font [2048];
  logic [7:0] cells [6144];

  vga_text_controller dut (.*);
  always #7.69 clk = ~clk;

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [10:0] x; logic [9:0] y; logic de, hs, vs; } px_t;
  px_t q [$];

  initial begin
    byte glyphs [] = '{"0", "1", "2", "3", "4", "5", "6", "7", "8", "9", "F", "T", "H", "z", "C", ".", "-", "=", 8'h7f, " "};
    int bad = 0;
    $readmemh("rtl/font_rom.hex", font);
    foreach (cells[i]) cells[i] = 8'h20;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int a;
      a = $urandom_range(0, 8 * 128 - 1);
      @(negedge clk);
      we = 1; waddr = 13'(a); wdata = glyphs[$urandom_range(0, glyphs.size() - 1)];
      cells[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int yy = 0; yy < 128; yy++) begin
      for (int xx = 0; xx < 1100; xx++) begin
        px_t p;
        x = 11'(xx); y = 10'(yy);
        de = (xx < 1024);
        hsync_n = !(xx >= 1048 && xx < 1084);
        vsync_n = (yy != 5);
        p.x = x; p.y = y; p.de = de; p.hs = hsync_n; p.vs = vsync_n;
        q.push_back(p);
        @(negedge clk);
        if (q.size() == 4) begin
          px_t o; logic e; logic [7:0] c;
          o = q.pop_front();
          c = cells[(o.y / 16) * 128 + o.x / 8];
          e = o.de && font[{c[6:0], o.y[3:0]}][7 - o.x[2:0]];
          checks++;
          if (text_on !== e || x_d !== o.x || y_d !== o.y || de_d !== o.de ||
              hsync_n_d !== o.hs || vsync_n_d !== o.vs) begin
            failures++;
            if (bad++ < 5) $display("FAIL x=%0d y=%0d on=%b exp=%b", o.x, o.y, text_on, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
