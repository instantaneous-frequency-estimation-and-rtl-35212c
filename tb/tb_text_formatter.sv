// Self-checking testbench of text_formatter: for random and edge-case
// frequencies and temperatures it collects the characters written to the
// text RAM and compares the two lines with strings built here with
// $sformatf ("F = %5d.%02d Hz", "T = s%3d.%02d<deg>C"); it also checks that
// exactly 32 writes land in the right cells and that the job ends in time.
module tb_text_formatter;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [31:0] freq = 0;
  logic signed [63:0] temp = 0;
  logic we, busy;
  logic [12:0] waddr;
  logic [7:0] wdata;
  int checks = 0, failures = 0;
  logic [7:0] screen [6144];
  int writes;

  text_formatter dut (.*);
  always #7.69 clk = ~clk;

  always @(posedge clk) if (we) begin screen[waddr] <= wdata; writes++; end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string blanked(input int v, input int width);
    string s;
    s = $sformatf("%0d", v);
    while (s.len() < width) s = {" ", s};
    return s;
  endfunction

  task automatic one(input longint f_q, input longint t_q);
    string l0, l1, got0, got1;
    longint ta; int ti, th, fi, fh; string sg;
    freq = 32'(f_q); temp = 64'(t_q);
    foreach (screen[i]) screen[i] = 8'h00;
    writes = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (60) @(negedge clk);
    checks++;
    if (busy || writes != 32) begin failures++; $display("FAIL busy=%b writes=%0d", busy, writes); end
    fi = int'(f_q >>> 16); fh = int'(((f_q & 64'hffff) * 100) >> 16);
    ta = (t_q < 0) ? -t_q : t_q;
    ti = int'(ta >>> 16); th = int'(((ta & 64'hffff) * 100) >> 16);
    if (ti > 999) begin ti = 999; th = 99; end
    sg = (t_q < 0) ? "-" : " ";
    l0 = $sformatf("F = %s.%02d Hz ", blanked(fi, 5), fh);
    l1 = $sformatf("T = %s%s.%02d%cC   ", sg, blanked(ti, 3), th, 8'h7f);
    got0 = ""; got1 = "";
    for (int c = 0; c < 16; c++) begin
      got0 = {got0, $sformatf("%c", screen[2 * 128 + 4 + c])};
      got1 = {got1, $sformatf("%c", screen[3 * 128 + 4 + c])};
    end
    checks++;
    if (got0 != l0) begin failures++; $display("FAIL line0 '%s' exp '%s'", got0, l0); end
    checks++;
    if (got1 != l1) begin failures++; $display("FAIL line1 '%s' exp '%s'", got1, l1); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    one(0, 0);
    one(longint'(19000) << 16, longint'(25) << 16);
    one((longint'(12345) << 16) + 32768, -((longint'(7) << 16) + 16384));
    one(longint'(32767) << 16 | 65535, longint'(5000) << 16);
    one(longint'(8) << 16, -(longint'(273) << 16));
    for (int n = 0; n < 200; n++)
      one(longint'($urandom_range(0, 32767)) << 16 | longint'($urandom_range(0, 65535)),
          longint'($signed($urandom_range(0, 600000 * 2))) * 65536 / 1000 - longint'(600) * 65536
          + longint'($urandom_range(0, 65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
