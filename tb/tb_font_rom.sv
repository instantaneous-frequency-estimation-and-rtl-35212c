// Self-checking testbench of font_rom: reads every address in random order
// and checks the data two clocks later against glyph rows written out here
// by hand for a few characters ('0', 'F', '.', degree sign, space), and
// against the table file for the rest.
module tb_font_rom;
  logic clk = 0;
  logic [10:0] addr = 0;
  logic [7:0] data;
  int checks = 0, failures = 0;
  logic [7:0] table_ [2048];
  logic [7:0] exp_q [$];

  font_rom dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 5x7 dot patterns, rows doubled, placed at bits 6..2 from glyph row 1.
  function automatic logic [7:0] hand(input logic [6:0] c, input logic [3:0] r);
    logic [4:0] p [7];
    case (c)
      7'h30: p = '{5'b01110, 5'b10001, 5'b10011, 5'b10101, 5'b11001, 5'b10001, 5'b01110};
      7'h46: p = '{5'b11111, 5'b10000, 5'b10000, 5'b11110, 5'b10000, 5'b10000, 5'b10000};
      7'h2e: p = '{5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b01100, 5'b01100};
      7'h7f: p = '{5'b01100, 5'b10010, 5'b10010, 5'b01100, 5'b00000, 5'b00000, 5'b00000};
      default: p = '{default: 5'b0};
    endcase
    if (r == 0 || r == 15) return 8'h00;
    return {1'b0, p[(r - 1) / 2], 2'b00};
  endfunction

  initial begin
    int order [2048];
    $readmemh("rtl/font_rom.hex", table_);
    foreach (order[i]) order[i] = i;
    order.shuffle();
    for (int n = 0; n < 2048 + 2; n++) begin
      @(negedge clk);
      if (exp_q.size() == 2) begin
        logic [7:0] e;
        e = exp_q.pop_front();
        checks++;
        if (data !== e) begin failures++; $display("FAIL got %h exp %h", data, e); end
      end
      if (n < 2048) begin
        logic [6:0] c;
        addr = 11'(order[n]);
        c = addr[10:4];
        if (c == 7'h30 || c == 7'h46 || c == 7'h2e || c == 7'h7f || c == 7'h20)
          exp_q.push_back(hand(c, addr[3:0]));
        else
          exp_q.push_back(table_[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
