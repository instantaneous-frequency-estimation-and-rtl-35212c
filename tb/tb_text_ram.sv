// Self-checking testbench of text_ram: initial contents are spaces; random
// writes on port A; reads on port B compared with a model two clocks later,
// including reads of a cell in the clock it is written.
module tb_text_ram;
  logic clk = 0;
  logic we = 0;
  logic [12:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [7:0] model [6144];
  logic [7:0] exp_q [$];

  text_ram dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 8'h20;
    for (int n = 0; n < 30000; n++) begin
      @(negedge clk);
      // the read issued two clocks ago is on rdata now
      if (exp_q.size() == 2) begin
        logic [7:0] e;
        e = exp_q.pop_front();
        checks++;
        if (rdata !== e) begin failures++; $display("FAIL n=%0d got %h exp %h", n, rdata, e); end
      end
      we = (n > 6144) && ($urandom_range(0, 1) == 1);
      waddr = 13'($urandom_range(0, 6143));
      wdata = 8'($urandom);
      raddr = (n < 6144) ? 13'(n) : (($urandom_range(0, 3) == 0) ? waddr : 13'($urandom_range(0, 6143)));
      // The read address is registered at this edge and the array read at the
      // next one, after this write has landed.
      if (we) model[waddr] = wdata;
      exp_q.push_back(model[raddr]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
