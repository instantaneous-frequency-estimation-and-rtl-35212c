// Moves an occasionally updated word from one clock domain to another.
//
// The source captures the word into a hold register and flips a toggle; the
// toggle crosses through three flip-flops, and on its edge the destination
// copies the hold register, which has been stable for at least two
// destination clocks. Updates must be further apart than about four
// destination clocks (here one result per FFT frame). Used to bring the
// frequency estimate from the 100 MHz processing clock to the 65 MHz pixel
// clock; this crossing scheme is this design's choice.
module cdc_word_sync #(
  parameter int unsigned W = 32
) (
  input  logic         clk_s,
  input  logic         rst_s_n,
  input  logic         s_valid,
  input  logic [W-1:0] s_data,
  input  logic         clk_d,
  input  logic         rst_d_n,
  output logic         d_valid,
  output logic [W-1:0] d_data
);
  logic [W-1:0] hold;
  logic         tog_s;
  logic [2:0]   tog_d;

  always_ff @(posedge clk_s) begin
    if (!rst_s_n) begin
      hold  <= '0;
      tog_s <= 1'b0;
    end else if (s_valid) begin
      hold  <= s_data;
      tog_s <= ~tog_s;
    end
  end

  always_ff @(posedge clk_d) begin
    if (!rst_d_n) begin
      tog_d   <= '0;
      d_valid <= 1'b0;
      d_data  <= '0;
    end else begin
      tog_d   <= {tog_d[1:0], tog_s};
      d_valid <= tog_d[2] ^ tog_d[1];
      if (tog_d[2] ^ tog_d[1]) d_data <= hold;
    end
  end
endmodule
