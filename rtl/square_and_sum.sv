// Power of each FFT output bin: p = re^2 + im^2.
//
// First step of the magnitude spectrum. Stage 1 registers both squares,
// stage 2 registers their sum, so the latency is 2 clocks as the design
// description gives; one bin per clock is accepted (fully pipelined). The
// AXI-stream style valid and last flags travel with the data. Widths are this
// design's choice: W-bit signed inputs give a 2W-bit unsigned power.
module square_and_sum #(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                s_valid,
  input  logic                s_last,
  input  logic signed [W-1:0] s_re,
  input  logic signed [W-1:0] s_im,
  output logic                m_valid,
  output logic                m_last,
  output logic [2*W-1:0]      m_power
);
  logic [2*W-1:0] sq_re, sq_im;
  logic           v1, l1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; l1 <= 1'b0; m_valid <= 1'b0; m_last <= 1'b0;
    end else begin
      v1 <= s_valid; l1 <= s_last & s_valid;
      m_valid <= v1; m_last <= l1;
    end
  end

  // Products of two W-bit signed values are non-negative when squared and at
  // most 2^(2W-2), so their sum fits 2W bits unsigned.
  logic signed [2*W-1:0] re_x, im_x;
  assign re_x = (2*W)'(s_re);
  assign im_x = (2*W)'(s_im);

  always_ff @(posedge clk) begin
    sq_re   <= re_x * re_x;
    sq_im   <= im_x * im_x;
    m_power <= sq_re + sq_im;
  end
endmodule
