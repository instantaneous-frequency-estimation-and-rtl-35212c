// Behavioural model of the streaming FFT core (testbench only).
//
// Collects one frame of 2^N_LOG2 real samples (ending with s_last), computes
// its DFT with a radix-2 FFT in floating point, and after LATENCY clocks
// streams the 2^N_LOG2 complex bins in natural order, one per clock, with
// m_last on the final bin. The output is unscaled (full precision) and
// rounded to integers, as the fixed-point core configured for full
// precision would deliver it. s_ready is always high: a pipelined
// streaming core accepts continuous input.
module fft_model #(
  parameter int N_LOG2  = 15,
  parameter int W       = 32,
  parameter int LATENCY = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                s_valid,
  input  logic signed [15:0]  s_data,
  input  logic                s_last,
  output logic                s_ready,
  output logic                m_valid,
  output logic signed [W-1:0] m_re,
  output logic signed [W-1:0] m_im,
  output logic                m_last
);
  localparam int N = 1 << N_LOG2;
  real xin [N];
  real re [N], im [N];
  int  n_in = 0;
  int  frames = 0;

  assign s_ready = 1'b1;

  task automatic fft_compute();
    // bit-reversed copy
    for (int i = 0; i < N; i++) begin
      int r = 0;
      for (int b = 0; b < N_LOG2; b++) if (i & (1 << b)) r |= 1 << (N_LOG2 - 1 - b);
      re[r] = xin[i];
      im[r] = 0.0;
    end
    for (int len = 2; len <= N; len *= 2) begin
      real ang;
      ang = -2.0 * 3.141592653589793 / len;
      for (int k = 0; k < len / 2; k++) begin
        real wr, wi;
        wr = $cos(ang * k);
        wi = $sin(ang * k);
        for (int i = 0; i < N; i += len) begin
          real ur, ui, vr, vi;
          ur = re[i + k]; ui = im[i + k];
          vr = re[i + k + len/2] * wr - im[i + k + len/2] * wi;
          vi = re[i + k + len/2] * wi + im[i + k + len/2] * wr;
          re[i + k] = ur + vr;           im[i + k] = ui + vi;
          re[i + k + len/2] = ur - vr;   im[i + k + len/2] = ui - vi;
        end
      end
    end
  endtask

  initial begin
    m_valid = 0; m_last = 0; m_re = 0; m_im = 0;
  end

  always @(posedge clk) begin
    if (rst_n && s_valid) begin
      xin[n_in] = real'(s_data);
      n_in = n_in + 1;
      if (s_last || n_in == N) begin
        n_in = 0;
        fft_compute();
        frames++;
        fork
          begin
            repeat (LATENCY) @(posedge clk);
            for (int k = 0; k < N; k++) begin
              m_valid <= 1'b1;
              m_re    <= W'($rtoi(re[k] + (re[k] >= 0.0 ? 0.5 : -0.5)));
              m_im    <= W'($rtoi(im[k] + (im[k] >= 0.0 ? 0.5 : -0.5)));
              m_last  <= (k == N - 1);
              @(posedge clk);
            end
            m_valid <= 1'b0;
            m_last  <= 1'b0;
          end
        join_none
      end
    end
  end
endmodule
