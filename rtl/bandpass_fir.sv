// 128-tap band-pass FIR filter in front of the FFT.
//
// Removes the content outside the 8-19 kHz frequency-modulation band of the
// 48 kHz sample stream. The coefficients are a 128-tap Parks-McClellan
// (equiripple) design: stop band 0-6 kHz and 21-24 kHz, pass band 8-19 kHz,
// quantised to signed Q1.15 and read from a hex table (one coefficient per
// line, tap 0 first). The filter length, band and design method follow the
// design description; the transition bands, word widths and the serial
// architecture are this design's choices.
//
// Because one sample arrives only every ~2000 clocks, a single multiplier is
// shared by all taps: an incoming sample is written into a circular delay
// line, then TAPS multiply-accumulate cycles compute
//   y[n] = sum_k h[k] * x[n-k],   output = sat16(acc >>> 15).
// Interface: s_ready is low for TAPS clocks after reset while the delay line
// is cleared, and while the MAC loop runs (TAPS+1 cycles); a sample offered
// then is a protocol error (asserted). m_valid pulses TAPS+2 cycles
// after the accepted s_valid.
module bandpass_fir #(
  parameter int unsigned TAPS      = 128,
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned COEF_W    = 16,
  parameter string       COEF_FILE = "rtl/fir_coeffs.hex"
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      s_valid,
  output logic                      s_ready,
  input  logic signed [DATA_W-1:0]  s_data,
  output logic                      m_valid,
  output logic signed [DATA_W-1:0]  m_data
);
  localparam int unsigned AW    = $clog2(TAPS);
  localparam int unsigned ACC_W = DATA_W + COEF_W + AW;

  logic signed [COEF_W-1:0] coef [TAPS];
  logic signed [DATA_W-1:0] dline [TAPS];

  initial $readmemh(COEF_FILE, coef);

  logic [AW-1:0]            wptr, rd_ptr, k;
  logic                     busy, mac_last, acc_done;
  logic signed [ACC_W-1:0]  acc;
  logic signed [DATA_W-1:0] x_rd;
  logic signed [COEF_W-1:0] c_rd;
  logic                     mac_en;

  // After reset the delay line is cleared, one word per clock, so the first
  // outputs do not depend on whatever the memory held before.
  logic          clearing;
  logic [AW-1:0] clr_ptr;

  assign s_ready = !busy && !clearing;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_ptr  <= '0;
    end else if (clearing) begin
      clr_ptr <= clr_ptr + 1'b1;
      if (clr_ptr == AW'(TAPS - 1)) clearing <= 1'b0;
    end
  end

  // Delay line write and the MAC address sequencer.
  always_ff @(posedge clk) begin
    if (clearing) dline[clr_ptr] <= '0;
    else if (s_valid && s_ready) dline[wptr] <= s_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr     <= '0;
      rd_ptr   <= '0;
      k        <= '0;
      busy     <= 1'b0;
      mac_en   <= 1'b0;
      mac_last <= 1'b0;
    end else begin
      mac_last <= 1'b0;
      if (s_valid && s_ready) begin
        busy   <= 1'b1;
        rd_ptr <= wptr;      // newest sample first (tap 0)
        k      <= '0;
        wptr   <= wptr + 1'b1;
        mac_en <= 1'b1;
      end else if (mac_en) begin
        rd_ptr <= rd_ptr - 1'b1;
        k      <= k + 1'b1;
        if (k == AW'(TAPS - 1)) begin
          mac_en   <= 1'b0;
          mac_last <= 1'b1;
        end
      end else if (mac_last) begin
        busy <= 1'b0;
      end
    end
  end

  // Registered operand reads (block-RAM style), then accumulate.
  logic mac_v;
  always_ff @(posedge clk) begin
    x_rd  <= dline[rd_ptr];
    c_rd  <= coef[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mac_v    <= 1'b0;
      acc      <= '0;
      acc_done <= 1'b0;
    end else begin
      mac_v    <= mac_en;
      acc_done <= mac_last;
      if (s_valid && s_ready) acc <= '0;
      else if (mac_v) acc <= acc + ACC_W'(x_rd) * ACC_W'(c_rd);
    end
  end

  // Scale and saturate.
  logic signed [ACC_W-1:0] shifted;
  assign shifted = acc >>> (COEF_W - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_data  <= '0;
    end else begin
      m_valid <= acc_done;
      if (acc_done) begin
        if (shifted > ACC_W'((longint'(1) << (DATA_W-1)) - 1))
          m_data <= {1'b0, {(DATA_W-1){1'b1}}};
        else if (shifted < -ACC_W'(longint'(1) << (DATA_W-1)))
          m_data <= {1'b1, {(DATA_W-1){1'b0}}};
        else
          m_data <= DATA_W'(shifted);
      end
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) s_valid |-> s_ready)
    else $error("bandpass_fir: sample offered while the MAC loop is busy");
endmodule
