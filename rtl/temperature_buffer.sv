// Dual-port, dual-clock buffer of the latest temperature results.
//
// DEPTH words of W bits (128 x 64-bit by default: 128 results, about 87 s of
// history at one result per 32768/48000 s). The processing side writes each
// new Celsius result at the next address of a circular buffer. The display
// side reads by age (0 = newest): the write pointer crosses into the read
// clock domain as a Gray code through two flip-flops, so the reader only ever
// addresses words whose write has completed. The memory itself is the only
// path for the data, which is what makes the crossing safe.
// Write port: one word per w_valid pulse. Read port: r_data is the word of
// age r_age two clk_r cycles later (address register + output register);
// r_fill is the number of valid words (0..DEPTH).
// Buffer size and dual-port use follow the design description; the
// age-addressed read port and the Gray-code pointer are this design's choices.
module temperature_buffer #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 64
) (
  input  logic                    clk_w,
  input  logic                    rst_w_n,
  input  logic                    w_valid,
  input  logic [W-1:0]            w_data,
  input  logic                    clk_r,
  input  logic                    rst_r_n,
  input  logic [$clog2(DEPTH)-1:0] r_age,
  output logic [W-1:0]            r_data,
  output logic [$clog2(DEPTH):0]  r_fill
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];

  // ---- write side ----
  logic [AW:0] wptr, wptr_gray;
  always_ff @(posedge clk_w) begin
    if (!rst_w_n) begin
      wptr      <= '0;
      wptr_gray <= '0;
    end else if (w_valid) begin
      wptr      <= wptr + 1'b1;
      wptr_gray <= (wptr + 1'b1) ^ ((wptr + 1'b1) >> 1);
    end
  end
  always_ff @(posedge clk_w) begin
    if (w_valid) mem[wptr[AW-1:0]] <= w_data;
  end

  // ---- read side ----
  logic [AW:0] gsync1, gsync2, rptr;
  logic        full_r;
  always_ff @(posedge clk_r) begin
    if (!rst_r_n) begin
      gsync1 <= '0;
      gsync2 <= '0;
    end else begin
      gsync1 <= wptr_gray;
      gsync2 <= gsync1;
    end
  end

  // Gray to binary.
  always_comb begin
    rptr[AW] = gsync2[AW];
    for (int i = AW - 1; i >= 0; i--) rptr[i] = rptr[i+1] ^ gsync2[i];
  end

  // The buffer is full for good once the pointer has passed DEPTH.
  always_ff @(posedge clk_r) begin
    if (!rst_r_n) full_r <= 1'b0;
    else if (rptr[AW]) full_r <= 1'b1;
  end
  assign r_fill = full_r ? (AW+1)'(DEPTH) : rptr;

  logic [AW-1:0] raddr;
  always_ff @(posedge clk_r) begin
    raddr  <= rptr[AW-1:0] - AW'(1) - r_age;
    r_data <= mem[raddr];
  end
endmodule
