// Square root of the bin power: the magnitude spectrum fed to the peak search.
//
// In the design description this is a square-root core with a latency of 17
// clocks. Here it is a fully pipelined restoring (digit-by-digit) square
// root: an input register followed by STAGES stages, each resolving
// BITS_PER_STAGE result bits, one new operand per clock. With a 64-bit input
// (32-bit root) and two bits per stage the latency is 1 + 16 = 17 clocks.
// The algorithm is this design's choice; the result is floor(sqrt(x)).
// valid and last flags travel with the data.
module magnitude_sqrt #(
  parameter int unsigned IN_W           = 64,   // even
  parameter int unsigned BITS_PER_STAGE = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 s_valid,
  input  logic                 s_last,
  input  logic [IN_W-1:0]      s_power,
  output logic                 m_valid,
  output logic                 m_last,
  output logic [IN_W/2-1:0]    m_mag
);
  localparam int unsigned OUT_W  = IN_W / 2;
  localparam int unsigned STAGES = OUT_W / BITS_PER_STAGE;

  logic [IN_W-1:0] op_q  [STAGES+1];
  logic [IN_W-1:0] res_q [STAGES+1];
  logic            v_q   [STAGES+1];
  logic            l_q   [STAGES+1];

  // One digit step of the restoring square root; 'bitpos' is the result bit.
  // Returns {op, res} after the step.
  function automatic logic [2*IN_W-1:0] sqrt_step(input int unsigned bitpos,
                                                  input logic [IN_W-1:0] op,
                                                  input logic [IN_W-1:0] res);
    logic [IN_W-1:0] one;
    one = IN_W'(1) << (2 * bitpos);
    if (op >= res + one) return {op - (res + one), (res >> 1) + one};
    else                 return {op, res >> 1};
  endfunction

  always_ff @(posedge clk) begin
    op_q[0]  <= s_power;
    res_q[0] <= '0;
    for (int s = 0; s < STAGES; s++) begin
      logic [IN_W-1:0] op, res;
      op  = op_q[s];
      res = res_q[s];
      for (int b = 0; b < BITS_PER_STAGE; b++)
        {op, res} = sqrt_step(OUT_W - 1 - s * BITS_PER_STAGE - b, op, res);
      op_q[s+1]  <= op;
      res_q[s+1] <= res;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s <= STAGES; s++) begin v_q[s] <= 1'b0; l_q[s] <= 1'b0; end
    end else begin
      v_q[0] <= s_valid;
      l_q[0] <= s_valid & s_last;
      for (int s = 0; s < STAGES; s++) begin
        v_q[s+1] <= v_q[s];
        l_q[s+1] <= l_q[s];
      end
    end
  end

  assign m_valid = v_q[STAGES];
  assign m_last  = l_q[STAGES];
  assign m_mag   = OUT_W'(res_q[STAGES]);
endmodule
