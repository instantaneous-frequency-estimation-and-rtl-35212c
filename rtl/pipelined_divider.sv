// Fully pipelined radix-2 restoring divider (one quotient bit per stage).
//
// Computes q = floor(a / b) and r = a mod b for an unsigned DW-bit dividend
// and VW-bit divisor, producing the QW low quotient bits. The caller
// guarantees (a >> QW) < b, i.e. the quotient fits QW bits, and b != 0; the
// initial partial remainder is then a >> QW. A new operand pair is accepted
// every clock (non-blocking); results leave QW clocks later with a TW-bit
// tag that travels alongside (sign, error flags). Used by
// sensing_resistance and convert_temperature in place of a vendor divider.
module pipelined_divider #(
  parameter int unsigned DW = 48,
  parameter int unsigned VW = 32,
  parameter int unsigned QW = 32,
  parameter int unsigned TW = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           s_valid,
  input  logic [DW-1:0]  s_dividend,
  input  logic [VW-1:0]  s_divisor,
  input  logic [TW-1:0]  s_tag,
  output logic           m_valid,
  output logic [QW-1:0]  m_quotient,
  output logic [VW-1:0]  m_remainder,
  output logic [TW-1:0]  m_tag
);
  // Stage registers; index s holds the state after s quotient bits.
  logic [VW-1:0] rem_q [1:QW];
  logic [QW-1:0] low_q [1:QW];   // dividend bits still to bring down, MSB first
  logic [QW-1:0] quo_q [1:QW];
  logic [VW-1:0] div_q [1:QW];
  logic [TW-1:0] tag_q [1:QW];
  logic          v_q   [1:QW];

  for (genvar s = 0; s < QW; s++) begin : g_stage
    logic [VW-1:0] rem_i, div_i;
    logic [QW-1:0] low_i, quo_i;
    logic [TW-1:0] tag_i;
    logic          v_i;
    logic [VW:0]   trial;
    if (s == 0) begin : g_first
      assign rem_i = VW'(s_dividend >> QW);
      assign low_i = s_dividend[QW-1:0];
      assign quo_i = '0;
      assign div_i = s_divisor;
      assign tag_i = s_tag;
      assign v_i   = s_valid;
    end else begin : g_next
      assign rem_i = rem_q[s];
      assign low_i = low_q[s];
      assign quo_i = quo_q[s];
      assign div_i = div_q[s];
      assign tag_i = tag_q[s];
      assign v_i   = v_q[s];
    end
    assign trial = {rem_i, low_i[QW-1]};
    always_ff @(posedge clk) begin
      if (trial >= {1'b0, div_i}) begin
        rem_q[s+1] <= VW'(trial - {1'b0, div_i});
        quo_q[s+1] <= {quo_i[QW-2:0], 1'b1};
      end else begin
        rem_q[s+1] <= VW'(trial);
        quo_q[s+1] <= {quo_i[QW-2:0], 1'b0};
      end
      low_q[s+1] <= low_i << 1;
      div_q[s+1] <= div_i;
      tag_q[s+1] <= tag_i;
    end
    always_ff @(posedge clk) begin
      if (!rst_n) v_q[s+1] <= 1'b0;
      else        v_q[s+1] <= v_i;
    end
  end

  assign m_valid     = v_q[QW];
  assign m_quotient  = quo_q[QW];
  assign m_remainder = rem_q[QW];
  assign m_tag       = tag_q[QW];
endmodule
