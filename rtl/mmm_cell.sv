// mmm_cell: one registered cell of the two-dimensional Montgomery systolic array.
//
// Wraps one processing element (mmm_pe0 in column 0, mmm_pe elsewhere) with
// the pipeline registers of the array. Every output is registered, so a cell
// evaluates one clock after its left neighbour and one clock after the cell
// above-right of it, which is what lets a new multiplication enter the array
// on every clock.
//   - s_out, p_out: carry bundle to the right, result bit P_{i+1}[j-1] down-left
//   - a_out, q_out: row bits A[i], Q[i] passed to the right (one register)
//   - b_out, m_out: column bits B[j], M[j] passed down through two registers,
//     because the row below evaluates column j two clocks later
// In column 0 (FIRST = 1) the cell computes Q[i] itself, ignores q_in and s_in,
// and drives p_out with 0. Registering every PE output follows the systolic
// principle of the array; the exact register placement is this design's choice.
// No reset: the cells only carry data, and validity is tracked outside.
module mmm_cell
  import mmm_pkg::*;
#(
  parameter bit FIRST = 1'b0  // 1 for the column-0 cell
) (
  input  logic   clk,
  input  logic   a_in,
  input  logic   q_in,
  input  logic   b_in,
  input  logic   m_in,
  input  logic   p_in,
  input  carry_t s_in,
  output logic   a_out,
  output logic   q_out,
  output logic   b_out,
  output logic   m_out,
  output logic   p_out,
  output carry_t s_out
);

  logic   q_now, p_now;
  carry_t s_now;
  logic   b_d1, m_d1;

  if (FIRST) begin : g_first
    logic   unused_in;
    carry_t s_first;
    assign unused_in = q_in ^ (^s_in);
    mmm_pe0 u_pe0 (
      .a_i  (a_in),
      .b_0  (b_in),
      .m_0  (m_in),
      .p_in (p_in),
      .q_out(q_now),
      .s_out(s_first)
    );
    assign s_now = s_first;
    assign p_now = 1'b0;
  end else begin : g_inner
    mmm_pe u_pe (
      .a_i  (a_in),
      .b_j  (b_in),
      .q_i  (q_in),
      .m_j  (m_in),
      .p_in (p_in),
      .s_in (s_in),
      .p_out(p_now),
      .s_out(s_now)
    );
    assign q_now = q_in;
  end

  always_ff @(posedge clk) begin
    s_out <= s_now;
    p_out <= p_now;
    a_out <= a_in;
    q_out <= q_now;
    b_d1  <= b_in;
    m_d1  <= m_in;
    b_out <= b_d1;
    m_out <= m_d1;
  end

endmodule
