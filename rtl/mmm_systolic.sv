// mmm_systolic: fully pipelined two-dimensional systolic Montgomery multiplier.
//
// Computes P = A * B * 2^-N (mod M) by the bit-serial Montgomery recurrence
//   P_0 = 0;  Q[i] = (P_i + A[i]*B) mod 2;  P_{i+1} = (P_i + A[i]*B + Q[i]*M) / 2
// unrolled into N rows of N+2 cells (mmm_cell). Row i performs iteration i;
// column j handles bit j. Cell (i, j) evaluates in clock 1 + 2i + j after the
// operands were sampled: it needs the carry of cell (i, j-1) and the bit
// P_i[j] from cell (i-1, j+1), both produced one clock earlier. Column N+1
// only turns the last carry into result bit N; B and M are zero there.
//
// Operands enter on input skew lines (A[i] is delayed 2i+1 clocks, B[j] and
// M[j] j+1 clocks); result bit j leaves row N-1 in clock 2N+j+1 and is
// delayed N-j more clocks so the whole result appears at once.
//
// Interface and timing:
//   - in_valid/a/b/m are sampled on every rising clock; a new multiplication
//     may start every clock. M must be odd (checked by an assertion).
//   - out_valid/p show the result LATENCY = 3N+1 clocks after the operands
//     were sampled, in the same order. p = P_N satisfies p < B + M < 2^(N+1)
//     and p = A*B*2^-N mod M up to one multiple of M; no final subtraction.
//   - rst_n (active low, synchronous) clears only the valid pipeline.
// The recurrence and the cell network follow the published design; the skew
// and deskew lines, the valid pipeline, N's default and the port list are
// this design's own choices.
module mmm_systolic
  import mmm_pkg::*;
#(
  parameter int unsigned N = 32  // operand width in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] m,
  output logic         out_valid,
  output logic [N:0]   p
);

  localparam int unsigned COLS    = N + 2;
  localparam int unsigned LATENCY = 3 * N + 1;

  // Cell outputs, indexed [row][column].
  carry_t s_w [N][COLS];
  logic   p_w [N][COLS];
  logic   a_w [N][COLS];
  logic   q_w [N][COLS];
  logic   b_w [N][COLS];
  logic   m_w [N][COLS];

  // Skewed operand bits.
  logic a_sk [N];
  logic b_sk [COLS];
  logic m_sk [COLS];

  for (genvar i = 0; i < N; i++) begin : g_a_skew
    mmm_delay #(.W(1), .D(2 * i + 1)) u_a (.clk(clk), .din(a[i]), .dout(a_sk[i]));
  end

  for (genvar j = 0; j < COLS; j++) begin : g_bm_skew
    if (j < N) begin : g_bit
      mmm_delay #(.W(2), .D(j + 1)) u_bm (
        .clk (clk),
        .din ({b[j], m[j]}),
        .dout({b_sk[j], m_sk[j]})
      );
    end else begin : g_zero
      assign b_sk[j] = 1'b0;
      assign m_sk[j] = 1'b0;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < COLS; j++) begin : g_col
      carry_t s_in;
      logic   a_in, q_in, b_in, m_in, p_in;

      if (j == 0) begin : g_left
        assign s_in = '0;
        assign a_in = a_sk[i];
        assign q_in = 1'b0;
      end else begin : g_mid
        assign s_in = s_w[i][j-1];
        assign a_in = a_w[i][j-1];
        assign q_in = q_w[i][j-1];
      end

      if (i == 0) begin : g_top
        assign b_in = b_sk[j];
        assign m_in = m_sk[j];
        assign p_in = 1'b0;              // P_0 = 0
      end else begin : g_below
        assign b_in = b_w[i-1][j];
        assign m_in = m_w[i-1][j];
        if (j + 1 < COLS) begin : g_p
          assign p_in = p_w[i-1][j+1];   // P_i[j] from cell (i-1, j+1)
        end else begin : g_p0
          assign p_in = 1'b0;            // P_i[N+1] = 0
        end
      end

      mmm_cell #(.FIRST(j == 0)) u_cell (
        .clk  (clk),
        .a_in (a_in),
        .q_in (q_in),
        .b_in (b_in),
        .m_in (m_in),
        .p_in (p_in),
        .s_in (s_in),
        .a_out(a_w[i][j]),
        .q_out(q_w[i][j]),
        .b_out(b_w[i][j]),
        .m_out(m_w[i][j]),
        .p_out(p_w[i][j]),
        .s_out(s_w[i][j])
      );
    end
  end

  // Result bit j = P_N[j] comes from cell (N-1, j+1); line them up.
  for (genvar j = 0; j <= N; j++) begin : g_deskew
    if (j < N) begin : g_dly
      mmm_delay #(.W(1), .D(N - j)) u_p (.clk(clk), .din(p_w[N-1][j+1]), .dout(p[j]));
    end else begin : g_direct
      assign p[j] = p_w[N-1][j+1];
    end
  end

  // Valid pipeline, LATENCY clocks long.
  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

  // Montgomery reduction by 2 needs an odd modulus.
  a_m_odd : assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> m[0])
    else $error("mmm_systolic: even modulus");

endmodule
