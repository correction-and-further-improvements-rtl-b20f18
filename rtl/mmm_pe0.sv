// mmm_pe0: column-0 processing element of the Montgomery systolic array.
//
// PE (i, 0) picks the quotient bit that makes the row sum even,
//   Q[i] = P_i[0] ^ (A[i] & B[0]),
// and, instead of a result bit (P_{i+1}[-1] is always zero), it starts the
// carry chain of row i. Its carry bundle is what the inner PE network gives
// with an all-zero carry input: s1 = s2 = A[i]&B[0]&Q[i]&M[0], s3 = 0 and
// s4 = ((A[i]&B[0]) ^ (Q[i]&M[0])) & P_i[0]. The quotient rule is the
// published one; reusing the inner network with zero carries is this design's
// reading of the published initial conditions. M must be odd (M[0] = 1).
//
// Purely combinational. Q[i] feeds this PE's own Q&M gate, so this PE is two
// gate levels deeper than the inner PE.
module mmm_pe0
  import mmm_pkg::*;
(
  input  logic   a_i,    // A[i]
  input  logic   b_0,    // B[0]
  input  logic   m_0,    // M[0] (1 for an odd modulus)
  input  logic   p_in,   // P_i[0]
  output logic   q_out,  // Q[i]
  output carry_t s_out   // carry bundle to PE (i, 1)
);

  logic ab, qm, v, u;

  always_comb begin
    ab    = a_i & b_0;
    q_out = p_in ^ ab;
    qm    = q_out & m_0;
    v     = ab & qm;
    u     = ab ^ qm;
  end

  assign s_out.s1 = v;
  assign s_out.s2 = v;
  assign s_out.s3 = 1'b0;
  assign s_out.s4 = u & p_in;

endmodule
