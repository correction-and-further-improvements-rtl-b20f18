// mmm_pe: inner processing element (PE) of the Montgomery systolic array.
//
// PE (i, j) adds one column of the row-i update P_{i+1} = (P_i + A[i]*B + Q[i]*M)/2:
//   P_{i+1}[j-1] + 2*carry_out = P_i[j] + A[i]B[j] + Q[i]M[j] + carry_in
// The carry is carried as the bundle s1..s4 (see mmm_pkg). The logic is a
// three-level gate network; the gate names g11..g51 follow the dependency
// graph of the published CPL-3 cell:
//   level 1: g11 = A&B, g12 = Q&M, g31 = s1&s3, g41 = s2&s4, g42 = s2^s4 (= C1 in)
//   level 2: g21 = g11&g12, g22 = g11^g12, g51 = g31^g41 (= C2 in),
//            g13 = g42&P, g14 = g42^P
//   level 3: g32 = g21^g51^g13 (one three-input XOR), g23 = g51^g13,
//            g33 = g22&g14, g34 = g22^g14
//   outputs: s1 = g21, s2 = g32, s3 = g23, s4 = g33, P_out = g34
// The gate types and connections follow the published dependency graph.
// Note that the first term of s2 is the AND of A&B and Q&M (the same signal
// as s1), and that s4 is an AND: an XOR there would equal P_out and break the
// addition.
//
// Purely combinational: the systolic registers live in mmm_cell.
module mmm_pe
  import mmm_pkg::*;
(
  input  logic   a_i,    // A[i], multiplier bit of this row
  input  logic   b_j,    // B[j], multiplicand bit of this column
  input  logic   q_i,    // Q[i], quotient bit of this row
  input  logic   m_j,    // M[j], modulus bit of this column
  input  logic   p_in,   // P_i[j], partial result bit from the row above
  input  carry_t s_in,   // carry bundle from PE (i, j-1)
  output logic   p_out,  // P_{i+1}[j-1]
  output carry_t s_out   // carry bundle to PE (i, j+1)
);

  // Level 1
  logic g11, g12, g31, g41, g42;
  // Level 2
  logic g21, g22, g51, g13, g14;
  // Level 3
  logic g32, g23, g33, g34;

  always_comb begin
    g11 = a_i & b_j;
    g12 = q_i & m_j;
    g31 = s_in.s1 & s_in.s3;
    g41 = s_in.s2 & s_in.s4;
    g42 = s_in.s2 ^ s_in.s4;

    g21 = g11 & g12;
    g22 = g11 ^ g12;
    g51 = g31 ^ g41;
    g13 = g42 & p_in;
    g14 = g42 ^ p_in;

    g32 = g21 ^ g51 ^ g13;
    g23 = g51 ^ g13;
    g33 = g22 & g14;
    g34 = g22 ^ g14;
  end

  assign p_out    = g34;
  assign s_out.s1 = g21;
  assign s_out.s2 = g32;
  assign s_out.s3 = g23;
  assign s_out.s4 = g33;

endmodule
