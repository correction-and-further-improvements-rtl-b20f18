// tb_mmm_pe: exhaustive self-checking test of the inner processing element.
//
// For every combination of A[i], B[j], Q[i], M[j], P_i[j] and every carry
// bundle s1..s4 whose carry value C1 + 2*C2 is at most 2 (the only values the
// array can produce), it checks the column-addition identity
//   P_out + 2*(C1_out + 2*C2_out) = P_in + A*B + Q*M + C1_in + 2*C2_in
// with the carry values recovered from the bundles, and that the carry out
// is again at most 2. The reference is plain integer arithmetic.
// The PE is combinational; a small clock only paces the watchdog.
module tb_mmm_pe;
  import mmm_pkg::*;

  logic   clk = 1'b0;
  logic   a_i, b_j, q_i, m_j, p_in, p_out;
  carry_t s_in, s_out;
  int     checks = 0;
  int     failures = 0;

  mmm_pe dut (.a_i, .b_j, .q_i, .m_j, .p_in, .s_in, .p_out, .s_out);

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned cin_val, cout_val, lhs, rhs;
    for (int unsigned s = 0; s < 16; s++) begin
      for (int unsigned v = 0; v < 32; v++) begin
        s_in = carry_t'(s[3:0]);
        cin_val = (((s >> 2) & 1) ^ (s & 1)) + 2 * ((((s >> 3) & 1) & ((s >> 1) & 1)) ^ (((s >> 2) & 1) & (s & 1)));
        if (cin_val > 2) continue;
        {a_i, b_j, q_i, m_j, p_in} = v[4:0];
        #1;
        cout_val = int'(carry_value(s_out));
        lhs = int'(p_out) + 2 * cout_val;
        rhs = int'(p_in) + int'(a_i & b_j) + int'(q_i & m_j) + cin_val;
        checks++;
        if (lhs != rhs) begin
          failures++;
          $display("FAIL s=%b abqmp=%b: out %0d expected %0d", s[3:0], v[4:0], lhs, rhs);
        end
        checks++;
        if (cout_val > 2) begin
          failures++;
          $display("FAIL s=%b abqmp=%b: carry out %0d above 2", s[3:0], v[4:0], cout_val);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
