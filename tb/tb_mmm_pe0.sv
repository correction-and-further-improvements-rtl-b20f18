// tb_mmm_pe0: exhaustive self-checking test of the column-0 processing element.
//
// With an odd modulus (M[0] = 1) the quotient bit must make the column sum
// even: Q = (P + A*B[0]) mod 2, and P + A*B[0] + Q*M[0] = 2*(C1 + 2*C2) with
// the carry value recovered from the output bundle. Both are checked for all
// eight input combinations, against integer arithmetic.
module tb_mmm_pe0;
  import mmm_pkg::*;

  logic   clk = 1'b0;
  logic   a_i, b_0, m_0, p_in, q_out;
  carry_t s_out;
  int     checks = 0;
  int     failures = 0;

  mmm_pe0 dut (.a_i, .b_0, .m_0, .p_in, .q_out, .s_out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned sum, q_exp;
    m_0 = 1'b1;
    for (int unsigned v = 0; v < 8; v++) begin
      {a_i, b_0, p_in} = v[2:0];
      #1;
      q_exp = (int'(p_in) + int'(a_i & b_0)) % 2;
      checks++;
      if (int'(q_out) != q_exp) begin
        failures++;
        $display("FAIL a=%b b0=%b p=%b: Q=%b expected %0d", a_i, b_0, p_in, q_out, q_exp);
      end
      sum = int'(p_in) + int'(a_i & b_0) + q_exp;
      checks++;
      if (2 * int'(carry_value(s_out)) != sum) begin
        failures++;
        $display("FAIL a=%b b0=%b p=%b: carry %0d expected %0d", a_i, b_0, p_in,
                 carry_value(s_out), sum / 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
