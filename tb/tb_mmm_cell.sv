// tb_mmm_cell: self-checking test of the registered array cell, in both its
// inner form (FIRST = 0) and its column-0 form (FIRST = 1).
//
// Random inputs are applied every clock (carry bundles restricted to carry
// values 0..2). One clock later the registered outputs must hold the column
// sum of those inputs (checked with integer arithmetic), A and Q must have
// moved one register to the right, and B and M must appear at the bottom
// exactly two clocks after they entered.
module tb_mmm_cell;
  import mmm_pkg::*;

  logic   clk = 1'b0;
  logic   a_in, q_in, b_in, m_in, p_in;
  carry_t s_in;
  logic   a_o [2], q_o [2], b_o [2], m_o [2], p_o [2];
  carry_t s_o [2];
  int     checks = 0;
  int     failures = 0;

  mmm_cell #(.FIRST(1'b0)) dut_inner (
    .clk, .a_in, .q_in, .b_in, .m_in, .p_in, .s_in,
    .a_out(a_o[0]), .q_out(q_o[0]), .b_out(b_o[0]), .m_out(m_o[0]), .p_out(p_o[0]), .s_out(s_o[0])
  );
  mmm_cell #(.FIRST(1'b1)) dut_first (
    .clk, .a_in, .q_in, .b_in, .m_in, .p_in, .s_in,
    .a_out(a_o[1]), .q_out(q_o[1]), .b_out(b_o[1]), .m_out(m_o[1]), .p_out(p_o[1]), .s_out(s_o[1])
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    logic       pa, pq, pb, pm, pp, ppb, ppm;
    carry_t     ps;
    int unsigned cin, qexp;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      // Previous clock's inputs (k-1) and the one before (k-2).
      ppb = pb; ppm = pm;
      pa = a_in; pq = q_in; pb = b_in; pm = m_in; pp = p_in; ps = s_in;
      if (k >= 2) begin
        cin = int'(carry_value(ps));
        // Inner cell: registered column sum of last clock's inputs.
        expect_eq("inner sum", int'(p_o[0]) + 2 * int'(carry_value(s_o[0])),
                  int'(pp) + int'(pa & pb) + int'(pq & pm) + cin);
        expect_eq("inner a", int'(a_o[0]), int'(pa));
        expect_eq("inner q", int'(q_o[0]), int'(pq));
        expect_eq("inner b", int'(b_o[0]), int'(ppb));
        expect_eq("inner m", int'(m_o[0]), int'(ppm));
        // Column-0 cell: quotient bit, and the carry of the column sum (the
        // sum is even whenever M[0] = 1).
        qexp = (int'(pp) + int'(pa & pb)) % 2;
        expect_eq("first q", int'(q_o[1]), qexp);
        expect_eq("first sum", 2 * int'(carry_value(s_o[1])),
                  ((int'(pp) + int'(pa & pb) + int'(qexp[0] & pm)) / 2) * 2);
        expect_eq("first p", int'(p_o[1]), 0);
        expect_eq("first a", int'(a_o[1]), int'(pa));
        expect_eq("first b", int'(b_o[1]), int'(ppb));
      end
      {a_in, q_in, b_in, p_in} = 4'($urandom());
      m_in = (k % 4 == 0) ? 1'($urandom()) : 1'b1;
      do s_in = carry_t'($urandom()); while (carry_value(s_in) > 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
