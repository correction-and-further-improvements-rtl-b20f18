// tb_mmm_systolic: end-to-end self-checking test of the systolic Montgomery
// multiplier at its default width (N = 32, no parameter override).
//
// Drives a stream of multiplications, one per clock where the stream is not
// deliberately idle, and checks every result against two references computed
// in the testbench: the bit-serial Montgomery recurrence itself, and the
// congruence P * 2^N = A * B (mod M) together with the bound P < B + M. It also
// checks that each result appears exactly 3N+1 clocks after its operands,
// that results keep their order, and that out_valid never rises on its own.
// Mechanisms that must each happen at least once: back-to-back issue, an idle
// gap in the stream, a result needing a final subtraction (P >= M), a modulus
// with its top bit set, and a zero operand.
module tb_mmm_systolic;
  localparam int unsigned N       = 32;
  localparam int unsigned LATENCY = 3 * N + 1;
  localparam int unsigned NUM_OPS = 600;

  typedef struct packed {
    int unsigned  due;
    logic [N-1:0] a, b, m;
  } op_t;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid;
  logic [N-1:0] a, b, m;
  logic         out_valid;
  logic [N:0]   p;

  int checks = 0;
  int failures = 0;
  int unsigned cycle = 0;
  int n_back_to_back = 0, n_gap = 0, n_ge_m = 0, n_msb_m = 0, n_zero = 0;

  op_t pending[$];

  mmm_systolic dut (.clk, .rst_n, .in_valid, .a, .b, .m, .out_valid, .p);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Watchdog.
  initial begin
    repeat (NUM_OPS * 3 + LATENCY + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] w;
    for (int k = 0; k < N; k += 32) w = (w << 32) | N'($urandom());
    return w;
  endfunction

  // Bit-serial Montgomery recurrence.
  function automatic logic [N+1:0] mont_ref(logic [N-1:0] x, logic [N-1:0] y, logic [N-1:0] md);
    logic [N+1:0] acc = '0;
    logic [N+1:0] t;
    for (int i = 0; i < N; i++) begin
      t = acc + (x[i] ? (N+2)'(y) : '0);
      if (t[0]) t = t + (N+2)'(md);
      acc = t >> 1;
    end
    return acc;
  endfunction

  task automatic check_result(op_t op);
    logic [N+1:0]   exp_p;
    logic [3*N+3:0] lhs, rhs;
    exp_p = mont_ref(op.a, op.b, op.m);
    checks++;
    if ({1'b0, p} != exp_p) begin
      failures++;
      $display("FAIL a=%h b=%h m=%h: p=%h expected %h", op.a, op.b, op.m, p, exp_p);
    end
    lhs = ((3*N+4)'(p) << N) % (3*N+4)'(op.m);
    rhs = ((3*N+4)'(op.a) * (3*N+4)'(op.b)) % (3*N+4)'(op.m);
    checks++;
    if (lhs != rhs || (N+2)'(p) >= (N+2)'(op.b) + (N+2)'(op.m)) begin
      failures++;
      $display("FAIL a=%h b=%h m=%h: p=%h breaks the congruence or bound", op.a, op.b, op.m, p);
    end
    if ((N+1)'(op.m) <= p) n_ge_m++;
  endtask

  // Output monitor (samples between rising edges).
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (pending.size() == 0) begin
        failures++;
        $display("FAIL cycle %0d: out_valid with nothing in flight", cycle);
      end else begin
        op_t op;
        op = pending.pop_front();
        if (op.due != cycle) begin
          failures++;
          $display("FAIL result due in cycle %0d came in cycle %0d", op.due, cycle);
        end
        check_result(op);
      end
    end else if (rst_n && pending.size() != 0 && pending[0].due < cycle) begin
      failures++;
      checks++;
      $display("FAIL result due in cycle %0d missing", pending[0].due);
      void'(pending.pop_front());
    end
  end

  initial begin
    bit prev_valid;
    bit gap_seen;
    prev_valid = 1'b0;
    gap_seen = 1'b0;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a = '0; b = '0; m = '1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NUM_OPS; k++) begin
      @(negedge clk);
      if (k > 4 && $urandom_range(3) == 0) begin
        in_valid = 1'b0;
        a = rand_word(); b = rand_word(); m = rand_word();
        if (prev_valid) gap_seen = 1'b1;
        prev_valid = 1'b0;
        continue;
      end
      case (k)
        0:       begin a = '0;         b = rand_word(); m = rand_word() | 1; end
        1:       begin a = rand_word(); b = '0;         m = rand_word() | 1; end
        2:       begin a = '1;         b = '1;          m = '1; end
        3:       begin a = '1;         b = '1;          m = N'(1); end
        default: begin a = rand_word(); b = rand_word(); m = rand_word() | 1; end
      endcase
      in_valid = 1'b1;
      if (prev_valid) n_back_to_back++;
      if (gap_seen) begin n_gap++; gap_seen = 1'b0; end
      if (m[N-1]) n_msb_m++;
      if (a == '0 || b == '0) n_zero++;
      begin
        op_t op;
        op.due = cycle + LATENCY;
        op.a = a;
        op.b = b;
        op.m = m;
        pending.push_back(op);
      end
      prev_valid = 1'b1;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 5) @(negedge clk);
    checks++;
    if (pending.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came", pending.size());
    end
    $display("mechanisms: back_to_back=%0d gap=%0d result_ge_m=%0d msb_modulus=%0d zero_operand=%0d",
             n_back_to_back, n_gap, n_ge_m, n_msb_m, n_zero);
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back issue"); end
    if (n_gap == 0)          begin failures++; $display("FAIL no idle gap"); end
    if (n_ge_m == 0)         begin failures++; $display("FAIL no result >= M"); end
    if (n_msb_m == 0)        begin failures++; $display("FAIL no modulus with top bit set"); end
    if (n_zero == 0)         begin failures++; $display("FAIL no zero operand"); end
    checks += 5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
