# Systolic Montgomery modular multiplier with a three-level processing element

This is a fully pipelined hardware Montgomery multiplier. Given N-bit numbers
A, B and an odd modulus M, it returns

    P = A * B * 2^-N  (mod M),   with 0 <= P < B + M

and it accepts a new multiplication on every clock. It is a two-dimensional
systolic array in the style of C. D. Walter's array. Each bit cell (processing
element, PE) is a small gate network. The point of this design is that network.
The carry passed from cell to cell is kept as four bits, s1..s4, instead of the
usual two. This lets the cell finish in three gate levels: one level is a
three-input XOR, counted as one gate. Earlier forms of the same cell needed
five levels (Walter) or four (a later boolean rewrite). The cell's depth sets
the clock period of the whole array.

## The recurrence being unrolled

Montgomery multiplication by bits, with R = 2^N:

    P_0 = 0
    for i = 0 .. N-1:
        Q[i]    = (P_i + A[i]*B) mod 2          -- makes the sum even (M is odd)
        P_{i+1} = (P_i + A[i]*B + Q[i]*M) / 2

Row i of the array performs iteration i. Column j handles bit j of the row sum:

    P_{i+1}[j-1] + 2*carry_out = P_i[j] + A[i]B[j] + Q[i]M[j] + carry_in

The division by 2 means that cell (i, j) outputs bit j-1 of the next partial
result. So cell (i, j) reads P_i[j] from cell (i-1, j+1), the cell above and to
the right. It reads carry_in from its left neighbour (i, j-1).

P_i never reaches B + M < 2^(N+1), so it has N+1 bits. The array therefore has
N rows and N+2 columns, j = 0 .. N+1. B and M are zero in columns N and N+1.
Column N+1 only turns the last carry of its row into bit N of the result.

## The carry as four bits

The carry into a column can be 0, 1 or 2. Written with two bits it is
C1 + 2*C2. This design never forms C1 and C2. It passes four bits s1..s4, and:

    C1 = s2 ^ s4
    C2 = (s1 & s3) ^ (s2 & s4)

Both are only one gate level deep given s1..s4. The receiving cell can rebuild
them in its first level, while it also forms A&B and Q&M. This moves work from
the end of one cell's critical path to the start of the next, where it runs in
parallel with the partial products.

## The processing element (`mmm_pe`)

With x = A[i]&B[j] and y = Q[i]&M[j], the gates in each level are:

| level | gates |
|-------|-------|
| 1 | g11 = A&B, g12 = Q&M, g31 = s1&s3, g41 = s2&s4, g42 = s2^s4 (= C1) |
| 2 | g21 = g11&g12, g22 = g11^g12, g51 = g31^g41 (= C2), g13 = g42&P, g14 = g42^P |
| 3 | g32 = g21^g51^g13 (three-input XOR), g23 = g51^g13, g33 = g22&g14, g34 = g22^g14 |

The outputs are s1 = g21, s2 = g32, s3 = g23, s4 = g33 and P_out = g34.

Why it adds correctly:

* The sum is P + x + y + C1 + 2*C2.
* Let u = x^y and v = x&y, so x + y = u + 2v. Let P + C1 = g14 + 2*g13.
* The low bits give u + g14 = P_out + 2*g33.
* That leaves a weight-2 sum g33 + v + (g13 + C2). Here g13 and C2 are never
  both 1, because the carry never exceeds 2. So g13 + C2 = g23.
* The new C1 is the sum bit of three bits: s2 ^ s4 = (v ^ g23) ^ g33.
* The new C2 is their majority: (v & g23) ^ ((v ^ g23) & g33) = (s1 & s3) ^ (s2 & s4).

Two details are easy to get wrong when writing this cell as equations:

* The first term of s2 is (A&B) & (Q&M), the same signal as s1. It is not
  (A&B) ^ (Q&M).
* s4 is an AND. An XOR there would make s4 equal to P_out and break the
  addition.

Turning g33 into an XOR is the fault that the PE testbench is shown to catch.

## The column-0 element (`mmm_pe0`)

No result bit comes out of column 0, because bit -1 of an even sum is always
zero. Instead this cell chooses the quotient bit:

    Q[i] = P_i[0] ^ (A[i] & B[0])

It also starts the row's carry. This is the PE network with all carry inputs
at zero, which reduces to:

* s1 = s2 = x & y
* s3 = 0
* s4 = (x ^ y) & P

Q[i] feeds this cell's own Q&M gate, so column 0 is about two gate levels
deeper than the other cells. Nothing in this design hides that.

## Array timing (`mmm_cell`, `mmm_systolic`)

Each `mmm_cell` wraps one PE and registers every output:

* s and P go one register onward.
* A[i] and Q[i] move one register to the right per column.
* B[j] and M[j] move two registers down per row.

Cell (i, j) evaluates in clock 1 + 2i + j after the operands are sampled. Its
left neighbour and its upper-right neighbour both ran one clock earlier.
Operand bits are skewed on the way in:

* A[i] is delayed by 2i+1 clocks.
* B[j] and M[j] are delayed by j+1 clocks.

Result bit j leaves cell (N-1, j+1) in clock 2N+j+1. It is delayed N-j more
clocks so that all bits appear together.

The data registers are not reset. Operations in flight never read one
another's registers, so idle clocks and reset need no flushing.

### Interface of `mmm_systolic` (parameter `N`, default 32)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | clock, rising edge |
| rst_n | in | 1 | synchronous, active low; clears the valid pipeline only |
| in_valid | in | 1 | a, b, m hold a multiplication this clock |
| a, b | in | N | operands, any N-bit values |
| m | in | N | modulus; must be odd (an assertion checks it) |
| out_valid | out | 1 | p holds a result |
| p | out | N+1 | A*B*2^-N mod M, possibly plus one M |

* Latency is 3N+1 clocks, from the clock in which the operands are presented
  to the clock in which the result is presented.
* Throughput is one result per clock.
* Results come out in issue order.
* There is no backpressure.

At N = 32 synthesis gives about 11,000 flip-flops and about 3,400 shift-register
bits. The flip-flops are the cell registers: up to 11 per cell in 32 x 34
cells, fewer where B and M are constant zero. The shift-register bits are the
skew and deskew lines.

## Where this design makes its own choices

* **Operand width.** N = 32 is a default chosen here. It has been simulated at
  N = 4 and N = 32.
* **No final subtraction.** P can be as large as B + M - 1. Reduce it with one
  conditional subtraction of M if a result below M is needed. The usual
  alternative is to feed P back as an operand, because it stays bounded.
* **Pipeline arrangement.** Register placement, skew and deskew lines, the
  valid signal and the port list are choices made here. The 3N+1 latency and
  the one-per-clock throughput follow from them.
* **Column-0 carry and boundary values.** The carry outputs of column 0 are
  derived here as described above. The boundary values are P_0 = 0, zero carry
  into column 0, and zero P into column N+1.
* **Odd modulus.** This is required for Q[i] to make the row sum even. It is
  assumed and asserted, not stated in the algorithm.

The corrected four-level cell of the earlier boolean rewrite, and Walter's
five-level cell, are references for comparison only. Neither is built here.

## Files

| file | contents |
|------|----------|
| `rtl/mmm_pkg.sv` | `carry_t` bundle {s1, s2, s3, s4} and `carry_value()` (C1 + 2*C2) |
| `rtl/mmm_pe.sv` | three-level inner PE |
| `rtl/mmm_pe0.sv` | column-0 PE (quotient bit) |
| `rtl/mmm_cell.sv` | registered cell, parameter `FIRST` selects the column-0 form |
| `rtl/mmm_delay.sv` | W-bit, D-clock shift register for skew/deskew |
| `rtl/mmm_systolic.sv` | top: the array, skew lines, valid pipeline |
| `tb/tb_mmm_pe.sv` | PE, every input with a carry of at most 2, against integer addition |
| `tb/tb_mmm_pe0.sv` | column-0 PE, all inputs |
| `tb/tb_mmm_cell.sv` | both cell forms, 1000 random clocks, register timing |
| `tb/tb_mmm_systolic.sv` | top at N = 32, 600 issue slots with random gaps |
| `tb/tb_mmm_systolic_small.sv` | top at N = 4, every A, B and odd M (2048 products) |

The two top-level testbenches check each result two ways:

* against a bit-serial model of the recurrence;
* against the congruence P * 2^N = A*B (mod M) and the bound P < B + M.

They also check the exact 3N+1 clock latency and that results keep their
order. They count back-to-back issues, idle gaps, results >= M, moduli with
the top bit set and zero operands, and fail if any of these never happened.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/mmm_pkg.sv tb/tb_mmm_systolic.sv --top-module tb_mmm_systolic
    ./obj_dir/Vtb_mmm_systolic

Every testbench ends with a line `TB_RESULT checks=<n> failures=<n>`. To
change the width, set `N` on `mmm_systolic`. The testbenches compute their
references for whatever `N` they declare.
