// mmm_pkg: types and constants shared by the Montgomery systolic multiplier.
//
// The carry that travels from one processing element (PE) to its right-hand
// neighbour is kept in four one-bit signals s1..s4 instead of the usual pair
// of carry bits. The ordinary carry pair can be recovered from them:
//   C1 = s2 ^ s4                  (weight 2 relative to the PE's own bit)
//   C2 = (s1 & s3) ^ (s2 & s4)    (weight 4)
// so the carry value entering a PE is C1 + 2*C2, which never exceeds 2.
// Keeping the carry in this split form lets every PE finish in three gate
// levels.
package mmm_pkg;

  // Carry bundle passed left to right along a row of the array.
  typedef struct packed {
    logic s1;
    logic s2;
    logic s3;
    logic s4;
  } carry_t;

  // Ordinary carry value (0..3) held by a carry bundle; used by checkers.
  function automatic logic [1:0] carry_value(carry_t c);
    logic c1, c2;
    c1 = c.s2 ^ c.s4;
    c2 = (c.s1 & c.s3) ^ (c.s2 & c.s4);
    return {c2, c1};
  endfunction

endpackage
