// mmm_delay: W-bit shift register of D clocks (D >= 1), no reset.
//
// Used by the systolic array to skew operand bits on the way in and to line
// the result bits up again on the way out. dout is din delayed by D clocks.
module mmm_delay #(
  parameter int unsigned W = 1,
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  logic [W-1:0] stage [D];

  always_ff @(posedge clk) begin
    stage[0] <= din;
    for (int unsigned k = 1; k < D; k++) stage[k] <= stage[k-1];
  end

  assign dout = stage[D-1];

endmodule
