// Dual-mode subtractor: one 64-bit or two independent 32-bit subtractions.
//
// d = a - b. Two 32-bit subtractors each add the inverted subtrahend with a
// carry-in of one; in DP mode (dp_sp = 1) the carry out of the lower half
// feeds the upper half instead, forming one 64-bit subtractor. Used by the
// mantissa divider for E = B - C and I = A - H, which the design performs at
// 64 bits in DP mode and at 32 bits per lane in dual-SP mode.
// Purely combinational.
module dual_sub (
  input  logic        dp_sp,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] d
);

  logic [32:0] lo, hi;

  always_comb begin
    lo = {1'b0, a[31:0]} + {1'b0, ~b[31:0]} + 33'd1;
    hi = {1'b0, a[63:32]} + {1'b0, ~b[63:32]} + (dp_sp ? {32'b0, lo[32]} : 33'd1);
    d  = {hi[31:0], lo[31:0]};
  end

endmodule
