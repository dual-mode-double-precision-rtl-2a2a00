// Dual-mode rounding, round to nearest (ties to even), third stage.
//
// Input x is the aligned and right-shifted quotient: a DP mantissa in x[63:11]
// with guard bit x[10], or SP-2 in x[63:40] (guard x[39]) and SP-1 in x[31:8]
// (guard x[7]); sticky_in holds the bits the right shifter dropped. The unit
// at the last place is computed for each format and added with two 32-bit
// incrementers: each one rounds an SP lane on its own, and in DP mode the
// carry of the lower one propagates into the upper one so that together they
// round the 53-bit DP mantissa. Bits below the last place are cleared.
// cout flags a lane whose mantissa rounded up to 2.0 (all ones plus one);
// the normalization that follows shifts it right by one. Purely combinational.
module round_dual
  import dpdsp_pkg::*;
(
  input  logic        dp_sp,
  input  logic [63:0] x,
  input  logic [2:0]  sticky_in,
  output logic [63:0] r,
  output logic [2:0]  cout
);

  always_comb begin
    logic up_dp, up_s2, up_s1;
    logic [31:0] hi, lo, inc_hi, inc_lo;
    logic [32:0] sum_lo, sum_hi;
    up_dp = x[10] & (sticky_in[LANE_DP]  | (|x[9:0])  | x[11]);
    up_s2 = x[39] & (sticky_in[LANE_SP2] | (|x[38:32]) | x[40]);
    up_s1 = x[7]  & (sticky_in[LANE_SP1] | (|x[6:0])  | x[8]);
    if (dp_sp) begin
      hi     = x[63:32];
      lo     = {x[31:11], 11'b0};
      inc_lo = {20'b0, up_dp, 11'b0};
      inc_hi = '0;
    end else begin
      hi     = {x[63:40], 8'b0};
      lo     = {x[31:8], 8'b0};
      inc_lo = {23'b0, up_s1, 8'b0};
      inc_hi = {23'b0, up_s2, 8'b0};
    end
    sum_lo = {1'b0, lo} + {1'b0, inc_lo};
    sum_hi = {1'b0, hi} + {1'b0, inc_hi} + {32'b0, dp_sp & sum_lo[32]};
    r = {sum_hi[31:0], sum_lo[31:0]};
    cout[LANE_DP]  = dp_sp & sum_hi[32];
    cout[LANE_SP2] = ~dp_sp & sum_hi[32];
    cout[LANE_SP1] = ~dp_sp & sum_lo[32];
  end

endmodule
