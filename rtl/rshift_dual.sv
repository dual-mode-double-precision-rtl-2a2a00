// Dual-mode dynamic right shifter (Dynamic Right Shift 64_Dual32), third stage.
//
// Takes the mantissa quotient q from the divider (DP: 2.62 fixed point; SP:
// two 2.30 lanes) and the two prepared shift amounts of each lane. It first
// aligns each quotient to 1.63 (or 1.31 per lane): a quotient >= 1 moves left
// by one, one below 1 by two, and lt1 tells the exponent logic which case
// occurred. It then shifts right by rs0 or rs1 (the amount needed for a
// sub-normal result), DP across all 64 bits or SP per 32-bit half, and ORs
// the bits that fall off into a sticky bit per lane for rounding.
// The right shifter is a logarithmic shifter of two 32-bit halves joined in
// DP mode, mirroring the left shifter; the pre-alignment is this design's
// choice. Purely combinational.
module rshift_dual
  import dpdsp_pkg::*;
(
  input  logic        dp_sp,
  input  logic [63:0] q,
  input  lane_exp_t   le [3],
  output logic [63:0] y,
  output logic [2:0]  lt1,     // per lane: quotient below 1
  output logic [2:0]  sticky,  // per lane: bits shifted out
  output logic [2:0]  shifted  // per lane: shift amount was not zero
);

  always_comb begin
    logic [31:0] hi, lo, m;
    logic [5:0]  ah, al, rs_dp, rs_s2, rs_s1;
    logic        st_hi, st_lo;
    logic [63:0] dpx;
    lt1[LANE_DP]  = ~q[62];
    lt1[LANE_SP2] = ~q[62];
    lt1[LANE_SP1] = ~q[30];
    rs_dp = lt1[LANE_DP]  ? le[LANE_DP].rs1  : le[LANE_DP].rs0;
    rs_s2 = lt1[LANE_SP2] ? le[LANE_SP2].rs1 : le[LANE_SP2].rs0;
    rs_s1 = lt1[LANE_SP1] ? le[LANE_SP1].rs1 : le[LANE_SP1].rs0;
    // alignment to a leading one in the most significant bit
    dpx = lt1[LANE_DP] ? {q[61:0], 2'b0} : {q[62:0], 1'b0};
    if (dp_sp) begin
      hi = dpx[63:32];
      lo = dpx[31:0];
    end else begin
      hi = lt1[LANE_SP2] ? {q[61:32], 2'b0} : {q[62:32], 1'b0};
      lo = lt1[LANE_SP1] ? {q[29:0], 2'b0}  : {q[30:0], 1'b0};
    end
    ah = dp_sp ? rs_dp : rs_s2;
    al = dp_sp ? rs_dp : rs_s1;
    st_hi = 1'b0;
    st_lo = 1'b0;
    for (int k = 0; k < 5; k++) begin
      m = (32'd1 << (1 << k)) - 32'd1;  // bits leaving at the bottom
      if (al[k]) begin
        st_lo = st_lo | (|(lo & m));
        lo = (lo >> (1 << k)) | (dp_sp ? (hi << (32 - (1 << k))) : 32'b0);
      end
      if (ah[k]) begin
        if (!dp_sp) st_hi = st_hi | (|(hi & m));
        hi = hi >> (1 << k);
      end
    end
    if (dp_sp && rs_dp[5]) begin
      st_lo = st_lo | (|lo);
      lo = hi;
      hi = '0;
    end
    y = {hi, lo};
    sticky[LANE_DP]  = st_lo;
    sticky[LANE_SP1] = st_lo;
    sticky[LANE_SP2] = st_hi;
    shifted[LANE_DP]  = |rs_dp;
    shifted[LANE_SP2] = |rs_s2;
    shifted[LANE_SP1] = |rs_s1;
  end

endmodule
