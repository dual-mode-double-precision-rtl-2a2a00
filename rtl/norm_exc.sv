// Normalization, exception handling and output multiplexer (third stage).
//
// Three lane_finish units, one for DP and one for each SP lane, finish the
// rounded quotients separately (1-bit normalization after a rounding carry,
// exponent increment, overflow, sub-normal exponent, special operands). A
// 64-bit 2:1 multiplexer then selects the DP result or the pair
// {SP-2 result, SP-1 result}. The exponent of each lane is the stage-2 base
// exponent, less one when the quotient was below one. Purely combinational.
module norm_exc
  import dpdsp_pkg::*;
(
  input  logic        dp_sp,
  input  logic [63:0] r,        // rounded mantissas, layout as in round_dual
  input  logic [2:0]  cout,
  input  logic [2:0]  lt1,
  input  logic [2:0]  shifted,
  input  lane_exp_t   le [3],
  input  fp_class_t   c1 [3],
  input  fp_class_t   c2 [3],
  output logic [63:0] result,
  output logic [2:0]  dbz,
  output logic [2:0]  invalid
);

  logic [63:0] dp_out;
  logic [31:0] sp2_out, sp1_out;
  logic [2:0]  dbz_l, inv_l;

  lane_finish #(.EW(11), .FW(52)) u_dp (
    .mant(r[63:11]), .carry(cout[LANE_DP]),
    .e(le[LANE_DP].ebase - 13'(lt1[LANE_DP])), .shifted(shifted[LANE_DP]),
    .sign(le[LANE_DP].sign), .a(c1[LANE_DP]), .b(c2[LANE_DP]),
    .res(dp_out), .dbz(dbz_l[LANE_DP]), .invalid(inv_l[LANE_DP])
  );

  lane_finish #(.EW(8), .FW(23)) u_sp2 (
    .mant(r[63:40]), .carry(cout[LANE_SP2]),
    .e(le[LANE_SP2].ebase - 13'(lt1[LANE_SP2])), .shifted(shifted[LANE_SP2]),
    .sign(le[LANE_SP2].sign), .a(c1[LANE_SP2]), .b(c2[LANE_SP2]),
    .res(sp2_out), .dbz(dbz_l[LANE_SP2]), .invalid(inv_l[LANE_SP2])
  );

  lane_finish #(.EW(8), .FW(23)) u_sp1 (
    .mant(r[31:8]), .carry(cout[LANE_SP1]),
    .e(le[LANE_SP1].ebase - 13'(lt1[LANE_SP1])), .shifted(shifted[LANE_SP1]),
    .sign(le[LANE_SP1].sign), .a(c1[LANE_SP1]), .b(c2[LANE_SP1]),
    .res(sp1_out), .dbz(dbz_l[LANE_SP1]), .invalid(inv_l[LANE_SP1])
  );

  assign result  = dp_sp ? dp_out : {sp2_out, sp1_out};
  assign dbz     = dp_sp ? {dbz_l[LANE_DP], 2'b00} : {1'b0, dbz_l[LANE_SP2], dbz_l[LANE_SP1]};
  assign invalid = dp_sp ? {inv_l[LANE_DP], 2'b00} : {1'b0, inv_l[LANE_SP2], inv_l[LANE_SP1]};

endmodule
