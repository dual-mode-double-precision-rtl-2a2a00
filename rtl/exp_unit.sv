// Sign, exponent and right-shift-amount unit (second stage).
//
// For each lane (DP, SP-2, SP-1, computed separately) it forms
//   sign  = s1 ^ s2
//   ebase = (e1' - ls1) - (e2' - ls2) + bias
// where e' is the exponent field with 0 replaced by 1 (sub-normal operands)
// and ls is the left shift that normalized that mantissa in the first stage.
// ebase is the biased exponent of the quotient if the mantissa quotient is in
// [1,2); when it is in (0.5,1) the exponent is ebase - 1. Because that is
// known only after the mantissa division, both right shift amounts for a
// sub-normal (underflowing) result are prepared here:
//   rs0 = max(0, 1 - ebase), rs1 = max(0, 2 - ebase)
// saturated at 63 (DP) or 31 (SP); any larger shift gives the same rounded
// result. The document calls these "traditional methods"; this formulation
// is the design's own. Purely combinational.
module exp_unit
  import dpdsp_pkg::*;
(
  input  fp_class_t  c1 [3],
  input  fp_class_t  c2 [3],
  input  logic [6:0] dp_ls1,
  input  logic [6:0] dp_ls2,
  input  logic [5:0] sp2_ls1,
  input  logic [5:0] sp2_ls2,
  input  logic [5:0] sp1_ls1,
  input  logic [5:0] sp1_ls2,
  output lane_exp_t  le [3]
);

  function automatic lane_exp_t lane(input fp_class_t a, input fp_class_t b,
                                     input logic [6:0] lsa, input logic [6:0] lsb,
                                     input int bias, input int rsmax);
    lane_exp_t r;
    logic signed [12:0] ea, eb, s0, s1;
    ea = 13'(a.exp == 0 ? 11'd1 : a.exp) - 13'(lsa);
    eb = 13'(b.exp == 0 ? 11'd1 : b.exp) - 13'(lsb);
    r.sign  = a.sign ^ b.sign;
    r.ebase = ea - eb + 13'(bias);
    s0 = 13'sd1 - r.ebase;
    s1 = 13'sd2 - r.ebase;
    r.rs0 = (s0 <= 0) ? 6'd0 : (s0 > 13'(rsmax)) ? 6'(rsmax) : 6'(s0);
    r.rs1 = (s1 <= 0) ? 6'd0 : (s1 > 13'(rsmax)) ? 6'(rsmax) : 6'(s1);
    return r;
  endfunction

  always_comb begin
    le[LANE_DP]  = lane(c1[LANE_DP],  c2[LANE_DP],  dp_ls1, dp_ls2, DP_BIAS, 63);
    le[LANE_SP2] = lane(c1[LANE_SP2], c2[LANE_SP2], 7'(sp2_ls1), 7'(sp2_ls2), SP_BIAS, 31);
    le[LANE_SP1] = lane(c1[LANE_SP1], c2[LANE_SP1], 7'(sp1_ls1), 7'(sp1_ls2), SP_BIAS, 31);
  end

endmodule
