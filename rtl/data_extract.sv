// Data extraction and exception checks, first stage of the divider.
//
// Splits the two 64-bit operands into sign, exponent and mantissa for the
// double precision format and for both single precision formats (SP-2 in
// bits [63:32], SP-1 in bits [31:0]), classifies each operand (zero,
// sub-normal, infinity, NaN) and builds the unified mantissas M1 and M2 with
// two 2:1 multiplexers:
//   dp_sp = 1 : M = {hidden, frac[51:0], 11'b0}
//   dp_sp = 0 : M = {hidden2, frac2[22:0], 8'b0, hidden1, frac1[22:0], 8'b0}
// The hidden bit is 0 for a sub-normal operand; the leading-one detector and
// left shifter that follow bring such mantissas to normalized form.
//
// Because the 8 most significant DP exponent bits are the SP-2 exponent, the
// all-ones and all-zeros tests of those 8 bits are computed once and shared by
// SP-2 and DP; likewise the zero test of the low fraction bits is shared by
// SP-1 and DP. The exact gate-level sharing is this design's own.
// Purely combinational.
module data_extract
  import dpdsp_pkg::*;
(
  input  logic        dp_sp,
  input  logic [63:0] in1,      // dividend
  input  logic [63:0] in2,      // divisor
  output fp_class_t   c1 [3],   // dividend classification, indexed by lane
  output fp_class_t   c2 [3],   // divisor classification, indexed by lane
  output logic [63:0] m1u,      // unified dividend mantissa M1
  output logic [63:0] m2u       // unified divisor mantissa M2
);

  function automatic void classify(input logic [63:0] x,
                                   output fp_class_t dp, output fp_class_t s2,
                                   output fp_class_t s1);
    logic e8_one, e8_zero, e_sp1_one, e_sp1_zero;
    logic f_lo23_z, f_lo_z, f_sp2_z, f_dp_hi_z, f_dp_z, dp_e_one, dp_e_zero;
    // shared SP-2 / DP exponent tests on bits [62:55]
    e8_one    = &x[62:55];
    e8_zero   = ~|x[62:55];
    dp_e_one  = e8_one & (&x[54:52]);
    dp_e_zero = e8_zero & ~|x[54:52];
    e_sp1_one  = &x[30:23];
    e_sp1_zero = ~|x[30:23];
    // shared fraction zero tests
    f_lo23_z  = ~|x[22:0];
    f_lo_z    = f_lo23_z & ~|x[31:23];
    f_sp2_z   = ~|x[54:32];
    f_dp_hi_z = ~|x[51:32];
    f_dp_z    = f_dp_hi_z & f_lo_z;

    dp.sign = x[63];
    dp.exp  = x[62:52];
    dp.zero = dp_e_zero & f_dp_z;
    dp.sub  = dp_e_zero & ~f_dp_z;
    dp.inf  = dp_e_one & f_dp_z;
    dp.nan  = dp_e_one & ~f_dp_z;

    s2.sign = x[63];
    s2.exp  = {3'b0, x[62:55]};
    s2.zero = e8_zero & f_sp2_z;
    s2.sub  = e8_zero & ~f_sp2_z;
    s2.inf  = e8_one & f_sp2_z;
    s2.nan  = e8_one & ~f_sp2_z;

    s1.sign = x[31];
    s1.exp  = {3'b0, x[30:23]};
    s1.zero = e_sp1_zero & f_lo23_z;
    s1.sub  = e_sp1_zero & ~f_lo23_z;
    s1.inf  = e_sp1_one & f_lo23_z;
    s1.nan  = e_sp1_one & ~f_lo23_z;
  endfunction

  function automatic logic [63:0] unify(input logic mode, input logic [63:0] x);
    logic [63:0] dpm, spm;
    dpm = {|x[62:52], x[51:0], 11'b0};
    spm = {|x[62:55], x[54:32], 8'b0, |x[30:23], x[22:0], 8'b0};
    return mode ? dpm : spm;
  endfunction

  always_comb begin
    fp_class_t d, s2, s1;
    classify(in1, d, s2, s1);
    c1[LANE_DP] = d; c1[LANE_SP2] = s2; c1[LANE_SP1] = s1;
    classify(in2, d, s2, s1);
    c2[LANE_DP] = d; c2[LANE_SP2] = s2; c2[LANE_SP1] = s1;
    m1u = unify(dp_sp, in1);
    m2u = unify(dp_sp, in2);
  end

endmodule
