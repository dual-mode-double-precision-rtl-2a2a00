// Initial approximation fetch, the first-stage part of the mantissa divider.
//
// Two tables: DP_SP2 (256 x 53) is indexed by dp_m2[51:44] in DP mode and by
// sp2_m2[22:15] in dual-SP mode (a 2:1 index multiplexer), SP1 (256 x 24) by
// sp1_m2[22:15]. The output multiplexer packs the result as the mantissa
// divider expects it:
//   dp_sp = 1 : a1inv = DP_SP2 entry (1.52 fixed point)
//   dp_sp = 0 : a1inv = {DP_SP2 entry[52:29], 5'b0, SP1 entry} (two 1.23 values)
// Inputs are the normalized unified divisor mantissa (DP in [63:11], SP-2 in
// [63:40], SP-1 in [31:8]). Table sizes and indexing follow the document;
// table contents are described in recip_lut. Purely combinational.
module a1inv_lookup (
  input  logic        dp_sp,
  input  logic [63:0] m2u,
  output logic [52:0] a1inv
);

  logic [7:0]  idx_dsp2, idx_sp1;
  logic [52:0] lut_dsp2;
  logic [23:0] lut_sp1;

  // dp_m2[51:44] and sp2_m2[22:15] both sit in m2u[62:55] of the unified
  // mantissa, so the index multiplexer of the DP_SP2 table reduces to wires.
  assign idx_dsp2 = m2u[62:55];
  assign idx_sp1  = m2u[30:23];

  recip_lut #(.WIDTH(53)) u_dsp2 (.idx(idx_dsp2), .val(lut_dsp2));
  recip_lut #(.WIDTH(24)) u_sp1  (.idx(idx_sp1),  .val(lut_sp1));

  assign a1inv = dp_sp ? lut_dsp2 : {lut_dsp2[52:29], 5'b0, lut_sp1};

endmodule
