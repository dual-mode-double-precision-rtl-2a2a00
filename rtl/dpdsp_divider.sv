// Dual-mode floating point divider: one IEEE 754 double precision division or
// two parallel single precision divisions, selected per operation by dp_sp.
//
// Operand layout (both in1 = dividend and in2 = divisor):
//   dp_sp = 1 : in[63:0] is one binary64 value
//   dp_sp = 0 : in[63:32] is SP-2, in[31:0] is SP-1 (two binary32 values)
// The result uses the same layout. Sub-normal operands and results are
// supported; rounding is to nearest (ties to even, applied to the approximate
// quotient, so a result may differ from the correctly rounded one by one unit
// in the last place). NaN, infinity and zero operands follow IEEE 754;
// out_dbz and out_invalid flag division by zero and invalid operations per
// lane (bit 2 = DP, bit 1 = SP-2, bit 0 = SP-1).
//
// Three stages:
//   1. data_extract, lod_dual + lshift_dual (sub-normal normalization) and
//      a1inv_lookup (initial 1/a1 approximation); registered on acceptance.
//   2. mant_div, the iterative series-expansion mantissa divider (9 cycles DP,
//      7 cycles dual-SP), in parallel with exp_unit (sign, exponent, shift).
//   3. rshift_dual, round_dual and norm_exc; registered at the output.
// Handshake: an operation is accepted when in_valid and in_ready are both
// high at a clock edge. in_ready is low from acceptance until the mantissa
// divider finishes. Latency, counting the accepting edge as cycle 1 and the
// edge that raises out_valid as the last: 11 cycles DP, 9 cycles dual-SP;
// a new operation can be accepted every 10 (DP) or 8 (dual-SP) cycles, the
// figures the document reports. out_valid is high for one cycle per result.
// Reset is asynchronous and active low (this design's choice).
module dpdsp_divider
  import dpdsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        dp_sp,
  input  logic [63:0] in1,
  input  logic [63:0] in2,
  output logic        out_valid,
  output logic        out_dp_sp,
  output logic [63:0] out_result,
  output logic [2:0]  out_dbz,
  output logic [2:0]  out_invalid
);

  // ---------------- stage 1 ----------------
  fp_class_t   x_c1 [3], x_c2 [3];
  logic [63:0] x_m1u, x_m2u, x_m1n, x_m2n;
  logic [6:0]  x_dp_ls1, x_dp_ls2;
  logic [5:0]  x_sp2_ls1, x_sp2_ls2, x_sp1_ls1, x_sp1_ls2;
  logic [52:0] x_a1inv;

  data_extract u_extract (
    .dp_sp(dp_sp), .in1(in1), .in2(in2),
    .c1(x_c1), .c2(x_c2), .m1u(x_m1u), .m2u(x_m2u)
  );

  lod_dual u_lod1 (.x(x_m1u), .dp_ls(x_dp_ls1), .sp2_ls(x_sp2_ls1), .sp1_ls(x_sp1_ls1));
  lod_dual u_lod2 (.x(x_m2u), .dp_ls(x_dp_ls2), .sp2_ls(x_sp2_ls2), .sp1_ls(x_sp1_ls2));

  lshift_dual u_lsh1 (.dp_sp(dp_sp), .x(x_m1u), .dp_ls(x_dp_ls1),
                      .sp2_ls(x_sp2_ls1), .sp1_ls(x_sp1_ls1), .y(x_m1n));
  lshift_dual u_lsh2 (.dp_sp(dp_sp), .x(x_m2u), .dp_ls(x_dp_ls2),
                      .sp2_ls(x_sp2_ls2), .sp1_ls(x_sp1_ls2), .y(x_m2n));

  a1inv_lookup u_lut (.dp_sp(dp_sp), .m2u(x_m2n), .a1inv(x_a1inv));

  logic        s1_valid, s1_dp_sp;
  fp_class_t   s1_c1 [3], s1_c2 [3];
  logic [63:0] s1_m1n, s1_m2n;
  logic [52:0] s1_a1inv;
  logic [6:0]  s1_dp_ls1, s1_dp_ls2;
  logic [5:0]  s1_sp2_ls1, s1_sp2_ls2, s1_sp1_ls1, s1_sp1_ls2;

  logic        md_done;
  logic [63:0] md_q;
  mdiv_state_e md_state;

  assign in_ready = ~s1_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_dp_sp <= 1'b1;
      s1_m1n <= '0; s1_m2n <= '0; s1_a1inv <= '0;
      s1_dp_ls1 <= '0; s1_dp_ls2 <= '0;
      s1_sp2_ls1 <= '0; s1_sp2_ls2 <= '0; s1_sp1_ls1 <= '0; s1_sp1_ls2 <= '0;
      for (int i = 0; i < 3; i++) begin s1_c1[i] <= '0; s1_c2[i] <= '0; end
    end else if (in_valid && in_ready) begin
      s1_valid <= 1'b1;
      s1_dp_sp <= dp_sp;
      s1_c1 <= x_c1; s1_c2 <= x_c2;
      s1_m1n <= x_m1n; s1_m2n <= x_m2n; s1_a1inv <= x_a1inv;
      s1_dp_ls1 <= x_dp_ls1; s1_dp_ls2 <= x_dp_ls2;
      s1_sp2_ls1 <= x_sp2_ls1; s1_sp2_ls2 <= x_sp2_ls2;
      s1_sp1_ls1 <= x_sp1_ls1; s1_sp1_ls2 <= x_sp1_ls2;
    end else if (md_done) begin
      s1_valid <= 1'b0;
    end
  end

  // ---------------- stage 2 ----------------
  lane_exp_t x_le [3];

  mant_div u_mdiv (
    .clk(clk), .rst_n(rst_n), .start(s1_valid), .dp_sp(s1_dp_sp),
    .m1u(s1_m1n), .m2u(s1_m2n), .a1inv(s1_a1inv),
    .done(md_done), .q(md_q), .state(md_state)
  );

  exp_unit u_exp (
    .c1(s1_c1), .c2(s1_c2),
    .dp_ls1(s1_dp_ls1), .dp_ls2(s1_dp_ls2),
    .sp2_ls1(s1_sp2_ls1), .sp2_ls2(s1_sp2_ls2),
    .sp1_ls1(s1_sp1_ls1), .sp1_ls2(s1_sp1_ls2),
    .le(x_le)
  );

  logic        s2_valid, s2_dp_sp;
  logic [63:0] s2_q;
  lane_exp_t   s2_le [3];
  fp_class_t   s2_c1 [3], s2_c2 [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_dp_sp <= 1'b1;
      s2_q <= '0;
      for (int i = 0; i < 3; i++) begin
        s2_le[i] <= '0; s2_c1[i] <= '0; s2_c2[i] <= '0;
      end
    end else begin
      s2_valid <= md_done & s1_valid;
      if (md_done) begin
        s2_dp_sp <= s1_dp_sp;
        s2_q  <= md_q;
        s2_le <= x_le;
        s2_c1 <= s1_c1;
        s2_c2 <= s1_c2;
      end
    end
  end

  // ---------------- stage 3 ----------------
  logic [63:0] y_sh, y_rnd, y_res;
  logic [2:0]  y_lt1, y_sticky, y_shifted, y_cout, y_dbz, y_inv;

  rshift_dual u_rsh (
    .dp_sp(s2_dp_sp), .q(s2_q), .le(s2_le),
    .y(y_sh), .lt1(y_lt1), .sticky(y_sticky), .shifted(y_shifted)
  );

  round_dual u_rnd (
    .dp_sp(s2_dp_sp), .x(y_sh), .sticky_in(y_sticky), .r(y_rnd), .cout(y_cout)
  );

  norm_exc u_norm (
    .dp_sp(s2_dp_sp), .r(y_rnd), .cout(y_cout), .lt1(y_lt1), .shifted(y_shifted),
    .le(s2_le), .c1(s2_c1), .c2(s2_c2),
    .result(y_res), .dbz(y_dbz), .invalid(y_inv)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_dp_sp <= 1'b1;
      out_result <= '0;
      out_dbz <= '0;
      out_invalid <= '0;
    end else begin
      out_valid <= s2_valid;
      if (s2_valid) begin
        out_dp_sp   <= s2_dp_sp;
        out_result  <= y_res;
        out_dbz     <= y_dbz;
        out_invalid <= y_inv;
      end
    end
  end

endmodule
