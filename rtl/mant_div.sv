// Dual-mode iterative mantissa divider (series expansion, nine-state FSM).
//
// Computes q = m1 / m2 for one DP mantissa pair or two SP pairs at once with
// one dual-mode Booth multiplier used once per state. With r the table value
// of 1/a1 (a1 = m2 cut after 8 fraction bits) the divider evaluates
//   A = m1*r, B = m2*r - 1, C = B^2, D = C^2, E = B - C, F = 1 + C + D,
//   G = E*F, H = A*G (DP) or A*E (SP), q = I = A - H,
// i.e. q = A*(1 - B + B^2 - B^3 + B^4 - B^5 + B^6) for DP and A*(1 - B + B^2)
// for SP. This is the document's unified series for a1^-1 in which
// B = m2*r - 1 replaces the document's B = a2*r: the two agree when r is
// exactly 1/a1, and the form used here also cancels the rounding error of
// the table entry (design choice).
//
// State sequence and the terms registered when leaving each state:
//   S0 -A-> S1 -B-> S2 -C-> S3 -(D,E)-> S4 -F-> S5 -G-> S6 -AG/AE-> S7 -H-> S8
// Dual-SP mode goes S3 -E-> S6, skipping S4 and S5. S0 is also the idle
// state: the FSM leaves it when start is high. In S8 done is high and q holds
// the quotient (combinational A - H). DP takes 9 cycles (S0..S8), dual-SP 7.
//
// Fixed-point formats (bit i of a register has weight 2^(i-F)):
//   DP : A 2.62, B F=71, C F=78, E F=71, F 1.53, G F=62, H F=62, q 2.62
//   SP lanes (32 bits each, SP-2 upper): A 2.30, B F=39, C F=39, E F=39,
//        H F=30, q 2.30
// Operands: m1u / m2u are the normalized unified mantissas (DP in [63:11],
// SP-2 in [63:40], SP-1 in [31:8]); a1inv as produced by a1inv_lookup.
// m1u, m2u, a1inv and dp_sp must stay stable from start until done.
module mant_div
  import dpdsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        dp_sp,
  input  logic [63:0] m1u,
  input  logic [63:0] m2u,
  input  logic [52:0] a1inv,
  output logic        done,
  output logic [63:0] q,
  output mdiv_state_e state
);

  mdiv_state_e nstate;

  logic [63:0] a_q, b_q, c_q, e_q, h_q;
  logic [24:0] d_q;
  logic [53:0] f_q, g_q;
  logic [55:0] ag_q;
  logic [47:0] ae_q;

  // multiplier operands
  logic [53:0]  dp_x, dp_y;
  logic [23:0]  s1_x, s1_y, s2_x, s2_y;
  logic [107:0] pm;
  logic [47:0]  p1, p2;

  logic [52:0] dp_m1, dp_m2, dp_r;
  logic [23:0] sp1_m1, sp1_m2, sp1_r, sp2_m1, sp2_m2, sp2_r;

  assign dp_m1  = m1u[63:11];
  assign dp_m2  = m2u[63:11];
  assign dp_r   = a1inv;
  assign sp2_m1 = m1u[63:40];
  assign sp2_m2 = m2u[63:40];
  assign sp1_m1 = m1u[31:8];
  assign sp1_m2 = m2u[31:8];
  assign sp2_r  = a1inv[52:29];
  assign sp1_r  = a1inv[23:0];

  always_comb begin
    dp_x = '0; dp_y = '0;
    s1_x = '0; s1_y = '0; s2_x = '0; s2_y = '0;
    unique case (state)
      S0: begin
        dp_x = {1'b0, dp_m1}; dp_y = {1'b0, dp_r};
        s1_x = sp1_m1; s1_y = sp1_r; s2_x = sp2_m1; s2_y = sp2_r;
      end
      S1: begin
        dp_x = {1'b0, dp_m2}; dp_y = {1'b0, dp_r};
        s1_x = sp1_m2; s1_y = sp1_r; s2_x = sp2_m2; s2_y = sp2_r;
      end
      S2: begin
        dp_x = b_q[63:10]; dp_y = b_q[63:10];
        s1_x = b_q[31:8];  s1_y = b_q[31:8];
        s2_x = b_q[63:40]; s2_y = b_q[63:40];
      end
      S3: begin
        dp_x = c_q[63:10]; dp_y = c_q[63:10];
      end
      S5: begin
        dp_x = e_q[62:9]; dp_y = f_q;
      end
      S6: begin
        dp_x = g_q; dp_y = a_q[63:10];
        s1_x = e_q[30:7];  s1_y = a_q[31:8];
        s2_x = e_q[62:39]; s2_y = a_q[63:40];
      end
      default: ;
    endcase
  end

  booth_mult_dual u_mult (
    .dp_sp(dp_sp),
    .dp_in1(dp_x), .dp_in2(dp_y),
    .sp1_in1(s1_x), .sp1_in2(s1_y),
    .sp2_in1(s2_x), .sp2_in2(s2_y),
    .dp_mult(pm), .sp1_mult(p1), .sp2_mult(p2)
  );

  // E = B - C and I = A - H on the dual-mode subtractor
  logic [63:0] c_al, e_d, i_d;
  assign c_al = dp_sp ? (c_q >> 7) : c_q;

  dual_sub u_sub_e (.dp_sp(dp_sp), .a(b_q), .b(c_al), .d(e_d));
  dual_sub u_sub_i (.dp_sp(dp_sp), .a(a_q), .b(h_q), .d(i_d));

  always_comb begin
    nstate = state;
    unique case (state)
      S0: if (start) nstate = S1;
      S1: nstate = S2;
      S2: nstate = S3;
      S3: nstate = dp_sp ? S4 : S6;
      S4: nstate = S5;
      S5: nstate = S6;
      S6: nstate = S7;
      S7: nstate = S8;
      S8: nstate = S0;
      default: nstate = S0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S0;
      a_q <= '0; b_q <= '0; c_q <= '0; d_q <= '0; e_q <= '0;
      f_q <= '0; g_q <= '0; h_q <= '0; ag_q <= '0; ae_q <= '0;
    end else begin
      state <= nstate;
      unique case (state)
        S0: if (start)
              a_q <= dp_sp ? pm[105:42] : {p2[47:16], p1[47:16]};
        S1: b_q <= dp_sp ? pm[96:33] : {p2[38:7], p1[38:7]};
        S2: c_q <= dp_sp ? pm[107:44] : {7'b0, p2[47:23], 7'b0, p1[47:23]};
        S3: begin
          e_q <= e_d;
          d_q <= pm[107:83];
        end
        S4: f_q <= {1'b1, 53'b0} + 54'(c_q >> 25) + 54'(d_q);
        S5: g_q <= pm[106:53];
        S6: begin
          ag_q <= pm[107:52];
          ae_q <= {p2[47:24], p1[47:24]};
        end
        S7: h_q <= dp_sp ? {8'b0, ag_q} : {8'b0, ae_q[47:24], 8'b0, ae_q[23:0]};
        default: ;
      endcase
    end
  end

  assign done = (state == S8);
  assign q    = i_d;

  // the mode may not change while an operation is in flight
  logic dp_sp_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)             dp_sp_q <= 1'b0;
    else if (state == S0)   dp_sp_q <= dp_sp;
  a_mode_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  (state != S0) |-> (dp_sp == dp_sp_q));

endmodule
