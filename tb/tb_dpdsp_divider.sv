// End-to-end self-checking testbench of the dual-mode divider, at the
// design's default (and only) configuration.
//
// Streams random operations, mixing DP and dual-SP mode, through the
// divider with back-to-back valid inputs. Operand classes cover normal,
// sub-normal, zero, infinity, NaN and mantissas of all ones, with exponents
// chosen both near the bias and over the whole range, so that quotients
// overflow, underflow into sub-normals and round up from sub-normal to normal.
// Reference (fp_ref_pkg): DP results come from real (binary64) division; SP
// operands are converted exactly to real, divided, and rounded to binary32. A result passes if it is a NaN where the reference is, or has the
// reference's sign and differs from it by at most one unit in the last
// place. Division-by-zero and invalid flags are checked exactly.
// Also checked: latency 11 (DP) / 9 (dual-SP) cycles and an acceptance
// interval of 10 / 8 cycles. Each mechanism (DP-only FSM states, SP skip,
// sub-normal input normalization, sub-normal output right shift, DP carry
// between the two rounding incrementers, sub-normal rounded up to normal,
// quotient below one, overflow, each special case, mode switch) is counted,
// and one that never happened is a failure. A mantissa rounding up to 2.0 is
// counted too but not required: the quotient approximation does not land in
// the last half unit below 2.0 (or below 1.0), so that path is exercised only
// by the round_dual and norm_exc testbenches.
module tb_dpdsp_divider;
  import dpdsp_pkg::*;
  import fp_ref_pkg::*;

  localparam int NOPS = 4000;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, dp_sp = 1;
  logic [63:0] in1 = '0, in2 = '0;
  logic        in_ready, out_valid, out_dp_sp;
  logic [63:0] out_result;
  logic [2:0]  out_dbz, out_invalid;

  dpdsp_divider dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NOPS * 12 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // stimulus
  function automatic logic [63:0] gen_dp();
    int k;
    logic [10:0] e;
    logic [51:0] f;
    k = $urandom_range(0, 99);
    f = {20'($urandom), $urandom};
    if ($urandom_range(0, 1) == 1) e = 11'(1023 + $urandom_range(0, 100) - 50);
    else e = 11'($urandom_range(1, 2046));
    if (k < 12) begin            // sub-normal, random number of leading zeros
      e = '0;
      f = f >> $urandom_range(0, 51);
      if (f == 0) f = 52'd1;
    end else if (k < 15) begin e = '0; f = '0; end
    else if (k < 17) begin e = '1; f = '0; end
    else if (k < 18) begin e = '1; f[51] = 1'b1; end
    else if (k < 24) f = '1;      // all-ones mantissa
    else if (k < 28) f = '0;      // power of two
    return {1'($urandom), e, f};
  endfunction

  function automatic logic [31:0] gen_sp();
    int k;
    logic [7:0] e;
    logic [22:0] f;
    k = $urandom_range(0, 99);
    f = 23'($urandom);
    if ($urandom_range(0, 1) == 1) e = 8'(127 + $urandom_range(0, 40) - 20);
    else e = 8'($urandom_range(1, 254));
    if (k < 12) begin
      e = '0;
      f = f >> $urandom_range(0, 22);
      if (f == 0) f = 23'd1;
    end else if (k < 15) begin e = '0; f = '0; end
    else if (k < 17) begin e = '1; f = '0; end
    else if (k < 18) begin e = '1; f[22] = 1'b1; end
    else if (k < 24) f = '1;
    else if (k < 28) f = '0;
    return {1'($urandom), e, f};
  endfunction

  typedef struct {
    logic        mode;
    logic [63:0] a, b;
    int          acc;
  } op_t;

  op_t pend [$];

  // mechanism counters
  int n_dp = 0, n_sp = 0, n_switch = 0, n_state_s4 = 0, n_skip = 0;
  int n_sub_in = 0, n_sub_out = 0, n_rcarry = 0, n_lt1 = 0, n_ovf = 0;
  int n_dbz = 0, n_inv = 0, n_inf_in = 0, n_zero_res = 0;
  int n_lat = 0, n_thr = 0, n_chain = 0, n_sub_round = 0;

  // driver: keeps in_valid high so operations go back to back
  initial begin
    logic [63:0] a, b;
    logic m, prev_m;
    int prev_acc, k;
    prev_acc = -1;
    prev_m = 1;
    #22 rst_n = 1;
    for (int t = 0; t < NOPS; t++) begin
      @(negedge clk);
      m = ($urandom_range(0, 3) != 0) ? prev_m : ~prev_m;
      if (t < 2) m = 1; else if (t < 4) m = 0;
      if (m) begin a = gen_dp(); b = gen_dp(); end
      else begin a = {gen_sp(), gen_sp()}; b = {gen_sp(), gen_sp()}; end
      k = $urandom_range(0, 99);
      if (k < 4) begin
        // equal mantissas: quotient exactly a power of two
        if (m) b[51:0] = a[51:0];
        else begin b[54:32] = a[54:32]; b[22:0] = a[22:0]; end
      end else if (k < 8) begin
        // all-ones dividend over a power of two, one place below the
        // normal range: rounds up into the smallest binade, carrying
        // through the whole mantissa
        if (m) begin
          a[62:52] = 11'($urandom_range(1, 1000)); a[51:0] = '1;
          b[62:52] = a[62:52] + 11'd1023;           b[51:0] = '0;
        end else begin
          a[62:55] = 8'($urandom_range(1, 100));   a[54:32] = '1;
          b[62:55] = a[62:55] + 8'd127;            b[54:32] = '0;
          a[30:23] = 8'($urandom_range(1, 100));   a[22:0]  = '1;
          b[30:23] = a[30:23] + 8'd127;            b[22:0]  = '0;
        end
      end
      in_valid = 1; dp_sp = m; in1 = a; in2 = b;
      while (!in_ready) @(negedge clk);
      // accepted at the next rising edge, number cyc + 1
      if (prev_acc >= 0) begin
        checks++; n_thr++;
        if (cyc + 1 - prev_acc != (prev_m ? 10 : 8)) begin
          failures++;
          $display("FAIL interval %0d after %s op", cyc + 1 - prev_acc, prev_m ? "DP" : "SP");
        end
      end
      if (m != prev_m) n_switch++;
      pend.push_back('{mode: m, a: a, b: b, acc: cyc + 1});
      prev_acc = cyc + 1;
      prev_m = m;
      @(posedge clk);
    end
    @(negedge clk) in_valid = 0;
    wait (pend.size() == 0);
    repeat (3) @(posedge clk);
    checks++;
    if (n_dp == 0 || n_sp == 0 || n_switch == 0 || n_state_s4 == 0 || n_skip == 0 ||
        n_sub_in == 0 || n_sub_out == 0 || n_chain == 0 || n_sub_round == 0 || n_lt1 == 0 || n_ovf == 0 ||
        n_dbz == 0 || n_inv == 0 || n_inf_in == 0 || n_zero_res == 0 || n_lat == 0) begin
      failures++;
      $display("FAIL some mechanism never happened");
    end
    $display("ops: DP %0d, dual-SP %0d, mode switches %0d", n_dp, n_sp, n_switch);
    $display("FSM: DP-only states S4 entered %0d, SP skip S3->S6 %0d", n_state_s4, n_skip);
    $display("sub-normal inputs normalized %0d, sub-normal outputs right-shifted %0d",
             n_sub_in, n_sub_out);
    $display("rounding carries to 2.0 %0d, quotients below one %0d, overflows %0d",
             n_rcarry, n_lt1, n_ovf);
    $display("DP carries between the rounding incrementers %0d, sub-normals rounded to normal %0d",
             n_chain, n_sub_round);
    $display("divide by zero %0d, invalid %0d, infinite operands %0d, zero results %0d",
             n_dbz, n_inv, n_inf_in, n_zero_res);
    $display("latency checks %0d, interval checks %0d", n_lat, n_thr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // design events, observed on internal signals
  always @(posedge clk) begin
    if (dut.u_mdiv.state == S4) n_state_s4++;
    if (dut.u_mdiv.state == S3 && !dut.s1_dp_sp) n_skip++;
    if (dut.in_valid && dut.in_ready) begin
      if (dp_sp && (dut.x_dp_ls1 != 0 || dut.x_dp_ls2 != 0) &&
          (dut.x_c1[LANE_DP].sub || dut.x_c2[LANE_DP].sub)) n_sub_in++;
      if (!dp_sp && ((dut.x_sp1_ls1 != 0 && dut.x_c1[LANE_SP1].sub) ||
                     (dut.x_sp2_ls2 != 0 && dut.x_c2[LANE_SP2].sub))) n_sub_in++;
    end
    if (dut.s2_valid) begin
      logic [2:0] lanes;
      // DP round-up that carries from the lower 32-bit incrementer into the upper
      if (dut.s2_dp_sp && dut.y_sh[31:11] == '1 && dut.y_rnd[63:32] != dut.y_sh[63:32])
        n_chain++;
      lanes = dut.s2_dp_sp ? 3'b100 : 3'b011;
      for (int l = 0; l < 3; l++) if (lanes[l]) begin
        if (!dut.s2_c1[l].zero && !dut.s2_c1[l].inf && !dut.s2_c1[l].nan &&
            !dut.s2_c2[l].zero && !dut.s2_c2[l].inf && !dut.s2_c2[l].nan) begin
          if (dut.y_shifted[l]) n_sub_out++;
          if (dut.y_shifted[l] && (l == LANE_DP ? dut.y_rnd[63] : l == LANE_SP2 ? dut.y_rnd[63]
                                                                 : dut.y_rnd[31])) n_sub_round++;
          if (dut.y_cout[l]) n_rcarry++;
          if (dut.y_lt1[l]) n_lt1++;
        end
      end
    end
  end

  // monitor
  always @(negedge clk) if (rst_n && out_valid) begin
    op_t o;
    logic [63:0] rf;
    logic [2:0]  fl_dbz, fl_inv;
    logic [1:0]  f1, f2;
    if (pend.size() == 0) begin
      failures++; $display("FAIL unexpected output");
    end else begin
      o = pend.pop_front();
      checks++; n_lat++;
      if (cyc - o.acc + 1 != (o.mode ? 11 : 9)) begin
        failures++;
        $display("FAIL latency %0d (%s)", cyc - o.acc + 1, o.mode ? "DP" : "SP");
      end
      checks++;
      if (out_dp_sp != o.mode) begin failures++; $display("FAIL mode tag"); end
      if (o.mode) begin
        n_dp++;
        rf = $realtobits($bitstoreal(o.a) / $bitstoreal(o.b));
        f1 = lane_flags(o.a, o.b, 64);
        fl_dbz = {f1[1], 2'b0}; fl_inv = {f1[0], 2'b0};
        checks++;
        if (!lane_ok(out_result, rf, 64)) begin
          failures++;
          if (failures < 20) $display("FAIL DP %h / %h = %h, expected %h", o.a, o.b, out_result, rf);
        end
        if (o.a[62:52] == 11'h7FF && o.a[51:0] == 0) n_inf_in++;
        if (out_result[62:0] == 0) n_zero_res++;
        if (out_result[62:52] == 11'h7FF && out_result[51:0] == 0 && o.a[62:52] != 11'h7FF &&
            o.b[62:0] != 0) n_ovf++;
      end else begin
        n_sp++;
        rf = {real_to_sp(sp_to_real(o.a[63:32]) / sp_to_real(o.b[63:32])),
              real_to_sp(sp_to_real(o.a[31:0]) / sp_to_real(o.b[31:0]))};
        f1 = lane_flags({32'b0, o.a[31:0]}, {32'b0, o.b[31:0]}, 32);
        f2 = lane_flags({32'b0, o.a[63:32]}, {32'b0, o.b[63:32]}, 32);
        fl_dbz = {1'b0, f2[1], f1[1]}; fl_inv = {1'b0, f2[0], f1[0]};
        checks += 2;
        if (!lane_ok({32'b0, out_result[31:0]}, {32'b0, rf[31:0]}, 32)) begin
          failures++;
          if (failures < 20) $display("FAIL SP1 %h / %h = %h, expected %h", o.a[31:0], o.b[31:0], out_result[31:0], rf[31:0]);
        end
        if (!lane_ok({32'b0, out_result[63:32]}, {32'b0, rf[63:32]}, 32)) begin
          failures++;
          if (failures < 20) $display("FAIL SP2 %h / %h = %h, expected %h", o.a[63:32], o.b[63:32], out_result[63:32], rf[63:32]);
        end
        if (o.a[30:23] == 8'hFF && o.a[22:0] == 0) n_inf_in++;
        if (out_result[30:0] == 0) n_zero_res++;
        if (out_result[30:23] == 8'hFF && out_result[22:0] == 0 && o.a[30:23] != 8'hFF &&
            o.b[30:0] != 0) n_ovf++;
      end
      checks++;
      if (out_dbz != fl_dbz || out_invalid != fl_inv) begin
        failures++;
        $display("FAIL flags dbz %b/%b invalid %b/%b", out_dbz, fl_dbz, out_invalid, fl_inv);
      end
      if (|out_dbz) n_dbz++;
      if (|out_invalid) n_inv++;
    end
  end

endmodule
