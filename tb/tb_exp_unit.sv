// Self-checking testbench of the sign / exponent / shift-amount unit:
// random exponent fields (including zero) and normalization shifts for all
// three lanes; the expected values are computed with plain integers here.
module tb_exp_unit;
  import dpdsp_pkg::*;
  int checks = 0, failures = 0;

  fp_class_t  c1 [3], c2 [3];
  logic [6:0] dp_ls1, dp_ls2;
  logic [5:0] sp2_ls1, sp2_ls2, sp1_ls1, sp1_ls2;
  lane_exp_t  le [3];

  exp_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int l, input int bias, input int mx, input int la, input int lb);
    int ea, eb, eq, r0, r1;
    ea = (c1[l].exp == 0) ? 1 : int'(c1[l].exp);
    eb = (c2[l].exp == 0) ? 1 : int'(c2[l].exp);
    eq = (ea - la) - (eb - lb) + bias;
    r0 = 1 - eq; if (r0 < 0) r0 = 0; if (r0 > mx) r0 = mx;
    r1 = 2 - eq; if (r1 < 0) r1 = 0; if (r1 > mx) r1 = mx;
    checks++;
    if (le[l].sign != (c1[l].sign ^ c2[l].sign) || int'(le[l].ebase) != eq ||
        int'(le[l].rs0) != r0 || int'(le[l].rs1) != r1) begin
      failures++;
      if (failures < 8) $display("FAIL lane %0d: ebase %0d/%0d rs %0d,%0d/%0d,%0d",
                                 l, le[l].ebase, eq, le[l].rs0, le[l].rs1, r0, r1);
    end
  endtask

  initial begin
    for (int t = 0; t < 4000; t++) begin
      for (int l = 0; l < 3; l++) begin
        c1[l] = '0; c2[l] = '0;
        c1[l].sign = 1'($urandom); c2[l].sign = 1'($urandom);
        if (l == LANE_DP) begin
          c1[l].exp = 11'($urandom_range(0, 2046)); c2[l].exp = 11'($urandom_range(0, 2046));
        end else begin
          c1[l].exp = 11'($urandom_range(0, 254)); c2[l].exp = 11'($urandom_range(0, 254));
        end
        if ($urandom_range(0, 4) == 0) c1[l].exp = '0;
        if ($urandom_range(0, 4) == 0) c2[l].exp = '0;
      end
      dp_ls1 = (c1[LANE_DP].exp == 0) ? 7'($urandom_range(1, 52)) : 7'd0;
      dp_ls2 = (c2[LANE_DP].exp == 0) ? 7'($urandom_range(1, 52)) : 7'd0;
      sp2_ls1 = (c1[LANE_SP2].exp == 0) ? 6'($urandom_range(1, 23)) : 6'd0;
      sp2_ls2 = (c2[LANE_SP2].exp == 0) ? 6'($urandom_range(1, 23)) : 6'd0;
      sp1_ls1 = (c1[LANE_SP1].exp == 0) ? 6'($urandom_range(1, 23)) : 6'd0;
      sp1_ls2 = (c2[LANE_SP1].exp == 0) ? 6'($urandom_range(1, 23)) : 6'd0;
      #1;
      chk(LANE_DP, 1023, 63, int'(dp_ls1), int'(dp_ls2));
      chk(LANE_SP2, 127, 31, int'(sp2_ls1), int'(sp2_ls2));
      chk(LANE_SP1, 127, 31, int'(sp1_ls1), int'(sp1_ls2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
