// Self-checking testbench of normalization, exception handling and the
// output multiplexer. Directed cases with known IEEE encodings (1.5, 1.0 after
// a rounding carry, largest finite value and overflow, sub-normal results,
// 0/0, inf/inf, x/0, 0/x, x/inf, NaN) are checked in both modes, followed by
// random normal and sub-normal lanes against a field-packing model.
module tb_norm_exc;
  import dpdsp_pkg::*;
  int checks = 0, failures = 0;

  logic        dp_sp;
  logic [63:0] r, result;
  logic [2:0]  cout, lt1, shifted, dbz, invalid;
  lane_exp_t   le [3];
  fp_class_t   c1 [3], c2 [3];

  norm_exc dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear();
    r = '0; cout = '0; lt1 = '0; shifted = '0;
    for (int l = 0; l < 3; l++) begin le[l] = '0; c1[l] = '0; c2[l] = '0; end
  endtask

  task automatic expect_eq(input logic [63:0] e, input logic [2:0] ed, input logic [2:0] ei,
                           input string what);
    #1;
    checks++;
    if (result != e || dbz != ed || invalid != ei) begin
      failures++;
      $display("FAIL %s: %h dbz %b inv %b, expected %h %b %b", what, result, dbz, invalid, e, ed, ei);
    end
  endtask

  initial begin
    // ---- DP directed ----
    dp_sp = 1;
    clear(); r[63:11] = {2'b11, 51'b0}; le[LANE_DP].ebase = 13'sd1023;
    expect_eq(64'h3FF8_0000_0000_0000, 3'b000, 3'b000, "DP 1.5");
    clear(); r[63:11] = '0; cout[LANE_DP] = 1; le[LANE_DP].ebase = 13'sd1023; lt1[LANE_DP] = 1;
    le[LANE_DP].sign = 1;
    expect_eq(64'hBFF0_0000_0000_0000, 3'b000, 3'b000, "DP carry -1.0");
    clear(); r[63:11] = '1; le[LANE_DP].ebase = 13'sd2046;
    expect_eq(64'h7FEF_FFFF_FFFF_FFFF, 3'b000, 3'b000, "DP max");
    clear(); r[63:11] = '0; cout[LANE_DP] = 1; le[LANE_DP].ebase = 13'sd2046;
    expect_eq(64'h7FF0_0000_0000_0000, 3'b000, 3'b000, "DP overflow by carry");
    clear(); r[63:11] = {1'b1, 52'b0}; le[LANE_DP].ebase = 13'sd2600;
    expect_eq(64'h7FF0_0000_0000_0000, 3'b000, 3'b000, "DP overflow");
    clear(); r[63:11] = {2'b01, 51'b0}; shifted[LANE_DP] = 1; le[LANE_DP].ebase = -13'sd3;
    expect_eq(64'h0008_0000_0000_0000, 3'b000, 3'b000, "DP sub-normal");
    clear(); r[63:11] = {1'b1, 52'b0}; shifted[LANE_DP] = 1; le[LANE_DP].ebase = 13'sd0;
    expect_eq(64'h0010_0000_0000_0000, 3'b000, 3'b000, "DP sub-normal rounded to normal");
    clear(); c1[LANE_DP].zero = 1; c2[LANE_DP].zero = 1;
    expect_eq(64'h7FF8_0000_0000_0000, 3'b000, 3'b100, "DP 0/0");
    clear(); c1[LANE_DP].inf = 1; c2[LANE_DP].inf = 1;
    expect_eq(64'h7FF8_0000_0000_0000, 3'b000, 3'b100, "DP inf/inf");
    clear(); c2[LANE_DP].nan = 1;
    expect_eq(64'h7FF8_0000_0000_0000, 3'b000, 3'b100, "DP x/NaN");
    clear(); c2[LANE_DP].zero = 1; le[LANE_DP].sign = 1;
    expect_eq(64'hFFF0_0000_0000_0000, 3'b100, 3'b000, "DP x/0");
    clear(); c1[LANE_DP].inf = 1;
    expect_eq(64'h7FF0_0000_0000_0000, 3'b000, 3'b000, "DP inf/x");
    clear(); c1[LANE_DP].zero = 1; r = '1; le[LANE_DP].ebase = 13'sd1000;
    expect_eq(64'h0000_0000_0000_0000, 3'b000, 3'b000, "DP 0/x");
    clear(); c2[LANE_DP].inf = 1; le[LANE_DP].sign = 1; r = '1; le[LANE_DP].ebase = 13'sd1000;
    expect_eq(64'h8000_0000_0000_0000, 3'b000, 3'b000, "DP x/inf");
    // ---- dual SP directed ----
    dp_sp = 0;
    clear(); r[63:40] = {2'b11, 22'b0}; le[LANE_SP2].ebase = 13'sd127;
    r[31:8] = '0; cout[LANE_SP1] = 1; le[LANE_SP1].ebase = 13'sd128; lt1[LANE_SP1] = 1;
    expect_eq({32'h3FC0_0000, 32'h4000_0000}, 3'b000, 3'b000, "SP 1.5 | 2.0 by carry");
    clear(); c2[LANE_SP2].zero = 1; c1[LANE_SP1].nan = 1; le[LANE_SP2].sign = 1;
    expect_eq({32'hFF80_0000, 32'h7FC0_0000}, 3'b010, 3'b001, "SP x/0 | NaN");
    clear(); r[63:40] = '1; le[LANE_SP2].ebase = 13'sd254; cout[LANE_SP2] = 1;
    r[31:8] = {2'b00, 22'h3FFFFF}; shifted[LANE_SP1] = 1; le[LANE_SP1].ebase = -13'sd5;
    expect_eq({32'h7F80_0000, 32'h003F_FFFF}, 3'b000, 3'b000, "SP overflow | sub-normal");
    clear(); c1[LANE_DP].zero = 1; c2[LANE_DP].zero = 1;
    r[63:40] = {1'b1, 23'h0}; le[LANE_SP2].ebase = 13'sd1;
    r[31:8] = {1'b1, 23'h1}; le[LANE_SP1].ebase = 13'sd254;
    expect_eq({32'h0080_0000, 32'h7F00_0001}, 3'b000, 3'b000, "SP ignores DP lane");
    // ---- random normal lanes ----
    for (int t = 0; t < 2000; t++) begin
      int e;
      logic [52:0] m;
      logic [23:0] m2, m1;
      clear();
      dp_sp = 1'(t);
      m = {1'b1, 20'($urandom), $urandom};
      m2 = {1'b1, 23'($urandom)}; m1 = {1'b1, 23'($urandom)};
      r = dp_sp ? {m, 11'b0} : {m2, 8'b0, m1, 8'b0};
      lt1 = 3'($urandom);
      for (int l = 0; l < 3; l++) begin
        le[l].sign = 1'($urandom);
        le[l].ebase = 13'(l == LANE_DP ? $urandom_range(2, 2046) : $urandom_range(2, 254));
      end
      #1;
      checks++;
      if (dp_sp) begin
        e = int'(le[LANE_DP].ebase) - int'(lt1[LANE_DP]);
        if (result != {le[LANE_DP].sign, 11'(e), m[51:0]}) begin
          failures++;
          if (failures < 10) $display("FAIL random DP %h", result);
        end
      end else begin
        if (result != {le[LANE_SP2].sign, 8'(int'(le[LANE_SP2].ebase) - int'(lt1[LANE_SP2])), m2[22:0],
                       le[LANE_SP1].sign, 8'(int'(le[LANE_SP1].ebase) - int'(lt1[LANE_SP1])), m1[22:0]}) begin
          failures++;
          if (failures < 10) $display("FAIL random SP %h", result);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
