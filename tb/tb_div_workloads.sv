// Operand-class workloads of the dual-mode divider.
//
// The verification plan for this divider runs random divisions for each
// combination of normal (n) and sub-normal (s) operands: n/n, n/s, s/n and
// s/s, in DP mode and in dual-SP mode, plus the exceptional cases. This
// testbench runs NPER operations of each of the eight combinations (the
// operation count is the only size; larger runs differ only in NPER) and an
// exceptional-case set, one operation at a time, and reports the largest
// distance from the correctly rounded result in units in the last place.
// Every result must be within one unit. The divider runs at its default
// configuration.
module tb_div_workloads;
  import dpdsp_pkg::*;
  import fp_ref_pkg::*;

  localparam int NPER = 40000;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, dp_sp = 1;
  logic [63:0] in1 = '0, in2 = '0;
  logic        in_ready, out_valid, out_dp_sp;
  logic [63:0] out_result;
  logic [2:0]  out_dbz, out_invalid;

  dpdsp_divider dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_exact = 0, n_res = 0;

  initial begin
    repeat ((8 * NPER + 200) * 14) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] dp_op(input bit sub);
    logic [63:0] x;
    x = {1'($urandom), 11'($urandom_range(1, 2046)), 20'($urandom), $urandom};
    if (sub) begin
      x[62:52] = '0;
      x[51:0] = x[51:0] >> $urandom_range(0, 51);
      if (x[51:0] == 0) x[0] = 1'b1;
    end
    return x;
  endfunction

  function automatic logic [31:0] sp_op(input bit sub);
    logic [31:0] x;
    x = {1'($urandom), 8'($urandom_range(1, 254)), 23'($urandom)};
    if (sub) begin
      x[30:23] = '0;
      x[22:0] = x[22:0] >> $urandom_range(0, 22);
      if (x[22:0] == 0) x[0] = 1'b1;
    end
    return x;
  endfunction

  task automatic run_one(input logic m, input logic [63:0] a, input logic [63:0] b,
                         inout longint maxd);
    logic [63:0] rf;
    longint d;
    @(negedge clk);
    in_valid = 1; dp_sp = m; in1 = a; in2 = b;
    while (!in_ready) @(negedge clk);
    @(posedge clk); #1 in_valid = 0;
    while (!out_valid) @(posedge clk) #1;
    checks++;
    if (m) begin
      rf = $realtobits($bitstoreal(a) / $bitstoreal(b));
      if (!lane_ok(out_result, rf, 64)) begin
        failures++;
        if (failures < 10) $display("FAIL DP %h / %h = %h, expected %h", a, b, out_result, rf);
      end else if (!(rf[62:52] == 11'h7FF && rf[51:0] != 0)) begin
        d = ulp_dist(out_result, rf, 64);
        if (d > maxd) maxd = d;
        n_res++; if (d == 0) n_exact++;
      end
      if (out_dbz != {lane_flags(a, b, 64)[1], 2'b0} || out_invalid != {lane_flags(a, b, 64)[0], 2'b0})
        failures++;
    end else begin
      rf = {real_to_sp(sp_to_real(a[63:32]) / sp_to_real(b[63:32])),
            real_to_sp(sp_to_real(a[31:0]) / sp_to_real(b[31:0]))};
      checks++;
      for (int l = 0; l < 2; l++) begin
        logic [63:0] g, e;
        g = {32'b0, out_result[32*l +: 32]};
        e = {32'b0, rf[32*l +: 32]};
        if (!lane_ok(g, e, 32)) begin
          failures++;
          if (failures < 10) $display("FAIL SP%0d %h / %h = %h, expected %h", l + 1,
                                      a[32*l +: 32], b[32*l +: 32], g[31:0], e[31:0]);
        end else if (!(e[30:23] == 8'hFF && e[22:0] != 0)) begin
          d = ulp_dist(g, e, 32);
          if (d > maxd) maxd = d;
          n_res++; if (d == 0) n_exact++;
        end
      end
    end
  endtask

  initial begin
    string nm [4] = '{"n/n", "n/s", "s/n", "s/s"};
    logic [63:0] specials [8] = '{64'h0, 64'h8000_0000_0000_0000, 64'h7FF0_0000_0000_0000,
                                  64'hFFF0_0000_0000_0000, 64'h7FF8_0000_0000_0001,
                                  64'h3FF0_0000_0000_0000, 64'h0000_0000_0000_0001,
                                  64'h7FEF_FFFF_FFFF_FFFF};
    logic [31:0] sps [8] = '{32'h0, 32'h8000_0000, 32'h7F80_0000, 32'hFF80_0000,
                             32'h7FC0_0001, 32'h3F80_0000, 32'h0000_0001, 32'h7F7F_FFFF};
    longint maxd;
    #22 rst_n = 1;
    for (int m = 1; m >= 0; m--) begin
      for (int c = 0; c < 4; c++) begin
        maxd = 0; n_exact = 0; n_res = 0;
        for (int t = 0; t < NPER; t++) begin
          if (m == 1) run_one(1'b1, dp_op(c[1]), dp_op(c[0]), maxd);
          else run_one(1'b0, {sp_op(c[1]), sp_op(c[1])}, {sp_op(c[0]), sp_op(c[0])}, maxd);
        end
        $display("%s %s: %0d operations, largest error %0d ulp, %0d of %0d results correctly rounded",
                 m ? "DP     " : "dual-SP", nm[c], NPER, maxd, n_exact, n_res);
      end
    end
    // exceptional cases: every pair of special values, both modes
    maxd = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        run_one(1'b1, specials[i], specials[j], maxd);
        run_one(1'b0, {sps[i], sps[j]}, {sps[j], sps[i]}, maxd);
      end
    $display("exceptional cases: 128 operations, largest error %0d ulp", maxd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
