// Self-checking testbench of the iterative mantissa divider.
//
// Random normalized mantissas in DP mode and in dual-SP mode. The expected
// quotient is the exact integer quotient floor(m1 * 2^62 / m2) (DP, 2.62) or
// floor(m1 * 2^30 / m2) per SP lane (2.30), computed with wide integers here.
// The divider's result must lie within the series truncation bound of it:
// relative 2^-55 (DP) or 2^-24 (SP, the size of B^3), plus 32 units of the
// last place of the fixed-point format. The number of
// cycles from start to done (9 for DP, 7 for dual-SP) is checked as well.
module tb_mant_div;
  import dpdsp_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, dp_sp = 1;
  logic [63:0] m1u = '0, m2u = '0;
  logic [52:0] a1inv = '0;
  logic done;
  logic [63:0] q;
  mdiv_state_e state;

  int checks = 0, failures = 0;

  mant_div dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] recip(input logic [7:0] i);
    return 24'(((64'd1 << 31) + 64'(256 + i) - 1) / 64'(256 + i));
  endfunction

  task automatic run(output int cyc);
    @(negedge clk);
    start = 1;
    cyc = 0;
    do begin
      @(posedge clk); cyc++;
      #1 start = 0;
    end while (!done);
    cyc++;  // count the S8 cycle itself
  endtask

  logic [127:0] ex;
  longint unsigned err;
  longint unsigned maxerr_dp = 0, maxerr_sp = 0;

  task automatic check_lane(input logic [127:0] mm1, input logic [127:0] mm2, input int sh,
                            input logic [63:0] got, input int tshift, input bit is_dp);
    logic [127:0] e;
    longint unsigned d;
    e = (mm1 << sh) / mm2;
    d = (e > 128'(got)) ? longint'(e - 128'(got)) : longint'(128'(got) - e);
    checks++;
    if (is_dp && d > maxerr_dp) maxerr_dp = d;
    if (!is_dp && d > maxerr_sp) maxerr_sp = d;
    if (128'(d) > (e >> tshift) + 128'd32) begin
      failures++;
      if (failures < 10) $display("FAIL m1=%h m2=%h got=%h exp=%h", mm1, mm2, got, e);
    end
  endtask

  initial begin
    int cyc;
    logic [52:0] d1, d2;
    logic [23:0] a1, b1, a2, b2;
    logic [52:0] r;
    #12 rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      // DP
      d1 = {1'b1, 20'($urandom), $urandom};
      d2 = {1'b1, 20'($urandom), $urandom};
      if (t == 0) begin d1 = {1'b1, 52'b0}; d2 = {1'b1, 52'b0}; end
      if (t == 1) begin d1 = '1; d2 = {1'b1, 52'b0}; end
      if (t == 2) begin d1 = {1'b1, 52'b0}; d2 = '1; end
      if (t == 3) begin d1 = '1; d2 = '1; end
      dp_sp = 1;
      m1u = {d1, 11'b0};
      m2u = {d2, 11'b0};
      a1inv = {recip(d2[51:44]), 29'b0};
      run(cyc);
      checks++;
      if (cyc != 9) begin failures++; $display("FAIL DP cycles %0d", cyc); end
      check_lane(128'(d1), 128'(d2), 62, q, 55, 1'b1);
      @(posedge clk); #1;
      // dual SP
      a1 = {1'b1, 23'($urandom)}; b1 = {1'b1, 23'($urandom)};
      a2 = {1'b1, 23'($urandom)}; b2 = {1'b1, 23'($urandom)};
      if (t == 0) begin a1 = '1; b1 = {1'b1, 23'b0}; a2 = {1'b1, 23'b0}; b2 = '1; end
      if (t == 1) begin a1 = '1; b1 = '1; a2 = {1'b1, 23'b0}; b2 = {1'b1, 23'b0}; end
      dp_sp = 0;
      m1u = {a2, 8'b0, a1, 8'b0};
      m2u = {b2, 8'b0, b1, 8'b0};
      a1inv = {recip(b2[22:15]), 5'b0, recip(b1[22:15])};
      run(cyc);
      checks++;
      if (cyc != 7) begin failures++; $display("FAIL SP cycles %0d", cyc); end
      check_lane(128'(a1), 128'(b1), 30, {32'b0, q[31:0]}, 24, 1'b0);
      check_lane(128'(a2), 128'(b2), 30, {32'b0, q[63:32]}, 24, 1'b0);
      @(posedge clk); #1;
    end
    $display("max error: DP %0d units of 2^-62, SP %0d units of 2^-30", maxerr_dp, maxerr_sp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
