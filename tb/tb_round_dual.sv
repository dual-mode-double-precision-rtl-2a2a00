// Self-checking testbench of dual-mode rounding: random words, sticky bits
// exact ties and all-ones mantissas (to force carries, including the carry from the
// lower into the upper incrementer in DP mode), checked against
// round-to-nearest-even computed on integers here.
module tb_round_dual;
  import dpdsp_pkg::*;
  int checks = 0, failures = 0;

  logic        dp_sp;
  logic [63:0] x, r;
  logic [2:0]  sticky_in, cout;

  round_dual dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // round an (m + g + s)-bit field: returns {carry, rounded mantissa}
  function automatic logic [53:0] rne(input logic [52:0] m, input int mw, input bit g, input bit s);
    logic [53:0] v;
    v = 54'(m);
    if (g && (s || m[0])) v = v + 1;
    return v;
  endfunction

  int n_carry = 0, n_chain = 0;

  initial begin
    logic [53:0] e, e2, e1;
    for (int t = 0; t < 4000; t++) begin
      dp_sp = 1'(t);
      x = {$urandom, $urandom};
      sticky_in = 3'($urandom);
      if (t % 4 == 2) begin x[63:11] = '1; x[10] = 1'b1; end                     // DP carry out
      if (t % 4 == 0) begin x[31:11] = '1; x[10] = 1'b1; end                     // DP chain
      if (t % 4 == 1) begin x[63:40] = '1; x[39] = 1'b1; x[31:8] = '1; x[7] = 1'b1; end
      if (t % 8 >= 6) begin                                                      // exact ties
        if (dp_sp) begin x[10] = 1'b1; x[9:0] = '0; end
        else begin x[39] = 1'b1; x[38:32] = '0; x[7] = 1'b1; x[6:0] = '0; end
        sticky_in = '0;
      end
      #1;
      checks++;
      if (dp_sp) begin
        e = rne(x[63:11], 53, x[10], sticky_in[LANE_DP] || x[9:0] != 0);
        if (e[53]) n_carry++;
        if (x[31:11] == '1 && e[52:0] != x[63:11] && !e[53]) n_chain++;
        if (r != {e[52:0], 11'b0} || cout != {e[53], 2'b00}) begin
          failures++;
          if (failures < 8) $display("FAIL DP x=%h r=%h exp=%h", x, r, {e[52:0], 11'b0});
        end
      end else begin
        e2 = rne(53'(x[63:40]), 24, x[39], sticky_in[LANE_SP2] || x[38:32] != 0);
        e1 = rne(53'(x[31:8]), 24, x[7], sticky_in[LANE_SP1] || x[6:0] != 0);
        if (r != {e2[23:0], 8'b0, e1[23:0], 8'b0} || cout != {1'b0, e2[24], e1[24]}) begin
          failures++;
          if (failures < 8) $display("FAIL SP x=%h r=%h", x, r);
        end
      end
    end
    checks++;
    if (n_carry == 0 || n_chain == 0) failures++;
    $display("DP carries out %0d, lower-to-upper carries %0d", n_carry, n_chain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
