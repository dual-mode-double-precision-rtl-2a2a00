// Self-checking testbench of the dual-mode left shifter: random words and
// shift amounts in DP mode (one 64-bit shift) and dual-SP mode (two
// independent 32-bit shifts), checked against the shift operator.
module tb_lshift_dual;
  int checks = 0, failures = 0;

  logic        dp_sp;
  logic [63:0] x, y;
  logic [6:0]  dp_ls;
  logic [5:0]  sp2_ls, sp1_ls;

  lshift_dual dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] e;
    for (int t = 0; t < 4000; t++) begin
      x = {$urandom, $urandom};
      dp_sp = 1'(t);
      dp_ls = 7'($urandom_range(0, 64));
      sp2_ls = 6'($urandom_range(0, 32));
      sp1_ls = 6'($urandom_range(0, 32));
      #1;
      if (dp_sp) e = (dp_ls >= 64) ? 64'b0 : x << dp_ls;
      else e = {x[63:32] << sp2_ls, x[31:0] << sp1_ls};
      checks++;
      if (y != e) begin
        failures++;
        if (failures < 5) $display("FAIL mode %b x=%h ls=%0d/%0d/%0d y=%h exp=%h",
                                   dp_sp, x, dp_ls, sp2_ls, sp1_ls, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
