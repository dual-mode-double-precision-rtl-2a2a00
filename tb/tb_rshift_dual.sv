// Self-checking testbench of the dual-mode right shifter: random quotients
// above and below one with random shift amounts, in both modes. The expected
// aligned and shifted words and sticky bits are computed with 128-bit
// arithmetic here.
module tb_rshift_dual;
  import dpdsp_pkg::*;
  int checks = 0, failures = 0;

  logic        dp_sp;
  logic [63:0] q, y;
  lane_exp_t   le [3];
  logic [2:0]  lt1, sticky, shifted;

  rshift_dual dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one lane of width w: quotient v with 2 integer bits
  task automatic lane_ref(input logic [63:0] v, input int w, input int rs0, input int rs1,
                          output logic [63:0] o, output bit st, output bit l1, output bit sh);
    logic [127:0] a, b;
    int rs;
    l1 = !v[w-2];
    a = 128'(v) << (l1 ? 2 : 1);
    a = a & ((128'd1 << w) - 1);
    rs = l1 ? rs1 : rs0;
    sh = (rs != 0);
    b = (a << w) >> rs;                      // keep the dropped bits below
    o = 64'(b >> w);
    st = (b & ((128'd1 << w) - 1)) != 0;
  endtask

  initial begin
    logic [63:0] o1, o2;
    bit s1, s2, l1a, l1b, h1, h2;
    for (int t = 0; t < 4000; t++) begin
      dp_sp = 1'(t);
      q = {2'b00, $urandom, 30'($urandom)};
      if ($urandom_range(0, 1)) q[62] = 1'b1; else begin q[62] = 1'b0; q[61] = 1'b1; end
      if ($urandom_range(0, 1)) q[30] = 1'b1; else begin q[30] = 1'b0; q[29] = 1'b1; end
      q[31] = 1'b0;
      for (int l = 0; l < 3; l++) begin
        le[l] = '0;
        le[l].rs0 = 6'($urandom_range(0, l == LANE_DP ? 63 : 31));
        le[l].rs1 = 6'($urandom_range(0, l == LANE_DP ? 63 : 31));
        if ($urandom_range(0, 2) == 0) le[l].rs0 = '0;
        if ($urandom_range(0, 2) == 0) le[l].rs1 = '0;
      end
      #1;
      checks++;
      if (dp_sp) begin
        lane_ref(q, 64, int'(le[LANE_DP].rs0), int'(le[LANE_DP].rs1), o1, s1, l1a, h1);
        if (y != o1 || sticky[LANE_DP] != s1 || lt1[LANE_DP] != l1a || shifted[LANE_DP] != h1) begin
          failures++;
          if (failures < 8) $display("FAIL DP q=%h rs=%0d/%0d y=%h exp=%h st %b/%b",
                                     q, le[LANE_DP].rs0, le[LANE_DP].rs1, y, o1, sticky[LANE_DP], s1);
        end
      end else begin
        lane_ref({32'b0, q[63:32]}, 32, int'(le[LANE_SP2].rs0), int'(le[LANE_SP2].rs1), o2, s2, l1b, h2);
        lane_ref({32'b0, q[31:0]}, 32, int'(le[LANE_SP1].rs0), int'(le[LANE_SP1].rs1), o1, s1, l1a, h1);
        if (y != {o2[31:0], o1[31:0]} || sticky[LANE_SP2] != s2 || sticky[LANE_SP1] != s1 ||
            lt1[LANE_SP2] != l1b || lt1[LANE_SP1] != l1a ||
            shifted[LANE_SP2] != h2 || shifted[LANE_SP1] != h1) begin
          failures++;
          if (failures < 8) $display("FAIL SP q=%h y=%h exp=%h", q, y, {o2[31:0], o1[31:0]});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
