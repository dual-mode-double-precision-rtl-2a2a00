// Self-checking testbench of data extraction: random operands of every class
// in both modes; sign, exponent and class of each lane and the unified
// mantissas are compared with a field-by-field decoding done here.
module tb_data_extract;
  import dpdsp_pkg::*;
  int checks = 0, failures = 0;

  logic        dp_sp;
  logic [63:0] in1, in2, m1u, m2u;
  fp_class_t   c1 [3], c2 [3];

  data_extract dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp_class_t ref_cls(input logic s, input int e, input int emax, input bit fz);
    fp_class_t c;
    c.sign = s; c.exp = 11'(e);
    c.zero = (e == 0) && fz;
    c.sub  = (e == 0) && !fz;
    c.inf  = (e == emax) && fz;
    c.nan  = (e == emax) && !fz;
    return c;
  endfunction

  function automatic logic [63:0] rnd_word();
    logic [63:0] w;
    int k;
    w = {$urandom, $urandom};
    k = $urandom_range(0, 9);
    if (k == 0) w[62:52] = '0;
    if (k == 1) w[62:52] = '1;
    if (k == 2) w[62:55] = '0;
    if (k == 3) w[62:55] = '1;
    if (k == 4) w[30:23] = '0;
    if (k == 5) w[30:23] = '1;
    if ($urandom_range(0, 3) == 0) w[51:0] = '0;
    if ($urandom_range(0, 3) == 0) w[54:32] = '0;
    if ($urandom_range(0, 3) == 0) w[22:0] = '0;
    return w;
  endfunction

  task automatic cmp(input fp_class_t got, input fp_class_t exp_c, input string what);
    checks++;
    if (got != exp_c) begin
      failures++;
      if (failures < 8) $display("FAIL %s got %h expected %h", what, got, exp_c);
    end
  endtask

  initial begin
    logic [63:0] w [2];
    fp_class_t   got [2][3];
    logic [63:0] mu [2];
    for (int t = 0; t < 3000; t++) begin
      in1 = rnd_word(); in2 = rnd_word();
      dp_sp = 1'($urandom);
      #1;
      w[0] = in1; w[1] = in2;
      got[0] = c1; got[1] = c2;
      mu[0] = m1u; mu[1] = m2u;
      for (int o = 0; o < 2; o++) begin
        logic [63:0] x;
        x = w[o];
        cmp(got[o][LANE_DP], ref_cls(x[63], int'(x[62:52]), 2047, x[51:0] == 0), "DP");
        cmp(got[o][LANE_SP2], ref_cls(x[63], int'(x[62:55]), 255, x[54:32] == 0), "SP2");
        cmp(got[o][LANE_SP1], ref_cls(x[31], int'(x[30:23]), 255, x[22:0] == 0), "SP1");
        checks++;
        if (dp_sp) begin
          if (mu[o] != {x[62:52] != 0, x[51:0], 11'b0}) failures++;
        end else begin
          if (mu[o] != {x[62:55] != 0, x[54:32], 8'b0, x[30:23] != 0, x[22:0], 8'b0}) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
