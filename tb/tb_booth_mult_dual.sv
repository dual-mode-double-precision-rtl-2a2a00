// Self-checking testbench of the dual-mode Booth multiplier: random and
// extreme operands in DP mode (54x54, checked against a 108-bit product) and
// in dual-SP mode (two 24x24 products, checked lane by lane, with the bits
// between the lanes required to be zero).
module tb_booth_mult_dual;
  int checks = 0, failures = 0;

  logic         dp_sp;
  logic [53:0]  dp_in1, dp_in2;
  logic [23:0]  sp1_in1, sp1_in2, sp2_in1, sp2_in2;
  logic [107:0] dp_mult;
  logic [47:0]  sp1_mult, sp2_mult;

  booth_mult_dual dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [107:0] e;
    for (int t = 0; t < 3000; t++) begin
      dp_in1 = {22'($urandom), $urandom};
      dp_in2 = {22'($urandom), $urandom};
      sp1_in1 = 24'($urandom); sp1_in2 = 24'($urandom);
      sp2_in1 = 24'($urandom); sp2_in2 = 24'($urandom);
      if (t == 0) begin dp_in1 = '1; dp_in2 = '1; sp1_in1 = '1; sp1_in2 = '1; sp2_in1 = '1; sp2_in2 = '1; end
      if (t == 1) begin dp_in1 = '0; sp1_in1 = '0; end
      if (t == 2) begin dp_in2 = {1'b1, 53'b0}; sp2_in2 = 24'h800000; end
      if (t % 7 == 4) begin dp_in2 = 54'h2AAAAAAAAAAAAA; sp1_in2 = 24'hAAAAAA; sp2_in2 = 24'h555555; end
      dp_sp = 1;
      #1;
      e = 108'(dp_in1) * 108'(dp_in2);
      checks++;
      if (dp_mult != e) begin
        failures++;
        if (failures < 5) $display("FAIL DP %h * %h = %h, expected %h", dp_in1, dp_in2, dp_mult, e);
      end
      dp_sp = 0;
      #1;
      checks += 3;
      if (sp1_mult != 48'(sp1_in1) * 48'(sp1_in2)) begin
        failures++;
        if (failures < 5) $display("FAIL SP1 %h * %h = %h", sp1_in1, sp1_in2, sp1_mult);
      end
      if (sp2_mult != 48'(sp2_in1) * 48'(sp2_in2)) begin
        failures++;
        if (failures < 5) $display("FAIL SP2 %h * %h = %h", sp2_in1, sp2_in2, sp2_mult);
      end
      if (dp_mult[59:48] != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
