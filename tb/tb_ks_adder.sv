// Self-checking testbench of the Kogge-Stone adder at its default width of
// 108 bits and at an odd width of 13: random and carry-chain operands, checked
// against the simulator's own wide addition.
module tb_ks_adder;
  int checks = 0, failures = 0;

  logic [107:0] a, b, s;
  logic         ci, co;
  logic [12:0]  a13, b13, s13;
  logic         co13;

  ks_adder              dut   (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
  ks_adder #(.W(13))    dut13 (.a(a13), .b(b13), .cin(ci), .sum(s13), .cout(co13));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [108:0] e;
    logic [13:0]  e13;
    for (int t = 0; t < 3000; t++) begin
      a = {12'($urandom), $urandom, $urandom, $urandom};
      b = {12'($urandom), $urandom, $urandom, $urandom};
      ci = 1'($urandom);
      if (t == 0) begin a = '1; b = '0; ci = 1; end
      if (t == 1) begin a = '1; b = '1; ci = 1; end
      if (t == 2) begin a = {1'b0, {107{1'b1}}}; b = 108'd1; ci = 0; end
      if (t % 5 == 3) b = ~a;
      a13 = a[12:0]; b13 = b[12:0];
      #1;
      e = {1'b0, a} + {1'b0, b} + 109'(ci);
      e13 = {1'b0, a13} + {1'b0, b13} + 14'(ci);
      checks += 2;
      if ({co, s} != e) begin
        failures++;
        if (failures < 5) $display("FAIL %h + %h + %b = %h, expected %h", a, b, ci, {co, s}, e);
      end
      if ({co13, s13} != e13) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
