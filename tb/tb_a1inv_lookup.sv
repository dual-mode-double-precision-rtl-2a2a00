// Self-checking testbench of the 1/a1 lookup. For all 256 values of a1 and
// both modes it checks the property the divider needs from each table entry
// r: r * a1 >= 1 and (r - 2^-23) * a1 < 1, i.e. r is 1/a1 rounded up to
// 23 fraction bits; it also checks where the DP and SP values are placed.
module tb_a1inv_lookup;
  int checks = 0, failures = 0;

  logic        dp_sp;
  logic [63:0] m2u;
  logic [52:0] a1inv;

  a1inv_lookup dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ok(input logic [23:0] r, input int i);
    longint unsigned p, pm;
    p  = longint'(r) * longint'(256 + i);        // r * a1 * 2^31
    pm = longint'(r - 24'd1) * longint'(256 + i);
    return (p >= (64'd1 << 31)) && (pm < (64'd1 << 31));
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      int j;
      j = 255 - i;
      // DP: index from dp_m2[51:44] = m2u[62:55]
      dp_sp = 1;
      m2u = {1'b1, 8'(i), 44'($urandom), 11'b0};
      #1;
      checks += 2;
      if (!ok(a1inv[52:29], i)) begin failures++; $display("FAIL DP entry %0d = %h", i, a1inv); end
      if (a1inv[28:0] != 0) failures++;
      // dual SP: SP-2 index i, SP-1 index j
      dp_sp = 0;
      m2u = {1'b1, 8'(i), 15'($urandom), 8'($urandom), 1'b1, 8'(j), 15'($urandom), 8'($urandom)};
      #1;
      checks += 3;
      if (!ok(a1inv[52:29], i)) begin failures++; $display("FAIL SP2 entry %0d", i); end
      if (!ok(a1inv[23:0], j)) begin failures++; $display("FAIL SP1 entry %0d", j); end
      if (a1inv[28:24] != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
