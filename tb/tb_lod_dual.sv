// Self-checking testbench of the dual-mode leading-one detector: words with
// a random number of leading zeros in either half, checked against counts
// found by scanning the bits here.
module tb_lod_dual;
  int checks = 0, failures = 0;

  logic [63:0] x;
  logic [6:0]  dp_ls;
  logic [5:0]  sp2_ls, sp1_ls;

  lod_dual dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lz(input logic [63:0] v, input int hi, input int lo);
    for (int i = hi; i >= lo; i--) if (v[i]) return hi - i;
    return hi - lo + 1;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      x = {$urandom, $urandom};
      x[63:32] = x[63:32] >> $urandom_range(0, 32);
      x[31:0]  = x[31:0] >> $urandom_range(0, 32);
      if (t == 0) x = '0;
      if (t == 1) x = 64'd1;
      if (t == 2) x = 64'h8000_0000_0000_0000;
      #1;
      checks += 3;
      if (int'(dp_ls) != lz(x, 63, 0)) begin
        failures++;
        if (failures < 5) $display("FAIL dp %h -> %0d", x, dp_ls);
      end
      if (int'(sp2_ls) != lz(x, 63, 32)) failures++;
      if (int'(sp1_ls) != lz(x, 31, 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
