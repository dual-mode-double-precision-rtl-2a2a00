// Dual-mode dynamic left shifter (Dynamic Left Shift 64_Dual32).
//
// Shifts either one 64-bit mantissa (dp_sp = 1) by dp_ls, or the two 32-bit
// halves independently (dp_sp = 0) by sp2_ls (upper) and sp1_ls (lower).
// It is a logarithmic shifter of 32-bit halves: in each of the stages 1, 2, 4,
// 8 and 16 the bits leaving the lower half enter the upper half only in DP
// mode, and a final stage moves the lower half up by 32 in DP mode. The stage
// structure is this design's own; the document gives only the function.
// Shift amounts above the width clear the result. Purely combinational.
module lshift_dual (
  input  logic        dp_sp,
  input  logic [63:0] x,
  input  logic [6:0]  dp_ls,
  input  logic [5:0]  sp2_ls,
  input  logic [5:0]  sp1_ls,
  output logic [63:0] y
);

  always_comb begin
    logic [31:0] hi, lo;
    logic [6:0]  ah, al;
    hi = x[63:32];
    lo = x[31:0];
    ah = dp_sp ? dp_ls : 7'(sp2_ls);
    al = dp_sp ? dp_ls : 7'(sp1_ls);
    for (int k = 0; k < 5; k++) begin
      if (ah[k]) hi = (hi << (1 << k)) | (dp_sp ? (lo >> (32 - (1 << k))) : 32'b0);
      if (al[k]) lo = lo << (1 << k);
    end
    // 32-bit stage: DP moves the lower half up, SP clears a lane shifted by 32
    if (dp_sp) begin
      if (dp_ls[5]) begin hi = lo; lo = '0; end
    end else begin
      if (ah[5]) hi = '0;
      if (al[5]) lo = '0;
    end
    if (ah[6]) begin hi = '0; lo = '0; end
    y = {hi, lo};
  end

endmodule
