// Dual-mode leading-one detector (LOD 64_Dual32).
//
// Counts the leading zeros of a 64-bit unified mantissa. Two 32-bit detectors
// work on the upper and lower halves; their counts are the SP-2 and SP-1 left
// shift amounts, and combined (upper count, or 32 plus the lower count when
// the upper half is zero) they give the DP left shift amount. The split into
// two 32-bit detectors is this design's choice for a dual-mode detector. An
// all-zero input yields 64 / 32, which the caller never uses because zero
// operands are handled as exceptions. Purely combinational.
module lod_dual (
  input  logic [63:0] x,
  output logic [6:0]  dp_ls,   // 0..64
  output logic [5:0]  sp2_ls,  // 0..32, leading zeros of x[63:32]
  output logic [5:0]  sp1_ls   // 0..32, leading zeros of x[31:0]
);

  function automatic logic [5:0] lzc32(input logic [31:0] v);
    logic [5:0] n;
    n = 6'd32;
    for (int i = 0; i < 32; i++)
      if (v[i]) n = 6'(31 - i);
    return n;
  endfunction

  always_comb begin
    sp2_ls = lzc32(x[63:32]);
    sp1_ls = lzc32(x[31:0]);
    dp_ls  = sp2_ls[5] ? 7'd32 + 7'(sp1_ls) : 7'(sp2_ls);
  end

endmodule
