// Reference model shared by the divider's system-level testbenches.
//
// sp_to_real converts a binary32 pattern exactly to real; real_to_sp rounds a
// real (binary64) value to binary32, to nearest with ties to even, including
// sub-normal results. lane_ok accepts a result that is a NaN where the
// reference is one, or has the reference's sign and lies within one unit in
// the last place of it; ulp_dist gives that distance. lane_flags gives the
// expected {divide-by-zero, invalid} flags of one lane.
package fp_ref_pkg;

  function automatic real sp_to_real(input logic [31:0] b);
    real v;
    logic [7:0] e;
    e = b[30:23];
    if (e == 8'hFF)
      v = (b[22:0] == 0) ? $bitstoreal(64'h7FF0_0000_0000_0000)
                         : $bitstoreal(64'h7FF8_0000_0000_0000);
    else if (e == 0)
      v = real'(b[22:0]) * (2.0 ** -149);
    else
      v = $bitstoreal({1'b0, 11'(int'(e) - 127 + 1023), b[22:0], 29'b0});
    return b[31] ? -v : v;
  endfunction

  function automatic logic [31:0] real_to_sp(input real r);
    logic [63:0] d;
    int e;
    logic [53:0] m;     // 1.52 mantissa with a zero on top for the carry
    logic [53:0] keep;
    int sh;
    logic g, st;
    logic [31:0] res;
    d = $realtobits(r);
    if (d[62:52] == 11'h7FF)
      return (d[51:0] != 0) ? 32'h7FC0_0000 : {d[63], 8'hFF, 23'b0};
    if (d[62:0] == 0) return {d[63], 31'b0};
    e = int'(d[62:52]) - 1023;
    m = {2'b01, d[51:0]};
    if (d[62:52] == 0) return {d[63], 31'b0};  // far below SP range
    if (e > 127) return {d[63], 8'hFF, 23'b0};
    // target: 24-bit mantissa at exponent max(e, -126)
    sh = 29 + ((e < -126) ? (-126 - e) : 0);
    if (sh > 53) sh = 53;
    keep = m >> sh;
    g    = m[sh-1];
    st   = (sh >= 2) ? ((m & ((54'd1 << (sh - 1)) - 1)) != 0) : 1'b0;
    if (g && (st || keep[0])) keep = keep + 1;
    if (e < -126) begin
      // sub-normal: keep[23] set means rounding produced the smallest normal
      res = {d[63], 8'(keep[23]), keep[22:0]};
    end else begin
      if (keep[24]) begin keep = keep >> 1; e = e + 1; end
      if (e > 127) res = {d[63], 8'hFF, 23'b0};
      else res = {d[63], 8'(e + 127), keep[22:0]};
    end
    return res;
  endfunction

  function automatic bit lane_ok(input logic [63:0] got, input logic [63:0] rf,
                                 input int w);  // w = 64 or 32
    logic [62:0] gm, rm;
    bit g_nan, r_nan;
    if (w == 64) begin
      g_nan = (got[62:52] == 11'h7FF) && (got[51:0] != 0);
      r_nan = (rf[62:52] == 11'h7FF) && (rf[51:0] != 0);
      gm = got[62:0]; rm = rf[62:0];
      if (r_nan || g_nan) return r_nan && g_nan;
      if (got[63] != rf[63]) return 0;
    end else begin
      g_nan = (got[30:23] == 8'hFF) && (got[22:0] != 0);
      r_nan = (rf[30:23] == 8'hFF) && (rf[22:0] != 0);
      gm = {32'b0, got[30:0]}; rm = {32'b0, rf[30:0]};
      if (r_nan || g_nan) return r_nan && g_nan;
      if (got[31] != rf[31]) return 0;
    end
    return (gm > rm) ? (gm - rm <= 1) : (rm - gm <= 1);
  endfunction

  // expected flags of one lane: {dbz, invalid}
  function automatic logic [1:0] lane_flags(input logic [63:0] a, input logic [63:0] b, input int w);
    bit an, bn, ai, bi, az, bz;
    if (w == 64) begin
      an = a[62:52] == 11'h7FF && a[51:0] != 0; bn = b[62:52] == 11'h7FF && b[51:0] != 0;
      ai = a[62:52] == 11'h7FF && a[51:0] == 0; bi = b[62:52] == 11'h7FF && b[51:0] == 0;
      az = a[62:0] == 0; bz = b[62:0] == 0;
    end else begin
      an = a[30:23] == 8'hFF && a[22:0] != 0; bn = b[30:23] == 8'hFF && b[22:0] != 0;
      ai = a[30:23] == 8'hFF && a[22:0] == 0; bi = b[30:23] == 8'hFF && b[22:0] == 0;
      az = a[30:0] == 0; bz = b[30:0] == 0;
    end
    return {bz && !az && !an && !ai, an || bn || (az && bz) || (ai && bi)};
  endfunction

  function automatic longint ulp_dist(input logic [63:0] got, input logic [63:0] rf, input int w);
    logic [62:0] gm, rm;
    if (w == 64) begin gm = got[62:0]; rm = rf[62:0]; end
    else begin gm = {32'b0, got[30:0]}; rm = {32'b0, rf[30:0]}; end
    return (gm > rm) ? longint'(gm - rm) : longint'(rm - gm);
  endfunction

endpackage
