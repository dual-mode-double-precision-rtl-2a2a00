// Initial-approximation table of 1/a1, 256 entries of WIDTH bits.
//
// a1 = 1.xxxxxxxx is the divisor mantissa cut after its 8 most significant
// fraction bits; idx is those 8 bits. Entry i holds
//     ceil(2^31 / (256 + i))            (1/a1 rounded up, 1.23 fixed point)
// placed in the 24 most significant bits of the WIDTH-bit word, the rest zero.
// Rounding up guarantees a1 * (1/a1) >= 1, which the mantissa divider relies on
// (its correction term B = m2 * (1/a1) - 1 is then never negative). Keeping
// only 24 significant bits lets the top 24 bits of the 53-bit table serve
// SP-2 directly; the precision of the table does not limit the quotient
// because the divider corrects the table error through B. The table contents
// are computed at elaboration. Asynchronous read, purely combinational.
module recip_lut #(
  parameter int unsigned WIDTH = 53
) (
  input  logic [7:0]       idx,
  output logic [WIDTH-1:0] val
);

  function automatic logic [23:0] entry(input int unsigned i);
    longint unsigned num, den;
    num = 64'd1 << 31;
    den = 64'(256 + i);
    return 24'((num + den - 1) / den);
  endfunction

  logic [WIDTH-1:0] rom [256];

  for (genvar i = 0; i < 256; i++) begin : g_rom
    if (WIDTH > 24) begin : g_wide
      assign rom[i] = {entry(i), {(WIDTH - 24){1'b0}}};
    end else begin : g_narrow
      localparam logic [23:0] E = entry(i);
      assign rom[i] = E[23 -: WIDTH];
    end
  end

  assign val = rom[idx];

endmodule
