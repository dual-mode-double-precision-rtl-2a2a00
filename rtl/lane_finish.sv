// Normalization and exception handling of one lane (DP or one SP lane).
//
// Inputs: the rounded mantissa (mant, leading bit first, MW = FW + 1 bits),
// the rounding carry (mantissa became 2.0), the biased exponent e of the
// unrounded quotient, whether the right shifter denormalized the quotient
// (shifted), the sign, and the classes of dividend (a) and divisor (b).
// Normal results: a rounding carry shifts the mantissa right by one, i.e.
// the fraction becomes zero, and increments the exponent; an exponent of
// 2^EW - 1 or more gives infinity. Denormalized results take exponent field 1
// if rounding brought the leading one back, else 0. Special operands follow
// IEEE 754: NaN for NaN inputs, 0/0 and inf/inf (a quiet NaN with only the
// top fraction bit set); infinity for inf/x and x/0 (x/0 also raises dbz);
// zero for 0/x and x/inf. Purely combinational.
module lane_finish
  import dpdsp_pkg::*;
#(
  parameter int unsigned EW = 11,
  parameter int unsigned FW = 52
) (
  input  logic [FW:0]        mant,
  input  logic               carry,
  input  logic signed [12:0] e,
  input  logic               shifted,
  input  logic               sign,
  input  fp_class_t          a,
  input  fp_class_t          b,
  output logic [EW+FW:0]     res,
  output logic               dbz,
  output logic               invalid
);

  localparam logic [EW-1:0] EMAX = {EW{1'b1}};

  always_comb begin
    logic signed [12:0] en;
    logic [EW-1:0] ef;
    logic [FW-1:0] ff;
    logic ovf;
    en  = e + 13'(carry);
    ovf = 1'b0;
    if (shifted) begin
      ef = EW'(mant[FW]);
      ff = mant[FW-1:0];
    end else begin
      ef  = en[EW-1:0];
      ff  = carry ? '0 : mant[FW-1:0];
      ovf = (en >= 13'(EMAX));
    end
    invalid = a.nan | b.nan | (a.zero & b.zero) | (a.inf & b.inf);
    dbz     = b.zero & ~a.zero & ~a.nan & ~a.inf;
    if (invalid)
      res = {1'b0, EMAX, 1'b1, {(FW-1){1'b0}}};
    else if (a.inf | b.zero | ovf)
      res = {sign, EMAX, {FW{1'b0}}};
    else if (a.zero | b.inf)
      res = {sign, {(EW+FW){1'b0}}};
    else
      res = {sign, ef, ff};
  end

endmodule
