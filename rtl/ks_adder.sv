// Kogge-Stone parallel-prefix adder, the final adder of the Booth multiplier.
//
// Computes sum = a + b + cin (modulo 2^W) and the carry out. Generate and
// propagate signals are combined over ceil(log2(W)) prefix levels with spans
// 1, 2, 4, ...; every bit position gets its own group-generate at each level,
// which is the Kogge-Stone structure. Purely combinational.
module ks_adder #(
  parameter int unsigned W = 108
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned L = $clog2(W);

  logic [W-1:0] g [L+1];
  logic [W-1:0] p [L+1];

  // level 0: bit generate / propagate, carry-in folded into bit 0
  assign g[0] = (a & b) | {{(W-1){1'b0}}, (a[0] ^ b[0]) & cin};
  assign p[0] = a ^ b;

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= D) begin : g_op
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-D]);
        assign p[l+1][i] = p[l][i] & p[l][i-D];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  // carry into bit i is the group generate of bits [i-1:0] (with cin)
  assign sum  = p[0] ^ {g[L][W-2:0], cin};
  assign cout = g[L][W-1];

endmodule
