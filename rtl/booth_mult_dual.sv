// Dual-mode radix-4 modified Booth multiplier, 54x54 or two parallel 24x24.
//
// Three 2:1 input multiplexers build the operands:
//   in1_t1 = dp_sp ? dp_in1 : {30'b0, sp1_in1}
//   in1_t2 = dp_sp ? dp_in1 : {sp2_in1, 30'b0}
//   in2    = dp_sp ? dp_in2 : {sp2_in2, 6'b0, sp1_in2}
// The multiplier in2 is radix-4 Booth recoded into 28 digits. Digits 0..13
// select multiples of in1_t1 (partial products PP1), digits 14..27 multiples
// of in1_t2 (PP2). In DP mode the two sets together form the full 54x54
// product. In dual-SP mode the zero gap in in2 makes digits 0..12 recode
// exactly sp1_in2 and digits 15..27 exactly sp2_in2 << 30, so PP1 sums to
// sp1_in1*sp1_in2 in bits [47:0] and PP2 to sp2_in1*sp2_in2 in bits [107:60],
// with the 12 bits between them left zero: no separate SP hardware is needed.
// Operands are unsigned.
//
// Each partial product row is 56 bits, {~sign, 55 magnitude bits}, using
// the usual sign-extension elimination. One correction row carries the +1 of
// every negated row and the constant that the inverted sign bits require.
// Together that makes 29 rows.
// A Dadda tree of full and half adders compresses them column by column in
// eight levels, to column heights 28, 19, 13, 9, 6, 4, 3 and 2.
// At each level a column is reduced only as far as that level's height
// requires. The tree's plan (heights, adder counts per column) is computed
// at elaboration by constant functions. A Kogge-Stone adder adds the final
// two rows.
// The Booth recoding, the three input multiplexers, the 8-level Dadda tree
// and the Kogge-Stone adder follow the document. The row encoding and the
// bit order inside a column are this design's.
// Purely combinational; outputs:
//   dp_mult  = full 108-bit product
//   sp1_mult = dp_mult[47:0], sp2_mult = dp_mult[107:60]
module booth_mult_dual (
  input  logic          dp_sp,
  input  logic [53:0]   dp_in1,
  input  logic [53:0]   dp_in2,
  input  logic [23:0]   sp1_in1,
  input  logic [23:0]   sp1_in2,
  input  logic [23:0]   sp2_in1,
  input  logic [23:0]   sp2_in2,
  output logic [107:0]  dp_mult,
  output logic [47:0]   sp1_mult,
  output logic [47:0]   sp2_mult
);

  localparam int NDIG   = 28;
  localparam int COLS   = 108;
  localparam int LEVELS = 8;
  localparam int FLD    = 6;     // bits per entry of the packed Dadda plan

  // Dadda height targets: level l reduces every column to at most TARGET(l)
  // bits (the sequence 2, 3, 4, 6, 9, 13, 19, 28 read from the top; 29 rows
  // need the eight levels 28 .. 2).
  function automatic int target(input int l);
    unique case (l)
      0:       return 28;
      1:       return 19;
      2:       return 13;
      3:       return 9;
      4:       return 6;
      5:       return 4;
      6:       return 3;
      default: return 2;
    endcase
  endfunction

  // Constant of the sign-extension elimination: every row is stored as
  // {~sign, low 55 bits}, which adds 2^(55+2i); this removes it again.
  function automatic logic [COLS-1:0] ksign();
    logic [COLS-1:0] k;
    k = '0;
    for (int i = 0; i < NDIG; i++)
      if (55 + 2 * i < COLS) k = k - (COLS'(1) << (55 + 2 * i));
    return k;
  endfunction

  localparam logic [COLS-1:0] KSIGN = ksign();

  // rows covering column c: lo(c) .. hi(c); the correction row adds one bit
  function automatic int row_lo(input int c);
    return (c > 55) ? (c - 54) / 2 : 0;
  endfunction
  function automatic int row_hi(input int c);
    return (c / 2 < NDIG - 1) ? c / 2 : NDIG - 1;
  endfunction
  function automatic bit has_corr(input int c);
    return (c <= 54) ? (c % 2 == 0) : bit'(KSIGN[c]);
  endfunction
  function automatic int h0(input int c);
    return row_hi(c) - row_lo(c) + 1 + int'(has_corr(c));
  endfunction

  // Dadda plan for all levels, packed: sel 0 = column heights (levels 0..8),
  // sel 1 = full adders, sel 2 = half adders (levels 0..7) per column.
  function automatic logic [(LEVELS+1)*COLS*FLD-1:0] plan(input int sel);
    logic [(LEVELS+1)*COLS*FLD-1:0] res;
    int h [COLS];
    int hn [COLS];
    int cin, tot, f, hh;
    res = '0;
    for (int c = 0; c < COLS; c++) h[c] = h0(c);
    for (int l = 0; l <= LEVELS; l++) begin
      cin = 0;
      for (int c = 0; c < COLS; c++) begin
        tot = h[c] + cin;
        f = 0; hh = 0;
        if (l < LEVELS && tot > target(l)) begin
          f  = (tot - target(l)) / 2;
          hh = (tot - target(l)) % 2;
        end
        unique case (sel)
          0:       res[(l*COLS+c)*FLD +: FLD] = FLD'(h[c]);
          1:       res[(l*COLS+c)*FLD +: FLD] = FLD'(f);
          default: res[(l*COLS+c)*FLD +: FLD] = FLD'(hh);
        endcase
        hn[c] = h[c] - 3 * f - 2 * hh + f + hh + cin;
        cin = f + hh;
      end
      h = hn;
    end
    return res;
  endfunction

  localparam logic [(LEVELS+1)*COLS*FLD-1:0] PH  = plan(0);
  localparam logic [(LEVELS+1)*COLS*FLD-1:0] PFA = plan(1);
  localparam logic [(LEVELS+1)*COLS*FLD-1:0] PHA = plan(2);

  logic [53:0] in1_t1, in1_t2, in2;
  logic [55:0] pp [NDIG];      // Booth rows, row i has weight 2^(2i)
  logic [NDIG-1:0] neg_r;      // +1 of each negated row, added at bit 2i

  assign in1_t1 = dp_sp ? dp_in1 : {30'b0, sp1_in1};
  assign in1_t2 = dp_sp ? dp_in1 : {sp2_in1, 30'b0};
  assign in2    = dp_sp ? dp_in2 : {sp2_in2, 6'b0, sp1_in2};

  // Booth recoding and partial product generation
  always_comb begin
    logic [56:0] ext;       // {0, 0, in2, 0}: bit j+1 holds in2[j]
    logic [2:0]  trip;
    logic [53:0] mcand;
    logic [54:0] mag;
    logic [55:0] w;
    logic        neg;
    ext      = {2'b00, in2, 1'b0};
    neg_r    = '0;
    for (int i = 0; i < NDIG; i++) begin
      trip  = ext[2*i +: 3];
      mcand = (i < NDIG / 2) ? in1_t1 : in1_t2;
      unique case (trip)
        3'b001, 3'b010: begin mag = {1'b0, mcand}; neg = 1'b0; end
        3'b011:         begin mag = {mcand, 1'b0}; neg = 1'b0; end
        3'b100:         begin mag = {mcand, 1'b0}; neg = 1'b1; end
        3'b101, 3'b110: begin mag = {1'b0, mcand}; neg = 1'b1; end
        default:        begin mag = '0;            neg = 1'b0; end
      endcase
      w     = neg ? ~{1'b0, mag} : {1'b0, mag};
      pp[i] = {~w[55], w[54:0]};
      neg_r[i] = neg;
    end
  end

  // Dadda tree. Level l holds each column c as the bits col[c][0 .. H-1].
  // Each level passes the upper bits of a column on unchanged, then the sums
  // of its full and half adders, then the carries from column c-1.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [31:0] col [COLS];
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int H   = int'(PH [(l*COLS+c)*FLD +: FLD]);
      if (l == 0) begin : g_init
        localparam int LO = row_lo(c);
        localparam int HI = row_hi(c);
        for (genvar i = LO; i <= HI; i++) begin : g_row
          assign col[c][i-LO] = pp[i][c-2*i];
        end
        if (c <= 54 && has_corr(c)) begin : g_neg
          assign col[c][HI-LO+1] = neg_r[c/2];
        end else if (has_corr(c)) begin : g_const
          assign col[c][HI-LO+1] = 1'b1;
        end
        assign col[c][31:H] = '0;
      end else begin : g_red
        localparam int HP  = int'(PH [((l-1)*COLS+c)*FLD +: FLD]);
        localparam int F   = int'(PFA[((l-1)*COLS+c)*FLD +: FLD]);
        localparam int HA  = int'(PHA[((l-1)*COLS+c)*FLD +: FLD]);
        localparam int P   = HP - 3 * F - 2 * HA;
        localparam int FI  = (c > 0) ? int'(PFA[((l-1)*COLS+c-1)*FLD +: FLD]) : 0;
        localparam int HI  = (c > 0) ? int'(PHA[((l-1)*COLS+c-1)*FLD +: FLD]) : 0;
        if (P < 0 || P + F + HA + FI + HI != H || (l == LEVELS && H > 2)) begin : g_bad
          $error("Dadda plan inconsistent at level %0d column %0d", l, c);
        end
        for (genvar k = 0; k < P; k++) begin : g_pass
          assign col[c][k] = g_lvl[l-1].col[c][3*F+2*HA+k];
        end
        for (genvar k = 0; k < F; k++) begin : g_fa
          logic x, y, z;
          assign x = g_lvl[l-1].col[c][3*k];
          assign y = g_lvl[l-1].col[c][3*k+1];
          assign z = g_lvl[l-1].col[c][3*k+2];
          assign col[c][P+k] = x ^ y ^ z;
          if (c + 1 < COLS) begin : g_co
            localparam int PN = int'(PH[((l-1)*COLS+c+1)*FLD +: FLD])
                                - 3 * int'(PFA[((l-1)*COLS+c+1)*FLD +: FLD])
                                - 2 * int'(PHA[((l-1)*COLS+c+1)*FLD +: FLD]);
            localparam int SN = int'(PFA[((l-1)*COLS+c+1)*FLD +: FLD])
                                + int'(PHA[((l-1)*COLS+c+1)*FLD +: FLD]);
            assign col[c+1][PN+SN+k] = (x & y) | (x & z) | (y & z);
          end
        end
        for (genvar k = 0; k < HA; k++) begin : g_ha
          logic x, y;
          assign x = g_lvl[l-1].col[c][3*F+2*k];
          assign y = g_lvl[l-1].col[c][3*F+2*k+1];
          assign col[c][P+F+k] = x ^ y;
          if (c + 1 < COLS) begin : g_co
            localparam int PN = int'(PH[((l-1)*COLS+c+1)*FLD +: FLD])
                                - 3 * int'(PFA[((l-1)*COLS+c+1)*FLD +: FLD])
                                - 2 * int'(PHA[((l-1)*COLS+c+1)*FLD +: FLD]);
            localparam int SN = int'(PFA[((l-1)*COLS+c+1)*FLD +: FLD])
                                + int'(PHA[((l-1)*COLS+c+1)*FLD +: FLD]);
            assign col[c+1][PN+SN+F+k] = x & y;
          end
        end
        assign col[c][31:H] = '0;
      end
    end
  end

  logic [COLS-1:0] fa_row, fb_row;
  for (genvar c = 0; c < COLS; c++) begin : g_final
    assign fa_row[c] = g_lvl[LEVELS].col[c][0];
    assign fb_row[c] = g_lvl[LEVELS].col[c][1];
  end

  logic unused_cout;

  ks_adder #(.W(108)) u_final (
    .a(fa_row), .b(fb_row), .cin(1'b0),
    .sum(dp_mult), .cout(unused_cout)
  );

  assign sp1_mult = dp_mult[47:0];
  assign sp2_mult = dp_mult[107:60];

endmodule
