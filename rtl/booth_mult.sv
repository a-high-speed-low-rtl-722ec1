// booth_mult: fixed-width 10 x 10 radix-4 Booth multiplier with error
// compensation, the real multiplier inside the Booth complex multiplier.
//
// y ~= round(x * c / 512), c a Q1.9 coefficient. The coefficient is Booth
// encoded into five digits d_i in {-2..2}; partial product i is d_i * x
// shifted by 2i, a negative one formed as the ones' complement plus a 1 in
// column 2i. Only the columns of weight 2^9 and above are summed, so the
// result keeps the input's 10-bit width. The truncated columns are split in
// two groups: the major group (column 8, right below the cut) is summed
// exactly; the minor group (columns 0..7) is replaced by its expected value,
// about half a unit of column 8 for every non-zero partial product that
// reaches below column 8 (the lowest four). The carry into the kept columns
// is then (major + 1 + nonzero/2) / 2, all divisions rounding down, where
// the +1 rounds to nearest. Against the exactly rounded product the result
// is within 1 LSB, with a mean bias of about +0.1 LSB. A zero input or
// coefficient gives exactly zero.
//
// The kept columns (eleven, weights 2^9..2^19) form a bit matrix: one bit
// of each sign-extended partial product per column, plus the three bits of
// the compensation value in the lowest columns. A Dadda network reduces it,
// as in the source architecture: column heights are brought down to 4, 3
// and then 2 with full and half adders, placed per column by the Dadda rule
// (only as many adders as needed to reach the stage's target height, counting
// the carries arriving from the column below). The adder plan is computed at
// elaboration by the constant function `plan`. The last two rows go to one
// carry-lookahead adder, as the source architecture has. Carries out of the
// top column are dropped (the sum is modulo 2^11, which holds every result
// in range).
// Sign extension is carried as plain bits rather than with the usual
// sign-extension constants; that is this design's choice.
//
// Interface: combinational, x and c in, y out, saturated to 10 bits.
module booth_mult
  import fft_pkg::*;
(
  input  sample_t x,
  input  sample_t c,
  output sample_t y
);

  localparam int NPP  = W / 2;         // five Booth digits
  localparam int PW   = 2 * W;         // full product width
  localparam int NC   = PW - FRAC;     // kept columns
  localparam int CW   = 3;             // compensation width (value <= 5)
  localparam int HMAX = NPP + 1;       // tallest column of the initial matrix

  // Dadda height sequence 2, 3, 4, 6, 9, ...
  function automatic int dseq(int i);
    int d;
    d = 2;
    for (int k = 0; k < i; k++) d = d * 3 / 2;
    return d;
  endfunction

  function automatic int nstages();
    int cnt;
    cnt = 0;
    while (dseq(cnt) < HMAX) cnt++;
    return cnt;
  endfunction

  localparam int NST = nstages();

  // Adder plan of stage s (target height falling to 2), column col:
  // what = 0 gives the column height entering the stage, 1 the number of
  // full adders, 2 the number of half adders.
  function automatic int plan(int s, int col, int what);
    int h  [NC];
    int hn [NC];
    int d, nf, nh, cin;
    for (int i = 0; i < NC; i++) h[i] = NPP + ((i < CW) ? 1 : 0);
    for (int j = 0; j <= s; j++) begin
      d   = dseq(NST - 1 - j);
      cin = 0;
      for (int i = 0; i < NC; i++) begin
        nf = 0;
        nh = 0;
        while (h[i] - 2 * nf - nh + cin > d) begin
          if (h[i] - 2 * nf - nh + cin == d + 1) nh++;
          else                                   nf++;
        end
        if (j == s && i == col) begin
          if (what == 0) return h[i];
          if (what == 1) return nf;
          return nh;
        end
        hn[i] = h[i] - 2 * nf - nh + cin;
        cin   = nf + nh;
      end
      h = hn;
    end
    return 0;
  endfunction

  // The whole plan as 4-bit fields, three per (stage, column), so the
  // reduction below reads it as constants.
  localparam int PF = 12;
  function automatic logic [NST*NC*PF-1:0] mkplan();
    logic [NST*NC*PF-1:0] v;
    v = '0;
    for (int s = 0; s < NST; s++)
      for (int k = 0; k < NC; k++)
        for (int w = 0; w < 3; w++)
          v[(s*NC+k)*PF + 4*w +: 4] = 4'(plan(s, k, w));
    return v;
  endfunction

  localparam logic [NST*NC*PF-1:0] PLAN = mkplan();

  function automatic int pl(int s, int k, int what);
    return int'(PLAN[(s*NC+k)*PF + 4*what +: 4]);
  endfunction

  logic [W:0]     cx;                  // coefficient with the implicit c[-1] = 0
  logic [PW-1:0]  pp  [NPP];
  logic           neg [NPP];
  logic [3:0]     major;               // number of ones in column 8
  logic [2:0]     nnz;                 // number of non-zero partial products
  logic [CW-1:0]  comp;
  logic [NC-1:0]  compw;               // comp, widened to the matrix
  logic [NC-1:0]  row0, row1;          // the two rows left after reduction
  logic [NC-1:0]  sum;

  always_comb begin
    cx    = {c, 1'b0};
    major = '0;
    nnz   = '0;
    for (int i = 0; i < NPP; i++) begin
      logic [2:0] g;
      logic signed [W+1:0] m;          // |d| * x
      logic signed [W+1:0] mm;         // m, complemented for a negative digit
      g = cx[2*i +: 3];
      unique case (g)
        3'b001, 3'b010, 3'b101, 3'b110: m = (W+2)'(x);
        3'b011, 3'b100:                 m = (W+2)'(x) <<< 1;
        default:                        m = '0;
      endcase
      neg[i] = g[2] && (g != 3'b111) && (x != '0);
      mm     = neg[i] ? ~m : m;
      pp[i]  = PW'(mm) << (2 * i);
      major  = major + 4'(pp[i][FRAC-1]);
      if (2 * i == FRAC - 1) major = major + 4'(neg[i]);
      if (m != '0 && 2 * i < FRAC - 1) nnz = nnz + 3'd1;
    end
    comp  = CW'((5'(major) + 5'd1 + 5'(nnz >> 1)) >> 1);
    compw = NC'(comp);
  end

  // Dadda reduction. mat[k] holds column k's bits from bit 0 up; each stage
  // builds nxt[k] as: the column's sums, the carries from column k - 1, then
  // the bits no adder touched. co[k] holds the carries column k sends up.
  always_comb begin
    logic [HMAX-1:0] mat [NC];
    logic [HMAX-1:0] nxt [NC];
    logic [HMAX-1:0] co  [NC];
    for (int k = 0; k < NC; k++) begin
      mat[k] = '0;
      for (int i = 0; i < NPP; i++) mat[k][i] = pp[i][FRAC+k];
      mat[k][NPP] = (k < CW) ? compw[k] : 1'b0;
    end
    for (int s = 0; s < NST; s++) begin
      for (int k = 0; k < NC; k++) begin
        int ho, nf, nh, ci, kb, base;
        ho     = pl(s, k, 0);
        nf     = pl(s, k, 1);
        nh     = pl(s, k, 2);
        kb     = (k == 0) ? 0 : k - 1;
        ci     = (k == 0) ? 0 : pl(s, kb, 1) + pl(s, kb, 2);
        nxt[k] = '0;
        co[k]  = '0;
        for (int f = 0; f < HMAX / 3; f++)
          if (f < nf) begin
            nxt[k][f] = mat[k][3*f] ^ mat[k][3*f+1] ^ mat[k][3*f+2];
            co[k][f]  = (mat[k][3*f] & mat[k][3*f+1])
                      | (mat[k][3*f+2] & (mat[k][3*f] ^ mat[k][3*f+1]));
          end
        for (int h = 0; h < HMAX / 2; h++)
          if (h < nh) begin
            base            = 3 * nf + 2 * h;
            nxt[k][nf+h]    = mat[k][base] ^ mat[k][base+1];
            co[k][nf+h]     = mat[k][base] & mat[k][base+1];
          end
        for (int i = 0; i < HMAX; i++)
          if (i < ci) nxt[k][nf+nh+i] = co[kb][i];
        for (int i = 0; i < HMAX; i++)
          if (i < ho - 3 * nf - 2 * nh) nxt[k][nf+nh+ci+i] = mat[k][3*nf+2*nh+i];
      end
      mat = nxt;
    end
    for (int k = 0; k < NC; k++) begin
      row0[k] = mat[k][0];
      row1[k] = mat[k][1];
    end
  end

  // Final carry-lookahead adder: every carry is formed directly from the
  // generate and propagate terms below it, c[i] = OR_j<i (g[j] & p[j+1..i-1]).
  always_comb begin
    logic [NC-1:0] gen, prp, carry;
    gen = row0 & row1;
    prp = row0 ^ row1;
    for (int i = 0; i < NC; i++) begin
      carry[i] = 1'b0;
      for (int j = 0; j < i; j++) begin
        logic t;
        t = gen[j];
        for (int m = j + 1; m < i; m++) t = t & prp[m];
        carry[i] = carry[i] | t;
      end
    end
    sum = prp ^ carry;
  end

  assign y   = sat(24'(signed'(sum)));

endmodule
