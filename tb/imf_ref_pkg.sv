// imf_ref_pkg: reference model used by the testbenches.
//
// The two-bit comparator is modelled as K-map tables (one 16-bit mask per
// output, bit index {x,y}) written from the cell-by-cell specification, not
// from the RTL equations:
//   exact h: cells with x>y               exact l: cells with x<y
//   inexact l (all variants): exact l with cells 0001 and 1011 cleared
//   IMFP  h: x != 00 and y == 00
//   IMFS  h: x == 11 and y != 11
//   IMFSP h: exact h plus the single wrong cell 0110
// On top of it: the sliced comparator, the three-input sorter and the 3x3
// median network, plus an exact median by full sorting.
package imf_ref_pkg;
  import imf_pkg::*;

  localparam logic [15:0] H_EXACT = 16'h7310;
  localparam logic [15:0] L_EXACT = 16'h08CE;
  localparam logic [15:0] L_APPROX = 16'h00CC;
  localparam logic [15:0] H_IMFP  = 16'h1110;
  localparam logic [15:0] H_IMFS  = 16'h7000;
  localparam logic [15:0] H_IMFSP = 16'h7350;

  function automatic logic [1:0] ref_tbc(cmp_mode_e m, logic [1:0] x, logic [1:0] y);
    logic [3:0] i;
    logic [15:0] hm, lm;
    i = {x, y};
    case (m)
      CMP_EXACT: begin hm = H_EXACT; lm = L_EXACT;  end
      CMP_IMFP:  begin hm = H_IMFP;  lm = L_APPROX; end
      CMP_IMFS:  begin hm = H_IMFS;  lm = L_APPROX; end
      default:   begin hm = H_IMFSP; lm = L_APPROX; end
    endcase
    return {hm[i], lm[i]};   // {h, l}
  endfunction

  // x > y as the sliced comparator sees it: the most significant slice
  // whose (h,l) is not (0,0) decides.
  function automatic logic ref_gt(cmp_mode_e m, int unsigned napprox,
                                  logic [7:0] x, logic [7:0] y);
    logic [1:0] hl;
    for (int s = 3; s >= 0; s--) begin
      hl = ref_tbc((s < int'(napprox)) ? m : CMP_EXACT, x[2*s +: 2], y[2*s +: 2]);
      if (hl != 2'b00) return hl[1];
    end
    return 1'b0;
  endfunction

  typedef struct packed { logic [7:0] mx, md, mn; } sort3_t;

  // Sorter: from the (a,b) and (b,c) decisions, with (a,c) used only to
  // place a between c and b or b between a and c.
  function automatic sort3_t ref_sort3(cmp_mode_e m, int unsigned n,
                                       logic [7:0] a, logic [7:0] b, logic [7:0] c);
    logic gab, gbc, gac;
    gab = ref_gt(m, n, a, b);
    gbc = ref_gt(m, n, b, c);
    gac = ref_gt(m, n, a, c);
    if (gab && gbc)        return '{a, b, c};
    if (!gab && !gbc)      return '{c, b, a};
    if (gab)  return gac ? sort3_t'{a, c, b} : sort3_t'{c, a, b};  // a>b, b<=c
    return gac ? sort3_t'{b, a, c} : sort3_t'{b, c, a};            // a<=b, b>c
  endfunction

  function automatic logic [7:0] ref_median_net(cmp_mode_e m, int unsigned n,
                                                logic [7:0] w[9]);
    sort3_t c0, c1, c2, r_hi, r_md, r_lo, f;
    c0 = ref_sort3(m, n, w[0], w[3], w[6]);
    c1 = ref_sort3(m, n, w[1], w[4], w[7]);
    c2 = ref_sort3(m, n, w[2], w[5], w[8]);
    r_hi = ref_sort3(m, n, c0.mx, c1.mx, c2.mx);
    r_md = ref_sort3(m, n, c0.md, c1.md, c2.md);
    r_lo = ref_sort3(m, n, c0.mn, c1.mn, c2.mn);
    f = ref_sort3(m, n, r_hi.mn, r_md.md, r_lo.mx);
    return f.md;
  endfunction

  function automatic logic [7:0] exact_median(logic [7:0] w[9]);
    logic [7:0] s[9];
    logic [7:0] t;
    s = w;
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 8 - i; j++)
        if (s[j] > s[j+1]) begin t = s[j]; s[j] = s[j+1]; s[j+1] = t; end
    return s[4];
  endfunction

endpackage
