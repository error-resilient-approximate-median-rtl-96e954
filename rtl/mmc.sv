// mmc: modified magnitude comparator for two pixels.
//
// The operands are cut into 2-bit slices. Each slice has a two-bit
// comparator (tbc) giving h (x>y) and l (x<y). A chain of equality checkers
// (ec) runs from the most significant slice down: a slice decides the result
// when every slice above it compared equal. gt is therefore
//   gt = h[n-1] | e[n-1] h[n-2] | e[n-1] e[n-2] h[n-3] | ...
// with e = ~h & ~l. When no slice decides (equal or taken as equal), gt is 0,
// max_o is y and min_o is x.
//
// The N_APPROX least significant slices use the inexact comparator selected
// by MODE; the slices above them are exact. With any MODE other than
// CMP_EXACT, comparisons against 0 (IMFP, IMFSP) or against the all-ones
// value (IMFS, IMFSP) stay exact for any N_APPROX.
//
// Slice structure, 2-bit comparators and equality checkers follow the filter
// design; the number of inexact slices is a parameter.
// Combinational.
module mmc
  import imf_pkg::*;
#(
  parameter int unsigned W        = PIX_W,      // operand width, even
  parameter cmp_mode_e   MODE     = CMP_IMFSP,
  parameter int unsigned N_APPROX = 2           // inexact slices from the LSB
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic         gt,     // x > y (as this comparator sees it)
  output logic         eq,     // no slice decided: x taken as equal to y
  output logic [W-1:0] max_o,
  output logic [W-1:0] min_o
);

  localparam int unsigned NS = W / 2;

  logic [NS-1:0] h, l, gt_s;
  logic [NS:0]   eqc;         // eqc[NS] = 1: nothing above the top slice

  assign eqc[NS] = 1'b1;

  for (genvar s = 0; s < NS; s++) begin : g_slice
    localparam cmp_mode_e SM = (s < N_APPROX) ? MODE : CMP_EXACT;
    tbc #(.MODE(SM)) u_tbc (
      .x (x[2*s +: 2]),
      .y (y[2*s +: 2]),
      .h (h[s]),
      .l (l[s])
    );
    ec u_ec (
      .eq_in  (eqc[s+1]),
      .h      (h[s]),
      .l      (l[s]),
      .eq_out (eqc[s]),
      .gt_out (gt_s[s])
    );
  end

  assign gt    = |gt_s;
  assign eq    = eqc[0];
  assign max_o = gt ? x : y;
  assign min_o = gt ? y : x;

  initial assert (W % 2 == 0) else $error("mmc: W must be even");

endmodule
