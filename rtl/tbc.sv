// tbc: two-bit magnitude comparator, exact or inexact.
//
// Compares two 2-bit slices x and y and raises h when x > y and l when x < y;
// both low means the slices are taken as equal and the decision passes to the
// next lower slice. The inexact variants drop product terms from the exact
// sum-of-products so the cell gets smaller, but keep every K-map cell exact
// that a salt (slice 11) or a pepper (slice 00) touches, as follows:
//
//   exact : h = x1 y1' + x1 x0 y0' + x0 y1' y0'
//           l = x1' y1 + x1' x0' y0 + x0' y1 y0
//   all inexact variants share  l = x1' y1
//           (wrong only in cells x=00,y=01 and x=10,y=11, where it says
//            "equal" instead of "less"; h is 0 in both cells, so the decision
//            falls to lower slices and never flips the order of a pepper or
//            a salt against another value)
//   IMFP  : h = (x1 + x0)(y1 + y0)'   exact in every cell with x=00 or y=00
//   IMFS  : h = x1 x0 (y1 y0)'        exact in every cell with x=11 or y=11
//   IMFSP : h = x1 y1' + x0 y0'       exact in both sets; wrong only at
//                                     x=01,y=10
//
// The rules (which cells must stay exact, that l may err only where h is 0,
// that one inexact l serves all three variants, and the two awkward cells
// 0001 and 1011) follow the filter design; the particular reduced equations
// are this implementation's choice within those rules.
//
// Purely combinational, no clock.
module tbc
  import imf_pkg::*;
#(
  parameter cmp_mode_e MODE = CMP_IMFSP
) (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic       h,   // x > y
  output logic       l    // x < y
);

  always_comb begin
    unique case (MODE)
      CMP_EXACT: begin
        h = (x[1] & ~y[1]) | (x[1] & x[0] & ~y[0]) | (x[0] & ~y[1] & ~y[0]);
        l = (~x[1] & y[1]) | (~x[1] & ~x[0] & y[0]) | (~x[0] & y[1] & y[0]);
      end
      CMP_IMFP: begin
        h = (x[1] | x[0]) & ~(y[1] | y[0]);
        l = ~x[1] & y[1];
      end
      CMP_IMFS: begin
        h = (x[1] & x[0]) & ~(y[1] & y[0]);
        l = ~x[1] & y[1];
      end
      default: begin  // CMP_IMFSP
        h = (x[1] & ~y[1]) | (x[0] & ~y[0]);
        l = ~x[1] & y[1];
      end
    endcase
  end

endmodule
