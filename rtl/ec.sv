// ec: equality checker of the sliced magnitude comparator.
//
// eq_in is high when every more significant slice compared equal. The slice
// at this position is equal when its two-bit comparator reports neither
// greater (h) nor less (l); eq_out then carries the "all equal so far" chain
// down to the next lower slice, and gt_out tells whether this slice decides
// the comparison in favour of x (all higher slices equal and h high).
// Combinational.
module ec (
  input  logic eq_in,   // all more significant slices equal
  input  logic h,       // this slice: x > y
  input  logic l,       // this slice: x < y
  output logic eq_out,  // all slices down to this one equal
  output logic gt_out   // this slice decides x > y
);

  assign eq_out = eq_in & ~h & ~l;
  assign gt_out = eq_in & h;

endmodule
