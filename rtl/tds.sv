// tds: ternary data sorter.
//
// Sorts three pixels a, b, c into max_o >= med_o >= min_o. Three magnitude
// comparators work in parallel on the pairs (a,b), (b,c) and (a,c); their
// three "greater" bits select, through multiplexers, which input goes to
// each output. With inexact comparators the three bits can be mutually
// inconsistent (a>b, b>c, but not a>c, or the reverse); the sorter then
// trusts the (a,b) and (b,c) decisions, so the outputs are always a
// permutation of the inputs.
//
// The sorter with three comparators is the building block of the filter
// design; the parallel arrangement and the rule for inconsistent decisions
// are this implementation's choice. Combinational.
module tds
  import imf_pkg::*;
#(
  parameter int unsigned W        = PIX_W,
  parameter cmp_mode_e   MODE     = CMP_IMFSP,
  parameter int unsigned N_APPROX = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] max_o,
  output logic [W-1:0] med_o,
  output logic [W-1:0] min_o
);

  logic gab, gbc, gac;

  // Only the "greater" flags are used; the comparators' equal flag and
  // max/min outputs are left open.

  mmc #(.W(W), .MODE(MODE), .N_APPROX(N_APPROX)) u_ab (
    .x(a), .y(b), .gt(gab), .eq(), .max_o(), .min_o());
  mmc #(.W(W), .MODE(MODE), .N_APPROX(N_APPROX)) u_bc (
    .x(b), .y(c), .gt(gbc), .eq(), .max_o(), .min_o());
  mmc #(.W(W), .MODE(MODE), .N_APPROX(N_APPROX)) u_ac (
    .x(a), .y(c), .gt(gac), .eq(), .max_o(), .min_o());

  always_comb begin
    unique case ({gab, gbc, gac})
      3'b000,
      3'b001:  begin max_o = c; med_o = b; min_o = a; end  // c >= b >= a
      3'b010:  begin max_o = b; med_o = c; min_o = a; end  // b > c >= a
      3'b011:  begin max_o = b; med_o = a; min_o = c; end  // b >= a > c
      3'b100:  begin max_o = c; med_o = a; min_o = b; end  // c >= a > b
      3'b101:  begin max_o = a; med_o = c; min_o = b; end  // a > c >= b
      default: begin max_o = a; med_o = b; min_o = c; end  // a > b > c
    endcase
  end

endmodule
