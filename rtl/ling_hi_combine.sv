// Recursive combine cell for Ling group signals.
//
// Joins the H / I pair of an upper span with that of the span directly
// below it:
//   H = h_hi | i_hi & h_lo
//   I = i_hi & i_lo
// which gives H and I of the two spans together. In the 8-bit adder one
// instance joins the two 4-bit groups into H(7:0), from which the carry out
// is taken; wider configurations chain more of them. Combinational and
// dual-rail; empty inputs give empty outputs.
module ling_hi_combine
  import ling_pkg::*;
(
  input  dr_t h_hi,
  input  dr_t i_hi,
  input  dr_t h_lo,
  input  dr_t i_lo,
  output dr_t h,
  output dr_t i
);

  always_comb begin
    h = dr_or(h_hi, dr_and(i_hi, h_lo));
    i = dr_and(i_hi, i_lo);
  end

endmodule
