// Bitwise generate / propagate / kill cell: the first logic level of the
// Ling adder, one instance per bit.
//
// From the dual-rail operand bits a and b it forms
//   g = a & b   (generate)
//   t = a | b   (propagate, called transmit in Ling's equations)
//   d = a ^ b   (half sum, used by the sum select gate)
// In dual rail the false rail of t is a' & b', the kill signal, so kill comes
// out of this cell at no extra cost as the false rail of t. With Ling's
// equations the OR form of propagate is enough everywhere, which keeps this
// level a single domino gate per rail. Combinational; an empty (precharged)
// input gives empty outputs.
module gpk_cell
  import ling_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t g,
  output dr_t t,
  output dr_t d
);

  always_comb begin
    g = dr_and(a, b);
    t = dr_or(a, b);
    d = dr_xor(a, b);
  end

endmodule
