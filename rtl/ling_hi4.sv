// Valency-4 group H / I cell of the Ling adder.
//
// For a 4-bit group j+3..j it forms, in one logic level,
//   H = g[3] | g[2] | t[j+1]&g[1] | t[j+1]&t[j]&g[0]
//   I = t[j+2] & t[j+1] & t[j] & t[j-1]
// H is Ling's group pseudo-carry: the real carry out of the group is
// t[j+3] & H, and Ling's form needs one product term less than the ordinary
// group generate. I is the group transmit, shifted down one bit as Ling's
// recursion H(hi:lo) = H(hi) | I(hi) & H(lo) requires. Port tm[k] carries
// t of bit j+k-1, the transmit of the bit below each bit of the group, so
// tm[0] is t[j-1] (the lowest group has no bit below and is fed a constant 0).
// Combinational and dual-rail; empty inputs give empty outputs.
module ling_hi4
  import ling_pkg::*;
(
  input  dr_t [3:0] g,
  input  dr_t [3:0] tm,
  output dr_t       h,
  output dr_t       i
);

  always_comb begin
    h = dr_or(dr_or(g[3], g[2]),
              dr_or(dr_and(tm[3], g[1]), dr_and(dr_and(tm[3], tm[2]), g[0])));
    i = dr_and(dr_and(tm[3], tm[2]), dr_and(tm[1], tm[0]));
  end

endmodule
