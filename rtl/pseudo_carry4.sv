// Conditional pseudo-carry cell for one 4-bit section of the Ling adder.
//
// Inside a section starting at bit j, the pseudo-carry into bit j+k
// (k = 1..3) is H(j+k-1 : 0) = Hl[k] | Il[k] & Hin, where Hin = H(j-1 : 0)
// is the pseudo-carry arriving from the sections below and
//   Hl[1] = g[0]                      Il[1] = t[j-1]
//   Hl[2] = g[1] | g[0]               Il[2] = t[j] & t[j-1]
//   Hl[3] = g[2] | g[1] | t[j+1]&g[0] Il[3] = t[j+1] & t[j] & t[j-1]
// This cell does not wait for Hin: it produces both possibilities,
// h0[k] = Hl[k] (for Hin = 0) and h1[k] = Hl[k] | Il[k] (for Hin = 1), and
// the sum select gates pick one when Hin arrives. The same cell serves every
// section, bits 0..2 of the lowest and bits 4..6 of the next alike. Port
// tm[k] is t of bit j+k-1 (tm[0] = t[j-1]). The pseudo-carry into the
// section's own bit 0 is Hin itself and needs no cell. Combinational and
// dual-rail; empty inputs give empty outputs.
module pseudo_carry4
  import ling_pkg::*;
(
  input  dr_t [2:0] g,
  input  dr_t [2:0] tm,
  output dr_t [3:1] h0,
  output dr_t [3:1] h1
);

  dr_t [3:1] hl, il;

  always_comb begin
    hl[1] = g[0];
    il[1] = tm[0];
    hl[2] = dr_or(g[1], g[0]);
    il[2] = dr_and(tm[1], tm[0]);
    hl[3] = dr_or(dr_or(g[2], g[1]), dr_and(tm[2], g[0]));
    il[3] = dr_and(tm[2], il[2]);
    for (int k = 1; k <= 3; k++) begin
      h0[k] = hl[k];
      h1[k] = dr_or(hl[k], il[k]);
    end
  end

endmodule
