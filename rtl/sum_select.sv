// Sum select gate: the last logic level of the Ling adder, one per bit.
//
// The pseudo-carry into bit i is h = hsel ? h1 : h0, where h0 and h1 are the
// two precomputed possibilities and hsel is the pseudo-carry arriving at the
// bit's 4-bit section. Ling's sum then folds the transmit of the bit below
// back in:
//   s = h ? (d ^ tprev) : d
// which equals d ^ (tprev & h) = d ^ carry-into-bit-i, with d = a ^ b of the
// bit. Both selections are multiplexers in dual rail, so the late-arriving
// hsel and h only steer values that are already there. Combinational;
// empty inputs give an empty sum.
module sum_select
  import ling_pkg::*;
(
  input  dr_t d,
  input  dr_t tprev,
  input  dr_t hsel,
  input  dr_t h0,
  input  dr_t h1,
  output dr_t s
);

  dr_t h;

  always_comb begin
    h = dr_mux(hsel, h0, h1);
    s = dr_mux(h, d, dr_xor(d, tprev));
  end

endmodule
