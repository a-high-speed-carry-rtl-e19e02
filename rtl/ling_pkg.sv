// Shared types and gate functions for the dual-rail domino Ling adder.
//
// Every logic signal inside the adder core travels on two rails, a true rail
// and a false rail, as it does in dual-rail domino logic. While the clock is
// low the domino gates precharge and both rails sit at 0 ("empty"). While the
// clock is high the gates evaluate and exactly one rail of each pair rises.
// Domino gates can only make rising transitions, so no gate function below
// inverts a rail: inversion is a free swap of the two rails, and every other
// function builds each output rail from AND and OR of input rails. An empty
// input therefore always gives an empty output, which is what lets the whole
// core precharge from its inputs. These functions are the cell-level logic;
// the cell modules of the adder are built from them.
package ling_pkg;

  // One dual-rail signal: t is high when the value is 1, f when it is 0.
  typedef struct packed {
    logic t;
    logic f;
  } dr_t;

  // Dual-rail constants. Constants stay valid during precharge as well, so
  // they are used only where an empty signal still empties the result: the
  // missing carry-in of the lowest section and the fixed pseudo-carry
  // choices of each section's lowest bit.
  localparam dr_t DR_ZERO = '{t: 1'b0, f: 1'b1};
  localparam dr_t DR_ONE = '{t: 1'b1, f: 1'b0};
  localparam dr_t DR_EMPTY = '{t: 1'b0, f: 1'b0};

  function automatic dr_t dr_not(input dr_t a);
    return '{t: a.f, f: a.t};
  endfunction

  function automatic dr_t dr_and(input dr_t a, input dr_t b);
    return '{t: a.t & b.t, f: a.f | b.f};
  endfunction

  function automatic dr_t dr_or(input dr_t a, input dr_t b);
    return '{t: a.t | b.t, f: a.f & b.f};
  endfunction

  function automatic dr_t dr_xor(input dr_t a, input dr_t b);
    return '{t: (a.t & b.f) | (a.f & b.t), f: (a.t & b.t) | (a.f & b.f)};
  endfunction

  // 2:1 multiplexer: returns x1 when s is 1, x0 when s is 0.
  function automatic dr_t dr_mux(input dr_t s, input dr_t x0, input dr_t x1);
    return '{t: (s.t & x1.t) | (s.f & x0.t), f: (s.t & x1.f) | (s.f & x0.f)};
  endfunction

  // A pair has evaluated when exactly one rail is high.
  function automatic logic dr_valid(input dr_t a);
    return a.t ^ a.f;
  endfunction

  function automatic logic dr_empty(input dr_t a);
    return ~a.t & ~a.f;
  endfunction

endpackage
