// ksa_pkg: types and the prefix operator shared by the Kogge-Stone adder.
//
// A bit position of a prefix adder is described by a generate/propagate pair.
// Generate g = a & b says the position makes a carry by itself; propagate
// p = a ^ b says it passes an incoming carry on (the XOR form is used so that
// the same p also gives the sum bit). Two adjacent groups merge with the
// prefix operator  (g, p) o (g', p') = (g | p & g', p & p'),  where the first
// pair is the more significant group. This operator is the "carry GP" cell of
// the adder; everything here is combinational.
package ksa_pkg;

  typedef struct packed {
    logic g;  // group generates a carry
    logic p;  // group propagates an incoming carry
  } gp_t;

  // Pre-processing of one bit position.
  function automatic gp_t gp_bit(input logic a, input logic b);
    gp_t r;
    r.g = a & b;
    r.p = a ^ b;
    return r;
  endfunction

endpackage
