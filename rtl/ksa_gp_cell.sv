// ksa_gp_cell: the carry generate/propagate ("carry GP") cell of the
// Kogge-Stone adder, the black cell of its prefix tree.
//
// It merges the generate/propagate pair of a more significant group (hi) with
// that of the adjacent less significant group (lo):
//   out.g = hi.g | (hi.p & lo.g)
//   out.p = hi.p & lo.p
// The OR that combines the two generate terms is the place where the
// pass-transistor variant of the adder replaces an OR gate with a
// pass-transistor network; at the logic level all variants compute the same
// function, which is what this cell describes. Purely combinational, no clock.
module ksa_gp_cell
  import ksa_pkg::*;
(
  input  gp_t hi,   // more significant group
  input  gp_t lo,   // less significant group, directly below hi
  output gp_t out   // merged group
);

  always_comb begin
    out.g = hi.g | (hi.p & lo.g);
    out.p = hi.p & lo.p;
  end

endmodule
