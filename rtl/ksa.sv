// ksa: Kogge-Stone parallel prefix adder, W bits with carry in and carry out.
//
// s + (cout << W) = a + b + cin, computed in three steps:
//   1. pre-processing: per bit, g = a & b and p = a ^ b;
//   2. the carry-in is folded into bit 0 with one carry GP cell, so that bit
//      0 carries (g0 | p0 & cin); then a Kogge-Stone prefix tree of
//      ceil(log2 W) levels follows: at level l every position i >= 2**l merges
//      with position i - 2**l, the others pass through unchanged. After the
//      last level position i holds the group generate of bits i..0 (with cin),
//      which is the carry into bit i + 1;
//   3. post-processing: s[i] = p[i] ^ carry into bit i, cout = carry out of
//      bit W-1.
// The default width of 4 bits is the adder size used throughout the design;
// the way the carry-in enters the tree is this design's choice. Purely
// combinational: the result is valid one settling delay after the inputs.
module ksa
  import ksa_pkg::*;
#(
  parameter int unsigned W = 4  // operand width in bits
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 0;

  gp_t        bit_gp [W];   // per-bit pairs, before the carry-in fold
  gp_t        lvl0   [W];   // input of the prefix tree
  gp_t        last   [W];   // output of the prefix tree
  gp_t        cin_gp;       // the carry-in as a generate-only group
  logic [W:0] carry;        // carry[i]: carry into bit i

  // 1. pre-processing
  always_comb begin
    for (int i = 0; i < W; i++) bit_gp[i] = gp_bit(a[i], b[i]);
  end

  // 2a. fold the carry-in into bit 0 (cin acts as a group that only generates)
  assign cin_gp = '{g: cin, p: 1'b0};

  ksa_gp_cell u_cin_cell (
    .hi  (bit_gp[0]),
    .lo  (cin_gp),
    .out (lvl0[0])
  );

  for (genvar i = 1; i < W; i++) begin : g_lvl0
    assign lvl0[i] = bit_gp[i];
  end

  // 2b. Kogge-Stone prefix levels; level l merges positions 2**l apart
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    gp_t prev [W];
    gp_t next [W];

    if (l == 0) begin : g_first
      assign prev = lvl0;
    end else begin : g_later
      assign prev = g_level[l-1].next;
    end

    for (genvar i = 0; i < W; i++) begin : g_pos
      if (i >= D) begin : g_black
        ksa_gp_cell u_cell (
          .hi  (prev[i]),
          .lo  (prev[i-D]),
          .out (next[i])
        );
      end else begin : g_pass
        assign next[i] = prev[i];
      end
    end
  end

  if (LEVELS == 0) begin : g_no_tree
    assign last = lvl0;
  end else begin : g_tree_out
    assign last = g_level[LEVELS-1].next;
  end

  // 3. post-processing
  always_comb begin
    carry[0] = cin;
    for (int i = 0; i < W; i++) carry[i+1] = last[i].g;
    for (int i = 0; i < W; i++) s[i] = bit_gp[i].p ^ carry[i];
    cout = carry[W];
  end

endmodule
