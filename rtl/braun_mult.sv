// braun_mult: N x N unsigned Braun array multiplier whose adder rows are
// Kogge-Stone parallel prefix adders instead of chains of full adders.
//
// p = a * b. The braun_pp_array makes the N partial product rows
// pp[j] = a & {N{b[j]}}. They are then summed row by row, as in a Braun
// array, but each row of full adders is replaced by one N-bit Kogge-Stone
// adder (ksa, carry-in tied to 0):
//   acc[0]      = {1'b0, pp[0][N-1:1]},                p[0] = pp[0][0]
//   {c, s}      = acc[j-1] + pp[j]       (row j = 1 .. N-1)
//   acc[j]      = {c, s[N-1:1]},                        p[j] = s[0]
//   p[2N-1:N]   = acc[N-1]
// The low bit of every row sum is final and leaves the array; the rest,
// with the row's carry-out on top, is the running sum shifted one place
// right, aligned with the next partial product row. So the default 4 x 4
// multiplier is 16 AND gates and three 4-bit Kogge-Stone adders.
//
// The 4-bit size and the use of the Kogge-Stone adder in place of the full
// adders follow the design; how the rows are chained (one adder per
// partial-product row, carry-out feeding the next row) is this design's
// choice. Purely combinational: no clock, the product is valid one settling
// delay after the operands, so it has a latency of zero cycles.
module braun_mult #(
  parameter int unsigned N = 4  // operand width in bits, at least 2
) (
  input  logic [N-1:0]   a,  // multiplicand, unsigned
  input  logic [N-1:0]   b,  // multiplier, unsigned
  output logic [2*N-1:0] p   // product a * b
);

  if (N < 2) begin : g_bad_n
    $error("braun_mult needs N >= 2");
  end

  logic [N-1:0] pp  [N];     // partial product rows
  logic [N-1:0] acc [N];     // running sum entering row j+1, shifted right
  logic [N-1:0] sum [N];     // sum of adder row j (index 0 unused)
  logic [N-1:1] cout;        // carry-out of adder row j

  braun_pp_array #(.N(N)) u_pp (
    .a  (a),
    .b  (b),
    .pp (pp)
  );

  assign acc[0]  = {1'b0, pp[0][N-1:1]};
  assign sum[0]  = pp[0];

  for (genvar j = 1; j < N; j++) begin : g_row
    ksa #(.W(N)) u_ksa (
      .a    (acc[j-1]),
      .b    (pp[j]),
      .cin  (1'b0),
      .s    (sum[j]),
      .cout (cout[j])
    );
    assign acc[j] = {cout[j], sum[j][N-1:1]};
  end

  always_comb begin
    for (int j = 0; j < N; j++) p[j] = sum[j][0];
    p[2*N-1:N] = acc[N-1];
  end

endmodule
