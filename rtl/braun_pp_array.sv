// braun_pp_array: partial product generator of an N x N array multiplier.
//
// Row j of the output is the multiplicand gated by multiplier bit j:
//   pp[j][i] = a[i] & b[j]
// giving N*N AND gates. In a transistor implementation each AND gate is a
// NAND gate followed by an inverter; at the logic level that is a plain AND,
// which is what is written here. Row j carries weight 2**j and bit i of a row
// weight 2**i. The AND-gate partial products follow the original design;
// presenting them as an unpacked array of rows is this design's choice.
// Purely combinational.
module braun_pp_array #(
  parameter int unsigned N = 4  // operand width in bits
) (
  input  logic [N-1:0] a,           // multiplicand
  input  logic [N-1:0] b,           // multiplier
  output logic [N-1:0] pp [N]       // pp[j]: a & {N{b[j]}}
);

  always_comb begin
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        pp[j][i] = a[i] & b[j];
      end
    end
  end

endmodule
