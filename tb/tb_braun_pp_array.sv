// tb_braun_pp_array: exhaustive self-checking test of the partial product
// generator at its default 4 x 4 size. For every pair of operands each row j
// must equal the multiplicand when multiplier bit j is 1 and zero otherwise.
module tb_braun_pp_array;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [3:0] pp [4];

  braun_pp_array dut (.a(a), .b(b), .pp(pp));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      @(posedge clk);
      for (int j = 0; j < 4; j++) begin
        logic [3:0] exp;
        exp = b[j] ? a : 4'd0;
        checks++;
        if (pp[j] !== exp) begin
          failures++;
          $display("FAIL a=%b b=%b row %0d: got %b expected %b", a, b, j, pp[j], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
