// tb_ksa_gp_cell: exhaustive self-checking test of the carry GP cell.
// All 16 combinations of the two input generate/propagate pairs are applied
// and compared with a reference written as a case analysis: the merged group
// generates if the upper group generates, or if it propagates and the lower
// group generates; it propagates only if both groups propagate.
module tb_ksa_gp_cell;
  import ksa_pkg::*;

  gp_t hi, lo, out;
  int  checks = 0, failures = 0;
  logic clk = 1'b0;

  ksa_gp_cell dut (.hi(hi), .lo(lo), .out(out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_g, exp_p;
    for (int v = 0; v < 16; v++) begin
      {hi.g, hi.p, lo.g, lo.p} = 4'(v);
      @(posedge clk);
      if (hi.g)      exp_g = 1'b1;
      else if (hi.p) exp_g = lo.g;
      else           exp_g = 1'b0;
      exp_p = (hi.p && lo.p);
      checks++;
      if (out.g !== exp_g || out.p !== exp_p) begin
        failures++;
        $display("FAIL hi=%b%b lo=%b%b out=%b%b exp=%b%b",
                 hi.g, hi.p, lo.g, lo.p, out.g, out.p, exp_g, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
