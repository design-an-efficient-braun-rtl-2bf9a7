// tb_ksa: self-checking test of the Kogge-Stone adder.
// The 4-bit adder (default width) gets every combination of a, b and cin
// (512 cases), including the reference vector a=1101, b=0101, cin=1, whose
// result must be s=0011 with a carry-out. Two more instances, 7 and 16 bits
// wide, check that the prefix tree is correct for widths that are not, and
// are, powers of two, with random operands. The reference is integer
// addition. The adder is combinational: each result is sampled one clock
// after the operands change.
module tb_ksa;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;
  logic        c4, co4;
  logic [6:0]  a7, b7, s7;
  logic        c7, co7;
  logic [15:0] a16, b16, s16;
  logic        c16, co16;

  ksa            dut4  (.a(a4),  .b(b4),  .cin(c4),  .s(s4),  .cout(co4));
  ksa #(.W(7))   dut7  (.a(a7),  .b(b7),  .cin(c7),  .s(s7),  .cout(co7));
  ksa #(.W(16))  dut16 (.a(a16), .b(b16), .cin(c16), .s(s16), .cout(co16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int unsigned got, input int unsigned exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    a7 = '0; b7 = '0; c7 = 1'b0; a16 = '0; b16 = '0; c16 = 1'b0;

    // reference vector: 1101 + 0101 + 1 = 1_0011
    a4 = 4'b1101; b4 = 4'b0101; c4 = 1'b1;
    @(posedge clk);
    check(32'(s4), 32'b0011, "ref s");
    check(32'(co4), 1, "ref cout");

    // exhaustive at 4 bits
    for (int v = 0; v < 512; v++) begin
      {c4, a4, b4} = 9'(v);
      @(posedge clk);
      check(32'({co4, s4}), 32'(a4) + 32'(b4) + 32'(c4), $sformatf("w4 %0d+%0d+%0d", a4, b4, c4));
    end

    // random at 7 and 16 bits, plus all-propagate corner cases
    for (int n = 0; n < 3000; n++) begin
      a7  = 7'($urandom);  b7  = 7'($urandom);  c7  = 1'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 1'($urandom);
      if (n == 0) begin a7 = '1; b7 = '0; c7 = 1'b1; a16 = '1; b16 = '0; c16 = 1'b1; end
      if (n == 1) begin a7 = 7'h55; b7 = 7'h2a; c7 = 1'b1; a16 = 16'h5555; b16 = 16'haaaa; c16 = 1'b1; end
      @(posedge clk);
      check(32'({co7, s7}), 32'(a7) + 32'(b7) + 32'(c7), "w7");
      check(32'({co16, s16}), 32'(a16) + 32'(b16) + 32'(c16), "w16");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
