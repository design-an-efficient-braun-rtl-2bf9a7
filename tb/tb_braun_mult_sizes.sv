// tb_braun_mult_sizes: checks the multiplier at widths other than its
// default 4 bits: 2 and 3 bits exhaustively, 8 bits exhaustively (65536
// pairs) and 16 bits with random operands. The reference is integer
// multiplication; the product is sampled one clock after the operands.
module tb_braun_mult_sizes;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;
  logic [1:0]  a2, b2;   logic [3:0]  p2;
  logic [2:0]  a3, b3;   logic [5:0]  p3;
  logic [7:0]  a8, b8;   logic [15:0] p8;
  logic [15:0] a16, b16; logic [31:0] p16;

  braun_mult #(.N(2))  dut2  (.a(a2),  .b(b2),  .p(p2));
  braun_mult #(.N(3))  dut3  (.a(a3),  .b(b3),  .p(p3));
  braun_mult #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  braun_mult #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint unsigned got, input longint unsigned exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      a2 = 2'(v); b2 = 2'(v >> 2);
      a3 = 3'(v); b3 = 3'(v >> 3);
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (v == 0) begin a16 = '1; b16 = '1; end
      @(posedge clk);
      check(64'(p8), 64'(a8) * 64'(b8), $sformatf("n8 %0d*%0d", a8, b8));
      check(64'(p16), 64'(a16) * 64'(b16), $sformatf("n16 %0d*%0d", a16, b16));
      if (v < 16) check(64'(p2), 64'(a2) * 64'(b2), "n2");
      if (v < 64) check(64'(p3), 64'(a3) * 64'(b3), "n3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
