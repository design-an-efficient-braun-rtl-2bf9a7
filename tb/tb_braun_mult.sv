// tb_braun_mult: end-to-end test of the multiplier at its default 4 x 4 size.
// It first applies the reference vector a=1101, b=1001 and checks every
// product bit (p = 0111_0101, i.e. 13 * 9 = 117), then all 256 operand pairs
// against integer multiplication. The multiplier is combinational, so the
// product is checked one clock after the operands change (zero-cycle
// latency). Using its own model of the three adder rows, it also counts how
// often each row produces a carry-out (the carry that becomes the top bit of
// the next row's input) and how often a carry has to travel through the
// prefix tree (some bit both receives a carry and propagates it), and fails
// if any of these never happened.
module tb_braun_mult;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [7:0] p;
  int         row_cout [1:3];
  int         long_carry;

  braun_mult dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: shift-and-add over the multiplier bits.
  function automatic logic [7:0] ref_mul(input logic [3:0] x, input logic [3:0] y);
    logic [7:0] acc = '0;
    for (int j = 0; j < 4; j++) if (y[j]) acc += 8'(x) << j;
    return acc;
  endfunction

  initial begin
    logic [7:0] exp;
    foreach (row_cout[j]) row_cout[j] = 0;
    long_carry = 0;

    // reference vector, bit by bit: P0..P7 = 1,0,1,0,1,1,1,0
    a = 4'b1101; b = 4'b1001;
    @(posedge clk);
    begin
      automatic logic [7:0] bits = 8'b0111_0101;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (p[k] !== bits[k]) begin
          failures++;
          $display("FAIL reference vector P%0d = %b, expected %b", k, p[k], bits[k]);
        end
      end
    end

    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      @(posedge clk);
      exp = ref_mul(a, b);
      checks++;
      if (p !== exp) begin
        failures++;
        $display("FAIL %0d * %0d = %0d, expected %0d", a, b, p, exp);
      end
      // mechanism coverage, from a model of the three adder rows
      begin
        automatic logic [3:0] acc = (b[0] ? a : 4'd0) >> 1;
        automatic logic       propagated = 1'b0;
        for (int j = 1; j <= 3; j++) begin
          automatic logic [3:0] row = b[j] ? a : 4'd0;
          automatic logic [4:0] full = 5'(acc) + 5'(row);
          for (int k = 1; k < 4; k++) begin
            // carry into bit k that bit k passes on (a ^ b = 1 there)
            automatic logic [4:0] low = 5'(acc & 4'((1 << k) - 1)) + 5'(row & 4'((1 << k) - 1));
            if (low[k] && (acc[k] ^ row[k])) propagated = 1'b1;
          end
          if (full[4]) row_cout[j]++;
          acc = full[4:1];
        end
        if (propagated) long_carry++;
      end
    end

    for (int j = 1; j <= 3; j++) begin
      $display("adder row %0d carry-out: %0d times", j, row_cout[j]);
      checks++;
      if (row_cout[j] == 0) begin
        failures++;
        $display("FAIL adder row %0d never produced a carry-out", j);
      end
    end
    $display("carry propagated through a row: %0d times", long_carry);
    checks++;
    if (long_carry == 0) begin
      failures++;
      $display("FAIL no carry was ever propagated through an adder row");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
