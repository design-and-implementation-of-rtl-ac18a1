// tb_vedic_mul2x2: exhaustive self-checking test of the 2x2 Vedic multiplier.
// All 16 operand pairs are applied; q must equal a * b computed as integers.
// A watchdog ends a hung run as a failure.
module tb_vedic_mul2x2;
  logic [1:0] a, b;
  logic [3:0] q;
  int         checks = 0, failures = 0;
  logic       clk = 1'b0;

  vedic_mul2x2 dut (.a(a), .b(b), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      @(posedge clk);
      checks++;
      if (int'(q) != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL %0d * %0d -> %0d", a, b, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
