// tb_half_adder: exhaustive self-checking test of half_adder.
// All four input pairs are applied; {carry, sum} must equal a + b, worked out
// with integer addition. A watchdog ends the run as a failure if it hangs.
module tb_half_adder;
  logic a, b, sum, carry;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      @(posedge clk);
      checks++;
      if (int'({carry, sum}) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> carry=%0b sum=%0b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
