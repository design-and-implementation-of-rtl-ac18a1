// tb_rca4: exhaustive self-checking test of the 4-bit ripple carry adder.
// Every a, b and carry in (512 cases) is applied; {cout, sum} must equal
// a + b + cin computed as integers. A watchdog ends a hung run as a failure.
module tb_rca4;
  logic [3:0] a, b, sum;
  logic       cin, cout;
  int         checks = 0, failures = 0;
  logic       clk = 1'b0;

  rca4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      @(posedge clk);
      checks++;
      if (int'({cout, sum}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> cout=%0d sum=%0d", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
