// tb_rev_vedic_mul2x2: self-checking test of the reversible 2x2 multiplier.
// First the five operand pairs of the published 2-bit simulation waveform
// are applied and compared with the printed products; then all 16 operand
// pairs are compared with a * b computed as integers. The garbage outputs
// are checked too: the two BME gates pass a0 and a1 through, and the Peres
// gate passes a0 b1 through.
module tb_rev_vedic_mul2x2;
  logic [1:0] a, b;
  logic [3:0] q;
  logic [4:0] g;
  int         checks = 0, failures = 0;
  logic       clk = 1'b0;

  localparam logic [1:0] WA [5] = '{2'b01, 2'b10, 2'b10, 2'b11, 2'b11};
  localparam logic [1:0] WB [5] = '{2'b01, 2'b10, 2'b11, 2'b10, 2'b11};
  localparam logic [3:0] WQ [5] = '{4'b0001, 4'b0100, 4'b0110, 4'b0110, 4'b1001};

  rev_vedic_mul2x2 dut (.a(a), .b(b), .q(q), .g(g));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) begin
      a = WA[i];
      b = WB[i];
      @(posedge clk);
      checks++;
      if (q !== WQ[i]) begin
        failures++;
        $display("FAIL waveform vector %0d: %b * %b -> %b, expected %b", i, a, b, q, WQ[i]);
      end
    end
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      @(posedge clk);
      checks++;
      if (int'(q) != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL %0d * %0d -> %0d", a, b, q);
      end
      checks++;
      if (g[0] !== a[0] || g[3] !== a[1] || g[2] !== (a[0] & b[1])) begin
        failures++;
        $display("FAIL garbage a=%b b=%b g=%b", a, b, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
