// tb_vedic_mul4x4: self-checking test of the 4x4 Vedic multiplier.
// First the six operand pairs of the published 4-bit simulation waveform are
// applied and compared with the printed products; then all 256 operand pairs
// are compared with a * b computed as integers, and the carry out must stay 0.
// A watchdog ends a hung run as a failure.
module tb_vedic_mul4x4;
  logic [3:0] a, b;
  logic [7:0] s;
  logic       co;
  int         checks = 0, failures = 0;
  logic       clk = 1'b0;

  // Operands and products as printed in the waveform (binary).
  localparam logic [3:0] WA [6] = '{4'b0011, 4'b0101, 4'b1010, 4'b1100, 4'b1101, 4'b1111};
  localparam logic [3:0] WB [6] = '{4'b0011, 4'b0111, 4'b1001, 4'b1110, 4'b1101, 4'b1111};
  localparam logic [7:0] WY [6] = '{8'b00001001, 8'b00100011, 8'b01011010,
                                    8'b10101000, 8'b10101001, 8'b11100001};

  vedic_mul4x4 dut (.a(a), .b(b), .s(s), .co(co));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) begin
      a = WA[i];
      b = WB[i];
      @(posedge clk);
      checks++;
      if (s !== WY[i]) begin
        failures++;
        $display("FAIL waveform vector %0d: %b * %b -> %b, expected %b", i, a, b, s, WY[i]);
      end
    end
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      @(posedge clk);
      checks++;
      if (int'(s) != int'(a) * int'(b) || co !== 1'b0) begin
        failures++;
        $display("FAIL %0d * %0d -> s=%0d co=%0b", a, b, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
