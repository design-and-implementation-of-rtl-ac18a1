// tb_vedic_top: end-to-end test of both multipliers in vedic_top, with the
// top at its default (and only) configuration.
// All 256 operand pairs go to the 4x4 multiplier while the reversible 2x2
// multiplier steps through its 16 pairs at the same time; both products are
// compared with integer multiplication. The run also counts how often each
// carry path of the design is exercised and fails if one never is:
//   - a carry out of the first ripple adder (crosswise products overflow),
//   - a carry out of the second ripple adder,
//   - a half adder sum of 1 (exactly one of those two carries).
// The half adder carry itself cannot be 1: the first adder sums at most
// 9 + 9 = 18, and when it carries its low four bits are at most 2, so the
// second adder cannot carry at the same time. The test checks that it stays 0.
//   - the crosswise carry of the reversible multiplier (Peres gate).
module tb_vedic_top;
  logic [3:0] a4, b4;
  logic [7:0] s8;
  logic       co4;
  logic [1:0] a2, b2;
  logic [3:0] q4;
  logic [4:0] g2;
  int         checks = 0, failures = 0;
  int         n_c1 = 0, n_c2 = 0, n_hs = 0, n_rev_c = 0;
  logic       clk = 1'b0;

  vedic_top dut (
    .a4(a4), .b4(b4), .s8(s8), .co4(co4),
    .a2(a2), .b2(b2), .q4(q4), .g2(g2)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      {a2, b2} = 4'(i);
      @(posedge clk);
      checks++;
      if (int'({co4, s8}) != int'(a4) * int'(b4)) begin
        failures++;
        $display("FAIL 4x4: %0d * %0d -> %0d (co=%0b)", a4, b4, s8, co4);
      end
      checks++;
      if (int'(q4) != int'(a2) * int'(b2)) begin
        failures++;
        $display("FAIL reversible 2x2: %0d * %0d -> %0d", a2, b2, q4);
      end
      if (dut.u_mul4.c1) n_c1++;
      if (dut.u_mul4.c2) n_c2++;
      if (dut.u_mul4.hs) n_hs++;
      checks++;
      if (dut.u_mul4.hc !== 1'b0) begin
        failures++;
        $display("FAIL half adder carry set for %0d * %0d", a4, b4);
      end
      if (dut.u_rev2.cross_c) n_rev_c++;
    end
    $display("first adder carries=%0d second adder carries=%0d half adder sums=%0d reversible crosswise carries=%0d",
             n_c1, n_c2, n_hs, n_rev_c);
    checks++;
    if (n_c1 == 0) begin failures++; $display("FAIL first adder carry never happened"); end
    checks++;
    if (n_c2 == 0) begin failures++; $display("FAIL second adder carry never happened"); end
    checks++;
    if (n_hs == 0) begin failures++; $display("FAIL half adder sum never set"); end
    checks++;
    if (n_rev_c == 0) begin failures++; $display("FAIL reversible crosswise carry never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
