// tb_bvf_gate: exhaustive self-checking test of the BVF gate.
// Each of the 16 inputs is checked against p=a, q=a^b, r=c, s=c^d, and the
// 16 outputs must all differ (the gate is reversible). With b = d = 0 the
// gate must copy a and c, the use it has in the reversible multiplier.
module tb_bvf_gate;
  logic a, b, c, d, p, q, r, s;
  bit   seen [16];
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  bvf_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

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
      {a, b, c, d} = 4'(i);
      @(posedge clk);
      checks++;
      if ({p, q, r, s} !== {a, a ^ b, c, c ^ d}) begin
        failures++;
        $display("FAIL in=%b out=%b", {a, b, c, d}, {p, q, r, s});
      end
      if (!b && !d) begin
        checks++;
        if (p !== a || q !== a || r !== c || s !== c) begin
          failures++;
          $display("FAIL copy in=%b out=%b", {a, b, c, d}, {p, q, r, s});
        end
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (!seen[i]) begin
        failures++;
        $display("FAIL output pattern %b never produced: not reversible", 4'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
