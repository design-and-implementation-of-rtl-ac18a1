// tb_cnot_gate: exhaustive self-checking test of the CNOT gate.
// Each of the 4 inputs is checked against p=a, q=a^b, and the 4 outputs must
// all differ (reversible).
module tb_cnot_gate;
  logic a, b, p, q;
  bit   seen [4];
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  cnot_gate dut (.a(a), .b(b), .p(p), .q(q));

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
      if ({p, q} !== {a, a ^ b}) begin
        failures++;
        $display("FAIL in=%b out=%b", {a, b}, {p, q});
      end
      seen[{p, q}] = 1'b1;
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (!seen[i]) begin
        failures++;
        $display("FAIL output pattern %b never produced: not reversible", 2'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
