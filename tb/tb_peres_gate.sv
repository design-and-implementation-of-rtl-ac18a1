// tb_peres_gate: exhaustive self-checking test of the Peres gate.
// Each of the 8 inputs is checked against p=a, q=a^b, r=ab^c; the 8 outputs
// must all differ (reversible); with c = 0, {r, q} must equal a + b (the gate
// is then a half adder).
module tb_peres_gate;
  logic a, b, c, p, q, r;
  bit   seen [8];
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      @(posedge clk);
      checks++;
      if ({p, q, r} !== {a, a ^ b, (a & b) ^ c}) begin
        failures++;
        $display("FAIL in=%b out=%b", {a, b, c}, {p, q, r});
      end
      if (!c) begin
        checks++;
        if (int'({r, q}) != int'(a) + int'(b)) begin
          failures++;
          $display("FAIL half adder a=%b b=%b -> %b", a, b, {r, q});
        end
      end
      seen[{p, q, r}] = 1'b1;
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (!seen[i]) begin
        failures++;
        $display("FAIL output pattern %b never produced: not reversible", 3'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
