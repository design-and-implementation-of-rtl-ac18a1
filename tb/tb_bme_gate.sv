// tb_bme_gate: exhaustive self-checking test of the BME gate.
// Each of the 16 inputs is checked against p=a, q=ab^c, r=ad^c, s=(~a)b^d;
// with c = 0 the partial products q = a b and r = a d are checked on their
// own as well, since they are what the multiplier uses.
module tb_bme_gate;
  logic a, b, c, d, p, q, r, s;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  bme_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

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
      if ({p, q, r, s} !== {a, (a & b) ^ c, (a & d) ^ c, (~a & b) ^ d}) begin
        failures++;
        $display("FAIL in=%b out=%b", {a, b, c, d}, {p, q, r, s});
      end
      if (!c) begin
        checks++;
        if (q !== (a && b) || r !== (a && d)) begin
          failures++;
          $display("FAIL partial products in=%b q=%b r=%b", {a, b, c, d}, q, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
