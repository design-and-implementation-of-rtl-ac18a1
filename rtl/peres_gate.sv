// peres_gate: 3-input, 3-output reversible Peres gate.
//
//   p = a      q = a ^ b      r = (a & b) ^ c
// With c = 0 it is a half adder: q is the sum and r the carry of a + b.
// Combinational. The document names the gate and calls it a half adder;
// the equations are the usual definition of the Peres gate and agree with
// the outputs the document's diagram prints.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,   // a
  output logic q,   // a ^ b
  output logic r    // (a & b) ^ c
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end
endmodule
