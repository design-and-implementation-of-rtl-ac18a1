// cnot_gate: 2-input, 2-output reversible controlled-NOT (Feynman) gate.
//
//   p = a      q = a ^ b
// The control a passes through; the target b is inverted when a is 1.
// Combinational. The document names the gate and says it performs the XOR;
// the equations are its usual definition.
module cnot_gate (
  input  logic a,   // control
  input  logic b,   // target
  output logic p,   // a
  output logic q    // a ^ b
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
