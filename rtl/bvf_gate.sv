// bvf_gate: 4-input, 4-output reversible BVF gate.
//
//   p = a      q = a ^ b      r = c      s = c ^ d
// With b = d = 0 it copies a and c, which is how the reversible 2x2
// multiplier gets a second copy of each multiplier bit without fan-out.
// Combinational. The document names the gate and says it removes fan-out;
// the equations are the usual definition of the BVF gate, chosen here to
// agree with the copies the document's diagram shows on its outputs.
module bvf_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,   // a
  output logic q,   // a ^ b
  output logic r,   // c
  output logic s    // c ^ d
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = c;
    s = c ^ d;
  end
endmodule
