// vedic_top: the two proposed multipliers side by side.
//
// u_mul4 is the 4x4 Vedic multiplier (four 2x2 Vedic multipliers, three
// 4-bit ripple carry adders and a half adder); u_rev2 is the 2x2 Vedic
// multiplier built from reversible gates. They share nothing: each has its
// own operand and product ports, and both are purely combinational, so a
// product follows its operands after the gate delays with no clock.
// Both multipliers come from the document; putting them in one top with
// separate ports is this design's own choice, since the document builds
// them as two separate designs.
module vedic_top (
  input  logic [3:0] a4,    // 4x4 multiplier: operand A
  input  logic [3:0] b4,    // 4x4 multiplier: operand B
  output logic [7:0] s8,    // 4x4 multiplier: product
  output logic       co4,   // 4x4 multiplier: carry out of the last adder
  input  logic [1:0] a2,    // reversible 2x2 multiplier: operand a
  input  logic [1:0] b2,    // reversible 2x2 multiplier: operand b
  output logic [3:0] q4,    // reversible 2x2 multiplier: product
  output logic [4:0] g2     // reversible 2x2 multiplier: garbage outputs
);
  vedic_mul4x4 u_mul4 (.a(a4), .b(b4), .s(s8), .co(co4));

  rev_vedic_mul2x2 u_rev2 (.a(a2), .b(b2), .q(q4), .g(g2));
endmodule
