// vedic_mul2x2: 2x2-bit unsigned multiplier by the "vertically and
// crosswise" (Urdhva Tiryakbhyam) rule.
//
// The rule forms the product column by column:
//   vertical   q0         = a0 b0
//   crosswise  q1, carry  = a1 b0 + a0 b1        (half adder)
//   vertical   q3 q2      = a1 b1 + carry        (half adder)
// Four AND gates and two half adders, purely combinational; q = a * b.
// The document uses this block as the leaf of its 4x4 multiplier and states
// the rule, but does not draw its gates: the gate level here is this
// design's own, the simplest circuit that applies the rule.
module vedic_mul2x2 (
  input  logic [1:0] a,   // multiplicand a1 a0
  input  logic [1:0] b,   // multiplier b1 b0
  output logic [3:0] q    // product q3..q0
);
  logic cross_c;   // carry of the crosswise column

  half_adder u_ha_cross (
    .a    (a[1] & b[0]),
    .b    (a[0] & b[1]),
    .sum  (q[1]),
    .carry(cross_c)
  );

  half_adder u_ha_vert (
    .a    (a[1] & b[1]),
    .b    (cross_c),
    .sum  (q[2]),
    .carry(q[3])
  );

  assign q[0] = a[0] & b[0];
endmodule
