// rev_vedic_mul2x2: 2x2-bit unsigned Vedic multiplier made of reversible
// gates.
//
// Five gates, wired as in the document's diagram:
//   BVF   (b0, 0, b1, 0)       -> b0, I0, b1, I1   copies of b0, b1 (no fan-out)
//   BME 1 (a0, b0, 0, b1)      -> g, a0b0, a0b1, g
//   BME 2 (a1, I0, 0, I1)      -> g, a1b0, a1b1, g
//   Peres (a0b1, a1b0, 0)      -> g, a0b1^a1b0, a0a1b0b1   (half adder)
//   CNOT  (a0a1b0b1, a1b1)     -> a0a1b0b1, a1b1^a0a1b0b1
// q0 = a0b0, q1 = the Peres sum, q2 = the CNOT XOR and q3 = the crosswise
// carry a0a1b0b1, so q = a * b. Purely combinational.
// Port g carries the five garbage outputs (the outputs the diagram marks g).
// The gates and their connections follow the document; which CNOT output is
// q2 and which q3 is read from the arithmetic, since the diagram's output
// labels are cut short.
module rev_vedic_mul2x2 (
  input  logic [1:0] a,   // multiplicand a1 a0
  input  logic [1:0] b,   // multiplier b1 b0
  output logic [3:0] q,   // product q3..q0
  output logic [4:0] g    // garbage: {BME2.s, BME2.p, Peres.p, BME1.s, BME1.p}
);
  logic b0_c, b1_c, i0, i1;      // BVF outputs: copies of b0 and b1
  logic a0b0, a0b1, a1b0, a1b1;  // partial products
  logic cross_c;                 // Peres carry a0 a1 b0 b1

  bvf_gate u_bvf (
    .a(b[0]), .b(1'b0), .c(b[1]), .d(1'b0),
    .p(b0_c), .q(i0), .r(b1_c), .s(i1)
  );

  bme_gate u_bme1 (
    .a(a[0]), .b(b0_c), .c(1'b0), .d(b1_c),
    .p(g[0]), .q(a0b0), .r(a0b1), .s(g[1])
  );

  bme_gate u_bme2 (
    .a(a[1]), .b(i0), .c(1'b0), .d(i1),
    .p(g[3]), .q(a1b0), .r(a1b1), .s(g[4])
  );

  peres_gate u_peres (
    .a(a0b1), .b(a1b0), .c(1'b0),
    .p(g[2]), .q(q[1]), .r(cross_c)
  );

  cnot_gate u_cnot (
    .a(cross_c), .b(a1b1),
    .p(q[3]), .q(q[2])
  );

  assign q[0] = a0b0;
endmodule
