// vedic_mul4x4: 4x4-bit unsigned Vedic multiplier.
//
// The operands are split into 2-bit halves, A = {AH, AL}, B = {BH, BL}.
// Four 2x2 Vedic multipliers form the partial products
//   m0 = BL*AL   (weight 1)     m1 = BH*AL, m2 = BL*AH (weight 4)
//   m3 = BH*AH   (weight 16)
// and the adder tree of the document sums them:
//   RCA1:  m2 + m1                      -> s1[3:0], carry c1 (weight 64)
//   RCA2:  s1 + {00, m0[3:2]}            -> s2[3:0], carry c2 (weight 64)
//   HA:    c1 + c2                       -> {hc, hs}
//   RCA3:  m3 + {hc, hs, s2[3:2]}        -> S7..S4 and Co
//   S3 S2 = s2[1:0],  S1 S0 = m0[1:0].
// Co is always 0 for 4-bit operands (15*15 = 225 < 256), and so is the half
// adder carry: RCA1 sums at most 9 + 9 = 18, and when it carries its low bits
// are at most 2, so RCA2 cannot carry as well (an assertion states this).
// Both are kept because the document's adder tree has them. Purely combinational: s = a * b
// after the ripple of three 4-bit adders.
// The structure and every connection follow the document's block diagram;
// the port names and the bit order of the half adder outputs on the last
// adder (carry above sum) are worked out from the weights.
module vedic_mul4x4 (
  input  logic [3:0] a,    // A3..A0
  input  logic [3:0] b,    // B3..B0
  output logic [7:0] s,    // product S7..S0
  output logic       co    // carry out of the last adder
);
  logic [3:0] m0, m1, m2, m3;   // 2x2 partial products
  logic [3:0] s1, s2;           // sums of the first and second adders
  logic       c1, c2;           // their carry outs
  logic       hs, hc;           // half adder sum and carry

  vedic_mul2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .q(m3));   // B3B2 x A3A2
  vedic_mul2x2 u_m2 (.a(a[3:2]), .b(b[1:0]), .q(m2));   // B1B0 x A3A2
  vedic_mul2x2 u_m1 (.a(a[1:0]), .b(b[3:2]), .q(m1));   // B3B2 x A1A0
  vedic_mul2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .q(m0));   // B1B0 x A1A0

  rca4 u_rca1 (.a(m2), .b(m1), .cin(1'b0), .sum(s1), .cout(c1));

  rca4 u_rca2 (.a(s1), .b({2'b00, m0[3:2]}), .cin(1'b0), .sum(s2), .cout(c2));

  half_adder u_ha (.a(c1), .b(c2), .sum(hs), .carry(hc));

  rca4 u_rca3 (.a(m3), .b({hc, hs, s2[3:2]}), .cin(1'b0), .sum(s[7:4]), .cout(co));

  // The two weight-64 carries are never set together.
  always_comb begin
    assert (!(c1 && c2)) else $error("vedic_mul4x4: both adder carries set");
  end

  assign s[3:2] = s2[1:0];
  assign s[1:0] = m0[1:0];
endmodule
